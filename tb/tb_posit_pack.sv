// tb_posit_pack: self-checking testbench of posit construction, rounding
// and exception handling.
//
// Drives the packer with a random sign, a product scale covering the whole
// range (including beyond maxpos and below minpos) and a random 25-bit
// product fraction; the regime run, exponent bits and scale sign are worked
// out here from the scale. The result, the rounding flag and the saturation
// flag are compared with the bit-serial reference encoder. Half of the
// fractions are forced to exact ties at some bit position so that
// round-to-even is exercised. NaR and zero inputs are also checked.
module tb_posit_pack;
  import posit_ref_pkg::*;
  localparam int N  = 16;
  localparam int ES = 1;
  localparam int RS = 4;
  localparam int MW = N - ES - 2;
  localparam int PFW = 2 * MW - 1;

  logic            s, neg, inf, zero, round_up, saturated;
  logic [ES-1:0]   e_o;
  logic [RS:0]     r_o;
  logic [PFW-1:0]  mfrac;
  logic [N-1:0]    out;
  logic            clk = 1'b0;
  int              checks = 0, failures = 0;
  int              n_rnd = 0, n_sat = 0, n_tie = 0;

  posit_pack #(.N(N), .ES(ES)) dut (
    .s(s), .neg(neg), .e_o(e_o), .r_o(r_o), .mfrac(mfrac), .inf(inf),
    .zero(zero), .out(out), .round_up(round_up), .saturated(saturated)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(input bit sg, input int sc, input logic [PFW-1:0] fr);
    int kk;
    enc_t t;
    kk = (sc >= 0) ? sc / 2 : -((-sc + 1) / 2);
    s = sg; neg = (sc < 0); e_o = ES'(sc - 2 * kk);
    r_o = (RS+1)'((kk >= 0) ? kk + 1 : -kk);
    mfrac = fr; inf = 0; zero = 0;
    #1;
    t = encode(sg, sc, (longint'(1) << PFW) | longint'(fr), PFW, N, ES);
    checks += 3;
    if (longint'(out) != t.bits || round_up != t.rnd || saturated != t.sat) begin
      failures++;
      if (failures < 10)
        $display("pack s=%0d sc=%0d fr=%h: out=%h rnd=%0d sat=%0d want %h %0d %0d",
                 sg, sc, fr, out, round_up, saturated, t.bits, t.rnd, t.sat);
    end
    n_rnd += int'(round_up);
    n_sat += int'(saturated);
  endtask

  initial begin
    logic [PFW-1:0] fr;
    int sc, pos;
    for (int i = 0; i < 60000; i++) begin
      sc = int'($urandom_range(0, 123)) - 62;
      fr = PFW'({$urandom, $urandom});
      if (i % 2 == 1) begin
        // exact tie at a random position: a single 1 followed by zeros
        pos = int'($urandom_range(0, PFW - 1));
        fr = (fr >> (pos + 1)) << (pos + 1);
        fr[pos] = 1'b1;
        n_tie++;
      end
      run_one(i[2], sc, fr);
    end
    // exceptions
    s = 1; neg = 0; e_o = '0; r_o = '0; mfrac = '1;
    inf = 1; zero = 1; #1;
    checks++; if (out != {1'b1, {(N-1){1'b0}}}) failures++;
    inf = 0; zero = 1; #1;
    checks++; if (out != '0) failures++;
    checks++; if (n_rnd == 0 || n_sat == 0 || n_tie == 0) failures++;
    $display("pack: rounded=%0d saturated=%0d ties=%0d", n_rnd, n_sat, n_tie);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

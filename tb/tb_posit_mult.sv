// tb_posit_mult: end-to-end, full-size testbench of the posit multiplier
// at its default parameters (posit<16,1>).
//
// Multiplies special operands (zero, NaR, +-1, maxpos, minpos and their
// neighbours) against each other, then a large set of random operand
// pairs, some uniform over all bit patterns and some drawn near 1.0 so that
// the product stays in the high-precision range. Every product and the
// status flags (mantissa overflow, rounding, saturation, NaR, zero) are
// compared with the bit-serial reference model. Each mechanism of the
// datapath must occur at least once: mantissa overflow and its absence,
// round-up, exact ties, saturation to maxpos and to minpos, NaR and zero
// results, negative results and results whose exponent bits were cut by a
// long regime.
module tb_posit_mult;
  import posit_ref_pkg::*;
  localparam int N  = 16;
  localparam int ES = 1;
  localparam int NVEC = 400000;

  logic [N-1:0] in1, in2, out;
  logic         nar, zero, mant_ovf, round_up, saturated;
  logic         clk = 1'b0;
  int           checks = 0, failures = 0;

  // mechanism counters
  int n_ovf = 0, n_noovf = 0, n_rnd = 0, n_satmax = 0, n_satmin = 0;
  int n_nar = 0, n_zero = 0, n_neg = 0, n_ecut = 0;

  posit_mult dut (
    .in1(in1), .in2(in2), .out(out), .nar(nar), .zero(zero),
    .mant_ovf(mant_ovf), .round_up(round_up), .saturated(saturated)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(input logic [N-1:0] a, input logic [N-1:0] b);
    enc_t   t;
    dec_t   d;
    longint nr = longint'(1) << (N - 1);
    in1 = a; in2 = b;
    @(posedge clk);
    #1;
    t = mul(longint'(a), longint'(b), N, ES);
    checks++;
    if (longint'(out) != t.bits) begin
      failures++;
      if (failures < 20) $display("mult %h * %h = %h, want %h", a, b, out, t.bits);
    end
    checks++;
    if (nar != (t.bits == nr) || zero != (t.bits == 0) ||
        (!nar && !zero && (mant_ovf != t.ovf || round_up != t.rnd || saturated != t.sat))) begin
      failures++;
      if (failures < 20) $display("flags %h * %h: nar=%0d zero=%0d ovf=%0d rnd=%0d sat=%0d",
                                  a, b, nar, zero, mant_ovf, round_up, saturated);
    end
    if (!nar && !zero) begin
      if (mant_ovf) n_ovf++; else n_noovf++;
      if (round_up) n_rnd++;
      if (saturated && !out[N-1] && out == {1'b0, {(N-1){1'b1}}}) n_satmax++;
      if (saturated && !out[N-1] && out == N'(1)) n_satmin++;
      if (saturated && out[N-1]) begin
        if (out == {1'b1, {(N-2){1'b0}}, 1'b1}) n_satmax++; else n_satmin++;
      end
      if (out[N-1]) n_neg++;
      d = decode(longint'(out), N, ES);
      if (!saturated && (-(d.k) >= N - 2 - ES || d.k >= N - 3 - ES)) n_ecut++;
    end
    if (nar) n_nar++;
    if (zero) n_zero++;
  endtask

  function automatic logic [N-1:0] near_one();
    // regime 10 or 01 with random exponent and fraction, random sign
    logic [N-1:0] v = N'($urandom);
    v[N-2:N-3] = $urandom_range(0, 1) ? 2'b10 : 2'b01;
    if ($urandom_range(0, 1)) v = ~v + 1'b1;
    if (v == {1'b1, {(N-1){1'b0}}}) v = '0;
    return v;
  endfunction

  initial begin
    logic [N-1:0] sp[12] = '{16'h0000, 16'h8000, 16'h4000, 16'hc000,
                             16'h7fff, 16'h0001, 16'h8001, 16'hffff,
                             16'h7ffe, 16'h0002, 16'h4001, 16'h3fff};
    foreach (sp[i]) foreach (sp[j]) run_one(sp[i], sp[j]);
    for (int i = 0; i < NVEC; i++) begin
      if (i % 2 == 0) run_one(N'($urandom), N'($urandom));
      else            run_one(near_one(), near_one());
    end
    $display("mechanisms: mant_ovf=%0d no_ovf=%0d round_up=%0d sat_max=%0d sat_min=%0d nar=%0d zero=%0d negative=%0d exp_cut=%0d",
             n_ovf, n_noovf, n_rnd, n_satmax, n_satmin, n_nar, n_zero, n_neg, n_ecut);
    checks += 9;
    if (n_ovf == 0)    failures++;
    if (n_noovf == 0)  failures++;
    if (n_rnd == 0)    failures++;
    if (n_satmax == 0) failures++;
    if (n_satmin == 0) failures++;
    if (n_nar == 0)    failures++;
    if (n_zero == 0)   failures++;
    if (n_neg == 0)    failures++;
    if (n_ecut == 0)   failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

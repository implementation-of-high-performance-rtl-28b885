// tb_posit_exp_proc: self-checking testbench of the exponent and regime
// processing block.
//
// Sweeps every legal posit<16,1> regime (k from -14 to 14), both exponent
// values and the overflow bit for both operands, and checks the summed
// scale, the result exponent (scale mod 2) and the absolute regime run
// (k+1 for k >= 0, -k otherwise, with k = floor(scale/2)).
module tb_posit_exp_proc;
  localparam int N  = 16;
  localparam int ES = 1;
  localparam int RS = 4;
  localparam int XW = ES + RS + 2;

  logic          rc1, rc2, movf;
  logic [RS-1:0] r1, r2;
  logic [ES-1:0] e1, e2, e_o;
  logic [XW-1:0] exp_o;
  logic [RS:0]   r_o;
  logic          clk = 1'b0;
  int            checks = 0, failures = 0;

  posit_exp_proc #(.N(N), .ES(ES)) dut (
    .rc1(rc1), .r1(r1), .e1(e1), .rc2(rc2), .r2(r2), .e2(e2),
    .movf(movf), .exp_o(exp_o), .e_o(e_o), .r_o(r_o)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sc, kk, ee, run;
    for (int k1 = -(N-2); k1 <= N-2; k1++)
      for (int k2 = -(N-2); k2 <= N-2; k2++)
        for (int x1 = 0; x1 < 2; x1++)
          for (int x2 = 0; x2 < 2; x2++)
            for (int mo = 0; mo < 2; mo++) begin
              rc1 = (k1 >= 0); r1 = RS'(k1 >= 0 ? k1 : -k1); e1 = ES'(x1);
              rc2 = (k2 >= 0); r2 = RS'(k2 >= 0 ? k2 : -k2); e2 = ES'(x2);
              movf = mo[0];
              #1;
              sc  = k1 * 2 + x1 + k2 * 2 + x2 + mo;
              kk  = (sc >= 0) ? sc / 2 : -((-sc + 1) / 2);
              ee  = sc - 2 * kk;
              run = (kk >= 0) ? kk + 1 : -kk;
              checks += 3;
              if (int'($signed(exp_o)) != sc || int'(e_o) != ee || int'(r_o) != run) begin
                failures++;
                if (failures < 10)
                  $display("exp k1=%0d e1=%0d k2=%0d e2=%0d movf=%0d: exp_o=%0d e_o=%0d r_o=%0d want %0d %0d %0d",
                           k1, x1, k2, x2, mo, $signed(exp_o), e_o, r_o, sc, ee, run);
              end
            end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

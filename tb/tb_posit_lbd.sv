// tb_posit_lbd: self-checking testbench of the leading-bit detector.
//
// Applies every 15-bit pattern with both lead values and compares the
// count with a run length measured by a separate while loop. A watchdog
// ends the run with a failure if it does not finish in time.
module tb_posit_lbd;
  localparam int W  = 15;
  localparam int CW = $clog2(W + 1);

  logic [W-1:0]  x;
  logic          lead;
  logic [CW-1:0] cnt;
  logic          clk = 1'b0;
  int            checks = 0, failures = 0;

  posit_lbd #(.W(W)) dut (.x(x), .lead(lead), .cnt(cnt));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_cnt, i;
    for (int l = 0; l < 2; l++) begin
      for (int v = 0; v < (1 << W); v++) begin
        x = W'(v); lead = l[0];
        #1;
        exp_cnt = 0; i = W - 1;
        while (i >= 0 && x[i] == lead) begin exp_cnt++; i--; end
        checks++;
        if (int'(cnt) != exp_cnt) begin
          failures++;
          if (failures < 10) $display("lbd x=%h lead=%0d cnt=%0d exp=%0d", x, lead, cnt, exp_cnt);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

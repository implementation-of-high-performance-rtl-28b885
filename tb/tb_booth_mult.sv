// tb_booth_mult: self-checking testbench of the radix-4 Booth multiplier.
//
// Checks the 13x13-bit default against the integer product for corner
// operands (0, 1, all ones, alternating patterns, hidden-bit ranges) and
// for random pairs, and runs an 8-bit instance (even width) exhaustively.
module tb_booth_mult;
  localparam int W  = 13;
  localparam int W2 = 8;

  logic [W-1:0]    a, b;
  logic [2*W-1:0]  p;
  logic [W2-1:0]   a2, b2;
  logic [2*W2-1:0] p2;
  logic            clk = 1'b0;
  int              checks = 0, failures = 0;

  booth_mult #(.W(W))  dut  (.a(a),  .b(b),  .p(p));
  booth_mult #(.W(W2)) dut2 (.a(a2), .b(b2), .p(p2));

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] x, input logic [W-1:0] y);
    longint unsigned expv;
    a = x; b = y;
    #1;
    expv = longint'(x) * longint'(y);
    checks++;
    if (longint'(p) != expv) begin
      failures++;
      if (failures < 10) $display("booth %0d*%0d=%0d exp %0d", x, y, p, expv);
    end
  endtask

  initial begin
    logic [W-1:0] corner[8] = '{'0, W'(1), '1, W'('h1555), W'('h0aaa),
                                W'(1) << (W-1), '1 >> 1, W'('h1001)};
    foreach (corner[i]) foreach (corner[j]) check(corner[i], corner[j]);
    for (int i = 0; i < 50000; i++) check(W'($urandom), W'($urandom));
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        a2 = W2'(x); b2 = W2'(y);
        #1;
        checks++;
        if (int'(p2) != x * y) begin
          failures++;
          if (failures < 10) $display("booth8 %0d*%0d=%0d", x, y, p2);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

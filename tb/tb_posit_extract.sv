// tb_posit_extract: self-checking testbench of the posit extraction block.
//
// Applies all 65536 posit<16,1> patterns and compares sign, complemented
// operand, regime check bit, absolute regime, exponent, significand (left
// aligned, hidden 1 included) and the zero/NaR flags with the bit-serial
// reference decoder.
module tb_posit_extract;
  import posit_ref_pkg::*;
  localparam int N  = 16;
  localparam int ES = 1;
  localparam int RS = 4;
  localparam int MW = N - ES - 2;

  logic [N-1:0]  in, xin;
  logic          s, rc, inf, zero;
  logic [RS-1:0] r;
  logic [ES-1:0] e;
  logic [MW-1:0] m;
  logic          clk = 1'b0;
  int            checks = 0, failures = 0;

  posit_extract #(.N(N), .ES(ES)) dut (
    .in(in), .xin(xin), .s(s), .rc(rc), .r(r), .e(e), .m(m),
    .inf(inf), .zero(zero)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input longint got, input longint want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("extract in=%h %s got %0d want %0d", in, what, got, want);
    end
  endtask

  initial begin
    dec_t d;
    longint m_exp;
    for (int v = 0; v < (1 << N); v++) begin
      in = N'(v);
      #1;
      d = decode(longint'(v), N, ES);
      expect_eq("zero", longint'(zero), longint'(d.is_zero));
      expect_eq("inf",  longint'(inf),  longint'(d.is_nar));
      expect_eq("s",    longint'(s),    longint'(in[N-1]));
      expect_eq("xin",  longint'(xin),  in[N-1] ? ((-longint'(v)) & 'hffff) : longint'(v));
      if (!d.is_zero && !d.is_nar) begin
        expect_eq("rc", longint'(rc), longint'(d.k >= 0));
        expect_eq("r",  longint'(r),  longint'(d.k >= 0 ? d.k : -d.k));
        expect_eq("e",  longint'(e),  longint'(d.e));
        m_exp = d.sig << (MW - 1 - d.fb);
        expect_eq("m",  longint'(m),  m_exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_posit_mult_sizes: checks the posit multiplier at other word sizes.
//
// posit<8,1> and posit<8,2> are multiplied exhaustively (all 65536 operand
// pairs each) and posit<32,2> on random operand pairs, every product being
// compared with the bit-serial reference model. This shows that the
// parameterisation (regime width, significand width, rounding position)
// holds beyond the default posit<16,1>.
module tb_posit_mult_sizes;
  import posit_ref_pkg::*;

  logic [7:0]  a8, b8, o81, o82;
  logic [31:0] a32, b32, o32;
  logic        clk = 1'b0;
  int          checks = 0, failures = 0;
  logic        f0, f1, f2, f3, f4, g0, g1, g2, g3, g4, h0, h1, h2, h3, h4;

  posit_mult #(.N(8), .ES(1)) dut81 (
    .in1(a8), .in2(b8), .out(o81), .nar(f0), .zero(f1), .mant_ovf(f2),
    .round_up(f3), .saturated(f4)
  );
  posit_mult #(.N(8), .ES(2)) dut82 (
    .in1(a8), .in2(b8), .out(o82), .nar(g0), .zero(g1), .mant_ovf(g2),
    .round_up(g3), .saturated(g4)
  );
  posit_mult #(.N(32), .ES(2)) dut32 (
    .in1(a32), .in2(b32), .out(o32), .nar(h0), .zero(h1), .mant_ovf(h2),
    .round_up(h3), .saturated(h4)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    enc_t t;
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        a8 = 8'(x); b8 = 8'(y);
        #1;
        t = mul(longint'(x), longint'(y), 8, 1);
        checks++;
        if (longint'(o81) != t.bits) begin
          failures++;
          if (failures < 10) $display("p8e1 %h*%h=%h want %h", a8, b8, o81, t.bits);
        end
        t = mul(longint'(x), longint'(y), 8, 2);
        checks++;
        if (longint'(o82) != t.bits) begin
          failures++;
          if (failures < 10) $display("p8e2 %h*%h=%h want %h", a8, b8, o82, t.bits);
        end
      end
    for (int i = 0; i < 100000; i++) begin
      a32 = $urandom; b32 = $urandom;
      if (i % 2 == 1) begin
        // keep the regimes short so that long fractions are multiplied
        a32[30:29] = 2'b10; b32[30:29] = 2'b01;
      end
      #1;
      t = mul(longint'(a32), longint'(b32), 32, 2);
      checks++;
      if (longint'(o32) != t.bits) begin
        failures++;
        if (failures < 10) $display("p32e2 %h*%h=%h want %h", a32, b32, o32, t.bits);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

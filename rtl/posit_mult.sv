// posit_mult: N-bit posit multiplier (default posit<16,1>).
//
// Multiplies two posits and returns their product rounded to nearest even,
// in a single combinational pass through four stages:
//   extraction  - two posit_extract units split each operand into sign,
//                 regime (check bit and absolute value), exponent and
//                 significand, and flag zero and NaR operands;
//   core        - the sign is the XOR of the input signs; the significands
//                 (MW = N-ES-2 bits each, hidden 1 included) are multiplied
//                 by a radix-4 Booth multiplier; the product's MSB is the
//                 mantissa overflow movf (product >= 2), and the product is
//                 shifted left by one when movf is clear so that its leading
//                 1 is always at the top; posit_exp_proc adds the operand
//                 scales and movf and derives the result regime run r_o and
//                 exponent e_o;
//   packing     - posit_pack forms the regime/exponent/fraction string,
//                 rounds it, saturates at maxpos/minpos, applies the sign
//                 and handles the exceptions.
//
// Ports: in1, in2 (posits) -> out (posit product); nar and zero tell that
// the result is NaR (an operand is NaR) or zero (an operand is zero and
// none is NaR); mant_ovf, round_up and saturated report, for a finite
// non-zero product, that the significand product reached 2, that rounding
// added one ULP, and that the result was clamped to maxpos or minpos.
// Timing: combinational, no clock; a caller registers inputs and outputs as
// its clock rate requires.
// The stage structure, field names and algorithm follow the posit
// multiplier description; N = 16 matches its 16-bit results, while ES = 1
// is this design's choice. The complemented operands xin1/xin2 that the
// extraction units provide are not needed further, and the normalised
// product's MSB is the hidden 1, so lint reports those bits as unused.
module posit_mult #(
  parameter int N  = 16,
  parameter int ES = 1
) (
  input  logic [N-1:0] in1,
  input  logic [N-1:0] in2,
  output logic [N-1:0] out,
  output logic         nar,
  output logic         zero,
  output logic         mant_ovf,
  output logic         round_up,
  output logic         saturated
);

  localparam int RS = posit_pkg::rs_bits(N);
  localparam int MW = posit_pkg::mant_bits(N, ES);
  localparam int XW = posit_pkg::scale_bits(N, ES);

  // Extracted operand fields.
  logic [N-1:0]  xin1, xin2;
  logic          s1, s2, rc1, rc2, inf1, inf2, z1, z2;
  logic [RS-1:0] r1, r2;
  logic [ES-1:0] e1, e2;
  logic [MW-1:0] m1, m2;

  // Core results.
  logic            s;
  logic [2*MW-1:0] prod, prod_n;
  logic            movf;
  logic [XW-1:0]   exp_o;
  logic [ES-1:0]   e_o;
  logic [RS:0]     r_o;
  logic            rnd, sat;

  posit_extract #(.N(N), .ES(ES)) u_ext1 (
    .in(in1), .xin(xin1), .s(s1), .rc(rc1), .r(r1), .e(e1), .m(m1),
    .inf(inf1), .zero(z1)
  );

  posit_extract #(.N(N), .ES(ES)) u_ext2 (
    .in(in2), .xin(xin2), .s(s2), .rc(rc2), .r(r2), .e(e2), .m(m2),
    .inf(inf2), .zero(z2)
  );

  // Exceptions: NaR dominates zero.
  assign nar  = inf1 | inf2;
  assign zero = !nar && (z1 | z2);

  // Sign processing.
  assign s = s1 ^ s2;

  // Significand product and its normalisation.
  booth_mult #(.W(MW)) u_mul (
    .a(m1), .b(m2), .p(prod)
  );

  assign movf   = prod[2*MW-1];
  assign prod_n = movf ? prod : (prod << 1);

  posit_exp_proc #(.N(N), .ES(ES)) u_exp (
    .rc1(rc1), .r1(r1), .e1(e1),
    .rc2(rc2), .r2(r2), .e2(e2),
    .movf(movf), .exp_o(exp_o), .e_o(e_o), .r_o(r_o)
  );

  posit_pack #(.N(N), .ES(ES)) u_pack (
    .s(s), .neg(exp_o[XW-1]), .e_o(e_o), .r_o(r_o),
    .mfrac(prod_n[2*MW-2:0]), .inf(nar), .zero(z1 | z2),
    .out(out), .round_up(rnd), .saturated(sat)
  );

  assign mant_ovf  = movf & !nar & !zero;
  assign round_up  = rnd & !nar & !zero;
  assign saturated = sat & !nar & !zero;

  // The exception outputs are exclusive.
  always_comb assert (!(nar && zero));

endmodule

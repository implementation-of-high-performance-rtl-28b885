// posit_exp_proc: exponent and regime processing of the posit multiplier.
//
// Each operand's scale is the signed value {k, e} = k*2^ES + e, where the
// signed regime k is recovered from the regime check bit and the absolute
// regime value (k = rc ? r : -r). The product scale is
//   exp_o = {k1, e1} + {k2, e2} + movf
// with movf the significand-product overflow. From it the block derives the
// fields the packer needs:
//   e_o - the ES exponent bits of the result (exp_o modulo 2^ES);
//   r_o - the absolute regime run length of the result: k+1 ones when the
//         scale is non-negative, -k zeros when it is negative, where
//         k = floor(exp_o / 2^ES). For a negative scale this is the
//         magnitude's regime part, plus one when its exponent part is
//         non-zero.
//
// Purely combinational. The widths (exp_o on ES+RS+2 bits, r_o on RS+1
// bits) and the formulas follow the multiplier algorithm description.
module posit_exp_proc #(
  parameter int N  = 16,
  parameter int ES = 1,
  parameter int RS = posit_pkg::rs_bits(N),
  parameter int XW = posit_pkg::scale_bits(N, ES)
) (
  input  logic          rc1,
  input  logic [RS-1:0] r1,
  input  logic [ES-1:0] e1,
  input  logic          rc2,
  input  logic [RS-1:0] r2,
  input  logic [ES-1:0] e2,
  input  logic          movf,
  output logic [XW-1:0] exp_o,
  output logic [ES-1:0] e_o,
  output logic [RS:0]   r_o
);

  logic signed [RS:0]   rg1, rg2;
  logic signed [XW-1:0] sc1, sc2;
  logic [XW-2:0]        exp_on;
  logic                 neg;
  logic                 efrac;

  // Effective (signed) regime values.
  assign rg1 = rc1 ? $signed({1'b0, r1}) : -$signed({1'b0, r1});
  assign rg2 = rc2 ? $signed({1'b0, r2}) : -$signed({1'b0, r2});

  // {regime, exponent} read as one signed number, sign-extended by one bit.
  assign sc1 = XW'($signed({rg1, e1}));
  assign sc2 = XW'($signed({rg2, e2}));

  assign exp_o  = XW'(sc1 + sc2 + $signed({{(XW-1){1'b0}}, movf}));
  assign neg    = exp_o[XW-1];
  assign exp_on = neg ? (XW-1)'(-exp_o) : exp_o[XW-2:0];
  assign efrac  = |exp_on[ES-1:0];

  assign e_o = (neg && efrac) ? exp_o[ES-1:0] : exp_on[ES-1:0];
  assign r_o = (!neg || efrac) ? exp_on[XW-2:ES] + 1'b1 : exp_on[XW-2:ES];

endmodule

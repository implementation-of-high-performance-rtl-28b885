// posit_pack: posit construction, rounding and exception handling.
//
// Builds the N-bit result from the product fields:
//   1. Regime/exponent/mantissa packing. A bit string
//        REM = { N copies of !neg, neg, e_o, fraction, G, R, sticky }
//      is formed, neg being the sign of the product scale. Shifting REM
//      right by the absolute regime r_o (zero fill) leaves, just below its
//      top N bits, the result regime (r_o copies of !neg and the
//      terminating bit neg), the exponent and the fraction. Bits shifted out
//      at the bottom are ORed into the sticky bit.
//   2. Round to nearest even on the N-1 bits below the sign: with L the
//      last kept bit, G the next one and S the OR of all later ones, one
//      ULP is added when G & (L | S).
//   3. Saturation. A product whose regime run would reach N-1 bits lies
//      beyond maxpos or below minpos; posits neither overflow to NaR nor
//      underflow to zero, so the result is maxpos (neg = 0) or minpos
//      (neg = 1).
//   4. A negative product is two's-complemented; NaR inputs give NaR and
//      zero inputs give zero, NaR taking priority.
//
// Ports: s, neg, e_o, r_o, mfrac (normalised significand product without
// its hidden 1, 2*MW-1 bits), inf, zero -> out, plus status flags
// round_up (an ULP was added) and saturated (maxpos/minpos returned).
// Purely combinational.
// Steps 1, 2 and 4 follow the multiplier algorithm description. Rounding is
// applied at every regime length, and the saturation of step 3 follows the
// usual posit rules; both are this design's choices where the description
// is silent or narrower.
module posit_pack #(
  parameter int N  = 16,
  parameter int ES = 1,
  parameter int RS = posit_pkg::rs_bits(N),
  parameter int MW = posit_pkg::mant_bits(N, ES)
) (
  input  logic            s,
  input  logic            neg,
  input  logic [ES-1:0]   e_o,
  input  logic [RS:0]     r_o,
  input  logic [2*MW-2:0] mfrac,
  input  logic            inf,
  input  logic            zero,
  output logic [N-1:0]    out,
  output logic            round_up,
  output logic            saturated
);

  localparam int FW  = MW - 1;                // fraction bits kept
  localparam int PFW = 2 * MW - 1;            // product fraction bits
  localparam int TW  = PFW - FW - 2;          // bits folded into sticky
  localparam int RW  = N + 1 + ES + FW + 3;   // width of REM
  localparam int KW  = N - 1;                 // kept bits below the sign

  logic [RW-1:0] rem, shifted, lost_mask;
  logic          sticky_in, lost;
  logic [KW-1:0] kept, rounded, mag;
  logic          g, l, st;
  logic [N-1:0]  res;

  assign sticky_in = (TW > 0) ? |mfrac[(TW > 0 ? TW-1 : 0):0] : 1'b0;
  assign rem = {{N{!neg}}, neg, e_o, mfrac[PFW-1 -: FW + 2], sticky_in};

  assign shifted   = rem >> r_o;
  assign lost_mask = ~({RW{1'b1}} << r_o);
  assign lost      = |(rem & lost_mask);

  assign kept = shifted[RW-N-1 -: KW];
  assign g    = shifted[RW-N-KW-1];
  assign st   = |shifted[RW-N-KW-2:0] | lost;
  assign l    = kept[0];

  assign saturated = (r_o >= (RS+1)'(N - 1));
  assign round_up  = !saturated && g && (l || st);
  assign rounded   = kept + KW'(round_up);

  always_comb begin
    if (saturated) mag = neg ? KW'(1) : {KW{1'b1}};
    else           mag = rounded;
  end

  assign res = s ? (~{1'b0, mag} + 1'b1) : {1'b0, mag};

  always_comb begin
    if (inf)       out = {1'b1, {(N-1){1'b0}}};
    else if (zero) out = '0;
    else           out = res;
  end

  // A packed regime always holds its terminating bit, so rounding up can
  // never carry past the kept bits.
  always_comb assert (saturated || inf || zero || !(&kept && round_up));

endmodule

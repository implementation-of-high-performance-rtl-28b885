// posit_extract: input extraction block of the posit multiplier.
//
// Splits an N-bit posit (ES exponent bits) into the fields the multiplier
// core works on:
//   xin  - the operand, two's-complemented when its sign bit is set, so that
//          the remaining fields are read from a positive bit pattern;
//   s    - sign bit;
//   rc   - regime check bit, the first regime bit (1: run of ones, k >= 0);
//   r    - absolute regime value: run length minus one for a run of ones,
//          run length for a run of zeros, so the signed regime is
//          k = rc ? r : -r;
//   e    - ES exponent bits following the regime terminator (zeros where the
//          regime leaves no room for them);
//   m    - significand with its hidden 1, MW = N-ES-2 bits, fraction bits
//          that do not fit padded with zeros;
//   inf  - operand is NaR (1 followed by zeros);
//   zero - operand is zero.
// The regime run is measured by posit_lbd; the regime and its terminator are
// then removed by a left shift of count+1, after which the exponent and
// fraction sit at the top of the word.
//
// Purely combinational. The order of operations (complement, regime count,
// shift) follows the multiplier description. The zero and NaR flags are
// active-high flags of the operand itself. The two lowest bits of the
// shifted word can only ever hold regime bits, so lint reports them unused.
module posit_extract #(
  parameter int N  = 16,
  parameter int ES = 1,
  parameter int RS = posit_pkg::rs_bits(N),
  parameter int MW = posit_pkg::mant_bits(N, ES)
) (
  input  logic [N-1:0]  in,
  output logic [N-1:0]  xin,
  output logic          s,
  output logic          rc,
  output logic [RS-1:0] r,
  output logic [ES-1:0] e,
  output logic [MW-1:0] m,
  output logic          inf,
  output logic          zero
);

  localparam int BW = N - 1;            // bits after the sign
  localparam int CW = $clog2(BW + 1);   // width of the run-length count
  localparam int FW = MW - 1;           // fraction bits without hidden 1

  logic [BW-1:0] body;
  logic [CW-1:0] cnt;
  logic [BW-1:0] rest;

  assign s    = in[N-1];
  assign zero = (in == '0);
  assign inf  = in[N-1] & ~|in[N-2:0];
  assign xin  = s ? (~in + 1'b1) : in;
  assign body = xin[BW-1:0];
  assign rc   = body[BW-1];

  posit_lbd #(.W(BW)) u_lbd (
    .x   (body),
    .lead(rc),
    .cnt (cnt)
  );

  // Run of ones: k = count-1; run of zeros: k = -count (sign applied later).
  assign r = rc ? RS'(cnt - 1'b1) : RS'(cnt);

  // Remove the regime run and its terminating bit.
  assign rest = body << ((CW+1)'(cnt) + 1'b1);
  assign e    = rest[BW-1 -: ES];
  assign m    = {1'b1, rest[BW-1-ES -: FW]};

endmodule

// booth_mult: unsigned W x W multiplier built on radix-4 modified Booth
// recoding, used for the posit significand product.
//
// The multiplier operand b is zero-extended to an even width with at least
// one leading zero (so that it stays non-negative) and recoded three bits
// at a time, overlapping by one, into ceil((W+1)/2) digits in {-2,-1,0,1,2}.
// Each digit selects 0, a or 2a, complemented when negative, giving a signed
// partial product that is weighted by 4^i. The partial products are summed
// by a final adder (a plain chain of word adders here; a synthesis tool is
// free to map it to a compressor tree).
//
// Ports: a[W-1:0], b[W-1:0] -> p[2W-1:0] = a*b. Purely combinational.
// Radix-4 modified Booth recoding is the multiplier type of the design; the
// adder arrangement for the partial products is this design's own choice.
module booth_mult #(
  parameter int W = 13
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);

  // Digits needed so that the top digit sees a zero above b's MSB.
  localparam int ND = (W + 2) / 2;
  localparam int BW = 2 * ND + 1;   // extended b plus the implicit b[-1]
  localparam int PW = 2 * W + 2;    // accumulator, wide enough for any sum

  logic [BW-1:0]          bx;
  logic signed [PW-1:0]   acc;
  logic signed [PW-1:0]   pp;
  logic [2:0]             trip;

  assign bx = {{(BW - W - 1){1'b0}}, b, 1'b0};

  always_comb begin
    acc = '0;
    for (int i = 0; i < ND; i++) begin
      trip = bx[2*i +: 3];
      unique case (trip)
        3'b001, 3'b010: pp = PW'($signed({1'b0, a}));
        3'b011:         pp = PW'($signed({1'b0, a, 1'b0}));
        3'b100:         pp = -PW'($signed({1'b0, a, 1'b0}));
        3'b101, 3'b110: pp = -PW'($signed({1'b0, a}));
        default:        pp = '0;
      endcase
      acc = acc + (pp <<< (2 * i));
    end
    p = acc[2*W-1:0];
  end

endmodule

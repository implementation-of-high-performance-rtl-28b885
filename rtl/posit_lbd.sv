// posit_lbd: leading-bit detector used to measure a posit regime.
//
// Counts how many bits, starting at the MSB of `x`, are equal to `lead`
// before the first bit that differs. With lead=1 it behaves as a leading-one
// detector (LOD), with lead=0 as a leading-zero detector (LZD); the two share
// one priority encoder by inverting the input when counting ones. If every
// bit equals `lead` the count is W.
//
// Ports: x[W-1:0], lead -> cnt (0..W). Purely combinational.
// The pairing of an LZD and an LOD to count the regime run follows the
// multiplier description; building both from a single inverted priority
// encoder is this design's choice.
module posit_lbd #(
  parameter int W  = 15,
  parameter int CW = $clog2(W + 1)
) (
  input  logic [W-1:0]  x,
  input  logic          lead,
  output logic [CW-1:0] cnt
);

  logic [W-1:0] y;
  logic         found;

  // Bits equal to `lead` become 0, so the run length is a leading-zero count.
  assign y = lead ? ~x : x;

  always_comb begin
    cnt   = CW'(W);
    found = 1'b0;
    for (int i = W - 1; i >= 0; i--) begin
      if (!found && y[i]) begin
        cnt   = CW'(W - 1 - i);
        found = 1'b1;
      end
    end
  end

endmodule

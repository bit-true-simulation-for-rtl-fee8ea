// fxp_limiter: run-time fractional word length limiter (bit-masking).
//
// Each lane is a signed fixed-point word of W bits whose FWL least
// significant bits are the fraction.  The limiter ANDs every lane with a
// mask whose LSB is aligned with the LSB of the word: the lowest `nbits`
// bits are zero, all others one.  Only fractional bits can be cleared: a
// count above FWL clears the whole fraction and leaves the integer part
// intact.  This lets one synthesized circuit emulate any fractional word
// length up to FWL, so a word length search needs no re-synthesis.
//
// The AND operation and the LSB alignment follow the document; encoding the
// mask as a bit count (one byte per operand, as it is sent over the serial
// link) is this design's choice.  Purely combinational, zero latency.  LANES
// lets a complex value (LANES=2) share one mask.
module fxp_limiter #(
  parameter int W     = 24,  // word width
  parameter int FWL   = 16,  // fractional bits that may be cleared
  parameter int LANES = 1
) (
  input  logic [LANES-1:0][W-1:0] din,
  input  fxp_pkg::mask_t          nbits,  // number of LSBs to clear
  output logic [LANES-1:0][W-1:0] dout
);
  logic [W-1:0] mask;

  always_comb begin
    for (int b = 0; b < W; b++)
      mask[b] = !((b < FWL) && (b < int'(nbits)));
    for (int l = 0; l < LANES; l++)
      dout[l] = din[l] & mask;
  end
endmodule

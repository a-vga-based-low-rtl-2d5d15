// trace_pixel: decides whether the current pixel lies on the trace (the
// block the original design's display diagram calls "displayer").
//
// The 8-bit sample is first widened to the 10-bit width of the row counter
// by adding a 0 above its MSB and a 1 below its LSB (the "word_extender"
// step of the original design), giving word = 2*data + 1. word is flipped
// so that large samples sit near the top of the screen: target = 511 - word,
// taken over the nine significant bits, i.e. 510 - 2*data. target is
// clamped to SAT_ROW, so samples too small for the screen pile up on the
// bottom row and show that the input is saturating. blue is high when the
// current row equals target, and forced low while busy (the sampler owns
// the memory address bus, so the data is not this column's). Bit 9 of word
// is always 0 and is not used. Combinational.
//
// The extension, the flip, the clamp and the busy rule follow the original
// design. Its clamp value is 480; this design uses 479, the last visible
// row, because row 480 is never displayed and the clamp would then show
// nothing.
module trace_pixel #(
  parameter int unsigned SAT_ROW = 479
) (
  input  logic [7:0] data,
  input  logic [9:0] row,
  input  logic       busy,
  output logic       blue
);
  logic [9:0] word, flipped, target;

  always_comb begin
    word    = {1'b0, data, 1'b1};
    flipped = {1'b0, ~word[8:0]};
    target  = (flipped > 10'(SAT_ROW)) ? 10'(SAT_ROW) : flipped;
    blue    = !busy && (row == target);
  end
endmodule

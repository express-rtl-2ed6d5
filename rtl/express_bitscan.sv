// express_bitscan: column-index finder for the Bitmap format (priority
// encoder with range masking).
//
// Given one 32-bit word of the bitmap, it returns the lowest set bit whose
// position p satisfies lo <= p < hi. Bit 0 is the first matrix position held
// by the word (the bitmap is consumed least-significant bit first). `lo`
// skips bits already consumed; `hi` (0..W) cuts off bits that belong to the
// next row. The masking plays the part of the shifter and the search the
// part of the priority encoder of the back-end's column-index stage.
// Interface: purely combinational, no clock.
module express_bitscan #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0]          word,
  input  logic [$clog2(W)-1:0]  lo,
  input  logic [$clog2(W):0]    hi,
  output logic                  found,
  output logic [$clog2(W)-1:0]  pos
);

  logic [W-1:0] masked;

  always_comb begin
    for (int i = 0; i < W; i++)
      masked[i] = word[i] && (i >= int'(lo)) && (i < int'(hi));
  end

  always_comb begin
    found = 1'b0;
    pos   = '0;
    for (int i = W - 1; i >= 0; i--) begin
      if (masked[i]) begin
        found = 1'b1;
        pos   = i[$clog2(W)-1:0];
      end
    end
  end

endmodule

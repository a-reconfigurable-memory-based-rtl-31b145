// pixel_column: one column of pixel registers M[1..T][r] of the window.
//
// When shift (the selection unit's q, qualified by the run state) is high,
// every register takes the pixel of the same row in the column to its left
// (or, for column 1, the word read from the image memory); otherwise it keeps
// its value. This is the 2:1 mux plus register drawn above each processing
// block. The columns therefore move the image through the blocks from left to
// right, one column per shift. The pixels carry no reset: their status bits in
// the processing block say whether they mean anything.
module pixel_column #(
  parameter int unsigned W = hist_pkg::PIX_W,
  parameter int unsigned T = hist_pkg::ROWS
) (
  input  logic                clk,
  input  logic                shift,          // q: take the left neighbour
  input  logic [T-1:0][W-1:0] pix_in,         // M[.][r-1]
  output logic [T-1:0][W-1:0] pix_out         // M[.][r]
);
  always_ff @(posedge clk)
    if (shift) pix_out <= pix_in;
endmodule

// image_memory: the frame store that feeds the first processing block.
//
// The image is kept as WORDS words of T pixels: pixel n of the image (raster
// order) is row n % T of word n / T, so one read fills a whole column of the
// window. The host loads it word by word through the write port. The read
// port is synchronous: rdata/rvalid show word raddr one clock after raddr is
// presented. rvalid[i] marks rows that hold image pixels; the rows past the
// last pixel of a partly filled last word, and every row of an address at or
// beyond WORDS, are invalid and enter the window as already counted.
module image_memory #(
  parameter int unsigned W      = hist_pkg::PIX_W,
  parameter int unsigned T      = hist_pkg::ROWS,
  parameter int unsigned PIXELS = hist_pkg::IMG_PIXELS,
  localparam int unsigned WORDS = (PIXELS + T - 1) / T,
  localparam int unsigned AW    = hist_pkg::bits_for(WORDS)
) (
  input  logic                clk,
  input  logic                we,
  input  logic [AW-1:0]       waddr,
  input  logic [T-1:0][W-1:0] wdata,
  input  logic [AW-1:0]       raddr,
  output logic [T-1:0][W-1:0] rdata,
  output logic [T-1:0]        rvalid
);
  logic [T*W-1:0] mem [WORDS];

  always_ff @(posedge clk)
    if (we && waddr < AW'(WORDS)) mem[waddr] <= wdata;

  always_ff @(posedge clk) begin
    rdata <= (raddr < AW'(WORDS)) ? mem[raddr] : '0;
    for (int i = 0; i < T; i++)
      rvalid[i] <= (32'(raddr) * T + i) < PIXELS;
  end
endmodule

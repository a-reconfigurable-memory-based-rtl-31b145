// histogram_top: memory-based parallel histogram generator.
//
// A window of T x N pixel registers (N pixel columns, one per processing
// block) slides over the image, one T-pixel word of the frame store per shift.
// Every pixel in the window carries a status bit D (1 = not yet counted). In
// each clock the selection unit picks one pending value P from the last block;
// all T*N comparators test their pixel against P at once, the matching pending
// pixels are marked counted, their number C is summed over the blocks, and the
// storing unit adds C into bin P of the histogram RAM. When the last block has
// no pending pixel left (q = 1), the window shifts one column to the right and
// the next word of the image enters block 1. Each clock thus retires every
// copy of one gray level in the window, so the number of clocks per image is
// between (number of words) and (number of pixels) plus the pipeline fill.
//
// Interface:
//  * Load the image with img_we/img_waddr/img_wdata, T pixels per word,
//    pixel n of the image at word n / T, row n % T.
//  * Pulse start (one clock, while done or idle). busy is high until done.
//    The histogram RAM is cleared (2^W clocks) and the image counted.
//  * When done is high, read bin b with hist_rd_en and hist_rd_addr = b; the
//    count appears on hist_rd_data one clock later.
// All logic is on clk; rst_n is an asynchronous active-low reset.
module histogram_top #(
  parameter int unsigned W      = hist_pkg::PIX_W,
  parameter int unsigned T      = hist_pkg::ROWS,
  parameter int unsigned N      = hist_pkg::BLOCKS,
  parameter int unsigned PIXELS = hist_pkg::IMG_PIXELS,
  localparam int unsigned WORDS = (PIXELS + T - 1) / T,
  localparam int unsigned AW    = hist_pkg::bits_for(WORDS),
  localparam int unsigned CW    = hist_pkg::bits_for(T),
  localparam int unsigned SUMW  = hist_pkg::bits_for(T * N),
  localparam int unsigned CNTW  = hist_pkg::bits_for(PIXELS),
  localparam int unsigned SW    = (T > 1) ? $clog2(T) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // frame store load port
  input  logic                img_we,
  input  logic [AW-1:0]       img_waddr,
  input  logic [T-1:0][W-1:0] img_wdata,
  // control
  input  logic                start,
  output logic                busy,
  output logic                done,
  // histogram read port
  input  logic                hist_rd_en,
  input  logic [W-1:0]        hist_rd_addr,
  output logic [CNTW-1:0]     hist_rd_data
);
  hist_pkg::state_t state;

  logic                       init, clear, run, shift, q, t, mem_enable;
  logic                       clear_busy;
  logic [AW-1:0]              mem_ads, mem_raddr;
  logic [N-1:0]               c_control;
  logic [T-1:0][W-1:0]        mem_word;
  logic [T-1:0]               mem_valid;
  logic [N-1:0][T-1:0][W-1:0] pix;       // M[.][r]
  logic [N-1:0][T-1:0]        k, d;      // K[.][r], D[.][r]
  logic [N-1:0][CW-1:0]       c_r;
  logic [W-1:0]               p, p_d;
  logic [SW-1:0]              s;
  logic [SUMW-1:0]            c;
  logic                       upd_d;

  image_memory #(.W(W), .T(T), .PIXELS(PIXELS)) u_img (
    .clk, .we(img_we), .waddr(img_waddr), .wdata(img_wdata),
    .raddr(mem_raddr), .rdata(mem_word), .rvalid(mem_valid)
  );

  for (genvar r = 0; r < N; r++) begin : g_blk
    logic [T-1:0][W-1:0] col_in;
    logic [T-1:0]        k_in;
    if (r == 0) begin : g_first
      assign col_in = mem_word;
      assign k_in   = mem_valid;
    end else begin : g_next
      assign col_in = pix[r-1];
      assign k_in   = k[r-1];
    end

    pixel_column #(.W(W), .T(T)) u_col (
      .clk, .shift(shift), .pix_in(col_in), .pix_out(pix[r])
    );

    processing_block #(.W(W), .T(T)) u_pb (
      .clk, .rst_n, .init, .en(run), .q,
      .pix(pix[r]), .p, .k_prev(k_in), .k(k[r]), .d(d[r]), .c_r(c_r[r])
    );
  end

  logic [T-1:0] k_before_last;
  if (N > 1) begin : g_kbl
    assign k_before_last = k[N-2];
  end else begin : g_kbl1
    assign k_before_last = mem_valid;
  end

  selection_unit #(.W(W), .T(T)) u_sel (
    .clk, .rst_n, .init, .en(run),
    .k_last(k[N-1]), .k_prev(k_before_last), .pix_last(pix[N-1]),
    .q, .s, .p
  );

  count_sum #(.W(W), .T(T), .N(N)) u_sum (
    .clk, .rst_n, .c_r, .c_control, .t, .p, .upd(run),
    .c, .p_d, .upd_d
  );

  storing_unit #(.W(W), .CNTW(CNTW), .SUMW(SUMW)) u_store (
    .clk, .rst_n, .clear, .clear_busy,
    .upd(upd_d), .p(p_d), .c, .mem_enable,
    .rd_en(hist_rd_en), .rd_addr(hist_rd_addr), .data_out(hist_rd_data)
  );

  hist_controller #(.W(W), .T(T), .N(N), .PIXELS(PIXELS)) u_ctrl (
    .clk, .rst_n, .start, .q, .clear_busy, .p_d, .upd_d,
    .state, .init, .clear, .run, .shift, .mem_ads, .mem_raddr, .t,
    .c_control, .mem_enable, .done
  );

  assign busy = (state != hist_pkg::ST_IDLE);
endmodule

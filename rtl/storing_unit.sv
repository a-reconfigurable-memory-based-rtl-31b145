// storing_unit: adds each count C into its histogram bin in a dual-port RAM.
//
// One update, histogram[P] += C, may arrive every clock. The update is a
// two-stage read-modify-write:
//   cycle k   : port B reads bin P (ADDRB = P, ENB = mem_enable); P, C and
//               mem_enable are registered (ADDRA, the C register and x).
//   cycle k+1 : data_in = (x ? DOUTB : R3) + C is written to ADDRA through
//               port A and also loaded into R3.
// mem_enable is low when an update hits the same bin as the update just
// before it. The RAM read of cycle k+1 would then miss the write made on the
// same edge, so the mux takes R3, the value just written, instead of DOUTB.
// The caller computes mem_enable (see hist_controller).
//
// Besides updates, the unit clears every bin (clear pulse, then BINS cycles
// with busy high, writing zero through port A) and lets the host read a bin
// through port B (rd_en/rd_addr, data on data_out one clock later) while no
// update is in progress.
module storing_unit #(
  parameter int unsigned W    = hist_pkg::PIX_W,
  parameter int unsigned CNTW = hist_pkg::bits_for(hist_pkg::IMG_PIXELS),
  parameter int unsigned SUMW = hist_pkg::bits_for(hist_pkg::ROWS * hist_pkg::BLOCKS),
  localparam int unsigned BINS = 2 ** W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,       // start zeroing all bins
  output logic            clear_busy,
  input  logic            upd,         // histogram[p] += c this cycle
  input  logic [W-1:0]    p,
  input  logic [SUMW-1:0] c,
  input  logic            mem_enable,  // 1: read bin p from RAM, 0: use R3
  input  logic            rd_en,       // host read (ignored while upd)
  input  logic [W-1:0]    rd_addr,
  output logic [CNTW-1:0] data_out     // DOUTB
);
  logic [W-1:0]    addra_q;
  logic [SUMW-1:0] c_q;
  logic            x_q;       // registered mem_enable
  logic            wv_q;      // registered upd
  logic [CNTW-1:0] r3_q;
  logic [CNTW-1:0] data_in;
  logic [W-1:0]    clr_addr;

  // RAM ports
  logic            ena, enb;
  logic [W-1:0]    ram_addra, ram_addrb;
  logic [CNTW-1:0] ram_dina;

  always_comb begin
    data_in   = (x_q ? data_out : r3_q) + CNTW'(c_q);
    ena       = clear_busy | wv_q;
    ram_addra = clear_busy ? clr_addr : addra_q;
    ram_dina  = clear_busy ? '0 : data_in;
    enb       = upd ? mem_enable : rd_en;
    ram_addrb = upd ? p : rd_addr;
  end

  dual_port_ram #(.DEPTH(BINS), .DW(CNTW)) u_ram (
    .clka (clk), .ena (ena), .addra (ram_addra), .dina (ram_dina),
    .clkb (clk), .enb (enb), .addrb (ram_addrb), .doutb (data_out)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      addra_q    <= '0;
      c_q        <= '0;
      x_q        <= 1'b0;
      wv_q       <= 1'b0;
      r3_q       <= '0;
      clear_busy <= 1'b0;
      clr_addr   <= '0;
    end else begin
      addra_q <= p;
      c_q     <= c;
      x_q     <= mem_enable;
      wv_q    <= upd;
      if (wv_q) r3_q <= data_in;
      if (clear) begin
        clear_busy <= 1'b1;
        clr_addr   <= '0;
      end else if (clear_busy) begin
        clr_addr <= clr_addr + 1'b1;
        if (clr_addr == W'(BINS - 1)) clear_busy <= 1'b0;
      end
    end

  // Updates must not overlap the clearing sweep.
  a_no_update_while_clearing: assert property (@(posedge clk) disable iff (!rst_n)
    clear_busy |-> !wv_q);
endmodule

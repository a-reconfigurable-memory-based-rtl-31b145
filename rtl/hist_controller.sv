// hist_controller: sequencing and window bookkeeping of the histogram generator.
//
// States: IDLE -> (start) CLEAR -> RUN -> DRAIN -> IDLE.
//  * start clears the window (init), resets mem_ads to 0, sets t and starts
//    the storing unit's sweep that zeroes every bin (CLEAR).
//  * RUN: every clock is one counting cycle. When the selection unit raises q
//    the window shifts: mem_ads (the image-memory word that enters block 1)
//    advances while it is below WORDS, and the c_control flags move one block
//    to the right; c_control[0] takes 1 while real image words enter. The
//    signal t, set at start, falls when the first image column reaches the
//    last block and stays low for the rest of the image.
//  * The run ends on the shift that moves the last image column out of the
//    last block (all words read, no other block holds image data).
//  * DRAIN waits the two clocks the last update needs to reach the RAM, then
//    done is raised and held until the next start.
// mem_raddr is the address mem_ads will have after the current clock, so that
// the synchronous image memory always presents word mem_ads.
// mem_enable tells the storing unit whether the update now arriving may read
// its bin from the RAM (1) or must take the bypass register R3 (0, same bin
// as the update one clock before).
module hist_controller #(
  parameter int unsigned W      = hist_pkg::PIX_W,
  parameter int unsigned T      = hist_pkg::ROWS,
  parameter int unsigned N      = hist_pkg::BLOCKS,
  parameter int unsigned PIXELS = hist_pkg::IMG_PIXELS,
  localparam int unsigned WORDS = (PIXELS + T - 1) / T,
  localparam int unsigned AW    = hist_pkg::bits_for(WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          q,            // from the selection unit
  input  logic          clear_busy,   // from the storing unit
  input  logic [W-1:0]  p_d,          // update arriving at the storing unit
  input  logic          upd_d,
  output hist_pkg::state_t state,
  output logic          init,         // clear window registers
  output logic          clear,        // start zeroing the bins
  output logic          run,          // counting cycle
  output logic          shift,        // window shifts this clock
  output logic [AW-1:0] mem_ads,
  output logic [AW-1:0] mem_raddr,
  output logic          t,
  output logic [N-1:0]  c_control,
  output logic          mem_enable,
  output logic          done
);
  import hist_pkg::*;

  logic          last;      // this shift empties the window of image data
  logic [1:0]    drain_cnt;
  logic [W-1:0]  p_prev;
  logic          upd_prev;
  logic [N-1:0]  not_last_mask;

  always_comb begin
    init          = (state == ST_IDLE) && start;
    clear         = init;
    run           = (state == ST_RUN);
    shift         = run && q;
    not_last_mask = ~(N'(1) << (N - 1));
    last          = shift && (mem_ads == AW'(WORDS)) && ((c_control & not_last_mask) == '0);
    if (init)
      mem_raddr = '0;
    else if (shift && mem_ads < AW'(WORDS))
      mem_raddr = mem_ads + 1'b1;
    else
      mem_raddr = mem_ads;
    mem_enable = !(upd_prev && (p_prev == p_d));
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state     <= ST_IDLE;
      mem_ads   <= '0;
      t         <= 1'b0;
      c_control <= '0;
      drain_cnt <= '0;
      done      <= 1'b0;
      p_prev    <= '0;
      upd_prev  <= 1'b0;
    end else begin
      p_prev   <= p_d;
      upd_prev <= upd_d;
      mem_ads  <= mem_raddr;
      unique case (state)
        ST_IDLE: if (start) begin
          state     <= ST_CLEAR;
          t         <= 1'b1;
          c_control <= '0;
          done      <= 1'b0;
        end
        ST_CLEAR: if (!clear_busy) state <= ST_RUN;
        ST_RUN: begin
          if (shift) c_control <= (c_control << 1) | N'(mem_ads < AW'(WORDS));
          if (c_control[N-1]) t <= 1'b0;
          if (last) begin
            state     <= ST_DRAIN;
            drain_cnt <= 2'd2;
          end
        end
        ST_DRAIN: begin
          drain_cnt <= drain_cnt - 1'b1;
          if (drain_cnt == 2'd1) begin
            state <= ST_IDLE;
            done  <= 1'b1;
          end
        end
      endcase
    end
endmodule

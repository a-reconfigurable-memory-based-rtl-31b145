// selection_unit: decides whether the window shifts and which value is
// counted next.
//
//  * q is the NOR of K[.][N], the status of the last (N-th) block after this
//    cycle's match: q = 1 when every pixel of block N has been counted, so the
//    window may shift one column to the right.
//  * Two priority encoders find S0 = min{i | K[i][N] = 1} and
//    S1 = min{i | K[i][N-1] = 1}. If the window stays (q = 0) the next value
//    is the first pending pixel of block N (S0); if it shifts (q = 1) block N
//    will next hold what block N-1 holds now, so S1 is taken. The choice is
//    stored in the S register.
//  * A T:1 mux reads P = M[S][N] from the pixels now in block N.
// P is combinational from the S register and the block-N pixels; S updates at
// the clock while en is high and is cleared by init.
module selection_unit #(
  parameter int unsigned W = hist_pkg::PIX_W,
  parameter int unsigned T = hist_pkg::ROWS,
  localparam int unsigned SW = (T > 1) ? $clog2(T) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                init,
  input  logic                en,
  input  logic [T-1:0]        k_last,    // K[.][N]
  input  logic [T-1:0]        k_prev,    // K[.][N-1]
  input  logic [T-1:0][W-1:0] pix_last,  // M[.][N]
  output logic                q,
  output logic [SW-1:0]       s,         // S register
  output logic [W-1:0]        p          // P = M[S][N]
);
  logic [SW-1:0] s0, s1;
  logic          v0, v1;

  priority_encoder #(.T(T)) u_pe_last (.req(k_last), .idx(s0), .valid(v0));
  priority_encoder #(.T(T)) u_pe_prev (.req(k_prev), .idx(s1), .valid(v1));

  assign q = ~|k_last;
  assign p = pix_last[s];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     s <= '0;
    else if (init)  s <= '0;
    else if (en)    s <= q ? s1 : s0;

  // When the window holds, block N still has a pending pixel to select.
  a_pending_when_held: assert property (@(posedge clk) disable iff (!rst_n)
    (en && !q) |-> v0);
  // v1 is informative only: an empty block N-1 still yields a usable S.
  wire unused_v1 = v1;
endmodule

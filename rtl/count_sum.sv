// count_sum: gathers the partial counts of the N processing blocks into C.
//
// Each block's C_r passes a 2:1 mux whose select is (c_control[r] OR t); when
// the select is low the mux gives 0. The mux outputs are registered and then
// added: C = sum_r C_r. c_control[r] marks a block that holds image data and t
// is high while the window is first filling, so only blocks that may hold
// pending pixels contribute.
// Because of the register, C belongs to the value P of the previous cycle; the
// unit therefore also registers P and the "update valid" flag, so its three
// outputs describe one histogram update: histogram[p_d] += c when upd_d.
module count_sum #(
  parameter int unsigned W = hist_pkg::PIX_W,
  parameter int unsigned T = hist_pkg::ROWS,
  parameter int unsigned N = hist_pkg::BLOCKS,
  localparam int unsigned CW = hist_pkg::bits_for(T),
  localparam int unsigned SUMW = hist_pkg::bits_for(T * N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0][CW-1:0] c_r,        // partial counts, block 1 at index 0
  input  logic [N-1:0]         c_control,  // block holds image data
  input  logic                 t,          // window is filling
  input  logic [W-1:0]         p,          // value counted this cycle
  input  logic                 upd,        // this cycle is a counting cycle
  output logic [SUMW-1:0]      c,          // C for p_d
  output logic [W-1:0]         p_d,
  output logic                 upd_d
);
  logic [N-1:0][CW-1:0] c_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      c_q   <= '0;
      p_d   <= '0;
      upd_d <= 1'b0;
    end else begin
      for (int r = 0; r < N; r++)
        c_q[r] <= (c_control[r] | t) ? c_r[r] : '0;
      p_d   <= p;
      upd_d <= upd;
    end

  always_comb begin
    c = '0;
    for (int r = 0; r < N; r++) c += SUMW'(c_q[r]);
  end
endmodule

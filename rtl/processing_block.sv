// processing_block: the r-th column of comparators and status bits.
//
// For every row i the block compares its pixel M[i][r] with P. The comparator
// output (1 = no match) is ANDed with the pixel's status bit D[i][r]
// (1 = not yet counted), giving K[i][r]: the pixel still has to be counted
// after this cycle. The partial count
//     C_r = sum_i ~K[i][r] - sum_i ~D[i][r]
// is the number of pixels of this column that are counted in this cycle,
// i.e. those that were pending and equal P. It is formed here as that
// difference, as the design draws it.
//
// Each D register sits behind a 2:1 mux: when q is low it stores K[i][r] (the
// matched pixels are now marked as counted); when q is high the whole window
// shifts and it stores K[i][r-1] from the block to its left (for block 1: the
// valid bits of the word entering from the image memory). Registers change only
// while en is high; init clears every status bit (an empty window).
// Timing: K and C_r are combinational from M, D and P; D updates at the clock.
module processing_block #(
  parameter int unsigned W = hist_pkg::PIX_W,
  parameter int unsigned T = hist_pkg::ROWS,
  localparam int unsigned CW = hist_pkg::bits_for(T)
) (
  input  logic                clk,
  input  logic                rst_n,     // asynchronous, active low
  input  logic                init,      // synchronous clear of D
  input  logic                en,        // run: registers may change
  input  logic                q,         // shift the window
  input  logic [T-1:0][W-1:0] pix,       // M[.][r]
  input  logic [W-1:0]        p,         // value counted this cycle
  input  logic [T-1:0]        k_prev,    // K[.][r-1]
  output logic [T-1:0]        k,         // K[.][r]
  output logic [T-1:0]        d,         // D[.][r]
  output logic [CW-1:0]       c_r        // pixels of this column counted now
);
  logic [T-1:0] comp_out;

  for (genvar i = 0; i < T; i++) begin : g_row
    comparator #(.W(W)) u_cmp (.data_in(pix[i]), .p(p), .comp_out(comp_out[i]));
    assign k[i] = comp_out[i] & d[i];
  end

  // C_r = (number of K bits at 0) - (number of D bits at 0)
  always_comb begin
    logic [CW-1:0] nk, nd;
    nk = '0;
    nd = '0;
    for (int i = 0; i < T; i++) begin
      nk += CW'(~k[i]);
      nd += CW'(~d[i]);
    end
    c_r = nk - nd;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     d <= '0;
    else if (init)  d <= '0;
    else if (en)    d <= q ? k_prev : k;
endmodule

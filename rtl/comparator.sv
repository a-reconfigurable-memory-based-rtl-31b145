// comparator: equality test of one stored pixel against the selected value P.
//
// Each processing block holds one comparator per row. The output follows the
// convention of the design: comp_out is 0 when the pixel equals P (a match)
// and 1 otherwise, so that ANDing it with the pixel's status bit leaves a 1
// only for pixels that are still waiting to be counted. Purely combinational.
module comparator #(
  parameter int unsigned W = hist_pkg::PIX_W
) (
  input  logic [W-1:0] data_in,   // stored pixel M[i][r]
  input  logic [W-1:0] p,         // value being counted this cycle
  output logic         comp_out   // 0 = match, 1 = no match
);
  always_comb comp_out = (data_in != p);
endmodule

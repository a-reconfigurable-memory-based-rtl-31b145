// priority_encoder: index of the lowest set bit of a T-bit vector.
//
// Used twice by the selection unit to find the first pixel of a column that is
// still waiting to be counted (S = min{i | K[i] = 1}). Rows are numbered from 0.
// When no bit is set the output is 0 and valid is low. Combinational.
module priority_encoder #(
  parameter int unsigned T = hist_pkg::ROWS,
  localparam int unsigned SW = (T > 1) ? $clog2(T) : 1
) (
  input  logic [T-1:0]  req,
  output logic [SW-1:0] idx,
  output logic          valid
);
  always_comb begin
    idx   = '0;
    valid = 1'b0;
    for (int i = T - 1; i >= 0; i--)
      if (req[i]) begin
        idx   = SW'(i);
        valid = 1'b1;
      end
  end
endmodule

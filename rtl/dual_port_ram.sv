// dual_port_ram: simple dual-port RAM that holds the histogram bins.
//
// Port A writes DINA to ADDRA on the rising edge of CLKA when ENA is high.
// Port B reads ADDRB on the rising edge of CLKB when ENB is high; DOUTB shows
// the word one clock later and holds while ENB is low. A read and a write of
// the same address on the same edge return the old word (read-first); the
// storing unit bypasses that case itself. The contents are not reset: the
// generator clears the bins through port A before it counts.
module dual_port_ram #(
  parameter int unsigned DEPTH = 2 ** hist_pkg::PIX_W,
  parameter int unsigned DW    = hist_pkg::bits_for(hist_pkg::IMG_PIXELS),
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clka,
  input  logic          ena,
  input  logic [AW-1:0] addra,
  input  logic [DW-1:0] dina,
  input  logic          clkb,
  input  logic          enb,
  input  logic [AW-1:0] addrb,
  output logic [DW-1:0] doutb
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clka)
    if (ena) mem[addra] <= dina;

  always_ff @(posedge clkb)
    if (enb) doutb <= mem[addrb];
endmodule

// axi_addr_decoder: derives the slave index from a transaction address
// (AWADDR[31:0] or ARADDR[31:0]).
//
// The address space is cut into regions by bits [31:28]; region s belongs to
// slave s for s < NUM_SLAVES, so with three slaves 0x0xxxxxxx, 0x1xxxxxxx and
// 0x2xxxxxxx are mapped and everything else is not (hit = 0). Purely
// combinational. The document says the decoder derives the slave from the
// address; the region layout is this design's choice. The interconnect uses one
// instance for the write address and one for the read address, and the bus
// monitor uses the same map to pick its counter bank.
module axi_addr_decoder
  import axi_pkg::*;
#(
  parameter int unsigned NUM_SLAVES = 3
) (
  input  logic [ADDR_W-1:0]   addr,
  output logic [REGION_W-1:0] idx,
  output logic                hit
);

  assign idx = addr[REGION_LSB +: REGION_W];
  assign hit = (32'(idx) < NUM_SLAVES);

endmodule

// amu: address modifier unit, one per output branch of an input port module.
//
// Before a header leaves the CMR buffer toward an output port module, its
// destination bit string is ANDed with the partition bit string of that output
// direction, so that each destination stays only in the copy whose XY path
// reaches it. A destination therefore receives exactly one copy, whatever
// tree the packet takes. Body and tail flits pass unchanged.
// Purely combinational. The masking rule is the document's; the partition
// strings are supplied by the instantiating module (see noc_pkg::xy_partition).
module amu
  import noc_pkg::*;
(
  input  flit_t              flit_in,
  input  logic [ADDR_W-1:0]  partition,
  output flit_t              flit_out
);

  always_comb begin
    flit_out = flit_in;
    if (flit_in.kind == FLIT_HEAD) flit_out.data = flit_in.data & partition;
  end

endmodule

// router: five-port multicast router (north, east, south, west, local).
//
// Each input port has an ipm and each output port an opm. The crossbar wires
// branch k of the ipm at port p to the opm at port q = (p + 1 + k) mod 5, on
// that opm's input j = 3 - k (its input j comes from port (q + 1 + j) mod 5).
// A multicast packet entering at one port is copied, flit by flit, to every
// output its masked destination set needs, each branch moving at the pace of
// its own output. Port order N=0, E=1, S=2, W=3, local=4; link_async selects
// the protocol of each port's input and output link. The router's position
// comes in on the x/y strap inputs, so every router of a mesh is the same
// design.
// The division into input and output port modules is the document's; port
// numbering and the crossbar indexing are this design's.
module router
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X = 8,
  parameter int unsigned MESH_Y = 8,
  parameter int unsigned DEPTH  = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  coord_t             x,
  input  coord_t             y,
  input  logic [NPORTS-1:0]  link_async,
  input  logic [NPORTS-1:0]  in_req,
  input  flit_t              in_flit  [NPORTS],
  output logic [NPORTS-1:0]  in_ack,
  output logic [NPORTS-1:0]  out_req,
  output flit_t              out_flit [NPORTS],
  input  logic [NPORTS-1:0]  out_ack
);

  logic [NBRANCH-1:0] ipm_valid [NPORTS];
  flit_t              ipm_flit  [NPORTS][NBRANCH];
  logic [NBRANCH-1:0] ipm_ready [NPORTS];
  logic [NBRANCH-1:0] opm_valid [NPORTS];
  flit_t              opm_flit  [NPORTS][NBRANCH];
  logic [NBRANCH-1:0] opm_ready [NPORTS];

  for (genvar p = 0; p < int'(NPORTS); p++) begin : g_port
    ipm #(.MESH_X(MESH_X), .MESH_Y(MESH_Y), .IN_DIR(p), .DEPTH(DEPTH)) u_ipm (
      .clk, .rst_n, .x, .y,
      .async_mode (link_async[p]),
      .in_req     (in_req[p]),
      .in_flit    (in_flit[p]),
      .in_ack     (in_ack[p]),
      .rd_valid   (ipm_valid[p]),
      .rd_flit    (ipm_flit[p]),
      .rd_ready   (ipm_ready[p])
    );

    opm #(.NIN(NBRANCH)) u_opm (
      .clk, .rst_n,
      .async_mode (link_async[p]),
      .req_valid  (opm_valid[p]),
      .req_flit   (opm_flit[p]),
      .req_ready  (opm_ready[p]),
      .out_req    (out_req[p]),
      .out_flit   (out_flit[p]),
      .out_ack    (out_ack[p])
    );

    // crossbar: opm p, input j  <-  ipm (p+1+j)%5, branch 3-j
    for (genvar j = 0; j < int'(NBRANCH); j++) begin : g_xbar
      localparam int unsigned SRC = (p + 1 + j) % NPORTS;
      localparam int unsigned BR  = NBRANCH - 1 - j;
      assign opm_valid[p][j]    = ipm_valid[SRC][BR];
      assign opm_flit[p][j]     = ipm_flit[SRC][BR];
      assign ipm_ready[SRC][BR] = opm_ready[p][j];
    end
  end

endmodule

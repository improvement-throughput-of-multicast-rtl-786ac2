// ipm: input port module of a router.
//
// One input link and NBRANCH (four) output branches, one toward each output
// port module of the other directions. Inside:
//  - link_rx takes flits off the link in synchronous or asynchronous mode;
//  - cmr_buffer stores every flit and lets the four branches read it in
//    parallel, each at its own rate;
//  - rcu latches the header address and computes PathEnabled from it;
//  - one amu per branch masks the header address with the partition string of
//    that branch's direction, so each destination stays in exactly one copy.
// Branch k leads to port (IN_DIR + 1 + k) mod 5 (no U-turn). The partition
// strings are derived from the router position, given on the x/y strap
// inputs (constant in a mesh, so synthesis folds them), and the mesh size. The link's acknowledge is the buffer's write acceptance, so the
// acknowledge of a tail is only given once the previous packet has left.
// Structure and behaviour follow the document; the sync/async front end is
// this design's reading of it.
module ipm
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X = 8,
  parameter int unsigned MESH_Y = 8,
  parameter int unsigned IN_DIR = int'(DIR_L),
  parameter int unsigned DEPTH  = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  coord_t              x,
  input  coord_t              y,
  input  logic                async_mode,
  input  logic                in_req,
  input  flit_t               in_flit,
  output logic                in_ack,
  output logic [NBRANCH-1:0]  rd_valid,
  output flit_t               rd_flit  [NBRANCH],
  input  logic [NBRANCH-1:0]  rd_ready
);

  logic               wr_valid, wr_ready;
  flit_t              wr_flit;
  logic               hdr_we, pkt_done, route_valid;
  logic [NBRANCH-1:0] path_en;
  flit_t              buf_flit [NBRANCH];
  logic [ADDR_W-1:0]  partition [NBRANCH];

  for (genvar k = 0; k < int'(NBRANCH); k++) begin : g_branch
    assign partition[k] = xy_partition(x, y, MESH_X, MESH_Y, branch_dir(IN_DIR, k));

    amu u_amu (
      .flit_in   (buf_flit[k]),
      .partition (partition[k]),
      .flit_out  (rd_flit[k])
    );
  end

  link_rx u_rx (
    .clk, .rst_n, .async_mode,
    .req       (in_req),
    .flit      (in_flit),
    .ack       (in_ack),
    .out_valid (wr_valid),
    .out_flit  (wr_flit),
    .out_ready (wr_ready)
  );

  cmr_buffer #(.DEPTH(DEPTH), .NRD(NBRANCH)) u_buf (
    .clk, .rst_n,
    .wr_valid, .wr_flit, .wr_ready,
    .route_valid, .path_en,
    .rd_valid,
    .rd_flit  (buf_flit),
    .rd_ready,
    .hdr_we, .pkt_done
  );

  rcu #(.NOUT(NBRANCH)) u_rcu (
    .clk, .rst_n,
    .hdr_we,
    .hdr_addr (wr_flit.data),
    .partition,
    .pkt_done,
    .route_valid,
    .path_en
  );

endmodule

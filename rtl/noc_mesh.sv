// noc_mesh: multicast GALS network-on-chip, a MESH_X by MESH_Y 2-D mesh.
//
// Node n = y*MESH_X + x holds one router. A packet is a header flit whose
// 64-bit payload is the destination bit string (bit n for node n), any number
// of body flits and a tail flit. A node injects a packet on its local input;
// the routers replicate it along an XY tree, each copy travelling at the pace
// of its own branch, and every destination ejects exactly one copy on its
// local output, with a header whose bit string holds only its own bit.
//
// GALS: each router has its own clock (clk[n]). With mesh_async=1 the links
// between routers use the four-phase asynchronous protocol with synchronizers,
// so the clocks may be unrelated; with mesh_async=0 they use synchronous
// valid/ready and all clocks must be the same. local_async[n] picks the
// protocol of node n's local links. Mode inputs are static, set during reset.
// Mesh-edge ports are tied off: the XY partitions never route toward them.
// The mesh, multicast scheme and port modules follow the document; the link
// protocols, reset, buffer depth and port numbering are this design's.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X = 8,
  parameter int unsigned MESH_Y = 8,
  parameter int unsigned DEPTH  = 4
) (
  input  logic [MESH_X*MESH_Y-1:0] clk,
  input  logic                     rst_n,
  input  logic                     mesh_async,
  input  logic [MESH_X*MESH_Y-1:0] local_async,
  input  logic [MESH_X*MESH_Y-1:0] inj_req,
  input  flit_t                    inj_flit [MESH_X*MESH_Y],
  output logic [MESH_X*MESH_Y-1:0] inj_ack,
  output logic [MESH_X*MESH_Y-1:0] ej_req,
  output flit_t                    ej_flit  [MESH_X*MESH_Y],
  input  logic [MESH_X*MESH_Y-1:0] ej_ack
);

  localparam int unsigned NODES = MESH_X * MESH_Y;

  logic [NPORTS-1:0] in_req   [NODES];
  flit_t             in_flit  [NODES][NPORTS];
  logic [NPORTS-1:0] in_ack   [NODES];
  logic [NPORTS-1:0] out_req  [NODES];
  flit_t             out_flit [NODES][NPORTS];
  logic [NPORTS-1:0] out_ack  [NODES];

  for (genvar y = 0; y < int'(MESH_Y); y++) begin : g_y
    for (genvar x = 0; x < int'(MESH_X); x++) begin : g_x
      localparam int unsigned N = y * MESH_X + x;

      router #(.MESH_X(MESH_X), .MESH_Y(MESH_Y), .DEPTH(DEPTH)) u_router (
        .clk        (clk[N]),
        .rst_n,
        .x          (coord_t'(x)),
        .y          (coord_t'(y)),
        .link_async ({local_async[N], {4{mesh_async}}}),
        .in_req     (in_req[N]),
        .in_flit    (in_flit[N]),
        .in_ack     (in_ack[N]),
        .out_req    (out_req[N]),
        .out_flit   (out_flit[N]),
        .out_ack    (out_ack[N])
      );

      // local port
      assign in_req[N][DIR_L]  = inj_req[N];
      assign in_flit[N][DIR_L] = inj_flit[N];
      assign inj_ack[N]        = in_ack[N][DIR_L];
      assign ej_req[N]         = out_req[N][DIR_L];
      assign ej_flit[N]        = out_flit[N][DIR_L];
      assign out_ack[N][DIR_L] = ej_ack[N];

      // north neighbour (y-1): its south output feeds our north input
      if (y > 0) begin : g_n
        assign in_req[N][DIR_N]  = out_req[N-MESH_X][DIR_S];
        assign in_flit[N][DIR_N] = out_flit[N-MESH_X][DIR_S];
        assign out_ack[N][DIR_N] = in_ack[N-MESH_X][DIR_S];
      end else begin : g_n_edge
        assign in_req[N][DIR_N]  = 1'b0;
        assign in_flit[N][DIR_N] = '0;
        assign out_ack[N][DIR_N] = 1'b0;
      end
      if (y < MESH_Y - 1) begin : g_s
        assign in_req[N][DIR_S]  = out_req[N+MESH_X][DIR_N];
        assign in_flit[N][DIR_S] = out_flit[N+MESH_X][DIR_N];
        assign out_ack[N][DIR_S] = in_ack[N+MESH_X][DIR_N];
      end else begin : g_s_edge
        assign in_req[N][DIR_S]  = 1'b0;
        assign in_flit[N][DIR_S] = '0;
        assign out_ack[N][DIR_S] = 1'b0;
      end
      if (x < MESH_X - 1) begin : g_e
        assign in_req[N][DIR_E]  = out_req[N+1][DIR_W];
        assign in_flit[N][DIR_E] = out_flit[N+1][DIR_W];
        assign out_ack[N][DIR_E] = in_ack[N+1][DIR_W];
      end else begin : g_e_edge
        assign in_req[N][DIR_E]  = 1'b0;
        assign in_flit[N][DIR_E] = '0;
        assign out_ack[N][DIR_E] = 1'b0;
      end
      if (x > 0) begin : g_w
        assign in_req[N][DIR_W]  = out_req[N-1][DIR_E];
        assign in_flit[N][DIR_W] = out_flit[N-1][DIR_E];
        assign out_ack[N][DIR_W] = in_ack[N-1][DIR_E];
      end else begin : g_w_edge
        assign in_req[N][DIR_W]  = 1'b0;
        assign in_flit[N][DIR_W] = '0;
        assign out_ack[N][DIR_W] = 1'b0;
      end
    end
  end

  initial begin
    if (MESH_X > 2**COORD_W || MESH_Y > 2**COORD_W)
      $error("noc_mesh: mesh side exceeds the coordinate straps");
    if (NODES > ADDR_W) $error("noc_mesh: %0d nodes exceed the %0d-bit destination field", NODES, ADDR_W);
  end

endmodule

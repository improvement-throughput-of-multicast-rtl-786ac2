// noc_pkg: types and constants shared by the multicast GALS NoC.
//
// A flit is a 2-bit kind plus a 64-bit payload. The header's payload is the
// destination bit string: bit n is set when node n (n = y*MESH_X + x) is a
// destination. Body and tail payloads are user data. The 64-bit width follows
// the 64-bit partition strings of the address modifier units; the kind
// encoding, the port order and the choice of north as y-1 are this design's.
//
// xy_partition() returns the partition bit string of one output direction of
// the router at (x,y): bit n is 1 when node n is reached through that output
// under XY (X first, then Y) routing. The coordinates may be run-time
// signals (router straps) or constants.
package noc_pkg;

  localparam int unsigned ADDR_W  = 64;   // destination bit string, one bit per node
  localparam int unsigned NPORTS  = 5;    // N, E, S, W, local
  localparam int unsigned NBRANCH = 4;    // outputs reachable from one input (no U-turn)
  localparam int unsigned COORD_W = 4;    // router coordinate straps

  typedef logic [COORD_W-1:0] coord_t;

  typedef enum logic [1:0] {
    FLIT_IDLE = 2'd0,
    FLIT_HEAD = 2'd1,
    FLIT_BODY = 2'd2,
    FLIT_TAIL = 2'd3
  } flit_kind_e;

  typedef struct packed {
    flit_kind_e          kind;
    logic [ADDR_W-1:0]   data;   // header: destination bit string
  } flit_t;

  typedef enum logic [2:0] {
    DIR_N = 3'd0,
    DIR_E = 3'd1,
    DIR_S = 3'd2,
    DIR_W = 3'd3,
    DIR_L = 3'd4
  } dir_e;

  // Output port reached by branch k of the input module at port p.
  function automatic logic [2:0] branch_dir(int unsigned p, int unsigned k);
    return 3'((p + 1 + k) % NPORTS);
  endfunction

  // Partition bit string of output direction d at router (x,y) in a mesh of
  // mx by my nodes, for XY routing.
  function automatic logic [ADDR_W-1:0] xy_partition(coord_t x, coord_t y,
                                                     int unsigned mx, int unsigned my,
                                                     logic [2:0] d);
    logic [ADDR_W-1:0] m;
    dir_e              dd;
    m  = '0;
    dd = dir_e'(d);
    for (int unsigned ny = 0; ny < my; ny++) begin
      for (int unsigned nx = 0; nx < mx; nx++) begin
        logic hit;
        case (dd)
          DIR_E:   hit = (nx > int'(x));
          DIR_W:   hit = (nx < int'(x));
          DIR_N:   hit = (nx == int'(x)) && (ny < int'(y));
          DIR_S:   hit = (nx == int'(x)) && (ny > int'(y));
          default: hit = (nx == int'(x)) && (ny == int'(y));
        endcase
        if (ny * mx + nx < ADDR_W) m[ny * mx + nx] = hit;
      end
    end
    return m;
  endfunction

endpackage

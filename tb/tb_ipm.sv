// tb_ipm: checks an input port module: router (1,1) of a 4x4 mesh, input
// from the west, so branches 0..3 lead to local, north, east and south.
// Packets with random destination bit strings arrive on the link, first in
// synchronous mode, then in four-phase mode from a sender on its own clock.
// The four branch readers run at different rates. Each branch must deliver
// exactly the packets whose destinations it can reach by XY routing, with
// the header masked to those destinations and body/tail unchanged; packets
// that reach nobody vanish. In synchronous mode a header must be offered to
// the selected branches two clocks after it is written (one clock to latch
// the address, one to compute the route). Partitions are computed here from
// coordinates, independently of the design's package function.
module tb_ipm;
  import noc_pkg::*;

  localparam int MX = 4, MY = 4, X = 1, Y = 1;

  logic        clk = 1'b0, sclk = 1'b0, rst_n = 1'b0;
  logic        async_mode = 1'b0;
  logic        in_req = 1'b0, in_ack;
  flit_t       in_flit = '0;
  logic [3:0]  rd_valid, rd_ready = '0;
  flit_t       rd_flit [4];
  int          checks = 0, failures = 0;

  ipm #(.MESH_X(MX), .MESH_Y(MY), .IN_DIR(3), .DEPTH(4)) dut (
    .clk, .rst_n, .x(coord_t'(X)), .y(coord_t'(Y)), .async_mode, .in_req, .in_flit, .in_ack, .rd_valid, .rd_flit, .rd_ready);

  always #5 clk = ~clk;
  always #6 sclk = ~sclk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("%t FAIL %s", $time, what);
    end
  endtask

  // partition strings: branch 0 local, 1 north, 2 east, 3 south
  logic [63:0] part [4];
  initial begin
    for (int k = 0; k < 4; k++) part[k] = '0;
    for (int n = 0; n < MX * MY; n++) begin
      int nx, ny;
      nx = n % MX; ny = n / MX;
      if (nx == X && ny == Y) part[0][n] = 1'b1;
      if (nx == X && ny < Y)  part[1][n] = 1'b1;
      if (nx > X)             part[2][n] = 1'b1;
      if (nx == X && ny > Y)  part[3][n] = 1'b1;
    end
  end

  flit_t exp_q [4][$];
  int    sent_pkts = 0, n_drop = 0, n_multi = 0;
  int    len = 0, idx = 0;
  logic [63:0] mask;
  longint edge_no = 0, hdr_edge = -1;
  logic  hdr_seen_rd = 1'b1;

  function automatic flit_t cur_flit();
    flit_t f;
    f.kind = (idx == 0) ? FLIT_HEAD : (idx == len - 1) ? FLIT_TAIL : FLIT_BODY;
    f.data = (idx == 0) ? mask : {32'(sent_pkts), 32'(idx)};
    return f;
  endfunction

  task automatic new_packet();
    int nb;
    len  = 2 + $urandom % 6;
    idx  = 0;
    // destinations: only nodes the input from the west can still reach (x >= 1)
    mask = {$urandom, $urandom} & {$urandom, $urandom};
    for (int n = 0; n < 64; n++) if (n >= MX * MY || n % MX < X) mask[n] = 1'b0;
    if ($urandom % 8 == 0) mask = '0;
    nb = 0;
    for (int k = 0; k < 4; k++) if ((mask & part[k]) != 0) nb++;
    if (nb == 0) n_drop++;
    if (nb > 1) n_multi++;
  endtask

  // record a flit that entered the buffer
  task automatic accepted(flit_t f);
    for (int k = 0; k < 4; k++) begin
      if ((mask & part[k]) != 0) begin
        flit_t e;
        e = f;
        if (f.kind == FLIT_HEAD) e.data = f.data & part[k];
        exp_q[k].push_back(e);
      end
    end
    idx++;
    if (idx == len) begin
      sent_pkts++;
      new_packet();
    end
  endtask

  // branch readers
  always @(negedge clk) edge_no++;

  always @(posedge clk) if (rst_n) begin
    if (!async_mode && !hdr_seen_rd && rd_valid != 0) begin
      check(edge_no - hdr_edge == 2, $sformatf("header offered %0d clocks after write", edge_no - hdr_edge));
      hdr_seen_rd = 1'b1;
    end
    for (int k = 0; k < 4; k++) begin
      if (rd_valid[k] && rd_ready[k]) begin
        check(exp_q[k].size() > 0, $sformatf("branch %0d: unexpected flit", k));
        if (exp_q[k].size() > 0) begin
          check(rd_flit[k] == exp_q[k][0], $sformatf("branch %0d: got %h expected %h", k, rd_flit[k], exp_q[k][0]));
          void'(exp_q[k].pop_front());
        end
      end
    end
    rd_ready[0] <= ($urandom % 8) < 7;
    rd_ready[1] <= ($urandom % 8) < 3;
    rd_ready[2] <= ($urandom % 8) < 5;
    rd_ready[3] <= ($urandom % 8) < 2;
  end

  // synchronous sender
  logic run = 1'b0;
  always @(posedge clk) if (rst_n && !async_mode) begin
    if (in_req && in_ack) begin
      if (in_flit.kind == FLIT_HEAD) begin
        hdr_edge    = edge_no;
        hdr_seen_rd = ((mask & (part[0] | part[1] | part[2] | part[3])) == 0);
      end
      accepted(in_flit);
    end
    if (!(in_req && !in_ack)) begin
      in_req  <= run && ($urandom % 4 != 0);
      in_flit <= cur_flit();
    end
  end

  // four-phase sender on its own clock
  int sstate = 0;
  always @(posedge sclk) if (rst_n && async_mode && run) begin
    case (sstate)
      0: begin in_flit <= cur_flit(); sstate = 1; end
      1: begin in_req <= 1'b1; accepted(in_flit); sstate = 2; end
      2: if (in_ack) begin in_req <= 1'b0; sstate = 3; end
      default: if (!in_ack) sstate = 0;
    endcase
  end

  function automatic int pending();
    return exp_q[0].size() + exp_q[1].size() + exp_q[2].size() + exp_q[3].size();
  endfunction

  initial begin
    new_packet();
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    run   <= 1'b1;
    wait (sent_pkts >= 300);
    wait (idx == 0);
    run <= 1'b0;
    @(posedge clk);
    in_req <= 1'b0;
    repeat (200) @(posedge clk);
    check(pending() == 0, $sformatf("sync: %0d flits not delivered", pending()));
    rst_n <= 1'b0;
    @(posedge clk);
    async_mode = 1'b1;
    @(posedge clk);
    rst_n <= 1'b1;
    run   <= 1'b1;
    wait (sent_pkts >= 450);
    wait (idx == 0 && sstate == 0);
    run <= 1'b0;
    repeat (300) @(posedge clk);
    check(pending() == 0, $sformatf("async: %0d flits not delivered", pending()));
    $display("ipm: packets=%0d dropped=%0d multicast=%0d", sent_pkts, n_drop, n_multi);
    check(n_drop > 0 && n_multi > 0, "drop and multicast seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

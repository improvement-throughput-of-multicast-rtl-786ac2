// tb_router: checks one five-port router, (1,1) of a 3x3 mesh.
//
// Every input port injects packets of 3 or 4 flits (header, body carrying
// the source port and packet number, optional second body, tail) whose
// destinations are drawn from the nodes that input can still reach under XY
// routing; the local input sometimes includes the router's own node, which
// must be dropped. Every output has a sink with random acceptance. The
// reference model says which outputs each packet must leave by and with
// which masked header; per (input, output) pair packets must arrive whole
// and in order. The run is done twice: all links synchronous, then all
// links four-phase asynchronous. It counts multicast packets, dropped ones
// and output contention, and fails if any never occurred.
module tb_router;
  import noc_pkg::*;

  localparam int MX = 3, MY = 3, X = 1, Y = 1, P = 5;
  localparam int NPKT = 150;   // per input and mode

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [4:0]  link_async = '0;
  logic [4:0]  in_req = '0, in_ack, out_req, out_ack = '0;
  flit_t       in_flit [5];
  flit_t       out_flit [5];
  int          checks = 0, failures = 0;

  coord_t      x = coord_t'(X), y = coord_t'(Y);

  router #(.MESH_X(MX), .MESH_Y(MY), .DEPTH(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired"); $display("made %0d %0d %0d %0d %0d pending %0d async %b", made[0], made[1], made[2], made[3], made[4], pending(), link_async);
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

  // XY partition of output q, from coordinates
  function automatic logic [63:0] part(int q);
    logic [63:0] m;
    m = '0;
    for (int n = 0; n < MX * MY; n++) begin
      int nx, ny;
      nx = n % MX; ny = n / MX;
      case (q)
        0: m[n] = (nx == X) && (ny < Y);
        1: m[n] = (nx > X);
        2: m[n] = (nx == X) && (ny > Y);
        3: m[n] = (nx < X);
        default: m[n] = (nx == X) && (ny == Y);
      endcase
    end
    return m;
  endfunction

  // nodes still reachable by a packet that entered through port p
  function automatic logic [63:0] reach(int p);
    logic [63:0] m;
    m = '0;
    for (int n = 0; n < MX * MY; n++) begin
      int nx, ny;
      nx = n % MX; ny = n / MX;
      case (p)
        0: m[n] = (nx == X) && (ny >= Y);   // came from the north, heading south
        1: m[n] = (nx <= X);                // came from the east, heading west
        2: m[n] = (nx == X) && (ny <= Y);
        3: m[n] = (nx >= X);
        default: m[n] = 1'b1;
      endcase
    end
    return m;
  endfunction

  flit_t src_q [5][$];
  flit_t exp_q [5][5][$];     // [input][output]
  int    made [5];
  int    n_multi = 0, n_drop = 0, n_conflict = 0, n_async = 0;

  task automatic make_packet(int p);
    logic [63:0] m;
    int len, nb;
    flit_t f;
    m = {$urandom, $urandom} & reach(p);
    if (p == 4 && $urandom % 6 == 0) m = part(4);    // only the router itself: dropped
    len = 3 + $urandom % 2;
    nb = 0;
    for (int i = 0; i < len; i++) begin
      f.kind = (i == 0) ? FLIT_HEAD : (i == len - 1) ? FLIT_TAIL : FLIT_BODY;
      f.data = (i == 0) ? m : {8'(p), 24'(made[p]), 32'(i)};
      src_q[p].push_back(f);
      for (int q = 0; q < 5; q++) begin
        if (q != p && (m & part(q)) != 0) begin
          flit_t e;
          e = f;
          if (i == 0) e.data = m & part(q);
          exp_q[p][q].push_back(e);
        end
      end
    end
    for (int q = 0; q < 5; q++) if (q != p && (m & part(q)) != 0) nb++;
    if (nb == 0) n_drop++;
    if (nb > 1) n_multi++;
    made[p]++;
  endtask

  // senders and sinks, both protocols, on the router clock
  int   sst [5];
  flit_t hdr_hold [5];
  int    cur_src [5];
  logic  run = 1'b0;

  task automatic sink_take(int q, flit_t f);
    if (f.kind == FLIT_HEAD) begin
      check(cur_src[q] == -2, $sformatf("out %0d: header inside a packet", q));
      hdr_hold[q] = f;
      cur_src[q]  = -1;
    end else begin
      int s;
      s = int'(f.data[63:56]);
      if (cur_src[q] == -1) begin
        // first body names the source: check the held header against it
        check(s < 5 && exp_q[s][q].size() > 0, $sformatf("out %0d: packet from %0d unexpected", q, s));
        if (s < 5 && exp_q[s][q].size() > 0) begin
          check(hdr_hold[q] == exp_q[s][q][0], $sformatf("out %0d: header %h expected %h", q, hdr_hold[q].data, exp_q[s][q][0].data));
          void'(exp_q[s][q].pop_front());
        end
        cur_src[q] = s;
      end
      check(s == cur_src[q], $sformatf("out %0d: interleaved packets", q));
      if (s < 5 && exp_q[s][q].size() > 0) begin
        check(f == exp_q[s][q][0], $sformatf("out %0d: flit %h expected %h", q, f, exp_q[s][q][0]));
        void'(exp_q[s][q].pop_front());
      end
      if (f.kind == FLIT_TAIL) cur_src[q] = -2;
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < 5; p++) begin
      if ($countones(dut.g_port[0].u_opm.req_valid) > 1 || $countones(dut.g_port[1].u_opm.req_valid) > 1 ||
          $countones(dut.g_port[2].u_opm.req_valid) > 1 || $countones(dut.g_port[3].u_opm.req_valid) > 1 ||
          $countones(dut.g_port[4].u_opm.req_valid) > 1) n_conflict++;
      // sender p
      if (!link_async[p]) begin
        if (in_req[p] && in_ack[p]) void'(src_q[p].pop_front());
        if (!(in_req[p] && !in_ack[p])) begin
          if (run && src_q[p].size() == 0 && made[p] < NPKT) make_packet(p);
          in_req[p]  <= (src_q[p].size() > 0) && ($urandom % 4 != 0);
          if (src_q[p].size() > 0) in_flit[p] <= src_q[p][0];
        end
      end else begin
        case (sst[p])
          0: begin
               if (run && src_q[p].size() == 0 && made[p] < NPKT) make_packet(p);
               if (src_q[p].size() > 0) begin
                 in_flit[p] <= src_q[p].pop_front();
                 sst[p] = 1;
               end
             end
          1: begin in_req[p] <= 1'b1; sst[p] = 2; end
          2: if (in_ack[p]) begin in_req[p] <= 1'b0; n_async++; sst[p] = 3; end
          default: if (!in_ack[p]) sst[p] = 0;
        endcase
      end
      // sink p
      if (!link_async[p]) begin
        if (out_req[p] && out_ack[p]) sink_take(p, out_flit[p]);
        out_ack[p] <= ($urandom % 3) != 0;
      end else begin
        if (out_req[p] && !out_ack[p] && ($urandom % 2 == 0)) begin
          sink_take(p, out_flit[p]);
          out_ack[p] <= 1'b1;
        end else if (!out_req[p] && out_ack[p]) out_ack[p] <= 1'b0;
      end
    end
  end

  function automatic int pending();
    int n;
    n = 0;
    for (int p = 0; p < 5; p++) begin
      n += src_q[p].size();
      for (int q = 0; q < 5; q++) n += exp_q[p][q].size();
    end
    return n;
  endfunction

  function automatic logic all_made();
    for (int p = 0; p < 5; p++) if (made[p] < NPKT) return 1'b0;
    return 1'b1;
  endfunction

  task automatic reset_model();
    for (int p = 0; p < 5; p++) begin
      made[p] = 0; sst[p] = 0; cur_src[p] = -2;
      in_flit[p] = '0;
    end
  endtask

  initial begin
    reset_model();
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    run   <= 1'b1;
    while (!all_made()) @(posedge clk);
    repeat (2000) @(posedge clk);
    check(pending() == 0, $sformatf("sync: %0d flits outstanding", pending()));
    run <= 1'b0;
    rst_n <= 1'b0;
    in_req  <= '0;
    out_ack <= '0;
    @(posedge clk);
    link_async = '1;
    reset_model();
    @(posedge clk);
    rst_n <= 1'b1;
    run   <= 1'b1;
    while (!all_made()) @(posedge clk);
    repeat (8000) @(posedge clk);
    check(pending() == 0, $sformatf("async: %0d flits outstanding", pending()));
    $display("router: multicast=%0d dropped=%0d contention=%0d async_flits=%0d", n_multi, n_drop, n_conflict, n_async);
    check(n_multi > 0, "multicast seen");
    check(n_drop > 0, "drop seen");
    check(n_conflict > 0, "output contention seen");
    check(n_async > 0, "asynchronous transfers seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

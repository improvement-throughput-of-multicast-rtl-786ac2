// tb_noc_mesh: end-to-end test of the full 8x8 multicast mesh, default sizes.
//
// Every node injects packets (header, one or two bodies carrying source and
// packet number, tail) with unicast, sparse multicast and broadcast
// destination sets; some packets also name their own source node, which is
// never delivered back. Each destination must eject exactly one copy of
// every packet addressed to it, with a header holding only its own bit, and
// packets from one source must reach a destination in the order sent.
//  Phase 1: one common clock, every link synchronous.
//  Phase 2 (GALS): mesh links four-phase asynchronous; odd nodes run on
//   their own clocks of different periods with asynchronous local links,
//   even nodes keep the common clock with synchronous local links.
// Multicast packets are 3 or 4 flits, no longer than a buffer; a third of
// the unicast packets are 6 flits. Counted, and each must happen: multicast
// and broadcast packets, buffer-full stalls (a long packet DEPTH flits ahead
// of its reader), tail holds
// (next header waiting for the slowest branch), output contention, packets
// naming their own sender, injection back-pressure, synchronous and
// asynchronous transfers.
module tb_noc_mesh;
  import noc_pkg::*;

  localparam int MX = 8, MY = 8, N = MX * MY;
  localparam int NPKT = 12;       // packets per node and phase

  logic          base_clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0]  clk = '0;
  logic          phase2 = 1'b0;
  logic          mesh_async = 1'b0;
  logic [N-1:0]  local_async = '0;
  logic [N-1:0]  inj_req = '0, inj_ack, ej_req, ej_ack = '0;
  flit_t         inj_flit [N];
  flit_t         ej_flit  [N];
  int            checks = 0, failures = 0;

  noc_mesh dut (.*);

  // The common clock and every router on it toggle in one statement, so
  // that the testbench and the routers see the same edge; in phase 2 odd
  // routers get their own periods.
  always #5 begin
    base_clk = ~base_clk;
    for (int n = 0; n < N; n++) if (!(phase2 && n % 2 == 1)) clk[n] = base_clk;
  end
  for (genvar n = 1; n < N; n += 2) begin : g_clk
    initial forever #(5 + (n * 3) % 5) if (phase2) clk[n] = ~clk[n];
  end

  initial begin
    repeat (600000) @(posedge base_clk);
    failures++;
    $display("watchdog expired, %0d flits outstanding", pending());
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

  // ---- internal event monitors ------------------------------------------
  logic [N-1:0] ev_full, ev_tailhold, ev_conflict, ev_drop;
  for (genvar y = 0; y < MY; y++) begin : g_my
    for (genvar x = 0; x < MX; x++) begin : g_mx
      logic [4:0] f, t, c, d;
      for (genvar p = 0; p < 5; p++) begin : g_mp
        assign f[p] = dut.g_y[y].g_x[x].u_router.g_port[p].u_ipm.u_buf.wr_valid &&
                      !dut.g_y[y].g_x[x].u_router.g_port[p].u_ipm.u_buf.wr_ready &&
                      !dut.g_y[y].g_x[x].u_router.g_port[p].u_ipm.u_buf.tail_in_q;
        assign t[p] = dut.g_y[y].g_x[x].u_router.g_port[p].u_ipm.u_buf.wr_valid &&
                      dut.g_y[y].g_x[x].u_router.g_port[p].u_ipm.u_buf.tail_in_q;
        assign c[p] = $countones(dut.g_y[y].g_x[x].u_router.g_port[p].u_opm.req_valid) > 1;
        assign d[p] = dut.g_y[y].g_x[x].u_router.g_port[p].u_ipm.u_buf.drain_fire;
      end
      assign ev_full[y*MX+x]     = |f;
      assign ev_tailhold[y*MX+x] = |t;
      assign ev_conflict[y*MX+x] = |c;
      assign ev_drop[y*MX+x]     = |d;
    end
  end

  int n_full = 0, n_tailhold = 0, n_conflict = 0, n_drop = 0;
  int n_multi = 0, n_bcast = 0, n_self = 0, n_backpressure = 0, n_sync = 0, n_async = 0;
  always @(posedge base_clk) if (rst_n) begin
    if (ev_full != 0)     n_full++;
    if (ev_tailhold != 0) n_tailhold++;
    if (ev_conflict != 0) n_conflict++;
    if (ev_drop != 0)     n_drop++;
  end

  // ---- traffic and scoreboard -------------------------------------------
  typedef struct { int src; int pkt; int len; } pkt_t;
  flit_t src_q [N][$];
  pkt_t  exp_q [N][N][$];    // [destination][source]
  int    made [N];
  int    outstanding = 0;     // copies still to be ejected
  int    sst [N];
  logic  run = 1'b0;

  task automatic make_packet(int s);
    logic [63:0] m;
    int len, kind;
    flit_t f;
    pkt_t  e;
    kind = $urandom % 10;
    if (kind < 3)      m = 64'(1) << ($urandom % N);                    // unicast
    else if (kind < 4) m = '1;                                          // broadcast
    else               m = {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
    if (N < 64) m = m & ((64'(1) << N) - 1);
    if (m[s]) n_self++;
    // a packet naming no other node: either send it to the next node, or
    // keep it addressed to its sender alone, so its router must drop it
    if ($countones(m & ~(64'(1) << s)) == 0) begin
      if ($urandom % 2 == 0) m = 64'(1) << s;
      else                   m[(s + 1) % N] = 1'b1;
    end
    if ($countones(m & ~(64'(1) << s)) > 1) n_multi++;
    if ($countones(m | (64'(1) << s)) == N) n_bcast++;
    // multicast packets fit in one buffer (DEPTH flits); a unicast may be
    // longer, which makes a buffer fill up behind its single branch
    if ($countones(m & ~(64'(1) << s)) == 1 && $urandom % 3 == 0) len = 6;
    else len = 3 + $urandom % 2;
    for (int i = 0; i < len; i++) begin
      f.kind = (i == 0) ? FLIT_HEAD : (i == len - 1) ? FLIT_TAIL : FLIT_BODY;
      f.data = (i == 0) ? m : {16'(s), 16'(made[s]), 32'(i)};
      src_q[s].push_back(f);
    end
    e.src = s; e.pkt = made[s]; e.len = len;
    for (int d = 0; d < N; d++) if (m[d] && d != s) begin
      exp_q[d][s].push_back(e);
      outstanding++;
    end
    made[s]++;
  endtask

  int   cur_src [N], cur_idx [N];
  logic hdr_ok [N];

  task automatic take(int d, flit_t f);
    if (f.kind == FLIT_HEAD) begin
      check(cur_src[d] == -2, $sformatf("node %0d: header inside a packet", d));
      check(f.data == (64'(1) << d), $sformatf("node %0d: header %h", d, f.data));
      cur_src[d] = -1;
      cur_idx[d] = 1;
    end else begin
      int s, p;
      s = int'(f.data[63:48]);
      p = int'(f.data[47:32]);
      if (cur_src[d] == -1) begin
        check(s < N && exp_q[d][s].size() > 0 && exp_q[d][s][0].pkt == p,
              $sformatf("node %0d: packet %0d from %0d not expected next", d, p, s));
        cur_src[d] = s;
      end
      check(s == cur_src[d] && int'(f.data[31:0]) == cur_idx[d], $sformatf("node %0d: flit out of place", d));
      cur_idx[d]++;
      if (f.kind == FLIT_TAIL) begin
        if (s < N && exp_q[d][s].size() > 0) begin
          check(exp_q[d][s][0].len == cur_idx[d], $sformatf("node %0d: packet length", d));
          void'(exp_q[d][s].pop_front());
          outstanding--;
        end
        cur_src[d] = -2;
      end
    end
  endtask

  // Local drivers. They act on the falling edge of the common clock, so the
  // routers never see an input change at their own rising edge. A
  // synchronous transfer is decided at one falling edge from req and ack,
  // which hold until the next rising edge, and is booked at the next falling
  // edge. Asynchronous local links are driven from the same clock; they need
  // no clock in common with their router.
  logic  inj_go [N], ej_go [N];
  flit_t ej_seen [N];
  always @(negedge base_clk) if (rst_n) begin
    for (int n = 0; n < N; n++) begin
      if (!local_async[n]) begin
        if (inj_go[n]) begin
          void'(src_q[n].pop_front());
          n_sync++;
        end
        if (inj_req[n] && !inj_go[n]) n_backpressure++;
        if (inj_go[n] || !inj_req[n]) begin
          if (run && src_q[n].size() == 0 && made[n] < NPKT && $urandom % 16 == 0) make_packet(n);
          inj_req[n] = (src_q[n].size() > 0) && ($urandom % 4 != 0);
          if (src_q[n].size() > 0) inj_flit[n] = src_q[n][0];
        end
        inj_go[n] = inj_req[n] && inj_ack[n];
        if (ej_go[n]) take(n, ej_seen[n]);
        ej_ack[n]  = ($urandom % 4) != 0;
        ej_go[n]   = ej_req[n] && ej_ack[n];
        ej_seen[n] = ej_flit[n];
      end else begin
        case (sst[n])
          0: begin
               if (run && src_q[n].size() == 0 && made[n] < NPKT && $urandom % 16 == 0) make_packet(n);
               if (src_q[n].size() > 0) begin
                 inj_flit[n] = src_q[n].pop_front();
                 sst[n] = 1;
               end
             end
          1: begin inj_req[n] = 1'b1; sst[n] = 2; end
          2: if (inj_ack[n]) begin inj_req[n] = 1'b0; n_async++; sst[n] = 3; end
          default: if (!inj_ack[n]) sst[n] = 0;
        endcase
        if (ej_req[n] && !ej_ack[n] && ($urandom % 2 == 0)) begin
          take(n, ej_flit[n]);
          ej_ack[n] = 1'b1;
        end else if (!ej_req[n] && ej_ack[n]) ej_ack[n] = 1'b0;
      end
    end
  end

  function automatic int pending();
    int c;
    c = outstanding;
    for (int n = 0; n < N; n++) c += src_q[n].size();
    return c;
  endfunction

  function automatic logic all_made();
    for (int n = 0; n < N; n++) if (made[n] < NPKT) return 1'b0;
    return 1'b1;
  endfunction

  task automatic reset_model();
    for (int n = 0; n < N; n++) begin
      made[n] = 0; sst[n] = 0; cur_src[n] = -2; cur_idx[n] = 0;
      inj_flit[n] = '0; inj_go[n] = 1'b0; ej_go[n] = 1'b0;
    end
  endtask

  task automatic run_phase(string name, int drain);
    int t;
    rst_n <= 1'b1;
    run   <= 1'b1;
    while (!all_made()) @(posedge base_clk);
    t = 0;
    while (pending() != 0 && t < drain) begin
      @(posedge base_clk);
      t++;
    end
    check(pending() == 0, $sformatf("%s: %0d copies/flits outstanding", name, pending()));
    $display("%s done at %0t", name, $time);
  endtask

  initial begin
    reset_model();
    repeat (3) @(posedge base_clk);
    run_phase("synchronous", 20000);
    // phase 2: GALS
    run   <= 1'b0;
    rst_n <= 1'b0;
    @(posedge base_clk);
    inj_req = '0;
    ej_ack  = '0;
    repeat (2) @(posedge base_clk);
    phase2 = 1'b1;
    mesh_async = 1'b1;
    for (int n = 0; n < N; n++) local_async[n] = (n % 2 == 1);
    reset_model();
    repeat (4) @(posedge base_clk);
    run_phase("gals", 100000);
    $display("mesh: multicast=%0d broadcast=%0d self=%0d full=%0d tailhold=%0d contention=%0d drop=%0d backpressure=%0d sync=%0d async=%0d",
             n_multi, n_bcast, n_self, n_full, n_tailhold, n_conflict, n_drop, n_backpressure, n_sync, n_async);
    check(n_multi > 0, "multicast");
    check(n_bcast > 0, "broadcast");
    check(n_full > 0, "buffer full stall");
    check(n_tailhold > 0, "tail hold");
    check(n_conflict > 0, "output contention");
    check(n_self > 0, "packets naming their own sender");
    check(n_drop > 0, "packets dropped at their sender's router");
    check(n_backpressure > 0, "injection back-pressure");
    check(n_sync > 0 && n_async > 0, "synchronous and asynchronous local transfers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

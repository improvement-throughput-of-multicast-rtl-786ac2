// tb_cmr_buffer: checks the multicast replication buffer (DEPTH 4, 4 readers).
//
// A writer offers packets of 2 to 6 flits with random gaps. The testbench
// plays the route computation unit: two clocks after a header is written it
// presents a random PathEnabled (sometimes empty), and drops it one clock
// after pkt_done. Each reader takes flits with its own random rate. Checked:
// every selected reader receives every flit of the packet in order, no
// unselected reader ever raises rd_valid, the write side stalls exactly when
// the slowest selected reader is DEPTH flits behind, the next header is held
// off until all selected readers have read the previous tail, a header is on
// all four read data ports while its route is unknown, and pkt_done pulses
// one clock after the last read of the tail. The testbench counts that full
// stalls, tail holds, drops and mixed reader rates all happened.
module tb_cmr_buffer;
  import noc_pkg::*;

  localparam int DEPTH = 4;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        wr_valid = 1'b0, wr_ready;
  flit_t       wr_flit = '0;
  logic        route_valid = 1'b0;
  logic [3:0]  path_en = '0;
  logic [3:0]  rd_valid, rd_ready = '0;
  flit_t       rd_flit [4];
  logic        hdr_we, pkt_done;
  int          checks = 0, failures = 0;

  cmr_buffer #(.DEPTH(DEPTH), .NRD(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  // ---- reference model --------------------------------------------------
  flit_t  exp_q [4][$];     // per reader: flits still to be read
  int     written = 0;      // flits written of the current packet
  int     behind [4];       // per reader: flits written but not yet read
  logic   tail_pending = 1'b0;
  int     route_timer = -1;
  logic [3:0] pe_next;
  int     n_full = 0, n_tailhold = 0, n_drop = 0, n_skew = 0, n_spec = 0;
  int     pkts_done = 0;
  int     pkt_cnt = 0;
  logic   last_tail_read;

  // writer
  int  wlen = 0, widx = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
  end

  task automatic do_writer();
    if (wr_valid && wr_ready) begin
      for (int o = 0; o < 4; o++) behind[o]++;
      for (int o = 0; o < 4; o++) exp_q[o].push_back(wr_flit);
      if (wr_flit.kind == FLIT_HEAD) begin
        route_timer <= 1;
        pe_next     <= ($urandom % 6 == 0) ? 4'h0 : 4'($urandom);
      end
      if (wr_flit.kind == FLIT_TAIL) tail_pending = 1'b1;
      widx++;
    end
    // next flit to offer
    if (!(wr_valid && !wr_ready)) begin
      if (widx >= wlen) begin
        wlen = 2 + $urandom % 5;
        widx = 0;
        pkt_cnt++;
      end
      wr_valid <= ($urandom % 4 != 0) && pkt_cnt <= 300;
      wr_flit.kind <= (widx == 0) ? FLIT_HEAD : (widx == wlen - 1) ? FLIT_TAIL : FLIT_BODY;
      wr_flit.data <= {32'(pkt_cnt), 32'(widx)};
      if (pkt_cnt > 300) begin
        $display("cmr_buffer: full=%0d tailhold=%0d drop=%0d skew=%0d spec=%0d packets=%0d",
                 n_full, n_tailhold, n_drop, n_skew, n_spec, pkts_done);
        check(n_full > 0, "full stall seen");
        check(n_tailhold > 0, "tail hold seen");
        check(n_drop > 0, "dropped packet seen");
        check(n_skew > 0, "readers at different positions seen");
        check(n_spec > 0, "speculative header seen");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    do_checks();
    do_readers();
    do_writer();
  end

  // pkt_done expectation from the state before the edge
  task automatic do_checks();
    int slowest;
    logic [3:0] cen;
    // write-side expectations, from the model state before this edge
    cen = route_valid ? path_en : 4'hf;
    if (route_valid && path_en == 4'h0) cen = 4'h1;
    slowest = 0;
    for (int o = 0; o < 4; o++) if (cen[o] && behind[o] > slowest) slowest = behind[o];
    check(wr_ready == (slowest < DEPTH && !tail_pending),
          $sformatf("wr_ready=%0d slowest=%0d tail_pending=%0d", wr_ready, slowest, tail_pending));
    if (wr_valid && !wr_ready && slowest >= DEPTH) n_full++;
    if (wr_valid && !wr_ready && tail_pending) n_tailhold++;
    check(hdr_we == (wr_valid && wr_ready && wr_flit.kind == FLIT_HEAD), "hdr_we");

    last_tail_read = tail_pending && route_valid;
    for (int o = 0; o < 4; o++)
      if ((route_valid && (path_en[o] || (path_en == 0 && o == 0))) && behind[o] != 0) last_tail_read = 1'b0;
    check(pkt_done == last_tail_read, "pkt_done timing");
  endtask

  // route model and readers
  task automatic do_readers();
    int lead, lag;
    // speculative header: while the route is unknown all read ports show it
    if (!route_valid && exp_q[0].size() > 0 && exp_q[0][0].kind == FLIT_HEAD) begin
      n_spec++;
      for (int o = 0; o < 4; o++)
        check(rd_flit[o] == exp_q[0][0] && !rd_valid[o], "speculative header on every port");
    end
    lead = 0; lag = 99;
    for (int o = 0; o < 4; o++) begin
      if (route_valid && path_en[o]) begin
        if (behind[o] > lead) lead = behind[o];
        if (behind[o] < lag) lag = behind[o];
        check(rd_valid[o] == (behind[o] > 0), $sformatf("rd_valid[%0d]", o));
        if (rd_valid[o]) check(rd_flit[o] == exp_q[o][0], $sformatf("rd_flit[%0d]", o));
        if (rd_valid[o] && rd_ready[o]) begin
          void'(exp_q[o].pop_front());
          behind[o]--;
        end
      end else begin
        check(!rd_valid[o], $sformatf("throttled port %0d silent", o));
      end
    end
    if (route_valid && path_en != 0 && lead != lag) n_skew++;
    // drop: port 0 pointer drains the unwanted packet, one flit per clock
    if (route_valid && path_en == 4'h0 && behind[0] > 0) begin
      void'(exp_q[0].pop_front());
      behind[0]--;
      if (behind[0] == 0) n_drop++;
    end
    if (pkt_done) begin
      pkts_done++;
      for (int o = 0; o < 4; o++) begin
        exp_q[o].delete();
        behind[o] = 0;
      end
      tail_pending = 1'b0;
      route_valid <= 1'b0;
    end
    if (route_timer == 0) begin
      route_valid <= 1'b1;
      path_en     <= pe_next;
    end
    if (route_timer >= 0) route_timer <= route_timer - 1;
    // each reader has its own rate
    rd_ready[0] <= ($urandom % 8) < 7;
    rd_ready[1] <= ($urandom % 8) < 4;
    rd_ready[2] <= ($urandom % 8) < 2;
    rd_ready[3] <= ($urandom % 8) < 5;
  endtask

  initial for (int o = 0; o < 4; o++) behind[o] = 0;

endmodule

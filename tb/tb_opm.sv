// tb_opm: checks the output port module.
// Four sources offer packets of 2 to 5 flits with random gaps. Checked, in
// synchronous and then asynchronous output mode: packets leave whole and in
// order per source (no interleaving of two packets), each header is granted
// round-robin starting after the previous winner, only the granted input
// sees req_ready, and every flit offered is delivered. Contention for the
// output (two or more headers waiting) must occur.
module tb_opm;
  import noc_pkg::*;

  logic        clk = 1'b0, rclk = 1'b0, rst_n = 1'b0;
  logic        async_mode = 1'b0;
  logic [3:0]  req_valid = '0, req_ready;
  flit_t       req_flit [4];
  logic        out_req, out_ack = 1'b0;
  flit_t       out_flit;
  int          checks = 0, failures = 0;

  opm #(.NIN(4)) dut (.*);

  always #5 clk = ~clk;
  always #8 rclk = ~rclk;

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

  // sources
  int  len [4], idx [4], pkt [4];
  int  sent_flits = 0, got_flits = 0;
  int  last_win = 3, n_conflict = 0;
  logic busy = 1'b0;
  int  owner = 0;
  logic run = 1'b0;

  function automatic flit_t make(int s);
    flit_t f;
    f.kind = (idx[s] == 0) ? FLIT_HEAD : (idx[s] == len[s] - 1) ? FLIT_TAIL : FLIT_BODY;
    f.data = {16'(s), 24'(pkt[s]), 24'(idx[s])};
    return f;
  endfunction

  always @(posedge clk) if (rst_n) begin
    int fired;
    fired = -1;
    // grant checks, state before the edge
    for (int s = 0; s < 4; s++) if (req_valid[s] && req_ready[s]) fired = s;
    check($countones(req_ready) <= 1, "one input served at a time");
    if (fired >= 0) begin
      if (!busy) begin
        int expw;
        expw = -1;
        for (int i = 1; i <= 4; i++) if (expw < 0 && req_valid[(last_win + i) % 4]) expw = (last_win + i) % 4;
        check(fired == expw, $sformatf("round robin: granted %0d expected %0d", fired, expw));
        if ($countones(req_valid) > 1) n_conflict++;
        last_win = fired;
        busy     = 1'b1;
        owner    = fired;
      end else begin
        check(fired == owner, "packet keeps the output");
      end
      if (req_flit[fired].kind == FLIT_TAIL) busy = 1'b0;
      sent_flits++;
    end
    // advance sources
    for (int s = 0; s < 4; s++) begin
      if (req_valid[s] && req_ready[s]) begin
        idx[s]++;
        if (idx[s] == len[s]) begin
          idx[s] = 0;
          pkt[s]++;
          len[s] = 2 + $urandom % 4;
        end
      end
      if (!(req_valid[s] && !req_ready[s])) begin
        req_valid[s] <= run && ($urandom % 3 != 0);
        req_flit[s]  <= make(s);
      end
    end
  end

  // output checking: per source expected packet/idx
  int exp_pkt [4], exp_idx [4];
  int cur = -1;
  task automatic take(flit_t f);
    int s, p, i;
    s = int'(f.data[63:48]);
    p = int'(f.data[47:24]);
    i = int'(f.data[23:0]);
    if (f.kind == FLIT_HEAD) begin
      check(cur < 0, "header only between packets");
      cur = s;
    end
    check(s == cur, "no interleaving");
    check(s < 4 && p == exp_pkt[s] && i == exp_idx[s], $sformatf("order src %0d pkt %0d idx %0d", s, p, i));
    if (s < 4) begin
      exp_idx[s]++;
      if (f.kind == FLIT_TAIL) begin
        exp_idx[s] = 0;
        exp_pkt[s]++;
        cur = -1;
      end
    end
    got_flits++;
  endtask

  always @(posedge clk) if (rst_n && !async_mode) begin
    if (out_req && out_ack) take(out_flit);
    out_ack <= ($urandom % 4) != 0;
  end

  logic req_was = 1'b0;
  always @(posedge rclk) if (rst_n && async_mode) begin
    if (out_req && !req_was) take(out_flit);
    req_was <= out_req;
    if (out_req && !out_ack) out_ack <= 1'b1;
    else if (!out_req && out_ack) out_ack <= 1'b0;
  end

  task automatic restart();
    for (int s = 0; s < 4; s++) begin
      len[s] = 2 + $urandom % 4; idx[s] = 0; pkt[s] = 0;
      exp_pkt[s] = 0; exp_idx[s] = 0;
      req_flit[s] = '0;
    end
    cur = -1; busy = 1'b0; last_win = 3;
    sent_flits = 0; got_flits = 0;
  endtask

  initial begin
    restart();
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    run   <= 1'b1;
    wait (got_flits >= 1500);
    run <= 1'b0;
    repeat (30) @(posedge clk);
    check(got_flits == sent_flits, "sync: all flits delivered");
    rst_n <= 1'b0;
    @(posedge clk);
    async_mode = 1'b1;
    req_valid <= '0;
    out_ack   <= 1'b0;
    @(posedge clk);
    restart();
    @(posedge clk);
    rst_n <= 1'b1;
    run   <= 1'b1;
    wait (got_flits >= 400);
    run <= 1'b0;
    repeat (200) @(posedge clk);
    check(got_flits == sent_flits, $sformatf("async: %0d sent, %0d delivered", sent_flits, got_flits));
    $display("opm: conflicts=%0d", n_conflict);
    check(n_conflict > 0, "output contention seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_link_tx: checks the send side of a link in both modes.
// Synchronous phase: link_tx must be a pass-through of valid/ready and every
// flit handed over must reach the receiver in order. Asynchronous phase: the
// testbench is a four-phase receiver on its own, unrelated clock; it checks
// that req rises one sender clock after a flit is taken, that the flit is
// stable while req is high, that req only falls after ack has risen, and
// that flits arrive in order, one per handshake.
module tb_link_tx;
  import noc_pkg::*;

  logic   clk = 1'b0, rclk = 1'b0, rst_n = 1'b0;
  logic   async_mode = 1'b0;
  logic   in_valid = 1'b0, in_ready;
  flit_t  in_flit = '0;
  logic   req, ack = 1'b0;
  flit_t  flit;
  int     checks = 0, failures = 0;

  link_tx dut (.*);

  always #5 clk = ~clk;
  always #7 rclk = ~rclk;

  initial begin
    repeat (100000) @(posedge clk);
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

  int   sent = 0, got = 0;
  logic took_prev = 1'b0;

  // source, sender clock
  always @(posedge clk) if (rst_n) begin
    if (!async_mode) begin
      check(req == in_valid && in_ready == ack && flit == in_flit, "sync pass-through");
      if (req && ack) begin
        check(flit.data == 64'(got), "sync order");
        got++;
      end
    end else begin
      if (took_prev) check(req, "req one clock after the flit is taken");
    end
    took_prev <= async_mode && in_valid && in_ready;
    if (in_valid && in_ready) sent++;
    if (!(in_valid && !in_ready)) begin
      in_valid     <= ($urandom % 3) != 0;
      in_flit.kind <= FLIT_BODY;
      in_flit.data <= 64'(sent);
    end
    if (!async_mode) ack <= ($urandom % 3) != 0;
  end

  // four-phase receiver, own clock
  logic  req_was = 1'b0;
  flit_t held;
  always @(posedge rclk) if (rst_n && async_mode) begin
    if (req && req_was) check(flit == held, "flit stable while req is high");
    if (!req && req_was) check(ack, "req falls only after ack");
    if (req && !req_was) begin
      held = flit;
      check(flit.data == 64'(got), "async order");
      got++;
    end
    req_was <= req;
    if (req && !ack && ($urandom % 2 == 0)) ack <= 1'b1;
    else if (!req && ack) ack <= 1'b0;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (got >= 300);
    @(posedge clk);
    in_valid <= 1'b0;
    // switch mode under reset
    rst_n <= 1'b0;
    repeat (2) @(posedge clk);
    async_mode = 1'b1;
    ack   <= 1'b0;
    sent  = 0;
    got   = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    wait (got >= 200);
    check(got == 200, "async flits delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

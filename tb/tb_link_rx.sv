// tb_link_rx: checks the receive side of a link in both modes.
// Synchronous phase: out_valid = req, ack = out_ready, flits in order.
// Asynchronous phase: the testbench is a four-phase sender on its own clock;
// the receiver must offer each flit exactly once, not before req has passed
// the two-flop synchronizer (two receiver clocks), raise ack only after the
// flit is taken, and drop ack only after req has fallen.
module tb_link_rx;
  import noc_pkg::*;

  logic   clk = 1'b0, sclk = 1'b0, rst_n = 1'b0;
  logic   async_mode = 1'b0;
  logic   req = 1'b0, ack;
  flit_t  flit = '0;
  logic   out_valid, out_ready = 1'b0;
  flit_t  out_flit;
  int     checks = 0, failures = 0;

  link_rx dut (.*);

  always #5 clk = ~clk;
  always #6 sclk = ~sclk;

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
  int   req_high_clks = 0;
  logic ack_prev = 1'b0, took_prev = 1'b0;

  // receiver side, receiver clock
  always @(posedge clk) if (rst_n) begin
    if (!async_mode) begin
      check(out_valid == req && ack == out_ready && out_flit == flit, "sync pass-through");
    end else begin
      req_high_clks = req ? req_high_clks + 1 : 0;
      if (out_valid) check(req_high_clks >= 2, "flit offered only after synchronizing req");
      if (ack && !ack_prev) check(took_prev, "ack rises after the flit is taken");
      if (!ack && ack_prev) check(req_high_clks == 0, "ack falls after req has fallen");
      took_prev <= out_valid && out_ready;
      ack_prev  <= ack;
    end
    if (out_valid && out_ready) begin
      check(out_flit.data == 64'(got), "order");
      got++;
    end
    out_ready <= ($urandom % 3) != 0;
  end

  // sender: synchronous valid/ready on clk
  always @(posedge clk) if (rst_n && !async_mode) begin
    if (req && ack) sent++;
    if (!(req && !ack)) begin
      req       <= ($urandom % 3) != 0;
      flit.kind <= FLIT_BODY;
      flit.data <= 64'(sent);
    end
  end

  // sender: four-phase on sclk (state machine)
  int sstate = 0;
  always @(posedge sclk) if (rst_n && async_mode) begin
    case (sstate)
      0: if ($urandom % 2 == 0) begin
           flit.kind <= FLIT_BODY;
           flit.data <= 64'(sent);
           sstate    = 1;
         end
      1: begin req <= 1'b1; sstate = 2; end
      2: if (ack) begin req <= 1'b0; sent++; sstate = 3; end
      default: if (!ack) sstate = 0;
    endcase
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (got >= 300);
    @(posedge clk);
    rst_n <= 1'b0;
    req   <= 1'b0;
    repeat (2) @(posedge clk);
    async_mode = 1'b1;
    sent = 0;
    got  = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    wait (sent >= 200);
    repeat (10) @(posedge clk);
    check(got == sent, $sformatf("async: %0d sent, %0d received", sent, got));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

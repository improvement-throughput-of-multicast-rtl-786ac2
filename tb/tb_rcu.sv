// tb_rcu: checks the route computation unit.
// Random headers and partition strings; PathEnabled must equal, per output,
// whether the address and the partition share a bit, route_valid must rise
// exactly two clocks after the header write, stay while the packet is in
// flight and fall one clock after pkt_done.
module tb_rcu;
  import noc_pkg::*;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic              hdr_we = 1'b0, pkt_done = 1'b0;
  logic [ADDR_W-1:0] hdr_addr = '0;
  logic [ADDR_W-1:0] partition [4];
  logic              route_valid;
  logic [3:0]        path_en;
  int                checks = 0, failures = 0;

  rcu #(.NOUT(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%t FAIL %s", $time, what);
    end
  endtask

  initial begin
    logic [3:0]        exp_pe;
    logic [ADDR_W-1:0] a;
    logic [ADDR_W-1:0] part_v [4];
    int                hold;
    for (int k = 0; k < 4; k++) partition[k] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check(!route_valid, "route_valid low after reset");
    for (int i = 0; i < 300; i++) begin
      for (int k = 0; k < 4; k++) begin
        part_v[k]    = {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
        partition[k] <= part_v[k];
      end
      a = ($urandom % 5 == 0) ? '0 : ({$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom});
      hdr_addr <= a;
      @(posedge clk);
      hdr_we <= 1'b1;
      @(posedge clk);          // header latched at this edge
      hdr_we   <= 1'b0;
      hdr_addr <= {$urandom, $urandom};   // later flits must not disturb the latched address
      #1 check(!route_valid, "no route one clock after the header");
      @(posedge clk);          // route computed at this edge
      #1;
      for (int k = 0; k < 4; k++) begin
        exp_pe[k] = 1'b0;
        for (int b = 0; b < int'(ADDR_W); b++)
          if (a[b] && part_v[k][b]) exp_pe[k] = 1'b1;
      end
      check(route_valid, "route valid two clocks after the header");
      check(path_en == exp_pe, $sformatf("path_en %b expected %b", path_en, exp_pe));
      hold = $urandom % 6;
      repeat (hold) begin
        @(posedge clk);
        #1 check(route_valid && path_en == exp_pe, "route held during the packet");
      end
      pkt_done <= 1'b1;
      @(posedge clk);
      pkt_done <= 1'b0;
      #1 check(!route_valid, "route dropped after pkt_done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// rcu: route computation unit of an input port module.
//
// When a header is written into the CMR buffer its destination bit string is
// copied into a one-entry address buffer. In the next clock the unit works
// out PathEnabled: output k is selected when the address shares a bit with
// the partition string of output k. The address buffer is then closed for
// the rest of the packet (no further writes, PathEnabled held) and is opened
// again by pkt_done, which the CMR buffer raises once every selected output
// has read the tail.
// Timing: hdr_we in cycle t, route_valid and path_en from cycle t+2 (one clock
// to latch, one to compute) until the cycle after pkt_done. The behaviour
// follows the document; the one-clock computation is this design's choice.
module rcu
  import noc_pkg::*;
#(
  parameter int unsigned NOUT = NBRANCH
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               hdr_we,
  input  logic [ADDR_W-1:0]  hdr_addr,
  input  logic [ADDR_W-1:0]  partition [NOUT],
  input  logic               pkt_done,
  output logic               route_valid,
  output logic [NOUT-1:0]    path_en
);

  logic              open_q;     // address buffer accepts a header
  logic              pending_q;  // address latched, route not yet computed
  logic [ADDR_W-1:0] addr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      open_q      <= 1'b1;
      pending_q   <= 1'b0;
      route_valid <= 1'b0;
      path_en     <= '0;
      addr_q      <= '0;
    end else if (pkt_done) begin
      open_q      <= 1'b1;
      pending_q   <= 1'b0;
      route_valid <= 1'b0;
    end else if (hdr_we && open_q) begin
      addr_q    <= hdr_addr;
      pending_q <= 1'b1;
      open_q    <= 1'b0;
    end else if (pending_q) begin
      for (int k = 0; k < int'(NOUT); k++) path_en[k] <= |(addr_q & partition[k]);
      route_valid <= 1'b1;
      pending_q   <= 1'b0;
    end
  end

  // A new header may only arrive while the address buffer is open.
  always_ff @(posedge clk) begin
    if (rst_n && hdr_we) assert (open_q) else $error("rcu: header while the address buffer is closed");
  end

endmodule

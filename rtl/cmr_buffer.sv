// cmr_buffer: continuous-time multicast replication buffer.
//
// A circular buffer of DEPTH flits with one write port and NRD read ports.
// Every read port keeps its own read pointer, so each output branch of a
// multicast packet drains the buffer at the rate of its own output port
// module: the branches are not kept in lock step. The flit under each read
// pointer is always on that port's data lines (the header is thus offered to
// every read interface speculatively), but a port raises rd_valid only once
// the route is known and PathEnabled selects it; unselected ports are
// throttled. The write side sees the buffer as full when the slowest selected
// reader is DEPTH flits behind. Before the route is known all ports count.
//
// Tail rule: after a tail has been stored the write side refuses the next
// header until every selected reader has read that tail; pkt_done then pulses
// for one clock, all read pointers are brought level with the write pointer
// and the route computation unit is reopened. This is the clocked form of the
// document's rule that the tail's acknowledge waits for all correct readers.
// If the route selects no output, the packet is drained through port 0's
// pointer without being offered (this drop path is this design's own).
//
// Interface: write side valid/ready, read sides valid/ready, all in one clock.
// A flit written in cycle t can be read from cycle t+1 on. DEPTH must be a
// power of two (an assumption of this design, as is the default of 4).
module cmr_buffer
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = 4,
  parameter int unsigned NRD   = NBRANCH
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            wr_valid,
  input  flit_t           wr_flit,
  output logic            wr_ready,
  input  logic            route_valid,
  input  logic [NRD-1:0]  path_en,
  output logic [NRD-1:0]  rd_valid,
  output flit_t           rd_flit  [NRD],
  input  logic [NRD-1:0]  rd_ready,
  output logic            hdr_we,
  output logic            pkt_done
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t        mem [DEPTH];
  logic [AW:0]  wp;
  logic [AW:0]  rp  [NRD];
  logic [AW:0]  cnt [NRD];
  logic         tail_in_q;      // tail stored, waiting for all readers
  logic         in_pkt_q;       // a header has been stored, tail not yet
  logic         drop;
  logic [NRD-1:0] count_en;
  logic [AW:0]  occ;
  logic         all_read;
  logic         wr_fire;
  logic         drain_fire;

  // read side: depends only on the buffer state and the route
  always_comb begin
    drop     = route_valid && (path_en == '0);
    count_en = route_valid ? path_en : '1;
    if (drop) count_en = NRD'(1);
    occ      = '0;
    all_read = 1'b1;
    for (int o = 0; o < int'(NRD); o++) begin
      cnt[o] = wp - rp[o];
      if (count_en[o] && cnt[o] > occ) occ = cnt[o];
      if (count_en[o] && cnt[o] != '0) all_read = 1'b0;
    end
  end

  always_comb begin
    for (int o = 0; o < int'(NRD); o++) begin
      rd_valid[o] = route_valid && path_en[o] && (cnt[o] != '0);
      rd_flit[o]  = mem[rp[o][AW-1:0]];
    end
  end

  assign pkt_done   = tail_in_q && route_valid && all_read;
  assign drain_fire = drop && (cnt[0] != '0);

  // write side
  assign wr_ready = (occ < (AW+1)'(DEPTH)) && !tail_in_q;
  assign wr_fire  = wr_valid && wr_ready;
  assign hdr_we   = wr_fire && (wr_flit.kind == FLIT_HEAD);

  always_ff @(posedge clk) begin
    if (wr_fire) mem[wp[AW-1:0]] <= wr_flit;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp        <= '0;
      tail_in_q <= 1'b0;
      in_pkt_q  <= 1'b0;
      for (int o = 0; o < int'(NRD); o++) rp[o] <= '0;
    end else begin
      if (wr_fire) begin
        wp <= wp + 1'b1;
        if (wr_flit.kind == FLIT_HEAD) in_pkt_q <= 1'b1;
        if (wr_flit.kind == FLIT_TAIL) begin
          tail_in_q <= 1'b1;
          in_pkt_q  <= 1'b0;
        end
      end
      if (pkt_done) begin
        tail_in_q <= 1'b0;
        for (int o = 0; o < int'(NRD); o++) rp[o] <= wp;
      end else begin
        for (int o = 0; o < int'(NRD); o++)
          if (rd_valid[o] && rd_ready[o]) rp[o] <= rp[o] + 1'b1;
        if (drain_fire) rp[0] <= rp[0] + 1'b1;
      end
    end
  end

  // A packet starts with a header; body and tail only follow a header, and
  // no header arrives inside a packet. DEPTH is a power of two.
  always_ff @(posedge clk) begin
    if (rst_n && wr_fire)
      assert ((wr_flit.kind == FLIT_HEAD) == !in_pkt_q)
        else $error("cmr_buffer: flit kind %0d out of packet order", wr_flit.kind);
  end

  initial assert ((DEPTH & (DEPTH - 1)) == 0) else $error("cmr_buffer: DEPTH must be a power of two");

endmodule

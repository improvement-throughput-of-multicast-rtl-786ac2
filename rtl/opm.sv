// opm: output port module of a router.
//
// NIN input port modules can send to this output. While no packet holds the
// output, a round-robin arbiter picks one requesting input (starting after
// the last winner); the winner keeps the output from its header to its tail
// (wormhole switching), so flits of different packets never interleave. The
// chosen input's flits go to a link_tx, which drives the output link in the
// synchronous or asynchronous mode. In synchronous mode a granted flit passes
// through without a register.
// The document names the output port module and its Ackin to the input
// module; arbitration and packet locking are this design's choice.
module opm
  import noc_pkg::*;
#(
  parameter int unsigned NIN = NBRANCH
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            async_mode,
  input  logic [NIN-1:0]  req_valid,
  input  flit_t           req_flit [NIN],
  output logic [NIN-1:0]  req_ready,
  output logic            out_req,
  output flit_t           out_flit,
  input  logic            out_ack
);

  localparam int unsigned IW = (NIN > 1) ? $clog2(NIN) : 1;

  logic          locked_q;
  logic [IW-1:0] owner_q;
  logic [IW-1:0] last_q;      // last winner, round-robin reference
  logic [IW-1:0] sel;
  logic [IW-1:0] cand;
  logic          sel_valid;
  logic          tx_ready;
  logic          fire;
  flit_t         sel_flit;

  always_comb begin
    sel       = owner_q;
    sel_valid = 1'b0;
    cand      = '0;
    if (locked_q) begin
      sel_valid = req_valid[owner_q];
    end else begin
      for (int i = int'(NIN); i >= 1; i--) begin
        cand = IW'((int'(last_q) + i) % int'(NIN));
        if (req_valid[cand]) begin
          sel       = cand;
          sel_valid = 1'b1;
        end
      end
    end
  end

  assign sel_flit = req_flit[sel];
  assign fire     = sel_valid && tx_ready;

  always_comb begin
    req_ready      = '0;
    req_ready[sel] = fire;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked_q <= 1'b0;
      owner_q  <= '0;
      last_q   <= IW'(NIN - 1);
    end else if (fire) begin
      if (sel_flit.kind == FLIT_TAIL) begin
        locked_q <= 1'b0;
      end else if (!locked_q) begin
        locked_q <= 1'b1;
        owner_q  <= sel;
        last_q   <= sel;
      end
    end
  end

  link_tx u_tx (
    .clk, .rst_n, .async_mode,
    .in_valid (sel_valid),
    .in_flit  (sel_flit),
    .in_ready (tx_ready),
    .req      (out_req),
    .flit     (out_flit),
    .ack      (out_ack)
  );

  // A packet is won with its header.
  always_ff @(posedge clk) begin
    if (rst_n && fire && !locked_q)
      assert (sel_flit.kind == FLIT_HEAD) else $error("opm: output won by a non-header flit");
  end

endmodule

// link_rx: receive side of a router link, synchronous or asynchronous.
//
// The same three wires (req, flit, ack) carry either protocol, chosen by
// async_mode, which is meant to be set during reset and left alone:
//  - synchronous (async_mode=0): req is a valid and ack a ready in the
//    receiver's clock; a flit moves in every cycle where both are high.
//    Sender and receiver must share this clock.
//  - asynchronous (async_mode=1): four-phase return-to-zero bundled data.
//    The sender raises req with the flit already stable and holds both until
//    ack rises; then req falls, then ack falls. req crosses into this clock
//    through a two-flop synchronizer, so the sender may run on any clock.
//    The flit is offered on out_flit while the synchronized req is high and
//    ack is still low; ack rises in the clock after the flit is taken.
// The document names only the support of both modes in the port modules; the
// two protocols and the synchronizer are this design's choice.
module link_rx
  import noc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   async_mode,
  input  logic   req,
  input  flit_t  flit,
  output logic   ack,
  output logic   out_valid,
  output flit_t  out_flit,
  input  logic   out_ready
);

  logic req_m, req_s;   // synchronizer stages
  logic ack_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_m <= 1'b0;
      req_s <= 1'b0;
      ack_q <= 1'b0;
    end else begin
      req_m <= req;
      req_s <= req_m;
      if (async_mode) begin
        if (req_s && !ack_q && out_ready) ack_q <= 1'b1;
        else if (!req_s && ack_q)          ack_q <= 1'b0;
      end else begin
        ack_q <= 1'b0;
      end
    end
  end

  assign out_flit  = flit;
  assign out_valid = async_mode ? (req_s && !ack_q) : req;
  assign ack       = async_mode ? ack_q : out_ready;

endmodule

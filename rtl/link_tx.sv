// link_tx: send side of a router link, synchronous or asynchronous.
//
// Counterpart of link_rx; async_mode is set during reset and left alone.
//  - synchronous (async_mode=0): a straight valid/ready pass-through, req =
//    in_valid, in_ready = ack, flit = in_flit, no added latency.
//  - asynchronous (async_mode=1): four-phase bundled data. An offered flit is
//    copied into a holding register (in_ready is high only while idle), req
//    rises in the next clock and stays high until the synchronized ack is
//    seen high; req then falls and the next flit waits until the synchronized
//    ack is seen low. One flit takes about two synchronizer delays each way.
// The protocols are this design's choice; the document names only the
// support of synchronous and asynchronous transmission.
module link_tx
  import noc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   async_mode,
  input  logic   in_valid,
  input  flit_t  in_flit,
  output logic   in_ready,
  output logic   req,
  output flit_t  flit,
  input  logic   ack
);

  typedef enum logic [1:0] {TX_IDLE, TX_WAIT_ACK, TX_WAIT_NACK} tx_state_e;

  tx_state_e state_q;
  flit_t     flit_q;
  logic      ack_m, ack_s;   // synchronizer stages

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= TX_IDLE;
      flit_q  <= '0;
      ack_m   <= 1'b0;
      ack_s   <= 1'b0;
    end else begin
      ack_m <= ack;
      ack_s <= ack_m;
      if (async_mode) begin
        case (state_q)
          TX_IDLE:      if (in_valid) begin
                          flit_q  <= in_flit;
                          state_q <= TX_WAIT_ACK;
                        end
          TX_WAIT_ACK:  if (ack_s)  state_q <= TX_WAIT_NACK;
          TX_WAIT_NACK: if (!ack_s) state_q <= TX_IDLE;
          default:      state_q <= TX_IDLE;
        endcase
      end else begin
        state_q <= TX_IDLE;
      end
    end
  end

  assign in_ready = async_mode ? (state_q == TX_IDLE)     : ack;
  assign req      = async_mode ? (state_q == TX_WAIT_ACK) : in_valid;
  assign flit     = async_mode ? flit_q                   : in_flit;

  // Bundled data: in asynchronous mode req is never up in the idle state, so
  // the holding register is only loaded while req is down.
  always_ff @(posedge clk) begin
    if (rst_n && async_mode && state_q == TX_IDLE) assert (!req) else $error("link_tx: req up while idle");
  end

endmodule

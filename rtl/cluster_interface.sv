// cluster_interface: Cluster Interface (CI) between one cluster's electrical
// NoC and its optical router.
//
// Two circular queues decouple the layers so that an IP hands a message for
// another cluster to the CI and carries on:
//   TX queue: flits arriving from the NoC (from_noc, credit from_noc_credit);
//   RX queue: flits rebuilt by the deserializer, drained into the NoC
//             (to_noc, taken when to_noc_credit is high).
// Sending a packet (header, size S, S payload flits):
//   IDLE  -> a header is at the head of the TX queue: request the optical
//            path with arb_rx and arb_dest = the header's cluster field;
//   REQ   -> wait for arb_ack (the arbiter has set the optical routers);
//   SEND  -> serialize the packet's flits, one bit per clock;
//   DRAIN -> after the last bit, wait DRAIN_CYCLES clocks so the light
//            still crossing the optical routers arrives;
//   TAIL  -> hold arb_tail until arb_tail_ack, then IDLE.
// Receiving needs no control: the arbiter lets a source send only while
// dest_ready is high, i.e. while the RX queue has room for MAX_PKT flits, so
// an optical stream never meets a full queue. rx_overflow is a sticky error
// flag for packets longer than MAX_PKT.
//
// From the document: two circular queues, the serializer/deserializer, the
// request to the arbiter and the forwarding to the destination IP. This
// design's: queue depths, MAX_PKT, dest_ready, the drain wait and the FSM.
module cluster_interface
  import htm_pkg::*;
#(
  parameter int unsigned N            = 9,
  parameter int unsigned CI_DEPTH     = 128,
  parameter int unsigned MAX_PKT      = 66,
  parameter int unsigned DRAIN_CYCLES = 4,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // electrical side
  input  link_t         from_noc,
  output logic          from_noc_credit,
  output link_t         to_noc,
  input  logic          to_noc_credit,
  // arbiter side
  output logic          arb_rx,
  output logic [IW-1:0] arb_dest,
  input  logic          arb_ack,
  output logic          arb_tail,
  input  logic          arb_tail_ack,
  output logic          dest_ready,
  // optical side
  output opt_t          opt_tx,
  input  opt_t          opt_rx,
  // status
  output logic          rx_overflow
);
  typedef enum logic [2:0] {S_IDLE, S_REQ, S_SEND, S_DRAIN, S_TAIL} state_e;
  typedef enum logic [1:0] {F_HDR, F_SIZE, F_PAY} fphase_e;
  localparam int CNTW = $clog2(CI_DEPTH + 1);

  state_e  state;
  fphase_e fph;
  flit_t   left;
  logic [$clog2(DRAIN_CYCLES + 2)-1:0] dcnt;

  // TX queue
  flit_t           txq_head;
  logic            txq_full, txq_empty, txq_pop;
  logic [CNTW-1:0] txq_cnt;
  // RX queue
  flit_t           rxq_head;
  logic            rxq_full, rxq_empty, rxq_pop;
  logic [CNTW-1:0] rxq_cnt;
  // serdes
  logic            ser_valid, ser_ready, tx_busy, des_valid;
  flit_t           des_data;

  circ_fifo #(.WIDTH(FLIT_W), .DEPTH(CI_DEPTH)) u_txq (
    .clk, .rst_n,
    .wr_en(from_noc.valid), .wr_data(from_noc.data),
    .rd_en(txq_pop), .rd_data(txq_head),
    .full(txq_full), .empty(txq_empty), .count(txq_cnt)
  );
  assign from_noc_credit = !txq_full;

  circ_fifo #(.WIDTH(FLIT_W), .DEPTH(CI_DEPTH)) u_rxq (
    .clk, .rst_n,
    .wr_en(des_valid), .wr_data(des_data),
    .rd_en(rxq_pop), .rd_data(rxq_head),
    .full(rxq_full), .empty(rxq_empty), .count(rxq_cnt)
  );
  assign rxq_pop      = !rxq_empty && to_noc_credit;
  assign to_noc.valid = rxq_pop;
  assign to_noc.data  = rxq_head;
  assign dest_ready   = (32'(rxq_cnt) + MAX_PKT) <= CI_DEPTH;

  ci_serdes u_serdes (
    .clk, .rst_n,
    .ser_valid(ser_valid), .ser_data(txq_head), .ser_ready(ser_ready),
    .tx_busy(tx_busy), .opt_tx(opt_tx),
    .opt_rx(opt_rx), .des_valid(des_valid), .des_data(des_data)
  );

  assign ser_valid = (state == S_SEND) && !txq_empty;
  assign txq_pop   = ser_valid && ser_ready;
  assign arb_rx    = (state == S_REQ);
  assign arb_tail  = (state == S_TAIL);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      fph      <= F_HDR;
      left     <= '0;
      dcnt     <= '0;
      arb_dest <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (!txq_empty) begin
          arb_dest <= IW'(hdr_cluster(txq_head));
          state    <= S_REQ;
        end
        S_REQ: if (arb_ack) begin
          state <= S_SEND;
          fph   <= F_HDR;
        end
        S_SEND: if (txq_pop) begin
          unique case (fph)
            F_HDR:  fph <= F_SIZE;
            F_SIZE: begin
              left <= txq_head;
              fph  <= F_PAY;
              if (txq_head == '0) state <= S_DRAIN;
            end
            default: begin
              left <= left - 1'b1;
              if (left == flit_t'(1)) state <= S_DRAIN;
            end
          endcase
          dcnt <= '0;
        end
        S_DRAIN: if (!tx_busy) begin
          if (32'(dcnt) >= DRAIN_CYCLES) state <= S_TAIL;
          else dcnt <= dcnt + 1'b1;
        end
        S_TAIL: if (arb_tail_ack) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)                      rx_overflow <= 1'b0;
    else if (des_valid && rxq_full)  rx_overflow <= 1'b1;
  end

  a_noc_credit: assert property (@(posedge clk) disable iff (!rst_n)
    from_noc.valid |-> from_noc_credit);
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    des_valid |-> !rxq_full);

endmodule

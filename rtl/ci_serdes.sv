// ci_serdes: serializer/deserializer of the cluster interface.
//
// Serializer: takes one flit when ser_ready and ser_valid are both high and
// sends it on the optical channel most significant bit first, one bit per
// clock, with opt_tx.valid marking light on the channel. ser_ready is high
// while the shift register is empty or sending its last bit, so
// back-to-back flits leave without a gap. tx_busy is high while bits remain.
//
// Deserializer: shifts in every bit that arrives with opt_rx.valid; after
// FLIT_W bits it presents the flit on des_data with a one-cycle des_valid
// pulse, one clock after the last bit. Word alignment comes from packets
// always holding whole flits, so no framing symbol is needed.
//
// The document says only that the interface has a serializer/deserializer;
// bit order, one bit per clock and the valid strobe are this design's.
module ci_serdes
  import htm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // serializer
  input  logic  ser_valid,
  input  flit_t ser_data,
  output logic  ser_ready,
  output logic  tx_busy,
  output opt_t  opt_tx,
  // deserializer
  input  opt_t  opt_rx,
  output logic  des_valid,
  output flit_t des_data
);
  localparam int CW = $clog2(FLIT_W + 1);

  flit_t         tx_sh;
  logic [CW-1:0] tx_cnt;
  flit_t         rx_sh;
  logic [CW-1:0] rx_cnt;

  assign ser_ready    = (tx_cnt <= CW'(1));
  assign tx_busy      = (tx_cnt != '0);
  assign opt_tx.valid = tx_busy;
  assign opt_tx.data  = tx_sh[FLIT_W-1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tx_sh  <= '0;
      tx_cnt <= '0;
    end else if (ser_ready && ser_valid) begin
      tx_sh  <= ser_data;
      tx_cnt <= CW'(FLIT_W);
    end else if (tx_busy) begin
      tx_sh  <= {tx_sh[FLIT_W-2:0], 1'b0};
      tx_cnt <= tx_cnt - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rx_sh     <= '0;
      rx_cnt    <= '0;
      des_valid <= 1'b0;
      des_data  <= '0;
    end else begin
      des_valid <= 1'b0;
      if (opt_rx.valid) begin
        rx_sh <= {rx_sh[FLIT_W-2:0], opt_rx.data};
        if (rx_cnt == CW'(FLIT_W - 1)) begin
          rx_cnt    <= '0;
          des_valid <= 1'b1;
          des_data  <= {rx_sh[FLIT_W-2:0], opt_rx.data};
        end else begin
          rx_cnt <= rx_cnt + 1'b1;
        end
      end
    end
  end

endmodule

// xcvr_module: transceiver module of one ring (receive module + transmit module).
//
// Sits between the TAXI receiver/transmitter pair of a ring and the ring
// controller. Receive side: every byte the TAXI receiver strobes out while it
// reports synchronisation and no code violation is written into the receive
// FIFO; bytes received out of sync or with a violation are dropped and
// counted, and so are bytes that find the FIFO full (the link cannot be
// stalled). Transmit side: the ring controller writes into the transmit FIFO
// and the module hands one byte per cycle to the TAXI transmitter whenever
// the FIFO holds data and the transmitter is ready. status mirrors the empty,
// half-full and full flags of both FIFOs, as the status register of the
// earlier router boards did. FIFO-behind-TAXI structure follows the document;
// drop-and-count on errors and the status bit order are this design's choices.
//
// Timing: a received byte is visible on rx_data the cycle after its strobe;
// tx_strobe/tx_data present the FIFO head combinationally.
module xcvr_module
  import clnet_pkg::*;
#(
  parameter int unsigned DEPTH = 2048
) (
  input  logic         clk,
  input  logic         rst_n,
  // TAXI receiver (parallel side)
  input  logic         taxi_rx_strobe,
  input  tbyte_t       taxi_rx_data,
  input  logic         taxi_rx_sync,
  input  logic         taxi_rx_violation,
  // TAXI transmitter (parallel side)
  output logic         taxi_tx_strobe,
  output tbyte_t       taxi_tx_data,
  input  logic         taxi_tx_ready,
  // receive FIFO read port, to the ring controller
  input  logic         rx_rd,
  output tbyte_t       rx_data,
  output logic         rx_empty,
  // transmit FIFO write port, from the ring controller
  input  logic         tx_wr,
  input  tbyte_t       tx_data,
  output logic         tx_full,
  // {rx_empty, rx_half, rx_full, tx_empty, tx_half, tx_full}
  output logic [5:0]   status,
  output logic [15:0]  rx_error_count,
  output logic [15:0]  rx_overrun_count
);
  logic rx_wr, rx_half, rx_full;
  logic tx_empty, tx_half;

  assign rx_wr = taxi_rx_strobe && taxi_rx_sync && !taxi_rx_violation;

  sync_fifo #(.WIDTH(9), .DEPTH(DEPTH)) u_rx_fifo (
    .clk, .rst_n,
    .wr_en(rx_wr), .wr_data(taxi_rx_data),
    .rd_en(rx_rd), .rd_data(rx_data),
    .empty(rx_empty), .half_full(rx_half), .full(rx_full), .count()
  );

  sync_fifo #(.WIDTH(9), .DEPTH(DEPTH)) u_tx_fifo (
    .clk, .rst_n,
    .wr_en(tx_wr), .wr_data(tx_data),
    .rd_en(taxi_tx_strobe), .rd_data(taxi_tx_data),
    .empty(tx_empty), .half_full(tx_half), .full(tx_full), .count()
  );

  assign taxi_tx_strobe = !tx_empty && taxi_tx_ready;
  assign status = {rx_empty, rx_half, rx_full, tx_empty, tx_half, tx_full};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_error_count   <= '0;
      rx_overrun_count <= '0;
    end else begin
      if (taxi_rx_strobe && (!taxi_rx_sync || taxi_rx_violation)) rx_error_count <= rx_error_count + 1'b1;
      if (rx_wr && rx_full) rx_overrun_count <= rx_overrun_count + 1'b1;
    end
  end
endmodule

// tb_xcvr_module: receive side gets random bytes with random loss of sync and
// code violations; only clean bytes may reach the receive FIFO, in order, and
// the error counter must count the others; an overrun of the 16-deep FIFO is
// provoked and counted. Transmit side: bytes written by the controller must
// leave in order, one per cycle while the transmitter is ready.
module tb_xcvr_module;
  import clnet_pkg::*;
  logic clk = 0, rst_n = 0;
  logic taxi_rx_strobe, taxi_rx_sync, taxi_rx_violation, taxi_tx_strobe, taxi_tx_ready;
  tbyte_t taxi_rx_data, taxi_tx_data, rx_data, tx_data;
  logic rx_rd, rx_empty, tx_wr, tx_full;
  logic [5:0] status;
  logic [15:0] rx_error_count, rx_overrun_count;
  tbyte_t rxq[$], txq[$];
  int checks = 0, failures = 0, exp_err = 0, exp_ovr = 0, tx_out = 0;

  xcvr_module #(.DEPTH(16)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #300000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receive model and reader
  always @(posedge clk) if (rst_n) begin
    if (rx_rd && !rx_empty) begin
      check(rxq.size() != 0 && rx_data == rxq[0], "rx order");
      if (rxq.size() != 0) void'(rxq.pop_front());
    end
    if (taxi_rx_strobe) begin
      if (!taxi_rx_sync || taxi_rx_violation) exp_err++;
      else if (status[3]) exp_ovr++;          // rx FIFO full
      else rxq.push_back(taxi_rx_data);
    end
    if (taxi_tx_strobe) begin
      check(txq.size() != 0 && taxi_tx_data == txq[0], "tx order");
      if (txq.size() != 0) void'(txq.pop_front());
      tx_out++;
    end
    if (tx_wr && !tx_full) txq.push_back(tx_data);
  end

  initial begin
    taxi_rx_strobe = 0; taxi_rx_sync = 1; taxi_rx_violation = 0; taxi_rx_data = 0;
    taxi_tx_ready = 1; rx_rd = 0; tx_wr = 0; tx_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      taxi_rx_strobe    = ($urandom % 4) != 0;
      taxi_rx_sync      = ($urandom % 10) != 0;
      taxi_rx_violation = ($urandom % 12) == 0;
      taxi_rx_data      = 9'($urandom);
      // slow reader in the middle third forces overruns
      rx_rd             = (cyc > 1300 && cyc < 2600) ? (($urandom % 8) == 0) : (($urandom % 4) != 0);
      tx_wr             = ($urandom % 3) != 0;
      tx_data           = 9'($urandom);
      taxi_tx_ready     = ($urandom % 5) != 0;
      if (cyc >= 3800) begin taxi_rx_strobe = 0; tx_wr = 0; rx_rd = 1; end
    end
    @(negedge clk);
    check(rx_error_count == 16'(exp_err), "error count");
    check(rx_overrun_count == 16'(exp_ovr), "overrun count");
    check(exp_ovr > 0, "overrun provoked");
    check(rxq.size() == 0 && rx_empty, "rx drained");
    check(txq.size() == 0 && status[2], "tx drained");
    check(tx_out > 1000, "tx traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_nic: one interface card on a scripted downlink.
//   receive: its own IP, another IP, a loaded VCI and an unknown VCI; only the
//   first and third reach the host, stripped to the datagram, last byte
//   flagged, one interrupt each; hub commands in the middle of a packet do
//   not disturb it; with the host not reading, a packet that finds the
//   receive FIFO over half full is dropped and counted;
//   transmit: polled without a packet the card stays silent; polled with a
//   packet it sends SYNC, on Allow the whole packet, then holds the link
//   until Force release; polls for other addresses are ignored.
module tb_nic;
  import clnet_pkg::*;
  import clnet_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [3:0] poll_addr = 4'd6;
  logic [31:0] my_ip = 32'h89BD6106;
  logic vci_wr = 0, vci_valid = 0;
  logic [1:0] vci_index = 0;
  logic [23:0] vci_data = 0;
  logic host_tx_wr = 0, host_tx_full, host_rx_rd = 0, host_rx_empty, irq;
  tbyte_t host_tx_data = 0, host_rx_data, dn_data = 0, up_data;
  logic [15:0] rx_packets, rx_dropped;
  logic dn_valid = 0, up_en, up_valid, up_sync;

  nic #(.TX_DEPTH(2048), .RX_DEPTH(256), .NVCI(4)) dut (.*);

  int checks = 0, failures = 0, irqs = 0;
  bq_t upcap;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (irq) irqs++;
    if (up_en && up_valid && !up_sync) upcap.push_back(up_data);
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic dn(tbyte_t b);
    @(negedge clk);
    dn_valid = 1; dn_data = b;
    @(negedge clk);
    dn_valid = 0;
  endtask

  // send a packet; a hub command goes in after byte 'cmd_at' (-1: none)
  task automatic dn_pkt(bq_t p, int cmd_at);
    foreach (p[i]) begin
      @(negedge clk);
      dn_valid = 1; dn_data = p[i];
      if (i == cmd_at) begin
        @(negedge clk);
        dn_data = hub_byte(HC_POLL, 4'd3);
      end
    end
    @(negedge clk);
    dn_valid = 0;
    repeat (3) @(negedge clk);
  endtask

  // read one datagram from the host side
  task automatic host_read(output bq_t got);
    got = {};
    forever begin
      @(negedge clk);
      if (!host_rx_empty) begin
        got.push_back(host_rx_data);
        host_rx_rd = 1;
        @(negedge clk);
        host_rx_rd = 0;
        if (got[got.size() - 1][8]) break;
      end
    end
  endtask

  function automatic bq_t datagram(bq_t p);
    bq_t d;
    for (int i = 5; i < p.size() - 1; i++) d.push_back({(i == p.size() - 2), p[i][7:0]});
    return d;
  endfunction

  initial begin
    bq_t pm, po, pv, pu, got, tp;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    vci_wr = 1; vci_index = 2; vci_data = 24'h00BEEF; vci_valid = 1;
    @(negedge clk);
    vci_wr = 0;

    // ---- receive filtering
    pm = make_pkt(1'b1, 1'b0, 32'h89BD6106, 1, 60);
    po = make_pkt(1'b1, 1'b0, 32'h89BD6107, 2, 60);
    pv = make_pkt(1'b0, 1'b0, 32'h00BEEF00, 3, 60);
    pu = make_pkt(1'b0, 1'b0, 32'h00BEEE00, 4, 60);
    dn_pkt(pm, 20);
    dn_pkt(po, 3);
    dn_pkt(pv, 40);
    dn_pkt(pu, -1);
    host_read(got);
    check(got == datagram(pm), "own IP datagram");
    host_read(got);
    check(got == datagram(pv), "VCI datagram");
    repeat (5) @(negedge clk);
    check(host_rx_empty, "nothing else delivered");
    check(irqs == 2 && rx_packets == 2, "one interrupt per packet");

    // ---- receive overflow: 256-deep FIFO, host not reading
    for (int k = 0; k < 4; k++) dn_pkt(make_pkt(1'b1, 1'b0, 32'h89BD6106, 10 + k, 100), -1);
    check(rx_dropped == 2, "packets dropped when over half full");
    check(rx_packets == 4, "two more received");
    while (!host_rx_empty) begin
      @(negedge clk); host_rx_rd = 1;
      @(negedge clk); host_rx_rd = 0;
    end

    // ---- transmit
    dn(hub_byte(HC_POLL, 4'd6));
    repeat (5) @(negedge clk);
    check(!up_en, "silent without a packet");
    dn(hub_byte(HC_RELEASE, 4'd0));
    tp = make_pkt(1'b1, 1'b0, 32'h89BD6199, 7, 576);
    foreach (tp[i]) begin
      @(negedge clk); host_tx_wr = 1; host_tx_data = tp[i];
    end
    @(negedge clk); host_tx_wr = 0;
    dn(hub_byte(HC_POLL, 4'd5));
    repeat (3) @(negedge clk);
    check(!up_en, "poll for another card ignored");
    dn(hub_byte(HC_POLL, 4'd6));
    repeat (2) @(negedge clk);
    check(up_en && up_valid && up_sync, "SYNC after poll");
    dn(hub_byte(HC_ALLOW, 4'd6));
    repeat (700) @(negedge clk);
    check(upcap == tp, $sformatf("packet sent (%0d bytes)", upcap.size()));
    check(up_en, "link held until release");
    dn(hub_byte(HC_RELEASE, 4'd0));
    @(negedge clk);
    check(!up_en, "released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

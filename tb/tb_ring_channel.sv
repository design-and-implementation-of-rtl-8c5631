// tb_ring_channel: drives one ring engine from queue models of its FIFOs.
//   1. routing: packets for another subnet, for this subnet, for a VCI in the
//      CAM and for an unknown VCI are all forwarded unchanged; only the second
//      and third are copied to the local queue; a 576-byte datagram packet
//      goes from first byte read to last byte written in 588 cycles (one byte
//      per clock plus six for the header decision and replay); a
//      network-management packet for this subnet goes to the management
//      queue instead of the local queue;
//   2. the node A / node B example of the control-packet scheme: N = 5 and
//      quota 3 sends 3 packets and releases N = 2; N = 2 with 3 waiting sends
//      2 and releases N = 0 (slot stop), the third goes in the next cycle;
//   3. two priority levels and a quota stop;
//   4. local copy refused while the local queue is over half full;
//   5. head of bus: opens a cycle by itself, erases returning packets (still
//      copying the local ones), and sizes the next cycle from the occupied
//      count (occupied + cycle_min, capped at cycle_max).
// Expected byte streams are built independently from the packet format.
module tb_ring_channel;
  import clnet_pkg::*;
  import clnet_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic is_head;
  logic [31:0] my_ip = 32'h89BD6100, ip_mask = 32'hFFFFFF00;   // 137.189.97.x
  logic [15:0] nq_unres, nq_res, n_res_cycle, cycle_min, cycle_max;
  logic [23:0] cp_timeout = 0;
  logic rx_rd, rx_empty, tx_wr, tx_full, lo_wr, lo_half_full, lo_full;
  logic mg_wr, mg_half_full = 0, mg_full = 0;
  logic li_rd, li_empty, li_pkt_avail, cam_hit;
  tbyte_t rx_data, tx_data, lo_data, li_data, mg_data;
  logic [47:0] cam_key;
  logic [15:0] n_unres_now, n_res_now;
  ring_stats_t stats;

  ring_channel dut (.*);

  bq_t rxq, liq, txcap, locap, exp_tx, exp_lo, mgcap;
  int checks = 0, failures = 0;
  logic stall_tx = 0;
  int first_rd_cyc, last_tx_cyc, cyc = 0;

  always #5 clk = ~clk;

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

  // the CAM holds VCI AB:CD:EF
  assign cam_hit = (cam_key == 48'h0000_00AB_CDEF);

  function automatic int trailers(bq_t q);
    int n = 0;
    foreach (q[i]) if (is_trailer(q[i])) n++;
    return n;
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (rx_rd && rxq.size() != 0) begin void'(rxq.pop_front()); first_rd_cyc = (first_rd_cyc < 0) ? cyc : first_rd_cyc; end
      if (li_rd && liq.size() != 0) void'(liq.pop_front());
      if (tx_wr && !tx_full) begin txcap.push_back(tx_data); last_tx_cyc = cyc; end
      if (lo_wr && !lo_full) locap.push_back(lo_data);
      if (mg_wr && !mg_full) mgcap.push_back(mg_data);
    end
    #1;
    rx_empty     = (rxq.size() == 0);
    rx_data      = rx_empty ? '0 : rxq[0];
    li_empty     = (liq.size() == 0);
    li_data      = li_empty ? '0 : liq[0];
    li_pkt_avail = trailers(liq) != 0;
    tx_full      = stall_tx ? (($urandom % 3) == 0) : 1'b0;
  end

  task automatic settle();
    repeat (1500) @(posedge clk);
  endtask

  task automatic compare(string what);
    check(txcap.size() == exp_tx.size(), {what, ": tx length"});
    for (int i = 0; i < exp_tx.size() && i < txcap.size(); i++)
      if (txcap[i] != exp_tx[i]) begin check(0, {what, ": tx byte"}); break; end
    check(locap.size() == exp_lo.size(), {what, ": local length"});
    for (int i = 0; i < exp_lo.size() && i < locap.size(); i++)
      if (locap[i] != exp_lo[i]) begin check(0, {what, ": local byte"}); break; end
    txcap = {}; locap = {}; exp_tx = {}; exp_lo = {};
  endtask

  initial begin
    bq_t p [8];
    ring_stats_t s0;
    is_head = 0; nq_unres = 3; nq_res = 1; n_res_cycle = 2; cycle_min = 4; cycle_max = 6;
    lo_half_full = 0; lo_full = 0;
    rx_empty = 1; li_empty = 1; li_pkt_avail = 0; rx_data = 0; li_data = 0; tx_full = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- 1. routing
    p[0] = make_pkt(1'b1, 1'b0, 32'h0A010203, 1, 576);          // other subnet
    p[1] = make_pkt(1'b1, 1'b0, 32'h89BD6105, 2, 576);          // 137.189.97.5
    p[2] = make_pkt(1'b0, 1'b0, 32'hABCDEF00, 3, 40);           // VCI in CAM
    p[3] = make_pkt(1'b0, 1'b0, 32'h11111100, 4, 40);           // unknown VCI
    first_rd_cyc = -1;
    @(negedge clk);
    rxq = {p[0]};
    settle();
    check(last_tx_cyc - first_rd_cyc + 1 == 582 + 6, "582-byte packet in 588 cycles");
    exp_tx = p[0];
    compare("route other subnet");
    stall_tx = 1;
    @(negedge clk);
    for (int k = 1; k < 4; k++) rxq = {rxq, p[k]};
    settle();
    exp_tx = {p[1], p[2], p[3]};
    exp_lo = {p[1], p[2]};
    compare("route local / vci");
    check(stats.forwarded == 4 && stats.copied == 2, "route stats");

    // network-management packets: the one for this subnet goes to the
    // management queue, not the local queue; both are forwarded
    p[4] = make_pkt(1'b1, 1'b0, 32'h89BD6106, 5, 40);
    p[4][0][2] = 1'b1;
    p[5] = make_pkt(1'b1, 1'b0, 32'h0A000006, 6, 40);
    p[5][0][2] = 1'b1;
    mgcap = {};
    @(negedge clk);
    rxq = {p[4], p[5]};
    settle();
    exp_tx = {p[4], p[5]};
    compare("management packets");
    check(mgcap == p[4], "management packet delivered to the management queue");
    check(stats.managed == 1, "management count");

    // ---- 2. node A: N = 5, quota 3, three waiting
    nq_unres = 3;
    for (int k = 0; k < 3; k++) p[k] = make_pkt(1'b1, 1'b0, 32'h0A000001, 10 + k, 60);
    @(negedge clk);
    liq = {p[0], p[1], p[2]};
    rxq = make_cp(16'd5, 16'd0);
    settle();
    exp_tx = {occupied(p[0]), occupied(p[1]), occupied(p[2]), make_cp(16'd2, 16'd0)};
    compare("node A");
    // ---- node B: N = 2, three waiting
    for (int k = 0; k < 3; k++) p[k] = make_pkt(1'b1, 1'b0, 32'h0A000002, 20 + k, 60);
    s0 = stats;
    @(negedge clk);
    liq = {p[0], p[1], p[2]};
    rxq = make_cp(16'd2, 16'd0);
    settle();
    exp_tx = {occupied(p[0]), occupied(p[1]), make_cp(16'd0, 16'd0)};
    compare("node B");
    check(stats.slot_stop == s0.slot_stop + 1, "slot stop counted");
    check(liq.size() == p[2].size(), "third packet waits");
    @(negedge clk);
    rxq = make_cp(16'd5, 16'd0);
    settle();
    exp_tx = {occupied(p[2]), make_cp(16'd4, 16'd0)};
    compare("node B next cycle");

    // ---- 3. priorities and quota
    nq_unres = 1; nq_res = 1;
    p[0] = make_pkt(1'b1, 1'b1, 32'h0A000003, 30, 30);   // reserved
    p[1] = make_pkt(1'b1, 1'b0, 32'h0A000003, 31, 30);   // unreserved
    p[2] = make_pkt(1'b1, 1'b0, 32'h0A000003, 32, 30);   // unreserved, over quota
    s0 = stats;
    @(negedge clk);
    liq = {p[0], p[1], p[2]};
    rxq = make_cp(16'd5, 16'd3);
    settle();
    exp_tx = {occupied(p[0]), occupied(p[1]), make_cp(16'd4, 16'd2)};
    compare("priorities");
    check(stats.quota_stop == s0.quota_stop + 1, "quota stop counted");
    @(negedge clk);
    liq = {};
    @(negedge clk);

    // ---- 4. local queue too full
    lo_half_full = 1;
    s0 = stats;
    p[0] = make_pkt(1'b1, 1'b0, 32'h89BD6107, 40, 30);
    @(negedge clk);
    rxq = p[0];
    settle();
    exp_tx = p[0];
    compare("local drop");
    check(stats.local_drop == s0.local_drop + 1, "local drop counted");
    lo_half_full = 0;
    stall_tx = 0;

    // ---- 5. head of bus / erasure node
    s0 = stats;
    is_head = 1;
    settle();
    exp_tx = make_cp(16'd4, 16'd2);                    // cycle_min, n_res_cycle
    compare("head opens cycle");
    p[0] = occupied(make_pkt(1'b1, 1'b0, 32'h0A000009, 50, 30));
    p[1] = occupied(make_pkt(1'b1, 1'b0, 32'h89BD6109, 51, 30));   // local
    p[2] = occupied(make_pkt(1'b1, 1'b0, 32'h0A000009, 52, 30));
    p[3] = occupied(make_pkt(1'b1, 1'b1, 32'h0A000009, 53, 30));   // reserved
    @(negedge clk);
    rxq = {p[0], p[1], p[2], p[3], make_cp(16'd1, 16'd1)};
    settle();
    exp_tx = make_cp(16'd6, 16'd2);                    // min(3 + 4, 6)
    exp_lo = p[1];
    compare("erasure and next cycle");
    check(stats.erased == s0.erased + 4, "erased count");
    check(stats.cycles == s0.cycles + 2, "cycle count");
    @(negedge clk);
    rxq = make_cp(16'd6, 16'd2);                       // empty cycle returns
    settle();
    exp_tx = make_cp(16'd4, 16'd2);                    // shrinks back to cycle_min
    compare("idle cycle shrinks");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

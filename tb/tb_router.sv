// tb_router: the loopback test of a single router at its default sizes.
// Each ring's transmitter is looped back to its own receiver through a
// one-cycle link, and the router is head of bus on both rings, so every
// packet it inserts goes round, is erased on return and -- being addressed
// to this router -- copied to the local output queue of its ring.
//   1. six IP packets on ring A and six VCI (multicast, CAM) packets on ring B
//      are delivered intact and in order to local A OUT / local B OUT;
//      insertion, erasure and copy counters match;
//   2. bytes received while the TAXI receiver reports a code violation are
//      dropped and counted;
//   3. link fault: with wrap_b_to_a set and ring A OUT looped to ring B IN,
//      a ring B packet leaves on A OUT, returns on B IN and is delivered;
//   4. throughput loopback on both rings at once: after a reset, the head
//      inserts three packets on each ring, then stops being head, so the
//      packets circulate for ever, forwarded and copied on every pass. Over
//      20000 clocks each link must be at least 98% busy and every round of
//      the three packets may take no more than 3 x 588 + 30 clocks: one byte
//      per clock per ring is the full link rate, 100 Mb/s per ring with a
//      12.63 MHz clock;
//   5. a network-management packet for this router lands in the management
//      queue of its ring and not in the hub's output queue.
module tb_router;
  import clnet_pkg::*;
  import clnet_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic taxi_rx_strobe [2], taxi_rx_sync [2], taxi_rx_violation [2];
  tbyte_t taxi_rx_data [2], taxi_tx_data [2];
  logic taxi_tx_strobe [2], taxi_tx_ready [2];
  logic local_in_wr [2], local_in_half_full [2], local_in_full [2];
  tbyte_t local_in_data [2], local_out_data [2];
  logic local_out_rd [2], local_out_empty [2];
  logic [31:0] my_ip = 32'h89BD6100, ip_mask = 32'hFFFFFF00;
  logic is_head [2];
  logic [15:0] nq_unres [2], nq_res [2];
  logic [15:0] n_res_cycle = 0, cycle_min = 8, cycle_max = 16;
  logic [23:0] cp_timeout = 0;
  logic wrap_b_to_a = 0, wrap_a_to_b = 0;
  logic cam_wr = 0, cam_valid = 0;
  logic [7:0] cam_index = 0;
  logic [47:0] cam_data = 0, cam_mask = 48'h0000_00FF_FFFF;
  logic [5:0] xcvr_status [2];
  logic [15:0] rx_error_count [2], rx_overrun_count [2], n_unres_now [2], n_res_now [2];
  ring_stats_t stats [2];
  logic mgmt_rd [2], mgmt_empty [2];
  tbyte_t mgmt_data [2];

  router dut (.*);

  int checks = 0, failures = 0;
  logic cross_link = 0;          // loop ring A OUT into ring B IN
  logic inject_violation = 0;
  bq_t outcap [2], mgcap [2];
  int tx_bytes_a = 0, tx_bytes_b = 0, cyc = 0;
  int tput_copies [2], tput_bytes [2];

  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // loopback links, one register each
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    taxi_rx_strobe[0]    <= taxi_tx_strobe[0];
    taxi_rx_data[0]      <= taxi_tx_data[0];
    taxi_rx_strobe[1]    <= cross_link ? taxi_tx_strobe[0] : taxi_tx_strobe[1];
    taxi_rx_data[1]      <= cross_link ? taxi_tx_data[0]   : taxi_tx_data[1];
    taxi_rx_violation[0] <= inject_violation;
    taxi_rx_violation[1] <= 1'b0;
  end

  // hub side reader
  always @(posedge clk) if (rst_n) begin
    for (int r = 0; r < 2; r++) if (local_out_rd[r] && !local_out_empty[r]) outcap[r].push_back(local_out_data[r]);
    for (int r = 0; r < 2; r++) if (mgmt_rd[r] && !mgmt_empty[r]) mgcap[r].push_back(mgmt_data[r]);
    if (taxi_tx_strobe[0] && !cross_link) tx_bytes_a++;
    if (taxi_tx_strobe[1]) tx_bytes_b++;
  end
  always_comb for (int r = 0; r < 2; r++) local_out_rd[r] = !local_out_empty[r];
  always_comb for (int r = 0; r < 2; r++) mgmt_rd[r] = !mgmt_empty[r];

  task automatic send_local(int r, bq_t p);
    foreach (p[i]) begin
      @(negedge clk);
      local_in_wr[r] = 1; local_in_data[r] = p[i];
    end
    @(negedge clk);
    local_in_wr[r] = 0;
  endtask

  initial begin
    bq_t pa [6], pb [6], expa, expb, pw;
    for (int r = 0; r < 2; r++) begin
      taxi_rx_sync[r] = 1; taxi_tx_ready[r] = 1; local_in_wr[r] = 0; local_in_data[r] = 0;
      is_head[r] = 0; nq_unres[r] = 3; nq_res[r] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    cam_wr = 1; cam_index = 8'd200; cam_data = 48'h0000_00C0_FFEE; cam_valid = 1;
    @(negedge clk);
    cam_wr = 0;

    // ---- 1. loopback delivery; packets queued before the first cycle opens
    for (int k = 0; k < 6; k++) begin
      pa[k] = make_pkt(1'b1, 1'b0, 32'h89BD6100 + 32'(k), 100 + k, 576);
      pb[k] = make_pkt(1'b0, 1'b0, 32'hC0FFEE00, 200 + k, 576);
      expa = {expa, occupied(pa[k])};
      expb = {expb, occupied(pb[k])};
    end
    fork
      for (int k = 0; k < 3; k++) send_local(0, pa[k]);
      for (int k = 0; k < 3; k++) send_local(1, pb[k]);
    join
    tx_bytes_a = 0;
    is_head[0] = 1; is_head[1] = 1;
    fork
      for (int k = 3; k < 6; k++) send_local(0, pa[k]);
      for (int k = 3; k < 6; k++) send_local(1, pb[k]);
    join
    repeat (12000) @(posedge clk);
    check(outcap[0] == expa, $sformatf("ring A delivery (%0d of %0d bytes)", outcap[0].size(), expa.size()));
    check(outcap[1] == expb, $sformatf("ring B delivery (%0d of %0d bytes)", outcap[1].size(), expb.size()));
    check(stats[0].inserted == 6 && stats[1].inserted == 6, "inserted");
    check(stats[0].erased == 6 && stats[1].erased == 6, "erased");
    check(stats[0].copied == 6 && stats[1].copied == 6, "copied");
    check(stats[0].forwarded == 0, "head forwards nothing");
    check(stats[0].cycles > 2, "cycles keep running");
    outcap[0] = {}; outcap[1] = {};

    // ---- 2. code violations on ring A IN
    inject_violation = 1;
    repeat (200) @(posedge clk);
    inject_violation = 0;
    repeat (50) @(posedge clk);
    check(rx_error_count[0] != 0, "violations counted");
    check(rx_error_count[1] == 0, "ring B clean");

    // ---- 3. wrap B to A, single ring through A OUT -> B IN
    is_head[0] = 0;
    repeat (2000) @(posedge clk);
    cross_link = 1;
    wrap_b_to_a = 1;
    repeat (2000) @(posedge clk);
    pw = make_pkt(1'b1, 1'b0, 32'h89BD6142, 300, 576);
    send_local(1, pw);
    repeat (6000) @(posedge clk);
    check(outcap[1] == occupied(pw), $sformatf("wrapped delivery (%0d bytes)", outcap[1].size()));
    check(outcap[0].size() == 0, "nothing on local A");
    check(stats[1].inserted == 7 && stats[1].erased >= 7, "wrapped insertion and erasure");

    // ---- 4. throughput loopback: packets circulate through a router that is
    // not head of bus, each pass forwarded and copied at full speed
    rst_n = 0;
    cross_link = 0; wrap_b_to_a = 0;
    is_head[0] = 0; is_head[1] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      for (int k = 0; k < 3; k++) send_local(0, make_pkt(1'b1, 1'b0, 32'h89BD6110 + 32'(k), 400 + k, 576));
      for (int k = 0; k < 3; k++) send_local(1, make_pkt(1'b1, 1'b0, 32'h89BD6120 + 32'(k), 500 + k, 576));
    join
    is_head[0] = 1; is_head[1] = 1;                  // each opens one cycle, inserts all 3
    wait (stats[0].inserted == 3 && stats[1].inserted == 3);
    wait (stats[0].cp_released == 1 && stats[1].cp_released == 1);
    @(negedge clk);
    is_head[0] = 0; is_head[1] = 0;                  // from now on nothing is erased
    repeat (3000) @(posedge clk);
    begin
      int c0 [2], t0 [2], win;
      win = 20000;
      for (int r = 0; r < 2; r++) c0[r] = int'(stats[r].copied);
      t0[0] = tx_bytes_a; t0[1] = tx_bytes_b;
      repeat (win) @(posedge clk);
      tput_bytes[0] = tx_bytes_a - t0[0];
      tput_bytes[1] = tx_bytes_b - t0[1];
      for (int r = 0; r < 2; r++) begin
        tput_copies[r] = int'(stats[r].copied) - c0[r];
        $display("loopback ring %s: %0d link bytes and %0d packet copies in %0d clocks",
                 r ? "B" : "A", tput_bytes[r], tput_copies[r], win);
        // each pass costs 582 + 6 clocks per packet plus the control packet
        check(tput_bytes[r] * 1000 >= win * 980, "link kept at least 98% busy");
        // a round of the three packets may take 3 x 588 clocks plus at most 30
        // for the control packet, so whole rounds give at least this many copies
        check(tput_copies[r] >= (win / (3 * 588 + 30)) * 3, "packets copied at line rate");
        check(rx_overrun_count[r] == 0, "no receive overrun while circulating");
      end
    end

    // ---- 5. a network-management packet for this router reaches the
    // management queue of its ring, not the hub
    rst_n = 0;
    is_head[0] = 0; is_head[1] = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    outcap[1] = {}; mgcap[1] = {};
    pw = make_pkt(1'b1, 1'b0, 32'h89BD6101, 500, 576);
    pw[0][2] = 1'b1;
    send_local(1, pw);
    repeat (3000) @(posedge clk);
    check(mgcap[1] == occupied(pw), $sformatf("management packet delivered (%0d bytes)", mgcap[1].size()));
    check(outcap[1].size() == 0 && stats[1].managed == 1, "management packet kept from the hub");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_clnet_node: end-to-end run of a network access point at its default
// sizes (16 host cards, 2048-word FIFOs, 256-entry CAM). Both rings are
// looped back on themselves and the router is head of bus on both, so the
// node forms a one-node network, as in a loopback throughput test.
// Host-to-host traffic goes card -> hub polling -> router local input queue
// -> ACTA insertion -> ring -> erasure node + local copy -> hub broadcast ->
// card address filter -> host.
//   phase 1: host 3 -> host 5 by IP (ring A); host 7 -> multicast VCI held by
//            hosts 2 and 9 (ring B); host 4 sends a reserved-priority packet;
//   phase 1b: with mc_both set, host 7 sends another multicast packet; the hub
//            puts it on both rings, so hosts 2 and 9 receive one copy from
//            each ring;
//   phase 2: ring A's transmitter is held not ready so packets from hosts
//            1 and 3 pile up; on release the quota of one packet per cycle
//            splits them over cycles (quota stop), and the cycle length
//            grows with the load;
//   phase 3: link fault: ring A OUT is looped into ring B IN and the router
//            wraps ring B onto ring A; host 9 (ring B) reaches host 12.
//            Rewiring cuts ring B's circulating control packet, so ring B's
//            head must notice the loss (cp_timeout) and open a new cycle.
// Every delivered datagram is compared with what was sent; hosts not
// addressed must receive nothing. Each mechanism is counted and must occur.
module tb_clnet_node;
  import clnet_pkg::*;
  import clnet_tb_pkg::*;
  localparam int NH = 16;

  logic clk = 0, rst_n = 0;
  logic taxi_rx_strobe [2], taxi_rx_sync [2], taxi_rx_violation [2];
  tbyte_t taxi_rx_data [2], taxi_tx_data [2];
  logic taxi_tx_strobe [2], taxi_tx_ready [2];
  logic [31:0] my_ip = 32'h89BD6100, ip_mask = 32'hFFFFFF00;
  logic is_head [2];
  logic [15:0] nq_unres [2], nq_res [2];
  logic [15:0] n_res_cycle = 1, cycle_min = 1, cycle_max = 3;
  logic [23:0] cp_timeout = 24'd12000;
  logic wrap_b_to_a = 0, wrap_a_to_b = 0;
  logic cam_wr = 0, cam_valid = 0;
  logic [7:0] cam_index = 0;
  logic [47:0] cam_data = 0, cam_mask = 48'h0000_00FF_FFFF;
  logic [5:0] xcvr_status [2];
  logic [15:0] rx_error_count [2], rx_overrun_count [2], n_unres_now [2], n_res_now [2];
  logic [$bits(ring_stats_t)-1:0] ring_stats [2];
  ring_stats_t stats [2];
  logic mgmt_rd [2] = '{0, 0}, mgmt_empty [2];
  logic [8:0] mgmt_data [2];
  assign stats[0] = ring_stats_t'(ring_stats[0]);
  assign stats[1] = ring_stats_t'(ring_stats[1]);
  logic [15:0] poll_enable = 16'hFFFF, up_ring_b = 16'h0280;   // hosts 7 and 9 on ring B
  logic mc_both = 0;
  logic dual_inserts = 0;
  logic [15:0] hub_polls, hub_grants, hub_poll_timeouts, hub_up_packets, hub_recv_timeouts;
  logic [31:0] host_ip [NH];
  logic vci_wr [NH], vci_valid [NH];
  logic [1:0] vci_index [NH];
  logic [23:0] vci_data [NH];
  logic host_tx_wr [NH], host_tx_full [NH], host_rx_rd [NH], host_rx_empty [NH], host_irq [NH];
  tbyte_t host_tx_data [NH], host_rx_data [NH];
  logic [15:0] host_rx_packets [NH], host_rx_dropped [NH];

  clnet_node dut (.*);

  int checks = 0, failures = 0;
  logic cross_link = 0;
  bq_t rxbuf [NH];
  bq_t got [NH][$];
  bq_t expect_q [NH][$];
  int max_nu = 0, cp_seen = 0, irqs = 0, stalled_cycles = 0;
  int cp_state = 0;
  logic [15:0] cp_nu;

  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // loopback links
  always_ff @(posedge clk) begin
    taxi_rx_strobe[0] <= cross_link ? 1'b0 : taxi_tx_strobe[0];  // the failed link is dead
    taxi_rx_data[0]   <= taxi_tx_data[0];
    taxi_rx_strobe[1] <= cross_link ? taxi_tx_strobe[0] : taxi_tx_strobe[1];
    taxi_rx_data[1]   <= cross_link ? taxi_tx_data[0]   : taxi_tx_data[1];
  end

  // hosts read whatever their card delivers; monitor ring A control packets
  always @(posedge clk) if (rst_n) begin
    for (int h = 0; h < NH; h++) begin
      if (host_irq[h]) irqs++;
      if (host_rx_rd[h] && !host_rx_empty[h]) begin
        rxbuf[h].push_back(host_rx_data[h]);
        if (host_rx_data[h][8]) begin got[h].push_back(rxbuf[h]); rxbuf[h] = {}; end
      end
    end
    if (!taxi_tx_ready[0]) stalled_cycles++;
    if (taxi_tx_strobe[0]) begin
      case (cp_state)
        0: if (taxi_tx_data[0] == cp_byte(1'b1)) cp_state = 1;
        1: begin cp_nu[15:8] = taxi_tx_data[0][7:0]; cp_state = 2; end
        2: begin
          cp_nu[7:0] = taxi_tx_data[0][7:0];
          cp_seen++;
          if (int'(cp_nu) > max_nu) max_nu = int'(cp_nu);
          cp_state = 0;
        end
        default: cp_state = 0;
      endcase
    end
  end
  always_comb for (int h = 0; h < NH; h++) host_rx_rd[h] = !host_rx_empty[h];

  function automatic bq_t datagram(bq_t p);
    bq_t d;
    for (int i = 5; i < p.size() - 1; i++) d.push_back({(i == p.size() - 2), p[i][7:0]});
    return d;
  endfunction

  task automatic host_send(int h, bq_t p);
    foreach (p[i]) begin
      @(negedge clk);
      host_tx_wr[h] = 1; host_tx_data[h] = p[i];
    end
    @(negedge clk);
    host_tx_wr[h] = 0;
  endtask

  task automatic ip_send(int src, int dst, int seed, logic rsv);
    bq_t p;
    p = make_pkt(1'b1, rsv, host_ip[dst], seed, 576);
    expect_q[dst].push_back(datagram(p));
    host_send(src, p);
  endtask

  task automatic wait_quiet(int n);
    repeat (n) @(posedge clk);
  endtask

  initial begin
    bq_t pm;
    for (int r = 0; r < 2; r++) begin
      taxi_rx_sync[r] = 1; taxi_rx_violation[r] = 0; taxi_tx_ready[r] = 1;
      is_head[r] = 1; nq_unres[r] = 1; nq_res[r] = 1;
    end
    for (int h = 0; h < NH; h++) begin
      host_ip[h] = 32'h89BD6100 + 32'(10 + h);
      vci_wr[h] = 0; vci_valid[h] = 0; vci_index[h] = 0; vci_data[h] = 0;
      host_tx_wr[h] = 0; host_tx_data[h] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // multicast group C0:DE:01 known to the router and to hosts 2 and 9
    @(negedge clk);
    cam_wr = 1; cam_index = 8'd3; cam_data = 48'h0000_00C0_DE01; cam_valid = 1;
    vci_wr[2] = 1; vci_data[2] = 24'hC0DE01; vci_valid[2] = 1;
    vci_wr[9] = 1; vci_data[9] = 24'hC0DE01; vci_valid[9] = 1; vci_index[9] = 2'd1;
    @(negedge clk);
    cam_wr = 0; vci_wr[2] = 0; vci_wr[9] = 0;

    // ---- phase 1
    pm = make_pkt(1'b0, 1'b0, 32'hC0DE0100, 77, 576);
    expect_q[2].push_back(datagram(pm));
    expect_q[9].push_back(datagram(pm));
    fork
      ip_send(3, 5, 35, 1'b0);
      host_send(7, pm);
      ip_send(4, 11, 411, 1'b1);
    join
    wait_quiet(8000);

    // ---- phase 1b: multicast on both rings
    begin
      bq_t pm2;
      int ins0, ins1;
      pm2 = make_pkt(1'b0, 1'b0, 32'hC0DE0100, int'($urandom_range(100, 999)), 576);
      for (int k = 0; k < 2; k++) begin
        expect_q[2].push_back(datagram(pm2));
        expect_q[9].push_back(datagram(pm2));
      end
      ins0 = int'(stats[0].inserted); ins1 = int'(stats[1].inserted);
      mc_both = 1;
      host_send(7, pm2);
      wait_quiet(8000);
      mc_both = 0;
      dual_inserts = (int'(stats[0].inserted) - ins0 == 1 && int'(stats[1].inserted) - ins1 == 1);
    end

    // ---- phase 2: ring A transmitter held, packets pile up
    taxi_tx_ready[0] = 0;
    fork
      ip_send(1, 6, 16, 1'b0);
      ip_send(3, 6, 36, 1'b0);
      ip_send(13, 14, 1314, 1'b0);
    join
    wait_quiet(4000);
    taxi_tx_ready[0] = 1;
    wait_quiet(12000);

    // ---- phase 3: wrap ring B onto ring A
    is_head[0] = 0;
    wait_quiet(2000);
    @(posedge clk iff taxi_tx_strobe[1]);   // cut while ring B's control packet is on the link
    @(negedge clk);
    cross_link = 1;
    wrap_b_to_a = 1;
    wait_quiet(2000);
    ip_send(9, 12, 912, 1'b0);
    wait_quiet(30000);

    // ---- results
    for (int h = 0; h < NH; h++) begin
      check(got[h].size() == expect_q[h].size(),
            $sformatf("host %0d received %0d datagrams, expected %0d", h, got[h].size(), expect_q[h].size()));
      for (int i = 0; i < got[h].size() && i < expect_q[h].size(); i++) begin
        logic found = 0;
        foreach (expect_q[h][j]) if (got[h][i] == expect_q[h][j]) found = 1;
        check(found, $sformatf("host %0d datagram %0d content", h, i));
      end
      check(host_rx_dropped[h] == 0, "no receive drops");
    end
    // mechanisms
    $display("polls=%0d grants=%0d timeouts=%0d up=%0d", hub_polls, hub_grants, hub_poll_timeouts, hub_up_packets);
    $display("ringA fwd=%0d copy=%0d erased=%0d ins=%0d cp=%0d qstop=%0d sstop=%0d cycles=%0d",
             stats[0].forwarded, stats[0].copied, stats[0].erased, stats[0].inserted,
             stats[0].cp_released, stats[0].quota_stop, stats[0].slot_stop, stats[0].cycles);
    $display("ringB fwd=%0d copy=%0d erased=%0d ins=%0d cp=%0d qstop=%0d cycles=%0d regen=%0d",
             stats[1].forwarded, stats[1].copied, stats[1].erased, stats[1].inserted,
             stats[1].cp_released, stats[1].quota_stop, stats[1].cycles, stats[1].cp_regen);
    $display("max N_u on ring A=%0d, irqs=%0d, stalled=%0d", max_nu, irqs, stalled_cycles);
    check(hub_poll_timeouts > 0, "mechanism: poll timeout");
    check(hub_grants == 8 && hub_up_packets == 8, "mechanism: poll grants, one per packet");
    check(stats[0].inserted + stats[1].inserted == 9, "mechanism: insertion");
    check(stats[0].erased + stats[1].erased == 9, "mechanism: erasure at head of bus");
    check(stats[0].copied + stats[1].copied == 9, "mechanism: local copy");
    check(dual_inserts, "mechanism: multicast packet inserted on both rings");
    check(stats[0].quota_stop > 0, "mechanism: quota stop");
    check(stats[0].cp_released > 10 && stats[1].cp_released > 10, "mechanism: control packets circulate");
    check(max_nu > int'(cycle_min), "mechanism: cycle length adapts");
    check(stalled_cycles > 0, "mechanism: link held");
    check(got[2].size() == 3 && got[9].size() >= 3, "mechanism: multicast to two hosts");
    check(got[12].size() == 1, "mechanism: wrapped delivery");
    check(stats[1].cp_regen > 0, "mechanism: lost control packet replaced by the head");
    check(irqs == 12, "one interrupt per delivered datagram");
    check(rx_overrun_count[0] == 0 && rx_overrun_count[1] == 0, "no receive overruns");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

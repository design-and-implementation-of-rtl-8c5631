// tb_ring3: three routers at default sizes built into a dual ring, as in
// the three-node backbone of the first prototype network.
// Ring A runs node 0 -> 1 -> 2 -> 0 and ring B the other way,
// 0 -> 2 -> 1 -> 0. Node 0 is head of bus on both rings. Node n serves the
// subnet 10.0.n.x. Nodes 0 and 2 hold VCI 5A5A5A in their CAM.
// Links are one-register delays that a fault can cut.
//   1. normal operation: node 1 sends on ring A to node 2, to node 0 and to
//      the VCI (copied by node 2, then by node 0 as it erases the packet);
//      node 0 sends on ring A to node 1; node 2 sends on ring B to node 1.
//   2. link fault between nodes 1 and 2, cutting both directions: node 1
//      wraps A IN onto B OUT, node 2 wraps B IN onto A OUT, and node 0 stays
//      the only head (its ring B engine stops being head). If the rewiring
//      cuts a circulating control packet, the head opens a new cycle after
//      cp_timeout; either way cycles must keep running. The single ring runs
//      0A -> 1 -> 0B -> 2 -> 0A. Traffic: node 1 to node 2, node 0 to node 1,
//      and node 2 to node 0.
//   3. router fault (node 1 dead, all four of its links cut), after a reset:
//      its neighbours wrap, node 0 A IN onto B OUT and node 2 B IN onto A OUT,
//      giving the single ring 0A -> 2B -> 0A with node 0 as head. Node 0
//      reaches node 2 and node 2 reaches node 0; a packet for the dead node
//      reaches nobody and is erased at the head.
// Each node's local output queues are split into packets and compared with
// the packets expected there, as the ring carries them (header and trailer
// re-marked as occupied). Counts and contents must match exactly.
module tb_ring3;
  import clnet_pkg::*;
  import clnet_tb_pkg::*;

  typedef bq_t pq_t[$];

  logic clk = 0, rst_n = 0;
  logic   trs [3][2], tsync [3][2], tviol [3][2], tts [3][2], tready [3][2];
  tbyte_t trd [3][2], ttd [3][2];
  logic   li_wr [3][2], li_half [3][2], li_full [3][2];
  tbyte_t li_data [3][2], lo_data [3][2];
  logic   lo_rd [3][2], lo_empty [3][2];
  logic   is_head [3][2];
  logic [15:0] nq_unres [3][2], nq_res [3][2];
  logic   wrap_b_to_a [3], wrap_a_to_b [3];
  logic   cam_wr [3];
  logic [7:0]  cam_index [3];
  logic [47:0] cam_data [3];
  logic   cam_valid [3];
  logic [5:0]  xst [3][2];
  logic [15:0] rxerr [3][2], rxovr [3][2], nun [3][2], nre [3][2];
  ring_stats_t st [3][2];
  logic   mg_rd [3][2], mg_empty [3][2];
  tbyte_t mg_data [3][2];

  logic linkA_ok [3], linkB_ok [3];   // link n -> n+1 on ring A, n -> n-1 on ring B

  int checks = 0, failures = 0;
  pq_t got [3][2];
  bq_t cur [3][2];

  for (genvar n = 0; n < 3; n++) begin : g_node
    router u_router (
      .clk, .rst_n,
      .taxi_rx_strobe(trs[n]), .taxi_rx_data(trd[n]), .taxi_rx_sync(tsync[n]),
      .taxi_rx_violation(tviol[n]), .taxi_tx_strobe(tts[n]), .taxi_tx_data(ttd[n]),
      .taxi_tx_ready(tready[n]),
      .local_in_wr(li_wr[n]), .local_in_data(li_data[n]),
      .local_in_half_full(li_half[n]), .local_in_full(li_full[n]),
      .local_out_rd(lo_rd[n]), .local_out_data(lo_data[n]), .local_out_empty(lo_empty[n]),
      .my_ip(32'h0A000000 | (32'(n) << 8)), .ip_mask(32'hFFFFFF00),
      .is_head(is_head[n]), .nq_unres(nq_unres[n]), .nq_res(nq_res[n]),
      .n_res_cycle(16'd0), .cycle_min(16'd2), .cycle_max(16'd6), .cp_timeout(24'd12000),
      .wrap_b_to_a(wrap_b_to_a[n]), .wrap_a_to_b(wrap_a_to_b[n]),
      .cam_wr(cam_wr[n]), .cam_index(cam_index[n]), .cam_data(cam_data[n]),
      .cam_valid(cam_valid[n]), .cam_mask(48'h0000_00FF_FFFF),
      .xcvr_status(xst[n]), .rx_error_count(rxerr[n]), .rx_overrun_count(rxovr[n]),
      .n_unres_now(nun[n]), .n_res_now(nre[n]), .stats(st[n]),
      .mgmt_rd(mg_rd[n]), .mgmt_data(mg_data[n]), .mgmt_empty(mg_empty[n])
    );
  end

  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #30000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // links
  always_ff @(posedge clk) begin
    for (int n = 0; n < 3; n++) begin
      trs[(n + 1) % 3][0] <= tts[n][0] && linkA_ok[n];
      trd[(n + 1) % 3][0] <= ttd[n][0];
      trs[(n + 2) % 3][1] <= tts[n][1] && linkB_ok[n];
      trd[(n + 2) % 3][1] <= ttd[n][1];
    end
  end

  // hub side of every node: drain the output queues, split into packets
  always_comb
    for (int n = 0; n < 3; n++)
      for (int r = 0; r < 2; r++) begin
        lo_rd[n][r] = !lo_empty[n][r];
        mg_rd[n][r] = !mg_empty[n][r];
      end
  always @(posedge clk) if (rst_n)
    for (int n = 0; n < 3; n++)
      for (int r = 0; r < 2; r++)
        if (!lo_empty[n][r]) begin
          cur[n][r].push_back(lo_data[n][r]);
          if (is_trailer(lo_data[n][r])) begin
            got[n][r].push_back(cur[n][r]);
            cur[n][r] = {};
          end
        end

  task automatic send_local(int n, int r, bq_t p);
    foreach (p[i]) begin
      @(negedge clk);
      li_wr[n][r] = 1; li_data[n][r] = p[i];
    end
    @(negedge clk);
    li_wr[n][r] = 0;
  endtask

  // every expected packet arrives exactly once at node n ring r, nothing else
  task automatic expect_at(int n, int r, pq_t want, string what);
    check(got[n][r].size() == want.size(),
          $sformatf("%s: node %0d ring %s got %0d packets, expected %0d", what, n, r ? "B" : "A",
                    got[n][r].size(), want.size()));
    foreach (want[i]) begin
      int hits = 0;
      foreach (got[n][r][j]) if (got[n][r][j] == occupied(want[i])) hits++;
      check(hits == 1, $sformatf("%s: node %0d ring %s packet %0d", what, n, r ? "B" : "A", i));
    end
  endtask

  initial begin
    bq_t p [10];
    int seed, cyc_before;
    seed = int'($urandom_range(1000, 9000));
    for (int n = 0; n < 3; n++) begin
      linkA_ok[n] = 1; linkB_ok[n] = 1;
      wrap_b_to_a[n] = 0; wrap_a_to_b[n] = 0;
      cam_wr[n] = 0; cam_index[n] = 0; cam_data[n] = 0; cam_valid[n] = 0;
      for (int r = 0; r < 2; r++) begin
        tsync[n][r] = 1; tviol[n][r] = 0; tready[n][r] = 1;
        li_wr[n][r] = 0; li_data[n][r] = 0;
        is_head[n][r] = 0;
        nq_unres[n][r] = (n == 0) ? 16'd1 : 16'd2;   // the head's quota must fit its FIFO
        nq_res[n][r] = 0;
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    cam_wr[0] = 1; cam_wr[2] = 1;
    cam_index[0] = 8'd7; cam_index[2] = 8'd99;
    cam_data[0] = 48'h5A5A5A; cam_data[2] = 48'h5A5A5A;
    cam_valid[0] = 1; cam_valid[2] = 1;
    @(negedge clk);
    cam_wr[0] = 0; cam_wr[2] = 0;
    is_head[0][0] = 1; is_head[0][1] = 1;

    // ---- 1. normal dual-ring operation
    p[1] = make_pkt(1'b1, 1'b0, 32'h0A000205, seed + 1, 576);   // 1 -> 2, ring A
    p[2] = make_pkt(1'b1, 1'b0, 32'h0A000007, seed + 2, 576);   // 1 -> 0, ring A
    p[3] = make_pkt(1'b0, 1'b0, 32'h5A5A5A00, seed + 3, 576);   // 1 -> VCI, ring A
    p[4] = make_pkt(1'b1, 1'b0, 32'h0A000109, seed + 4, 576);   // 2 -> 1, ring B
    p[5] = make_pkt(1'b1, 1'b0, 32'h0A000103, seed + 5, 576);   // 0 -> 1, ring A
    fork
      begin send_local(1, 0, p[1]); send_local(1, 0, p[2]); send_local(1, 0, p[3]); end
      send_local(2, 1, p[4]);
      send_local(0, 0, p[5]);
    join
    repeat (15000) @(posedge clk);
    expect_at(2, 0, '{p[1], p[3]}, "normal");
    expect_at(0, 0, '{p[2], p[3]}, "normal");
    expect_at(1, 1, '{p[4]}, "normal");
    expect_at(1, 0, '{p[5]}, "normal");
    expect_at(0, 1, '{}, "normal");
    expect_at(2, 1, '{}, "normal");
    check(st[0][0].erased == 4 && st[0][1].erased == 1, "head of bus erased every packet");
    check(st[1][0].inserted == 3 && st[2][1].inserted == 1 && st[0][0].inserted == 1, "insertions");
    for (int n = 0; n < 3; n++) for (int r = 0; r < 2; r++) got[n][r] = {};

    // ---- 2. link fault between nodes 1 and 2, rings wrapped into one loop
    cyc_before = int'(st[0][0].cycles);
    linkA_ok[1] = 0;          // ring A 1 -> 2
    linkB_ok[2] = 0;          // ring B 2 -> 1
    wrap_a_to_b[1] = 1;
    wrap_b_to_a[2] = 1;
    is_head[0][1] = 0;
    repeat (30000) @(posedge clk);
    p[6] = make_pkt(1'b1, 1'b0, 32'h0A000201, seed + 6, 576);   // 1 -> 2
    p[7] = make_pkt(1'b1, 1'b0, 32'h0A000104, seed + 7, 576);   // 0 -> 1
    p[8] = make_pkt(1'b1, 1'b0, 32'h0A000008, seed + 8, 576);   // 2 -> 0
    fork
      send_local(1, 0, p[6]);
      send_local(0, 0, p[7]);
      send_local(2, 1, p[8]);
    join
    repeat (20000) @(posedge clk);
    expect_at(2, 1, '{p[6]}, "wrapped");
    expect_at(1, 0, '{p[7]}, "wrapped");
    expect_at(0, 0, '{p[8]}, "wrapped");
    expect_at(0, 1, '{}, "wrapped");
    expect_at(1, 1, '{}, "wrapped");
    expect_at(2, 0, '{}, "wrapped");
    check(int'(st[0][0].cycles) > cyc_before + 10, "cycles keep running on the wrapped ring");
    $display("node0 A: cycles=%0d regen=%0d erased=%0d; node0 B forwarded=%0d",
             st[0][0].cycles, st[0][0].cp_regen, st[0][0].erased, st[0][1].forwarded);

    // ---- 3. router fault: node 1 fails, nodes 0 and 2 wrap around it
    rst_n = 0;
    for (int n = 0; n < 3; n++) begin
      wrap_b_to_a[n] = 0; wrap_a_to_b[n] = 0;
      linkA_ok[n] = 1; linkB_ok[n] = 1;
      for (int r = 0; r < 2; r++) is_head[n][r] = 0;
    end
    linkA_ok[0] = 0; linkA_ok[1] = 0;   // ring A 0 -> 1 and 1 -> 2
    linkB_ok[2] = 0; linkB_ok[1] = 0;   // ring B 2 -> 1 and 1 -> 0
    wrap_a_to_b[0] = 1;
    wrap_b_to_a[2] = 1;
    repeat (3) @(posedge clk);
    for (int n = 0; n < 3; n++) for (int r = 0; r < 2; r++) begin got[n][r] = {}; cur[n][r] = {}; end
    rst_n = 1;
    @(negedge clk);
    is_head[0][0] = 1;
    p[7] = make_pkt(1'b1, 1'b0, 32'h0A000211, seed + 9, 576);   // 0 -> 2
    p[8] = make_pkt(1'b1, 1'b0, 32'h0A000012, seed + 10, 576);  // 2 -> 0
    p[9] = make_pkt(1'b1, 1'b0, 32'h0A000113, seed + 11, 576);  // 0 -> dead node 1
    fork
      begin send_local(0, 0, p[7]); send_local(0, 0, p[9]); end
      send_local(2, 1, p[8]);
    join
    repeat (15000) @(posedge clk);
    expect_at(2, 1, '{p[7]}, "router fault");
    expect_at(0, 0, '{p[8]}, "router fault");
    expect_at(0, 1, '{}, "router fault");
    expect_at(2, 0, '{}, "router fault");
    check(st[0][0].erased == 3, "head erased all three packets, the dead node's included");
    check(st[0][0].cycles > 10, "cycles run on the ring around the failed router");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ring_controller: both ring engines, the shared CAM and the wrap crossbar.
//   1. the CAM is loaded through the processor port; a VCI packet on ring B
//      and an IP packet on ring A arrive at the same time and are routed
//      independently (each forwarded on its own ring, copied to its own
//      local queue); an invalidated VCI is no longer copied;
//   2. wrap B to A (link fault): a packet on B IN and a local ring B insertion
//      leave on A OUT, nothing on B OUT;
//   3. wrap A to B: the mirror case.
module tb_ring_controller;
  import clnet_pkg::*;
  import clnet_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [31:0] my_ip = 32'h89BD6100, ip_mask = 32'hFFFFFF00;
  logic is_head [2];
  logic [15:0] nq_unres [2], nq_res [2];
  logic [15:0] n_res_cycle = 0, cycle_min = 4, cycle_max = 8;
  logic [23:0] cp_timeout = 0;
  logic wrap_b_to_a = 0, wrap_a_to_b = 0;
  logic cam_wr = 0, cam_valid = 0;
  logic [4:0] cam_index = 0;
  logic [47:0] cam_data = 0, cam_mask = 48'h0000_00FF_FFFF;
  logic rx_rd [2], rx_empty [2], tx_wr [2], tx_full [2];
  tbyte_t rx_data [2], tx_data [2], lo_data [2], li_data [2];
  logic lo_wr [2], lo_half_full [2], lo_full [2], li_rd [2], li_empty [2], li_pkt_avail [2];
  logic mg_wr [2], mg_half_full [2] = '{0, 0}, mg_full [2] = '{0, 0};
  tbyte_t mg_data [2];
  logic [15:0] n_unres_now [2], n_res_now [2];
  ring_stats_t stats [2];

  ring_controller #(.CAM_ENTRIES(32)) dut (.*);

  bq_t rxq [2], liq [2], txcap [2], locap [2], exp_tx [2], exp_lo [2];
  int checks = 0, failures = 0;

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

  function automatic int trailers(bq_t q);
    int n = 0;
    foreach (q[i]) if (is_trailer(q[i])) n++;
    return n;
  endfunction

  always @(posedge clk) begin
    if (rst_n) for (int r = 0; r < 2; r++) begin
      if (rx_rd[r] && rxq[r].size() != 0) void'(rxq[r].pop_front());
      if (li_rd[r] && liq[r].size() != 0) void'(liq[r].pop_front());
      if (tx_wr[r]) txcap[r].push_back(tx_data[r]);
      if (lo_wr[r]) locap[r].push_back(lo_data[r]);
    end
    #1;
    for (int r = 0; r < 2; r++) begin
      rx_empty[r]     = (rxq[r].size() == 0);
      rx_data[r]      = rx_empty[r] ? '0 : rxq[r][0];
      li_empty[r]     = (liq[r].size() == 0);
      li_data[r]      = li_empty[r] ? '0 : liq[r][0];
      li_pkt_avail[r] = trailers(liq[r]) != 0;
      tx_full[r]      = ($urandom % 4) == 0;
    end
  end

  task automatic settle();
    repeat (2000) @(posedge clk);
  endtask

  task automatic compare(string what);
    for (int r = 0; r < 2; r++) begin
      check(txcap[r] == exp_tx[r], $sformatf("%s: tx ring %0d (%0d bytes, expected %0d)", what, r, txcap[r].size(), exp_tx[r].size()));
      check(locap[r] == exp_lo[r], $sformatf("%s: local ring %0d", what, r));
      txcap[r] = {}; locap[r] = {}; exp_tx[r] = {}; exp_lo[r] = {};
    end
  endtask

  task automatic cam_load(int i, logic [23:0] vci, logic v);
    @(negedge clk);
    cam_wr = 1; cam_index = 5'(i); cam_data = {24'h0, vci}; cam_valid = v;
    @(negedge clk);
    cam_wr = 0;
  endtask

  initial begin
    bq_t pa, pb, pl;
    for (int r = 0; r < 2; r++) begin
      is_head[r] = 0; nq_unres[r] = 2; nq_res[r] = 0; lo_half_full[r] = 0; lo_full[r] = 0;
      rx_empty[r] = 1; li_empty[r] = 1; li_pkt_avail[r] = 0; rx_data[r] = 0; li_data[r] = 0; tx_full[r] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    cam_load(7, 24'h123456, 1);
    cam_load(9, 24'h654321, 1);

    // ---- 1. independent rings, IP on A, VCI on B
    pa = make_pkt(1'b1, 1'b0, 32'h89BD6111, 1, 200);
    pb = make_pkt(1'b0, 1'b0, 32'h65432100, 2, 200);
    @(negedge clk);
    rxq[0] = pa; rxq[1] = pb;
    settle();
    exp_tx[0] = pa; exp_lo[0] = pa;
    exp_tx[1] = pb; exp_lo[1] = pb;
    compare("both rings");
    cam_load(9, 24'h654321, 0);
    @(negedge clk);
    rxq[1] = pb;
    settle();
    exp_tx[1] = pb;
    compare("invalidated VCI");

    // ---- 2. wrap B to A
    wrap_b_to_a = 1;
    pb = make_pkt(1'b0, 1'b0, 32'h12345600, 3, 100);    // VCI in CAM
    pl = make_pkt(1'b1, 1'b0, 32'h0A000001, 4, 100);
    @(negedge clk);
    liq[1] = pl;
    rxq[1] = {pb, make_cp(16'd3, 16'd0)};
    settle();
    exp_tx[0] = {pb, occupied(pl), make_cp(16'd2, 16'd0)};
    exp_lo[1] = pb;
    compare("wrap B to A");
    check(stats[1].inserted == 1, "ring B insertion");
    wrap_b_to_a = 0;

    // ---- 3. wrap A to B
    wrap_a_to_b = 1;
    pa = make_pkt(1'b1, 1'b0, 32'h0A000002, 5, 100);
    @(negedge clk);
    rxq[0] = pa;
    settle();
    exp_tx[1] = pa;
    compare("wrap A to B");
    wrap_a_to_b = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

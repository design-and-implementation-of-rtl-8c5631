// tb_hub: the hub with 16 behavioural host cards and queue models of the
// router's local queues.
//   - polling visits the enabled hosts in round-robin order and times out on
//     hosts with nothing to send;
//   - a host with a packet answers the poll with SYNC, is allowed, sends its
//     packet, and is released after the trailer; the packet lands intact in
//     the input queue of the ring chosen for that host (host 5 on ring B);
//   - a host whose ring input queue is over half full is not polled;
//   - the downlink carries the router's ring A and ring B copies whole and in
//     order once hub commands are removed, and commands do appear inside
//     packets;
//   - with mc_both set, a host's VCI packet lands in both rings' input queues
//     while an IP packet still goes only to its host's ring.
module tb_hub;
  import clnet_pkg::*;
  import clnet_tb_pkg::*;
  localparam int NH = 16;

  logic clk = 0, rst_n = 0;
  logic [15:0] poll_enable = 16'hFFFF, up_ring_b = 16'h0020;
  logic mc_both = 0;
  logic lo_rd [2], lo_empty [2], li_wr [2], li_half_full [2];
  tbyte_t lo_data [2], li_data [2];
  logic dn_valid, up_valid, up_sync;
  tbyte_t dn_data, up_data;
  logic [15:0] polls, grants, poll_timeouts, up_packets, recv_timeouts;

  hub #(.NHOSTS(NH)) dut (.*);

  bq_t loq [2], licap [2], hostpkt [NH], dnpk;
  int checks = 0, failures = 0, mid_cmds = 0, in_pkt = 0;
  int poll_seq[$];
  // card models
  typedef enum {C_OFF, C_SYNC, C_SEND, C_DONE} cst_e;
  cst_e cst [NH];
  int   cidx [NH];

  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // behavioural cards and router queues
  always @(posedge clk) begin
    if (rst_n) begin
      for (int r = 0; r < 2; r++) begin
        if (lo_rd[r] && loq[r].size() != 0) void'(loq[r].pop_front());
        if (li_wr[r]) licap[r].push_back(li_data[r]);
      end
      for (int h = 0; h < NH; h++)
        if (cst[h] == C_SEND) begin
          cidx[h]++;
          if (cidx[h] == hostpkt[h].size()) cst[h] = C_DONE;
        end
      if (dn_valid) begin
        if (is_hub_cmd(dn_data)) begin
          hcb_t c;
          c = hcb_t'(dn_data);
          if (in_pkt != 0) mid_cmds++;
          if (c.cmd == HC_POLL) poll_seq.push_back(int'(c.addr));
          for (int h = 0; h < NH; h++) begin
            if (c.cmd == HC_POLL && int'(c.addr) == h && hostpkt[h].size() != 0 && cst[h] == C_OFF) cst[h] = C_SYNC;
            if (c.cmd == HC_ALLOW && int'(c.addr) == h && cst[h] == C_SYNC) begin cst[h] = C_SEND; cidx[h] = 0; end
            if (c.cmd == HC_RELEASE) begin
              if (cst[h] == C_DONE) hostpkt[h] = {};
              cst[h] = C_OFF;
            end
          end
        end else begin
          dnpk.push_back(dn_data);
          if (is_header(dn_data)) in_pkt = 1;
          if (is_trailer(dn_data)) in_pkt = 0;
        end
      end
    end
    #1;
    up_valid = 0; up_sync = 0; up_data = '0;
    for (int h = 0; h < NH; h++) begin
      if (cst[h] == C_SYNC) begin up_valid = 1; up_sync = 1; end
      if (cst[h] == C_SEND) begin up_valid = 1; up_data = hostpkt[h][cidx[h]]; end
    end
    for (int r = 0; r < 2; r++) begin
      lo_empty[r] = loq[r].size() == 0;
      lo_data[r]  = lo_empty[r] ? '0 : loq[r][0];
    end
  end

  initial begin
    bq_t pa, pb, p2, p5, p9, expdn;
    int k;
    for (int h = 0; h < NH; h++) begin cst[h] = C_OFF; cidx[h] = 0; end
    for (int r = 0; r < 2; r++) begin li_half_full[r] = 0; lo_empty[r] = 1; lo_data[r] = 0; end
    up_valid = 0; up_sync = 0; up_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // downlink traffic from both rings, uplink from hosts 2 and 5
    pa = {make_pkt(1'b1, 1'b0, 32'hAAAA0001, 1, 300), make_pkt(1'b1, 1'b0, 32'hAAAA0002, 2, 300)};
    pb = {make_pkt(1'b0, 1'b0, 32'hBBBBBB00, 3, 300), make_pkt(1'b0, 1'b0, 32'hBBBBBB00, 4, 300)};
    p2 = make_pkt(1'b1, 1'b0, 32'h89BD6107, 22, 576);
    p5 = make_pkt(1'b1, 1'b1, 32'h89BD6108, 55, 576);
    @(negedge clk);
    loq[0] = pa; loq[1] = pb;
    hostpkt[2] = p2; hostpkt[5] = p5;
    repeat (4000) @(posedge clk);
    check(licap[0] == p2, "host 2 packet on ring A");
    check(licap[1] == p5, "host 5 packet on ring B");
    check(grants == 2 && up_packets == 2, "two grants, two packets");
    check(poll_timeouts + 2 == polls || poll_timeouts + 3 == polls, "silent hosts time out (one poll may be open)");
    check(poll_seq.size() >= NH + 2, "polling continues");
    for (int i = 0; i < poll_seq.size(); i++) check(poll_seq[i] == i % NH, "round-robin order");
    check(mid_cmds > 0, "commands inside packets");
    // downlink: split the command-free stream into packets and check each source in order
    begin
      bq_t cur, gota, gotb;
      foreach (dnpk[i]) begin
        cur.push_back(dnpk[i]);
        if (is_trailer(dnpk[i])) begin
          if (cur[1][7:0] == 8'hAA) gota = {gota, cur}; else gotb = {gotb, cur};
          cur = {};
        end
      end
      check(gota == pa, "downlink ring A copies");
      check(gotb == pb, "downlink ring B copies");
    end

    // ring A input queue over half full: only ring B hosts are polled
    li_half_full[0] = 1;
    poll_seq = {};
    repeat (2000) @(posedge clk);
    k = 0;
    foreach (poll_seq[i]) if (poll_seq[i] != 5) k++;
    check(poll_seq.size() > 0 && k == 0, "only host 5 polled while ring A is full");
    li_half_full[0] = 0;

    // multicast on both rings: host 3 sends to a VCI, host 4 to an IP address
    begin
      bq_t p3, p4, p34;
      p3 = make_pkt(1'b0, 1'b0, 32'h5A5A5A00, int'($urandom_range(100, 999)), 576);
      p4 = make_pkt(1'b1, 1'b0, 32'h89BD6109, int'($urandom_range(100, 999)), 576);
      @(negedge clk);
      mc_both = 1;
      licap[0] = {}; licap[1] = {};
      hostpkt[3] = p3; hostpkt[4] = p4;
      repeat (4000) @(posedge clk);
      p34 = {p3, p4};
      check(licap[0] == p34, "VCI and IP packets on ring A");
      check(licap[1] == p3, "VCI packet also on ring B, IP packet not");
      mc_both = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

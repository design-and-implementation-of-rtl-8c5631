// clnet_node: one access point of the level-1 dual-ring network.
//
// A level-1 router on the two counter-rotating rings, the hub hanging off its
// local ports, and NHOSTS host network interface cards on the hub's broadcast
// downlink and shared uplink, card i answering to polled address i. Packets a
// host writes into its card are collected by the hub's polling, queued in the
// router's local input queue of ring A or B (per host, up_ring_b; with
// mc_both set, multicast packets into both), and put on that ring behind the
// ACTA control packet within the router's quota.
// Packets arriving on a ring for this router's subnet (or for a VCI in its
// CAM) are forwarded and copied to the hub, which broadcasts them; each card
// keeps those addressed to its host.
//
// Brought out as ports: the parallel sides of the four TAXI chips (ring A/B
// IN and OUT; index 0 is ring A), the configuration and status of the
// router's control processor (with its management queues), the hub's configuration, and each host's side
// of its card. Connect ring A OUT to the next node's ring A IN (and ring B the
// other way round) to build a ring; loop OUT back to IN on a single node.
// The uplink is a wired OR of the cards' outputs gated by their transmitter
// enables; the polling protocol guarantees at most one is on. ring_stats
// carries each ring engine's event counters (clnet_pkg::ring_stats_t) as a
// plain vector; cast it back to the struct to read the fields. The default of
// 16 hosts is the document's; everything else is as in the sub-blocks.
module clnet_node
  import clnet_pkg::*;
#(
  parameter int unsigned NHOSTS      = 16,
  parameter int unsigned DEPTH       = 2048,
  parameter int unsigned CAM_ENTRIES = 256,
  parameter int unsigned NVCI        = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // TAXI chips of the two rings
  input  logic        taxi_rx_strobe    [2],
  input  logic [8:0]  taxi_rx_data      [2],
  input  logic        taxi_rx_sync      [2],
  input  logic        taxi_rx_violation [2],
  output logic        taxi_tx_strobe    [2],
  output logic [8:0]  taxi_tx_data      [2],
  input  logic        taxi_tx_ready     [2],
  // router configuration (control processor)
  input  logic [31:0] my_ip,
  input  logic [31:0] ip_mask,
  input  logic        is_head     [2],
  input  logic [15:0] nq_unres    [2],
  input  logic [15:0] nq_res      [2],
  input  logic [15:0] n_res_cycle,
  input  logic [15:0] cycle_min,
  input  logic [15:0] cycle_max,
  input  logic [23:0] cp_timeout,
  input  logic        wrap_b_to_a,
  input  logic        wrap_a_to_b,
  input  logic                           cam_wr,
  input  logic [$clog2(CAM_ENTRIES)-1:0] cam_index,
  input  logic [47:0]                    cam_data,
  input  logic                           cam_valid,
  input  logic [47:0]                    cam_mask,
  // router status
  output logic [5:0]  xcvr_status      [2],
  output logic [15:0] rx_error_count   [2],
  output logic [15:0] rx_overrun_count [2],
  output logic [15:0] n_unres_now      [2],
  output logic [15:0] n_res_now        [2],
  output logic [$bits(ring_stats_t)-1:0] ring_stats [2],  // ring_stats_t per ring, packed
  input  logic        mgmt_rd          [2],
  output logic [8:0]  mgmt_data        [2],
  output logic        mgmt_empty       [2],
  // hub configuration and status
  input  logic [15:0] poll_enable,
  input  logic [15:0] up_ring_b,
  input  logic        mc_both,          // multicast (VCI) packets on both rings
  output logic [15:0] hub_polls,
  output logic [15:0] hub_grants,
  output logic [15:0] hub_poll_timeouts,
  output logic [15:0] hub_up_packets,
  output logic [15:0] hub_recv_timeouts,
  // hosts
  input  logic [31:0] host_ip       [NHOSTS],
  input  logic                     vci_wr    [NHOSTS],
  input  logic [$clog2(NVCI)-1:0]  vci_index [NHOSTS],
  input  logic [23:0]              vci_data  [NHOSTS],
  input  logic                     vci_valid [NHOSTS],
  input  logic        host_tx_wr    [NHOSTS],
  input  logic [8:0]  host_tx_data  [NHOSTS],
  output logic        host_tx_full  [NHOSTS],
  input  logic        host_rx_rd    [NHOSTS],
  output logic [8:0]  host_rx_data  [NHOSTS],
  output logic        host_rx_empty [NHOSTS],
  output logic        host_irq      [NHOSTS],
  output logic [15:0] host_rx_packets [NHOSTS],
  output logic [15:0] host_rx_dropped [NHOSTS]
);
  logic   local_in_wr [2], local_in_half_full [2], local_in_full [2];
  ring_stats_t stats [2];
  assign ring_stats[0] = stats[0];
  assign ring_stats[1] = stats[1];
  tbyte_t local_in_data [2], local_out_data [2];
  logic   local_out_rd [2], local_out_empty [2];
  logic   dn_valid, up_valid, up_sync;
  tbyte_t dn_data, up_data;
  logic   nic_en [NHOSTS], nic_valid [NHOSTS], nic_sync [NHOSTS];
  tbyte_t nic_data [NHOSTS];
  logic [NHOSTS-1:0] en_vec;

  router #(.DEPTH(DEPTH), .CAM_ENTRIES(CAM_ENTRIES)) u_router (
    .clk, .rst_n,
    .taxi_rx_strobe, .taxi_rx_data, .taxi_rx_sync, .taxi_rx_violation,
    .taxi_tx_strobe, .taxi_tx_data, .taxi_tx_ready,
    .local_in_wr, .local_in_data, .local_in_half_full, .local_in_full,
    .local_out_rd, .local_out_data, .local_out_empty,
    .my_ip, .ip_mask, .is_head, .nq_unres, .nq_res,
    .n_res_cycle, .cycle_min, .cycle_max, .cp_timeout, .wrap_b_to_a, .wrap_a_to_b,
    .cam_wr, .cam_index, .cam_data, .cam_valid, .cam_mask,
    .xcvr_status, .rx_error_count, .rx_overrun_count,
    .n_unres_now, .n_res_now, .stats(stats),
    .mgmt_rd, .mgmt_data, .mgmt_empty
  );

  hub #(.NHOSTS(NHOSTS)) u_hub (
    .clk, .rst_n,
    .poll_enable, .up_ring_b, .mc_both,
    .lo_rd(local_out_rd), .lo_data(local_out_data), .lo_empty(local_out_empty),
    .li_wr(local_in_wr), .li_data(local_in_data), .li_half_full(local_in_half_full),
    .dn_valid, .dn_data,
    .up_valid, .up_data, .up_sync,
    .polls(hub_polls), .grants(hub_grants), .poll_timeouts(hub_poll_timeouts),
    .up_packets(hub_up_packets), .recv_timeouts(hub_recv_timeouts)
  );

  for (genvar h = 0; h < int'(NHOSTS); h++) begin : g_host
    nic #(.TX_DEPTH(DEPTH), .RX_DEPTH(DEPTH), .NVCI(NVCI)) u_nic (
      .clk, .rst_n,
      .poll_addr(4'(h)), .my_ip(host_ip[h]),
      .vci_wr(vci_wr[h]), .vci_index(vci_index[h]), .vci_data(vci_data[h]), .vci_valid(vci_valid[h]),
      .host_tx_wr(host_tx_wr[h]), .host_tx_data(host_tx_data[h]), .host_tx_full(host_tx_full[h]),
      .host_rx_rd(host_rx_rd[h]), .host_rx_data(host_rx_data[h]), .host_rx_empty(host_rx_empty[h]),
      .irq(host_irq[h]), .rx_packets(host_rx_packets[h]), .rx_dropped(host_rx_dropped[h]),
      .dn_valid, .dn_data,
      .up_en(nic_en[h]), .up_valid(nic_valid[h]), .up_data(nic_data[h]), .up_sync(nic_sync[h])
    );
    assign en_vec[h] = nic_en[h];
  end

  // wired-OR uplink
  always_comb begin
    up_valid = 1'b0;
    up_sync  = 1'b0;
    up_data  = '0;
    for (int h = 0; h < int'(NHOSTS); h++) begin
      if (nic_en[h]) begin
        up_valid = up_valid | nic_valid[h];
        up_sync  = up_sync  | nic_sync[h];
        up_data  = up_data  | nic_data[h];
      end
    end
  end

  // Polling lets at most one card drive the uplink.
  a_one_talker: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(en_vec));
endmodule

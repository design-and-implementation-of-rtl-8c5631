// router: level-1 dual-ring router (third-generation architecture).
//
// Each router sits on two counter-rotating 100 Mb/s rings and serves one hub
// of up to 16 hosts. For each ring it has a transceiver module (receive FIFO
// behind the TAXI receiver, transmit FIFO ahead of the TAXI transmitter) and a
// local accessing module (input queue from the hub, output queue to the hub);
// the ring controller moves packets between them: every data packet is
// forwarded downstream (removed instead at the erasure node) and copied to the
// local output queue when its destination belongs to this router; local
// packets are inserted behind the ACTA control packet within the node's quota.
// Ring A IN feeds ring A OUT and local A OUT, local A IN goes onto ring A;
// likewise for ring B. In a fault the controller can wrap one ring into the
// other.
//
// The TAXI chips and the control processor are outside this module: their
// parallel byte interfaces and the processor's configuration and CAM load
// signals are ports. All bytes are 9 bits, one per clock cycle of clk (the
// byte clock). Index 0 of every array port is ring A, index 1 ring B.
// Network-management packets (NM bit set) for this router are not sent to the
// hub but to a management queue per ring that the control processor reads
// (mgmt_*).
// Structure and data paths follow the document's block diagram; FIFO depth
// (DEPTH) and the management queues as FIFOs are this design's choices.
module router
  import clnet_pkg::*;
#(
  parameter int unsigned DEPTH       = 2048,
  parameter int unsigned CAM_ENTRIES = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  // TAXI receivers (ring A IN, ring B IN)
  input  logic        taxi_rx_strobe    [2],
  input  tbyte_t      taxi_rx_data      [2],
  input  logic        taxi_rx_sync      [2],
  input  logic        taxi_rx_violation [2],
  // TAXI transmitters (ring A OUT, ring B OUT)
  output logic        taxi_tx_strobe    [2],
  output tbyte_t      taxi_tx_data      [2],
  input  logic        taxi_tx_ready     [2],
  // hub side: local A/B IN
  input  logic        local_in_wr        [2],
  input  tbyte_t      local_in_data      [2],
  output logic        local_in_half_full [2],
  output logic        local_in_full      [2],
  // hub side: local A/B OUT (first-word-fall-through)
  input  logic        local_out_rd    [2],
  output tbyte_t      local_out_data  [2],
  output logic        local_out_empty [2],
  // control processor: configuration
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
  // control processor: status
  output logic [5:0]  xcvr_status     [2],
  output logic [15:0] rx_error_count  [2],
  output logic [15:0] rx_overrun_count[2],
  output logic [15:0] n_unres_now     [2],
  output logic [15:0] n_res_now       [2],
  output ring_stats_t stats           [2],
  // control processor: network-management packets received for this router
  input  logic        mgmt_rd         [2],
  output tbyte_t      mgmt_data       [2],
  output logic        mgmt_empty      [2]
);
  logic   rx_rd [2], rx_empty [2], tx_wr [2], tx_full [2];
  tbyte_t rx_data [2], tx_data [2];
  logic   lo_wr [2], lo_half_full [2], lo_full [2];
  logic   li_rd [2], li_empty [2], li_pkt_avail [2];
  tbyte_t lo_data [2], li_data [2];
  logic   mg_wr [2], mg_half_full [2], mg_full [2];
  tbyte_t mg_data [2];

  for (genvar i = 0; i < 2; i++) begin : g_ring
    xcvr_module #(.DEPTH(DEPTH)) u_xcvr (
      .clk, .rst_n,
      .taxi_rx_strobe(taxi_rx_strobe[i]), .taxi_rx_data(taxi_rx_data[i]),
      .taxi_rx_sync(taxi_rx_sync[i]), .taxi_rx_violation(taxi_rx_violation[i]),
      .taxi_tx_strobe(taxi_tx_strobe[i]), .taxi_tx_data(taxi_tx_data[i]),
      .taxi_tx_ready(taxi_tx_ready[i]),
      .rx_rd(rx_rd[i]), .rx_data(rx_data[i]), .rx_empty(rx_empty[i]),
      .tx_wr(tx_wr[i]), .tx_data(tx_data[i]), .tx_full(tx_full[i]),
      .status(xcvr_status[i]),
      .rx_error_count(rx_error_count[i]), .rx_overrun_count(rx_overrun_count[i])
    );

    local_access #(.DEPTH(DEPTH)) u_local (
      .clk, .rst_n,
      .in_wr(local_in_wr[i]), .in_data(local_in_data[i]),
      .in_half_full(local_in_half_full[i]), .in_full(local_in_full[i]),
      .ring_rd(li_rd[i]), .ring_data(li_data[i]), .ring_empty(li_empty[i]),
      .ring_pkt_avail(li_pkt_avail[i]),
      .copy_wr(lo_wr[i]), .copy_data(lo_data[i]),
      .copy_half_full(lo_half_full[i]), .copy_full(lo_full[i]),
      .out_rd(local_out_rd[i]), .out_data(local_out_data[i]), .out_empty(local_out_empty[i])
    );

    // management queue, read by the control processor
    sync_fifo #(.WIDTH(9), .DEPTH(DEPTH)) u_mgmt (
      .clk, .rst_n,
      .wr_en(mg_wr[i]), .wr_data(mg_data[i]),
      .rd_en(mgmt_rd[i]), .rd_data(mgmt_data[i]),
      .empty(mgmt_empty[i]), .half_full(mg_half_full[i]), .full(mg_full[i]), .count()
    );
  end

  ring_controller #(.CAM_ENTRIES(CAM_ENTRIES)) u_ctrl (
    .clk, .rst_n,
    .my_ip, .ip_mask, .is_head, .nq_unres, .nq_res,
    .n_res_cycle, .cycle_min, .cycle_max, .cp_timeout, .wrap_b_to_a, .wrap_a_to_b,
    .cam_wr, .cam_index, .cam_data, .cam_valid, .cam_mask,
    .rx_rd, .rx_data, .rx_empty, .tx_wr, .tx_data, .tx_full,
    .lo_wr, .lo_data, .lo_half_full, .lo_full,
    .mg_wr, .mg_data, .mg_half_full, .mg_full,
    .li_rd, .li_data, .li_empty, .li_pkt_avail,
    .n_unres_now, .n_res_now, .stats
  );
endmodule

// ring_controller: ring controller module of the level-1 router.
//
// Couples the transceiver modules and the local accessing modules of the two
// rings. It holds one ring_channel engine per ring, so that both rings route
// and insert packets independently and at the same time, the multicast CAM
// shared by the two engines (one search port each), and the data-path
// crossbar that decides which transmit FIFO each engine writes.
//
// Index 0 is ring A, index 1 is ring B. Normally engine A writes ring A's
// transmit FIFO and engine B ring B's. For a link or neighbour failure the
// control processor sets wrap_b_to_a (everything arriving on B IN, and ring
// B's local insertions, leaves on A OUT, Fig. 4.10 of the design) or
// wrap_a_to_b (the mirror case). The wrapping engine then owns the other
// ring's transmit FIFO; the engine whose output is taken over is held (its
// input link is the failed one) until the wrap is removed. Setting both swaps
// the outputs.
//
// The engines, CAM and wrap paths are the document's; that they are
// dedicated logic rather than processor firmware, and the hold of the
// displaced engine, are this design's choices. The CAM compares
// {24'b0, VCI} against its entries under cam_mask.
module ring_controller
  import clnet_pkg::*;
#(
  parameter int unsigned CAM_ENTRIES = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  // configuration
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
  // CAM load port
  input  logic                           cam_wr,
  input  logic [$clog2(CAM_ENTRIES)-1:0] cam_index,
  input  logic [47:0]                    cam_data,
  input  logic                           cam_valid,
  input  logic [47:0]                    cam_mask,
  // transceiver modules
  output logic        rx_rd    [2],
  input  tbyte_t      rx_data  [2],
  input  logic        rx_empty [2],
  output logic        tx_wr    [2],
  output tbyte_t      tx_data  [2],
  input  logic        tx_full  [2],
  // local accessing modules
  output logic        lo_wr        [2],
  output tbyte_t      lo_data      [2],
  input  logic        lo_half_full [2],
  input  logic        lo_full      [2],
  output logic        mg_wr        [2],
  output tbyte_t      mg_data      [2],
  input  logic        mg_half_full [2],
  input  logic        mg_full      [2],
  output logic        li_rd        [2],
  input  tbyte_t      li_data      [2],
  input  logic        li_empty     [2],
  input  logic        li_pkt_avail [2],
  // status
  output logic [15:0] n_unres_now [2],
  output logic [15:0] n_res_now   [2],
  output ring_stats_t stats       [2]
);
  logic        ch_tx_wr   [2];
  tbyte_t      ch_tx_data [2];
  logic        ch_tx_full [2];
  logic [47:0] key        [2];
  logic        hit        [2];
  logic [$clog2(CAM_ENTRIES)-1:0] hit_index [2];
  logic        dest       [2];   // ring whose transmit FIFO engine i writes
  logic        held       [2];

  assign dest[0] = wrap_a_to_b;
  assign dest[1] = !wrap_b_to_a;
  assign held[0] = (dest[0] == dest[1]) && wrap_b_to_a;
  assign held[1] = (dest[0] == dest[1]) && wrap_a_to_b;

  for (genvar i = 0; i < 2; i++) begin : g_ch
    ring_channel u_ch (
      .clk, .rst_n,
      .is_head(is_head[i]), .my_ip, .ip_mask,
      .nq_unres(nq_unres[i]), .nq_res(nq_res[i]),
      .n_res_cycle, .cycle_min, .cycle_max, .cp_timeout,
      .rx_rd(rx_rd[i]), .rx_data(rx_data[i]), .rx_empty(rx_empty[i]),
      .tx_wr(ch_tx_wr[i]), .tx_data(ch_tx_data[i]), .tx_full(ch_tx_full[i]),
      .lo_wr(lo_wr[i]), .lo_data(lo_data[i]),
      .lo_half_full(lo_half_full[i]), .lo_full(lo_full[i]),
      .mg_wr(mg_wr[i]), .mg_data(mg_data[i]),
      .mg_half_full(mg_half_full[i]), .mg_full(mg_full[i]),
      .li_rd(li_rd[i]), .li_data(li_data[i]), .li_empty(li_empty[i]),
      .li_pkt_avail(li_pkt_avail[i]),
      .cam_key(key[i]), .cam_hit(hit[i]),
      .n_unres_now(n_unres_now[i]), .n_res_now(n_res_now[i]),
      .stats(stats[i])
    );
  end

  cam #(.ENTRIES(CAM_ENTRIES), .WIDTH(48), .NSRCH(2)) u_cam (
    .clk, .rst_n,
    .wr_en(cam_wr), .wr_index(cam_index), .wr_data(cam_data), .wr_valid(cam_valid),
    .search_mask(cam_mask), .key(key), .hit(hit), .index(hit_index)
  );

  // crossbar from the engines to the transmit FIFOs
  always_comb begin
    for (int r = 0; r < 2; r++) begin
      tx_wr[r]   = 1'b0;
      tx_data[r] = '0;
    end
    for (int i = 0; i < 2; i++) begin
      ch_tx_full[i] = held[i] ? 1'b1 : tx_full[int'(dest[i])];
      if (!held[i] && ch_tx_wr[i]) begin
        tx_wr[int'(dest[i])]   = 1'b1;
        tx_data[int'(dest[i])] = ch_tx_data[i];
      end
    end
  end
endmodule

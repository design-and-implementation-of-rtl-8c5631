// hub: concentrator between a level-1 router and up to 16 hosts.
//
// Downlink: every packet the router copied to its local output queues (ring
// A and ring B) is broadcast on the shared downlink; each host's interface
// card keeps only what is addressed to it. The two queues are served a whole
// packet at a time, alternating when both hold data. Hub polling commands are
// slipped into the downlink between any two bytes, even inside a packet, and
// take precedence over packet bytes.
//
// Uplink (round-robin polling, so that only one host drives the shared uplink
// at a time): for host X the hub sends "Poll node X"; the polled card turns its
// transmitter on and sends the SYNC symbol; on seeing it the hub sends "Allow
// node X"; the card sends one packet, which the hub writes into the router's
// local input queue of the ring chosen for that host; on its trailer the hub
// sends "Force all nodes to release" and moves to host X+1. If no SYNC arrives
// within POLL_TIMEOUT cycles (nothing to send, or no card), or no trailer within
// RECV_TIMEOUT, the hub releases and moves on. A host is polled only when
// poll_enable has its bit set and the target input queue is at most half full,
// which leaves room for a whole packet.
//
// Multicast on both rings: when mc_both is set, a packet whose header marks a
// VCI destination is written into both rings' input queues at once, so that
// it travels upstream and downstream and reaches members on either side of
// the sender. Hosts are then polled only while both queues are at most half
// full. Which VCIs have members on both sides is the network manager's
// knowledge, so the switch is a configuration input.
//
// The command set and the poll/sync/allow/trailer/release sequence follow
// the document. This design's choices: the timeouts, the per-host ring choice
// (up_ring_b bit X set sends host X's packets to ring B), the poll_enable
// mask, mc_both as a single switch for all VCIs, and representing the SYNC symbol as a flag (up_sync) on the uplink.
module hub
  import clnet_pkg::*;
#(
  parameter int unsigned NHOSTS       = 16,
  parameter int unsigned POLL_TIMEOUT = 16,
  parameter int unsigned RECV_TIMEOUT = 4096
) (
  input  logic         clk,
  input  logic         rst_n,
  // configuration
  input  logic [15:0]  poll_enable,
  input  logic [15:0]  up_ring_b,
  input  logic         mc_both,        // send VCI packets on both rings
  // router local output queues (first-word-fall-through)
  output logic         lo_rd    [2],
  input  tbyte_t       lo_data  [2],
  input  logic         lo_empty [2],
  // router local input queues
  output logic         li_wr        [2],
  output tbyte_t       li_data      [2],
  input  logic         li_half_full [2],
  // broadcast downlink to all cards
  output logic         dn_valid,
  output tbyte_t       dn_data,
  // shared uplink from the cards
  input  logic         up_valid,
  input  tbyte_t       up_data,
  input  logic         up_sync,
  // status
  output logic [15:0]  polls,
  output logic [15:0]  grants,
  output logic [15:0]  poll_timeouts,
  output logic [15:0]  up_packets,
  output logic [15:0]  recv_timeouts
);
  localparam int unsigned HW = (NHOSTS > 1) ? $clog2(NHOSTS) : 1;

  typedef enum logic [1:0] {H_SELECT, H_WAIT, H_RECV, H_NEXT} hstate_e;

  hstate_e     hstate;
  logic [HW-1:0] cur;
  logic [15:0] timer;
  logic        cmd_pending;
  tbyte_t      cmd_byte;
  logic        cur_ring;
  logic        in_pkt, dual_q, dual;   // header seen; packet goes on both rings

  // downlink arbitration state
  logic        locked, src, last_src;
  logic        pick_valid, pick;
  logic        send_pkt;
  tbyte_t      pkt_byte;

  assign cur_ring = up_ring_b[4'(cur)];

  // ---------------------------------------------------------------- downlink
  always_comb begin
    pick_valid = 1'b0;
    pick       = 1'b0;
    if (locked) begin
      pick_valid = !lo_empty[int'(src)];
      pick       = src;
    end else if (!lo_empty[int'(!last_src)]) begin
      pick_valid = 1'b1;
      pick       = !last_src;
    end else if (!lo_empty[int'(last_src)]) begin
      pick_valid = 1'b1;
      pick       = last_src;
    end
    send_pkt = !cmd_pending && pick_valid;
    pkt_byte = lo_data[int'(pick)];

    lo_rd[0] = send_pkt && !pick;
    lo_rd[1] = send_pkt && pick;
    dn_valid = cmd_pending || send_pkt;
    dn_data  = cmd_pending ? cmd_byte : (send_pkt ? pkt_byte : '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked   <= 1'b0;
      src      <= 1'b0;
      last_src <= 1'b1;
    end else if (send_pkt) begin
      if (is_trailer(pkt_byte)) begin
        locked   <= 1'b0;
        last_src <= pick;
      end else if (!locked && is_header(pkt_byte)) begin
        locked <= 1'b1;
        src    <= pick;
      end
    end
  end

  // ------------------------------------------------------------------ uplink
  always_comb begin
    for (int r = 0; r < 2; r++) begin
      li_wr[r]   = 1'b0;
      li_data[r] = up_data;
    end
    if (hstate == H_RECV && up_valid && !up_sync) begin
      li_wr[int'(cur_ring)] = 1'b1;
      if (dual) li_wr[int'(!cur_ring)] = 1'b1;
    end
  end

  // the header byte decides whether this packet goes on both rings
  acb_t up_acb;
  assign up_acb = acb_t'(up_data);
  assign dual = mc_both && (in_pkt ? dual_q : (is_header(up_data) && !up_acb.ip));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_pkt <= 1'b0;
      dual_q <= 1'b0;
    end else if (hstate != H_RECV) begin
      in_pkt <= 1'b0;
      dual_q <= 1'b0;
    end else if (up_valid && !up_sync && !in_pkt && is_header(up_data)) begin
      in_pkt <= 1'b1;
      dual_q <= dual;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hstate        <= H_SELECT;
      cur           <= '0;
      timer         <= '0;
      cmd_pending   <= 1'b0;
      cmd_byte      <= '0;
      polls         <= '0;
      grants        <= '0;
      poll_timeouts <= '0;
      up_packets    <= '0;
      recv_timeouts <= '0;
    end else begin
      if (cmd_pending) cmd_pending <= 1'b0;   // a command goes out the cycle after it is set
      unique case (hstate)
        H_SELECT: if (!cmd_pending) begin
          if (poll_enable[4'(cur)] && !li_half_full[int'(cur_ring)] &&
              !(mc_both && li_half_full[int'(!cur_ring)])) begin
            cmd_pending <= 1'b1;
            cmd_byte    <= hub_byte(HC_POLL, 4'(cur));
            polls       <= polls + 1'b1;
            timer       <= '0;
            hstate      <= H_WAIT;
          end else begin
            cur <= (cur == HW'(NHOSTS - 1)) ? '0 : cur + 1'b1;
          end
        end

        H_WAIT: begin
          if (up_valid && up_sync && !cmd_pending) begin
            cmd_pending <= 1'b1;
            cmd_byte    <= hub_byte(HC_ALLOW, 4'(cur));
            grants      <= grants + 1'b1;
            timer       <= '0;
            hstate      <= H_RECV;
          end else if (timer == 16'(POLL_TIMEOUT)) begin
            cmd_pending   <= 1'b1;
            cmd_byte      <= hub_byte(HC_RELEASE, 4'd0);
            poll_timeouts <= poll_timeouts + 1'b1;
            hstate        <= H_NEXT;
          end else begin
            timer <= timer + 1'b1;
          end
        end

        H_RECV: begin
          if (up_valid && !up_sync && is_trailer(up_data)) begin
            cmd_pending <= 1'b1;
            cmd_byte    <= hub_byte(HC_RELEASE, 4'd0);
            up_packets  <= up_packets + 1'b1;
            hstate      <= H_NEXT;
          end else if (timer == 16'(RECV_TIMEOUT)) begin
            cmd_pending   <= 1'b1;
            cmd_byte      <= hub_byte(HC_RELEASE, 4'd0);
            recv_timeouts <= recv_timeouts + 1'b1;
            hstate        <= H_NEXT;
          end else begin
            timer <= timer + 1'b1;
          end
        end

        H_NEXT: begin
          cur    <= (cur == HW'(NHOSTS - 1)) ? '0 : cur + 1'b1;
          hstate <= H_SELECT;
        end

        default: hstate <= H_SELECT;
      endcase
    end
  end
endmodule

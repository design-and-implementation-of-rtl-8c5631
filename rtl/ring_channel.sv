// ring_channel: packet engine of one ring inside the ring controller.
//
// Does, in hardware, what the router's processor and DMA logic do for one
// ring: fast packet routing and the ACTA (adaptive cycle tunable access)
// media access control in its control-packet form.
//
// Routing. A packet is a header byte, four destination bytes, the datagram
// and a trailer byte. The engine reads only the header and the destination:
// an IP destination is compared with the router's subnet (my_ip under
// ip_mask), a VCI destination (the first three destination bytes) is looked
// up in the CAM. The five header bytes are then written to the transmit FIFO
// and, on a match, to the local output FIFO at the same time, and the rest of
// the packet is streamed to both until the trailer, one byte per cycle
// (Fig. 4.8 of the design). A packet that matches while the local output
// queue is over half full is not copied and is counted as a local drop.
//
// ACTA. A control packet (header with CS set, two bytes of unreserved slots
// N_u, two bytes of reserved slots N_r, trailer) opens every cycle. On
// receiving it the engine holds it back, appends complete packets from the
// local input queue -- a packet of priority p (header bit 1) only while its
// level still has N_p > 0 and this node has sent fewer than its quota nq_p
// at that level in this cycle -- then releases the control packet with each
// N_p decreased by the packets sent at that level. Inserted headers and
// trailers are re-marked as router bytes with SO set and CS clear.
//
// Head of bus / erasure node (is_head = 1): packets arriving here have been
// round the ring and are removed instead of forwarded (still copied locally
// on a match); occupied slots are counted per level. The returning control
// packet closes the cycle: the next cycle gets N_r = n_res_cycle and
// N_u = occupied unreserved slots of the closed cycle + cycle_min, capped at
// cycle_max, after which the engine itself acts on the new control packet
// (inserting its own local packets) and sends it out. After reset, or when
// is_head rises, the head opens a first cycle with N_u = cycle_min.
//
// A head of bus keeps no other traffic moving while it inserts, so the
// packets it inserts at the start of a cycle come back round into its receive
// FIFO while it is still inserting: its quota (nq_unres + nq_res packets of
// 582 bytes) must fit in that FIFO, i.e. at most 3 packets with the default
// 2048-byte FIFO. Other nodes have no such limit, since nothing follows the
// control packet they hold.
//
// Recovery (this design's own addition; the document does not discuss a lost
// control packet): a header byte arriving where address or control-packet
// bytes were expected restarts parsing at that header, and a head of bus that
// has not seen its control packet return for cp_timeout cycles (0 disables)
// opens a new cycle. Both matter when the rings are rewired after a fault.
//
// From the document: packet format, header-only routing, copy-and-forward,
// erasure at the head, hold/append/decrement/release of the control packet,
// two priority levels with two-byte counts. This design's choices: the
// next-cycle rule above (the document says only that the occupied count
// predicts the load), the priority flag in header bit 1, most-significant
// byte first in the control packet, network-management packets (NM set) that
// match going to a separate management queue (mg_*) for the router's
// control processor instead of to the hub, and head-of-line order in the local queue (a
// packet whose level is exhausted ends the node's turn).
//
// Timing: one byte per clock whenever the source FIFO has data and the
// transmit FIFO has room. A routed packet costs six extra cycles (one for the
// address decision, five to replay the header bytes): a 582-byte packet takes
// 588 cycles from its first byte read to its last byte written. The clock
// must therefore run at least 1.1 % above the rate at which bytes arrive; a
// 125 MBaud TAXI link with 9-bit bytes (11-bit code groups) delivers about
// 11.4 Mbyte/s, so a 12.5 MHz byte clock leaves about 10 % margin. An inserted
// packet costs one extra cycle, the control packet six cycles.
module ring_channel
  import clnet_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // configuration (written by the control processor)
  input  logic        is_head,
  input  logic [31:0] my_ip,
  input  logic [31:0] ip_mask,
  input  logic [15:0] nq_unres,
  input  logic [15:0] nq_res,
  input  logic [15:0] n_res_cycle,
  input  logic [15:0] cycle_min,
  input  logic [15:0] cycle_max,
  input  logic [23:0] cp_timeout,
  // receive FIFO of this ring (first-word-fall-through)
  output logic        rx_rd,
  input  tbyte_t      rx_data,
  input  logic        rx_empty,
  // transmit FIFO of the outgoing ring
  output logic        tx_wr,
  output tbyte_t      tx_data,
  input  logic        tx_full,
  // local output queue (copies to the hub)
  output logic        lo_wr,
  output tbyte_t      lo_data,
  input  logic        lo_half_full,
  input  logic        lo_full,
  // management queue (network-management packets for this router)
  output logic        mg_wr,
  output tbyte_t      mg_data,
  input  logic        mg_half_full,
  input  logic        mg_full,
  // local input queue (packets from the hub)
  output logic        li_rd,
  input  tbyte_t      li_data,
  input  logic        li_empty,
  input  logic        li_pkt_avail,
  // CAM search port
  output logic [47:0] cam_key,
  input  logic        cam_hit,
  // status
  output logic [15:0] n_unres_now,
  output logic [15:0] n_res_now,
  output ring_stats_t stats
);
  typedef enum logic [3:0] {
    S_IDLE, S_ADDR, S_DECIDE, S_HDR_OUT, S_STREAM,
    S_CP_BODY, S_CP_TRL, S_INSERT, S_INS_DATA, S_CP_OUT
  } state_e;

  state_e      state;
  acb_t        hdr;
  logic [31:0] addr;
  logic [2:0]  cnt;
  logic        fwd, copy, copy_mg;
  logic [15:0] n_unres, n_res;
  logic [15:0] sent_unres, sent_res;
  logic [15:0] occ_unres, occ_res;
  logic        cur_rsv;
  logic        start_pending;
  logic        head_q;
  logic [23:0] lost_timer;
  logic        cp_lost;
  logic        hdr_resync;

  // decision on the current header
  logic        ip_hit, to_local, to_mgmt, c_half, c_full;
  // insertion decision on the head of the local queue
  acb_t        li_hdr, rx_hdr;
  logic        allow_res, allow_unres, allowed;
  logic [16:0] next_unres;
  // byte moves this cycle
  logic        out_ok, stream_go, ins_go;
  tbyte_t      hb;

  assign cam_key  = {24'b0, addr[31:8]};
  assign ip_hit   = ((addr ^ my_ip) & ip_mask) == 32'b0;
  assign to_local = !hdr.nm && (hdr.ip ? ip_hit : cam_hit);
  assign to_mgmt  =  hdr.nm && (hdr.ip ? ip_hit : cam_hit);
  // the queue a matching packet is copied to
  assign c_half   = to_mgmt ? mg_half_full : lo_half_full;
  assign c_full   = copy_mg ? mg_full : lo_full;

  assign li_hdr      = acb_t'(li_data);
  assign rx_hdr      = acb_t'(rx_data);
  assign allow_res   = (n_res   != 0) && (sent_res   < nq_res);
  assign allow_unres = (n_unres != 0) && (sent_unres < nq_unres);
  assign allowed     = li_hdr.rsv ? allow_res : allow_unres;
  assign next_unres  = {1'b0, occ_unres} + {1'b0, cycle_min};

  assign out_ok    = !fwd || !tx_full;
  assign stream_go = (state == S_STREAM) && !rx_empty && out_ok;
  assign ins_go    = (state == S_INS_DATA) && !li_empty && !tx_full;

  // head of bus: no control packet back within cp_timeout cycles
  assign cp_lost = is_head && (cp_timeout != 0) && (lost_timer >= cp_timeout) &&
                   (state == S_IDLE || state == S_ADDR || state == S_CP_BODY || state == S_CP_TRL ||
                    (state == S_STREAM && rx_empty));
  // a header where packet bytes were expected: the previous packet was cut
  assign hdr_resync = !rx_empty && is_header(rx_data) &&
                      (state == S_ADDR || state == S_CP_BODY || state == S_CP_TRL);

  assign n_unres_now = n_unres;
  assign n_res_now   = n_res;

  // the five header bytes, replayed in S_HDR_OUT
  always_comb begin
    unique case (cnt)
      3'd0:    hb = tbyte_t'(hdr);
      3'd1:    hb = data_byte(addr[31:24]);
      3'd2:    hb = data_byte(addr[23:16]);
      3'd3:    hb = data_byte(addr[15:8]);
      default: hb = data_byte(addr[7:0]);
    endcase
  end

  always_comb begin
    rx_rd   = 1'b0;
    li_rd   = 1'b0;
    tx_wr   = 1'b0;
    tx_data = '0;
    lo_wr   = 1'b0;
    lo_data = '0;
    mg_wr   = 1'b0;
    mg_data = '0;
    unique case (state)
      S_IDLE:    rx_rd = !rx_empty && !(is_head && start_pending);
      S_ADDR, S_CP_BODY, S_CP_TRL: rx_rd = !rx_empty && !cp_lost;
      S_HDR_OUT: begin
        tx_wr   = fwd && !tx_full;
        tx_data = hb;
        lo_wr   = copy && !copy_mg && out_ok && !c_full;
        lo_data = hb;
        mg_wr   = copy &&  copy_mg && out_ok && !c_full;
        mg_data = hb;
      end
      S_STREAM: begin
        rx_rd   = stream_go;
        tx_wr   = stream_go && fwd;
        tx_data = rx_data;
        lo_wr   = stream_go && copy && !copy_mg && !c_full;
        lo_data = rx_data;
        mg_wr   = stream_go && copy &&  copy_mg && !c_full;
        mg_data = rx_data;
      end
      S_INSERT:  li_rd = li_pkt_avail && !li_empty && !is_header(li_data);
      S_INS_DATA: begin
        li_rd   = ins_go;
        tx_wr   = ins_go;
        tx_data = (is_ctrl(li_data) && !is_hub_cmd(li_data)) ? occupy(li_data) : li_data;
      end
      S_CP_OUT: begin
        tx_wr = !tx_full;
        unique case (cnt)
          3'd0:    tx_data = cp_byte(1'b1);
          3'd1:    tx_data = data_byte(n_unres[15:8]);
          3'd2:    tx_data = data_byte(n_unres[7:0]);
          3'd3:    tx_data = data_byte(n_res[15:8]);
          3'd4:    tx_data = data_byte(n_res[7:0]);
          default: tx_data = cp_byte(1'b0);
        endcase
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      hdr           <= '0;
      addr          <= '0;
      cnt           <= '0;
      fwd           <= 1'b0;
      copy          <= 1'b0;
      copy_mg       <= 1'b0;
      n_unres       <= '0;
      n_res         <= '0;
      sent_unres    <= '0;
      sent_res      <= '0;
      occ_unres     <= '0;
      occ_res       <= '0;
      cur_rsv       <= 1'b0;
      start_pending <= 1'b1;
      head_q        <= 1'b0;
      lost_timer    <= '0;
      stats         <= '0;
    end else begin
      head_q <= is_head;
      if (is_head && !head_q) start_pending <= 1'b1;
      if (!is_head || (state == S_CP_TRL && !rx_empty && is_trailer(rx_data)) || (state == S_IDLE && start_pending))
        lost_timer <= '0;
      else if (lost_timer != '1)
        lost_timer <= lost_timer + 1'b1;

      if (cp_lost) begin
        // the cycle never came back (a link was cut or reconfigured): open a new one
        start_pending  <= 1'b1;
        lost_timer     <= '0;
        stats.cp_regen <= stats.cp_regen + 1'b1;
        state          <= S_IDLE;
      end else if (hdr_resync) begin
        hdr   <= rx_hdr;
        cnt   <= '0;
        state <= rx_hdr.cs ? S_CP_BODY : S_ADDR;
      end else
      unique case (state)
        S_IDLE: begin
          if (is_head && start_pending) begin
            start_pending <= 1'b0;
            n_unres       <= cycle_min;
            n_res         <= n_res_cycle;
            sent_unres    <= '0;
            sent_res      <= '0;
            occ_unres     <= '0;
            occ_res       <= '0;
            stats.cycles  <= stats.cycles + 1'b1;
            state         <= S_INSERT;
          end else if (!rx_empty && is_header(rx_data)) begin
            // anything that is not a header outside a packet is discarded
            hdr   <= acb_t'(rx_data);
            cnt   <= '0;
            state <= rx_hdr.cs ? S_CP_BODY : S_ADDR;
          end
        end

        S_ADDR: if (!rx_empty) begin
          addr <= {addr[23:0], rx_data[7:0]};
          cnt  <= cnt + 1'b1;
          if (cnt == 3'd3) state <= S_DECIDE;
        end

        S_DECIDE: begin
          fwd  <= !is_head;
          copy    <= (to_local || to_mgmt) && !c_half;
          copy_mg <= to_mgmt;
          if ((to_local || to_mgmt) && c_half) stats.local_drop <= stats.local_drop + 1'b1;
          if (to_mgmt && !c_half) stats.managed <= stats.managed + 1'b1;
          if (is_head) begin
            stats.erased <= stats.erased + 1'b1;
            if (hdr.rsv) occ_res   <= occ_res + 1'b1;
            else         occ_unres <= occ_unres + 1'b1;
          end else begin
            stats.forwarded <= stats.forwarded + 1'b1;
          end
          if (to_local && !lo_half_full) stats.copied <= stats.copied + 1'b1;
          cnt   <= '0;
          state <= S_HDR_OUT;
        end

        S_HDR_OUT: if (out_ok) begin
          cnt <= cnt + 1'b1;
          if (cnt == 3'd4) state <= S_STREAM;
        end

        S_STREAM: if (stream_go && is_trailer(rx_data)) state <= S_IDLE;

        S_CP_BODY: if (!rx_empty) begin
          addr <= {addr[23:0], rx_data[7:0]};
          cnt  <= cnt + 1'b1;
          if (cnt == 3'd3) state <= S_CP_TRL;
        end

        S_CP_TRL: if (!rx_empty && is_trailer(rx_data)) begin
          sent_unres <= '0;
          sent_res   <= '0;
          if (is_head) begin
            // the cycle has come back round: open the next one
            n_unres      <= (next_unres > {1'b0, cycle_max}) ? cycle_max : next_unres[15:0];
            n_res        <= n_res_cycle;
            occ_unres    <= '0;
            occ_res      <= '0;
            stats.cycles <= stats.cycles + 1'b1;
          end else begin
            n_unres <= addr[31:16];
            n_res   <= addr[15:0];
          end
          state <= S_INSERT;
        end

        S_INSERT: begin
          if (li_pkt_avail && !li_empty) begin
            if (is_header(li_data)) begin
              if (allowed) begin
                cur_rsv <= li_hdr.rsv;
                state   <= S_INS_DATA;
              end else begin
                if ((li_hdr.rsv ? n_res : n_unres) == 0) stats.slot_stop  <= stats.slot_stop + 1'b1;
                else                                     stats.quota_stop <= stats.quota_stop + 1'b1;
                cnt   <= '0;
                state <= S_CP_OUT;
              end
            end
          end else begin
            cnt   <= '0;
            state <= S_CP_OUT;
          end
        end

        S_INS_DATA: if (ins_go && is_trailer(li_data)) begin
          stats.inserted <= stats.inserted + 1'b1;
          if (cur_rsv) begin
            n_res    <= n_res - 1'b1;
            sent_res <= sent_res + 1'b1;
          end else begin
            n_unres    <= n_unres - 1'b1;
            sent_unres <= sent_unres + 1'b1;
          end
          state <= S_INSERT;
        end

        S_CP_OUT: if (!tx_full) begin
          cnt <= cnt + 1'b1;
          if (cnt == 3'd5) begin
            stats.cp_released <= stats.cp_released + 1'b1;
            state <= S_IDLE;
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  // A packet is only inserted while its level still has free slots.
  a_slots_left: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_INSERT && li_pkt_avail && !li_empty && is_header(li_data) && allowed)
      |-> ((li_hdr.rsv ? n_res : n_unres) != 0));
endmodule

// nic: network interface card of a host on a hub.
//
// Receive: the card watches the hub's broadcast downlink. Hub polling bytes
// (control bytes with the HUB bit set) go to the transmit side; everything
// else is parsed as packets: header, four destination bytes, datagram,
// trailer. An IP destination must equal my_ip; a VCI destination (first three
// destination bytes) must equal one of the NVCI entries the host loaded into
// the card's VCI table. Matching packets lose header, destination and trailer
// and their datagram bytes go to the receive FIFO; host_rx_data[8] marks the
// last byte of a datagram, and irq pulses for one cycle when the trailer
// arrives, so the host never needs the length in advance. A matching packet
// that finds the receive FIFO over half full is dropped and counted. A hub
// command may arrive between any two bytes of a packet without disturbing it.
//
// Transmit: the host writes whole packets (header, destination, datagram,
// trailer, 9-bit bytes) into the transmit FIFO. When the hub polls this card's
// address (poll_addr, hard-wired per card) and a complete packet is queued,
// the card turns its transmitter on (up_en) and sends SYNC; on "Allow node X"
// it sends the packet, one byte per cycle, trailer included, then waits for
// "Force release" and turns the transmitter off. Without a complete packet the
// card stays silent when polled.
//
// Behaviour follows the document's description of the card and the polling
// protocol; the host-side FIFO interface, the last-byte flag, the VCI table
// size and its load port, and the drop rule are this design's choices.
module nic
  import clnet_pkg::*;
#(
  parameter int unsigned TX_DEPTH = 2048,
  parameter int unsigned RX_DEPTH = 2048,
  parameter int unsigned NVCI     = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  // identity
  input  logic [3:0]    poll_addr,
  input  logic [31:0]   my_ip,
  input  logic                     vci_wr,
  input  logic [$clog2(NVCI)-1:0]  vci_index,
  input  logic [23:0]              vci_data,
  input  logic                     vci_valid,
  // host transmit side
  input  logic          host_tx_wr,
  input  tbyte_t        host_tx_data,
  output logic          host_tx_full,
  // host receive side
  input  logic          host_rx_rd,
  output tbyte_t        host_rx_data,
  output logic          host_rx_empty,
  output logic          irq,
  output logic [15:0]   rx_packets,
  output logic [15:0]   rx_dropped,
  // hub downlink (broadcast)
  input  logic          dn_valid,
  input  tbyte_t        dn_data,
  // hub uplink (shared)
  output logic          up_en,
  output logic          up_valid,
  output tbyte_t        up_data,
  output logic          up_sync
);
  // ------------------------------------------------------------ VCI table
  logic [23:0] vci_tab   [NVCI];
  logic        vci_ok    [NVCI];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NVCI); i++) begin
        vci_tab[i] <= '0;
        vci_ok[i]  <= 1'b0;
      end
    end else if (vci_wr) begin
      vci_tab[vci_index] <= vci_data;
      vci_ok[vci_index]  <= vci_valid;
    end
  end

  // ------------------------------------------------------------ receive
  typedef enum logic [1:0] {R_IDLE, R_ADDR, R_DATA, R_SKIP} rstate_e;
  rstate_e     rstate;
  logic        pkt_ip;
  logic [23:0] addr_hi;
  logic [1:0]  acnt;
  logic [7:0]  held;
  logic        have_held;
  logic        rx_wr, rx_half;
  tbyte_t      rx_wdata;
  logic [31:0] full_addr;
  logic        vci_hit, addr_hit;
  logic        dn_pkt;

  assign dn_pkt    = dn_valid && !is_hub_cmd(dn_data);
  assign full_addr = {addr_hi, dn_data[7:0]};

  always_comb begin
    vci_hit = 1'b0;
    for (int i = 0; i < int'(NVCI); i++)
      if (vci_ok[i] && vci_tab[i] == full_addr[31:8]) vci_hit = 1'b1;
    addr_hit = pkt_ip ? (full_addr == my_ip) : vci_hit;
  end

  always_comb begin
    rx_wr    = 1'b0;
    rx_wdata = '0;
    if (dn_pkt && rstate == R_DATA && have_held) begin
      if (!is_ctrl(dn_data)) begin
        rx_wr    = 1'b1;
        rx_wdata = {1'b0, held};
      end else if (is_trailer(dn_data)) begin
        rx_wr    = 1'b1;
        rx_wdata = {1'b1, held};
      end
    end
  end

  sync_fifo #(.WIDTH(9), .DEPTH(RX_DEPTH)) u_rx_fifo (
    .clk, .rst_n,
    .wr_en(rx_wr), .wr_data(rx_wdata),
    .rd_en(host_rx_rd), .rd_data(host_rx_data),
    .empty(host_rx_empty), .half_full(rx_half), .full(), .count()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rstate     <= R_IDLE;
      pkt_ip     <= 1'b0;
      addr_hi    <= '0;
      acnt       <= '0;
      held       <= '0;
      have_held  <= 1'b0;
      irq        <= 1'b0;
      rx_packets <= '0;
      rx_dropped <= '0;
    end else begin
      irq <= 1'b0;
      if (dn_pkt) begin
        if (is_header(dn_data)) begin
          pkt_ip <= dn_data[3];   // IP/VCI bit of the header
          acnt   <= '0;
          rstate <= R_ADDR;
        end else begin
          unique case (rstate)
            R_ADDR: if (!is_ctrl(dn_data)) begin
              addr_hi <= {addr_hi[15:0], dn_data[7:0]};
              acnt    <= acnt + 1'b1;
              if (acnt == 2'd3) begin
                have_held <= 1'b0;
                if (addr_hit && !rx_half) rstate <= R_DATA;
                else begin
                  if (addr_hit) rx_dropped <= rx_dropped + 1'b1;
                  rstate <= R_SKIP;
                end
              end
            end
            R_DATA: begin
              if (!is_ctrl(dn_data)) begin
                held      <= dn_data[7:0];
                have_held <= 1'b1;
              end else if (is_trailer(dn_data)) begin
                irq        <= 1'b1;
                rx_packets <= rx_packets + 1'b1;
                rstate     <= R_IDLE;
              end
            end
            R_SKIP: if (is_trailer(dn_data)) rstate <= R_IDLE;
            default: ;
          endcase
        end
      end
    end
  end

  // ------------------------------------------------------------ transmit
  typedef enum logic [1:0] {T_OFF, T_SYNC, T_SEND, T_WAIT_REL} tstate_e;
  tstate_e     tstate;
  tbyte_t      tx_head;
  logic        tx_empty, tx_rd;
  logic [15:0] tx_pkts;
  logic        tx_add, tx_sub;
  hcb_t        cmd;
  logic        cmd_valid, for_me;

  sync_fifo #(.WIDTH(9), .DEPTH(TX_DEPTH)) u_tx_fifo (
    .clk, .rst_n,
    .wr_en(host_tx_wr), .wr_data(host_tx_data),
    .rd_en(tx_rd), .rd_data(tx_head),
    .empty(tx_empty), .half_full(), .full(host_tx_full), .count()
  );

  assign tx_rd   = (tstate == T_SEND) && !tx_empty;
  assign tx_add  = host_tx_wr && !host_tx_full && is_trailer(host_tx_data);
  assign tx_sub  = tx_rd && is_trailer(tx_head);

  assign cmd       = hcb_t'(dn_data);
  assign cmd_valid = dn_valid && is_hub_cmd(dn_data);
  assign for_me    = (cmd.addr == poll_addr);

  assign up_en    = (tstate != T_OFF);
  assign up_sync  = (tstate == T_SYNC);
  assign up_valid = (tstate == T_SYNC) || tx_rd;
  assign up_data  = tx_rd ? tx_head : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tstate  <= T_OFF;
      tx_pkts <= '0;
    end else begin
      tx_pkts <= tx_pkts + 16'(tx_add) - 16'(tx_sub);
      unique case (tstate)
        T_OFF:      if (cmd_valid && cmd.cmd == HC_POLL && for_me && tx_pkts != 0) tstate <= T_SYNC;
        T_SYNC: begin
          if (cmd_valid && cmd.cmd == HC_ALLOW && for_me) tstate <= T_SEND;
          else if (cmd_valid && cmd.cmd == HC_RELEASE)    tstate <= T_OFF;
        end
        T_SEND:     if (tx_sub) tstate <= T_WAIT_REL;
        T_WAIT_REL: if (cmd_valid && cmd.cmd == HC_RELEASE) tstate <= T_OFF;
        default:    tstate <= T_OFF;
      endcase
    end
  end
endmodule

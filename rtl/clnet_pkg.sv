// clnet_pkg: types and constants shared by the level-1 dual-ring network blocks.
//
// Every byte on a link is 9 bits wide. Bit 8 (DT) tells a data byte (1) from an
// access control byte (0). A router access control byte (header or trailer of a
// fast-packet-routing packet) carries PS/PE, HUB/ROU, CS, SO, IP/VCI and NM;
// a hub polling byte carries a 2-bit command and a 4-bit polled address. The bit
// positions and the command codes follow the network's byte format; the use of
// bit 1 as the reserved-service (priority) flag of a data packet is this
// design's own choice, since the format leaves bits 1 and 0 unassigned.
package clnet_pkg;

  typedef logic [8:0] tbyte_t;

  // Router access control byte (header when ps = 1, trailer when ps = 0).
  typedef struct packed {
    logic dt;    // 0: control byte, 1: data byte
    logic ps;    // 1: packet start (header), 0: packet end (trailer)
    logic hub;   // 1: from a hub, 0: from a router
    logic cs;    // cycle start: marks the ACTA control packet
    logic so;    // slot occupied: set on data packets
    logic ip;    // 1: 32-bit IP destination, 0: 24-bit VCI destination
    logic nm;    // network management packet
    logic rsv;   // reserved-service priority level (this design's use of bit 1)
    logic r0;    // unused
  } acb_t;

  // Hub polling byte.
  typedef enum logic [1:0] {
    HC_POLL    = 2'b00,   // poll node X
    HC_RELEASE = 2'b01,   // force all nodes to release the link
    HC_ALLOW   = 2'b11    // allow node X to transmit
  } hub_cmd_e;

  typedef struct packed {
    logic       dt;
    logic       r;
    logic       hub;
    hub_cmd_e   cmd;
    logic [3:0] addr;
  } hcb_t;

  localparam int unsigned ADDR_BYTES     = 4;    // destination IP / VCI field
  localparam int unsigned DATAGRAM_BYTES = 576;  // fixed-size IP datagram
  localparam int unsigned PACKET_BYTES   = 582;  // header + address + datagram + trailer
  localparam int unsigned CP_BYTES       = 6;    // ACTA control packet
  localparam int unsigned MAX_HOSTS      = 16;   // 4-bit polled address

  // Event counters of one ring channel.
  typedef struct packed {
    logic [15:0] forwarded;    // data packets passed downstream
    logic [15:0] copied;       // data packets copied to the local hub
    logic [15:0] local_drop;   // local copies dropped, output queue too full
    logic [15:0] erased;       // data packets removed by the erasure node
    logic [15:0] inserted;     // local packets put on the ring
    logic [15:0] cp_released;  // control packets sent downstream
    logic [15:0] quota_stop;   // insertion ended by the node's quota N_q
    logic [15:0] slot_stop;    // insertion ended by N_i reaching zero
    logic [15:0] cycles;       // cycles started (head of bus only)
    logic [15:0] cp_regen;     // cycles reopened after a lost control packet
    logic [15:0] managed;      // management packets copied to the processor queue
  } ring_stats_t;

  function automatic logic is_ctrl(tbyte_t b);
    return !b[8];
  endfunction

  // Start of a packet sent by a router (or by a host towards the router).
  function automatic logic is_header(tbyte_t b);
    return !b[8] && b[7] && !b[6];
  endfunction

  function automatic logic is_trailer(tbyte_t b);
    return !b[8] && !b[7] && !b[6];
  endfunction

  function automatic logic is_hub_cmd(tbyte_t b);
    return !b[8] && b[6];
  endfunction

  function automatic tbyte_t data_byte(logic [7:0] d);
    return {1'b1, d};
  endfunction

  function automatic tbyte_t hub_byte(hub_cmd_e c, logic [3:0] a);
    hcb_t h;
    h = '{dt: 1'b0, r: 1'b0, hub: 1'b1, cmd: c, addr: a};
    return tbyte_t'(h);
  endfunction

  // Header or trailer of an ACTA control packet.
  function automatic tbyte_t cp_byte(logic ps);
    acb_t a;
    a = '{dt: 1'b0, ps: ps, hub: 1'b0, cs: 1'b1, so: 1'b0, ip: 1'b0, nm: 1'b0, rsv: 1'b0, r0: 1'b0};
    return tbyte_t'(a);
  endfunction

  // A host's header or trailer as the router puts it on the ring: router
  // origin, slot occupied, no cycle start; the IP/VCI, NM and priority bits kept.
  function automatic tbyte_t occupy(tbyte_t b);
    acb_t a;
    a     = acb_t'(b);
    a.hub = 1'b0;
    a.cs  = 1'b0;
    a.so  = 1'b1;
    return tbyte_t'(a);
  endfunction

endpackage

// local_access: local accessing module of one ring.
//
// Holds the two FIFOs between the ring controller and the hub for one ring:
// the input queue buffers packets from the hub/hosts waiting to be inserted
// on the ring, the output queue buffers packets copied off the ring for the
// local hosts. Besides the FIFOs it counts the complete packets in the input
// queue (a trailer written adds one, a trailer read removes one) so that the
// ring controller starts inserting a packet only when all of it is already
// buffered and the ring never waits on the hub. The two-queue structure is
// the document's; the complete-packet counter is this design's choice.
//
// Interface: the hub writes in_* and reads out_* (first-word-fall-through);
// the ring controller reads ring_* and writes copy_*. Flags are those of
// sync_fifo; the half-full flags are what the hub and the ring controller use
// to keep room for one whole packet.
module local_access
  import clnet_pkg::*;
#(
  parameter int unsigned DEPTH = 2048
) (
  input  logic   clk,
  input  logic   rst_n,
  // from the hub into the input queue
  input  logic   in_wr,
  input  tbyte_t in_data,
  output logic   in_half_full,
  output logic   in_full,
  // input queue towards the ring controller
  input  logic   ring_rd,
  output tbyte_t ring_data,
  output logic   ring_empty,
  output logic   ring_pkt_avail,
  // ring controller into the output queue
  input  logic   copy_wr,
  input  tbyte_t copy_data,
  output logic   copy_half_full,
  output logic   copy_full,
  // output queue towards the hub
  input  logic   out_rd,
  output tbyte_t out_data,
  output logic   out_empty
);
  logic [15:0] pkts;
  logic        add, sub;

  sync_fifo #(.WIDTH(9), .DEPTH(DEPTH)) u_in_fifo (
    .clk, .rst_n,
    .wr_en(in_wr), .wr_data(in_data),
    .rd_en(ring_rd), .rd_data(ring_data),
    .empty(ring_empty), .half_full(in_half_full), .full(in_full), .count()
  );

  sync_fifo #(.WIDTH(9), .DEPTH(DEPTH)) u_out_fifo (
    .clk, .rst_n,
    .wr_en(copy_wr), .wr_data(copy_data),
    .rd_en(out_rd), .rd_data(out_data),
    .empty(out_empty), .half_full(copy_half_full), .full(copy_full), .count()
  );

  assign add = in_wr && !in_full && is_trailer(in_data);
  assign sub = ring_rd && !ring_empty && is_trailer(ring_data);
  assign ring_pkt_avail = (pkts != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pkts <= '0;
    else        pkts <= pkts + 16'(add) - 16'(sub);
  end
endmodule

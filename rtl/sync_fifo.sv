// sync_fifo: first-in-first-out byte buffer with empty, half-full and full flags.
//
// Models the FIFO memory used throughout the router, hub and NIC: a write
// strobe appends a word at the tail pointer, a read strobe advances the head
// pointer, and the flags follow the distance between the two pointers. Empty
// means the pointers coincide, half_full means more than half of the locations
// are in use, full means all are (half_full is then also set). The
// flag definitions follow the document; the depth is not given there and
// defaults to 2048 words (this design's choice: room for three 582-byte
// packets). The read port is first-word-fall-through: rd_data shows the oldest
// word whenever empty is low, and rd_en removes it at the clock edge. A write
// while full and a read while empty are ignored. Both ports share one clock.
module sync_fifo #(
  parameter int unsigned WIDTH = 9,
  parameter int unsigned DEPTH = 2048
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     empty,
  output logic                     half_full,
  output logic                     full,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign empty     = (count == 0);
  assign full      = (count == DEPTH[AW:0]);
  assign half_full = (count > DEPTH[AW:0] / 2);
  assign do_wr     = wr_en && !full;
  assign do_rd     = rd_en && !empty;
  assign rd_data   = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= (rd_ptr == AW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end
endmodule

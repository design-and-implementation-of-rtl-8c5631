// cam: content addressable memory for the multicast virtual circuit table.
//
// ENTRIES registers of WIDTH bits each (256 x 48 in the router, as the
// document gives) act as a bank of parallel comparators: every search key is
// compared with all valid entries in the same cycle and a hit flag plus the
// lowest matching index come back combinationally, so a lookup costs one cycle
// of the caller's state machine. The document's CAM has one data bus shared by
// searches and writes; here NSRCH independent search ports serve the two ring
// channels at once, and a single write port (from the control processor)
// loads or invalidates an entry. search_mask selects which key bits take part
// in a comparison (1 = compare), which lets a 24-bit VCI be looked up in the
// 48-bit words. Port count, mask and write interface are this design's choices.
module cam #(
  parameter int unsigned ENTRIES = 256,
  parameter int unsigned WIDTH   = 48,
  parameter int unsigned NSRCH   = 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // write port: store wr_data at wr_index and set its valid bit to wr_valid
  input  logic                       wr_en,
  input  logic [$clog2(ENTRIES)-1:0] wr_index,
  input  logic [WIDTH-1:0]           wr_data,
  input  logic                       wr_valid,
  // search ports
  input  logic [WIDTH-1:0]           search_mask,
  input  logic [WIDTH-1:0]           key   [NSRCH],
  output logic                       hit   [NSRCH],
  output logic [$clog2(ENTRIES)-1:0] index [NSRCH]
);
  localparam int unsigned IW = $clog2(ENTRIES);

  logic [WIDTH-1:0] word  [ENTRIES];
  logic             valid [ENTRIES];

  always_ff @(posedge clk) begin
    if (wr_en) word[wr_index] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(ENTRIES); i++) valid[i] <= 1'b0;
    end else if (wr_en) begin
      valid[wr_index] <= wr_valid;
    end
  end

  always_comb begin
    for (int s = 0; s < int'(NSRCH); s++) begin
      hit[s]   = 1'b0;
      index[s] = '0;
      for (int i = int'(ENTRIES) - 1; i >= 0; i--) begin
        if (valid[i] && (((word[i] ^ key[s]) & search_mask) == '0)) begin
          hit[s]   = 1'b1;
          index[s] = IW'(i);
        end
      end
    end
  end
endmodule

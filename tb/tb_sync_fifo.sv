// tb_sync_fifo: random pushes and pops against a queue model; checks the
// head word and the empty / half-full / full flags every cycle, including
// writes into a full FIFO and reads from an empty one being ignored.
module tb_sync_fifo;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0;
  logic wr_en, rd_en, empty, half_full, full;
  logic [8:0] wr_data, rd_data;
  logic [$clog2(DEPTH):0] count;
  logic [8:0] model[$];
  int checks = 0, failures = 0;

  sync_fifo #(.WIDTH(9), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // flags and head against the model
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == DEPTH), "full");
      check(half_full == (model.size() > DEPTH / 2), "half_full");
      check(count == ($clog2(DEPTH)+1)'(model.size()), "count");
      if (model.size() != 0) check(rd_data == model[0], "head");
      // phases: fill-biased, drain-biased, balanced
      wr_en   = ($urandom % 100) < ((cyc % 600) < 200 ? 80 : (cyc % 600) < 400 ? 20 : 50);
      rd_en   = ($urandom % 100) < ((cyc % 600) < 200 ? 20 : (cyc % 600) < 400 ? 80 : 50);
      wr_data = 9'($urandom);
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model update on the same edge as the DUT
  always @(posedge clk) if (rst_n) begin
    logic do_rd, do_wr;
    do_rd = rd_en && model.size() != 0;
    do_wr = wr_en && model.size() != DEPTH;
    if (do_rd) void'(model.pop_front());
    if (do_wr) model.push_back(wr_data);
  end
endmodule

// tb_cam: loads random entries (some invalidated again) into a 32-entry CAM
// and checks hit flag and lowest matching index on both search ports against
// a software model, with full and partial (24-bit VCI) compare masks.
module tb_cam;
  localparam int N = 32;
  logic clk = 0, rst_n = 0;
  logic wr_en, wr_valid;
  logic [4:0] wr_index;
  logic [47:0] wr_data, search_mask;
  logic [47:0] key [2];
  logic hit [2];
  logic [4:0] index [2];
  logic [47:0] mword [N];
  logic mvalid [N];
  int checks = 0, failures = 0;

  cam #(.ENTRIES(N), .WIDTH(48), .NSRCH(2)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic write(int i, logic [47:0] d, logic v);
    @(negedge clk);
    wr_en = 1; wr_index = 5'(i); wr_data = d; wr_valid = v;
    @(negedge clk);
    wr_en = 0;
    mword[i] = d; mvalid[i] = v;
  endtask

  task automatic search(int s, logic [47:0] k);
    logic exp_hit;
    int exp_idx;
    exp_hit = 0; exp_idx = 0;
    key[s] = k;
    for (int i = N - 1; i >= 0; i--)
      if (mvalid[i] && ((mword[i] ^ k) & search_mask) == 0) begin exp_hit = 1; exp_idx = i; end
    #1;
    check(hit[s] == exp_hit, "hit");
    if (exp_hit) check(index[s] == 5'(exp_idx), "index");
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_valid = 0; wr_index = 0; wr_data = 0;
    search_mask = '1; key[0] = 0; key[1] = 0;
    for (int i = 0; i < N; i++) begin mword[i] = 0; mvalid[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // empty CAM never hits, even on zero key
    search(0, 48'h0); search(1, 48'h0);
    for (int i = 0; i < N; i++) write(i, {24'h0, 24'h100 + 24'(i % 20)}, 1'b1);
    for (int i = 0; i < N; i += 5) write(i, mword[i], 1'b0);
    for (int m = 0; m < 2; m++) begin
      search_mask = (m == 0) ? '1 : 48'h0000_00FF_FFFF;
      for (int t = 0; t < 300; t++) begin
        search(0, {24'($urandom), 24'h100 + 24'($urandom % 24)});
        search(1, {24'h0, 24'h100 + 24'($urandom % 24)});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

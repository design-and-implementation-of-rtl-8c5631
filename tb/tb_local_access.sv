// tb_local_access: the hub side writes whole packets into the input queue
// byte by byte with gaps; the complete-packet flag must rise only once a
// trailer is in and fall when the last buffered trailer is read out. The
// output queue must deliver what the controller copied, in order.
module tb_local_access;
  import clnet_pkg::*;
  import clnet_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_wr, in_half_full, in_full, ring_rd, ring_empty, ring_pkt_avail;
  logic copy_wr, copy_half_full, copy_full, out_rd, out_empty;
  tbyte_t in_data, ring_data, copy_data, out_data;
  tbyte_t inq[$], outq[$];
  int checks = 0, failures = 0, pkts_in = 0, model_pkts = 0;

  local_access #(.DEPTH(64)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    check(ring_pkt_avail == (model_pkts != 0), "pkt_avail");
    if (ring_rd && !ring_empty) begin
      check(inq.size() != 0 && ring_data == inq[0], "in order");
      if (is_trailer(ring_data)) model_pkts--;
      void'(inq.pop_front());
    end
    if (in_wr && !in_full) begin
      inq.push_back(in_data);
      if (is_trailer(in_data)) model_pkts++;
    end
    if (out_rd && !out_empty) begin
      check(outq.size() != 0 && out_data == outq[0], "out order");
      void'(outq.pop_front());
    end
    if (copy_wr && !copy_full) outq.push_back(copy_data);
  end

  logic draining = 0;

  // controller and hub-reader side, independent of the writer
  always @(negedge clk) begin
    ring_rd   = draining || (($urandom % 3) == 0 && model_pkts != 0);
    copy_wr   = !draining && ($urandom % 2) == 0;
    copy_data = 9'($urandom);
    out_rd    = draining || ($urandom % 2) == 0;
  end

  initial begin
    bq_t p;
    in_wr = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 30; k++) begin
      p = make_pkt(1'b1, 1'(k), 32'h0a000000 + 32'(k), k, 4 + k % 9);
      foreach (p[i]) begin
        @(negedge clk);
        in_wr = !in_half_full; in_data = p[i];
        if (!in_wr) begin
          @(negedge clk); in_wr = 0;
          wait (!in_half_full);
          @(negedge clk); in_wr = 1; in_data = p[i];
        end
      end
      @(negedge clk); in_wr = 0;
      pkts_in++;
    end
    // drain
    draining = 1;
    repeat (800) @(negedge clk);
    check(!ring_pkt_avail && ring_empty && out_empty, "drained");
    check(pkts_in == 30, "all packets written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

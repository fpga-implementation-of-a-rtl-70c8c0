// tb_rs_buf: remote-store buffer. Checks that adjacent word stores coalesce
// into one multi-word entry (up to the end of the 32-byte line), that a
// non-adjacent store waits until the entry departs, and that a random store
// stream is delivered with every word at the right address.
module tb_rs_buf;
  import ccsp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, ev_coalesce;
  logic [31:0] in_addr = '0, in_data = '0;
  rstore_t out_data;
  int checks = 0, failures = 0, ncoal = 0;
  logic [31:0] exp_a [$], exp_d [$];

  rs_buf dut (.*);

  always @(posedge clk) if (ev_coalesce) ncoal++;

  task automatic store(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk); in_valid = 1; in_addr = a; in_data = d; #1;
    while (!in_ready) begin @(negedge clk); #1; end
    exp_a.push_back(a); exp_d.push_back(d);
    @(negedge clk); in_valid = 0;
  endtask

  // reader: unpack entries into words
  logic rd_en = 0;
  int   nent = 0;
  always begin
    @(negedge clk); out_ready = rd_en && ($urandom_range(0, 1) != 0); #1;
    if (out_valid && out_ready) begin
      nent++;
      for (int i = 0; i < out_data.nwords; i++) begin
        checks++;
        if (exp_a.size() == 0 || out_data.addr + 4*i != exp_a[0] || out_data.data[i] != exp_d[0]) begin
          failures++; $display("FAIL entry %h+%0d %h", out_data.addr, i, out_data.data[i]);
        end
        if (exp_a.size()) begin void'(exp_a.pop_front()); void'(exp_d.pop_front()); end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    // eight adjacent stores with the reader stopped: one 8-word entry
    for (int i = 0; i < 8; i++) store(32'h8100_0100 + 4*i, 32'hA0 + i);
    checks++; if (!(out_valid && out_data.nwords == 8)) begin failures++; $display("FAIL nwords %0d", out_data.nwords); end
    checks++; if (ncoal != 7) begin failures++; $display("FAIL coalesce %0d", ncoal); end
    // a non-adjacent store must wait
    @(negedge clk); in_valid = 1; in_addr = 32'h8100_0400; in_data = 1; #1;
    checks++; if (in_ready) begin failures++; $display("FAIL accepted non-adjacent"); end
    @(negedge clk); in_valid = 0;
    rd_en = 1;
    repeat (10) @(negedge clk);
    checks++; if (nent != 1) begin failures++; $display("FAIL entries %0d", nent); end
    // random stream, mostly sequential runs
    begin
      logic [31:0] a; a = 32'h8200_0000;
      for (int i = 0; i < 400; i++) begin
        if ($urandom_range(0, 3) == 0) a = 32'h8000_0000 | ($urandom & 32'h03FF_FFFC);
        else a = a + 4;
        store(a, $urandom);
      end
    end
    repeat (50) @(negedge clk);
    checks++; if (exp_a.size() != 0) begin failures++; $display("FAIL %0d words lost", exp_a.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

// tb_sync_fifo: random pushes and pops against a queue model; checks order,
// full/empty flags and the occupancy count.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [31:0] in_data = 0, out_data;
  logic [2:0] count;
  int checks = 0, failures = 0;
  logic [31:0] q [$];

  sync_fifo #(.T(logic [31:0]), .DEPTH(4)) dut (.*);

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (out_valid !== (q.size() != 0) || in_ready !== (q.size() < 4) || count !== 3'(q.size())) begin
        failures++; $display("FAIL flags size=%0d", q.size());
      end
      if (out_valid) begin
        checks++;
        if (out_data !== q[0]) begin failures++; $display("FAIL data %h %h", out_data, q[0]); end
      end
      in_valid = ($urandom_range(0, 2) != 0); in_data = $urandom; out_ready = ($urandom_range(0, 2) == 0);
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(in_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (50000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

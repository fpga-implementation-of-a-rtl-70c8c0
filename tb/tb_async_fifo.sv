// tb_async_fifo: writes and reads flits in two unrelated clocks with random
// stalls on both sides; checks order and data, that the FIFO fills up and
// backpressures, and the crossing latency of a flit into an empty FIFO.
module tb_async_fifo;
  import ccsp_pkg::*;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  flit_t in_data = '0, out_data;
  int checks = 0, failures = 0, nread = 0, saw_full = 0;
  flit_t q [$];

  async_fifo #(.DEPTH(16)) dut (.*);

  initial begin
    repeat (3) @(posedge wclk); wrst_n = 1; rrst_n = 1;
    repeat (3) @(posedge wclk);
    // latency: one flit into the empty FIFO
    @(negedge wclk); in_valid = 1; in_data = '{data: 32'hABCD, last: 1'b1};
    @(posedge wclk); q.push_back(in_data); @(negedge wclk); in_valid = 0;
    begin
      int n; n = 0;
      while (!out_valid) begin @(posedge rclk); n++; end
      checks++; if (n < 2 || n > 4) begin failures++; $display("FAIL latency %0d", n); end
    end
    fork
      begin
      for (int i = 0; i < 600; i++) begin
        // values set at the falling edge are taken at the next rising edge
        @(negedge wclk);
        in_valid = ($urandom_range(0, 3) != 0);
        in_data = '{data: $urandom, last: 1'($urandom)};
        #1;
        if (!in_ready) saw_full++;
        if (in_valid && in_ready) q.push_back(in_data);
      end
      @(negedge wclk) in_valid = 0;
      end
      for (int it = 0; nread < 600; it++) begin
        @(negedge rclk);
        out_ready = (it < 40) ? 1'b0 : ($urandom_range(0, 2) != 0);
        #1;
        if (out_valid && out_ready) begin
          checks++;
          if (q.size() == 0 || out_data !== q[0]) begin failures++; $display("FAIL data %h %h n=%0d qs=%0d w=%0d r=%0d", out_data, q[0], nread, q.size(), dut.wbin_q, dut.rbin_q); end
          void'(q.pop_front());
          nread++;
        end
        if (it > 1000 && q.size() == 0) break;
      end
    join
    checks++; if (saw_full == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (50000) @(posedge wclk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

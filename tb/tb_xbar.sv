// tb_xbar: NoC crossbar. Measures the no-load latency of a one-word packet
// (3 cycles from input to output), then runs random packets from every input
// to random outputs with random backpressure, checking that every packet
// arrives whole at its destination, in order per source, and that packets
// are never interleaved on an output.
module tb_xbar;
  import ccsp_pkg::*;
  localparam int P = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [P-1:0] in_valid = '0, in_ready, out_valid, out_ready = '0;
  flit_t [P-1:0] in_data = '0, out_data;
  int checks = 0, failures = 0, npkt = 0;
  int exp_q [P][P][$];          // [src][dst] packet lengths in order
  int seq_tx [P][P];

  xbar dut (.*);

  // payload word: {src[3], seq[13], idx[8], len[8]}
  function automatic logic [31:0] pw(int s, int q, int i, int n);
    return {3'(s), 13'(q), 8'(i), 8'(n)};
  endfunction

  task automatic send_pkt(int s, int d, int n);
    flit_t f [$];
    f.push_back('{data: mk_header(PT_WRITE, 3'(d), 3'(s), 8'(n)), last: 1'b0});
    for (int i = 0; i < n; i++) f.push_back('{data: pw(s, seq_tx[s][d], i, n), last: (i == n-1)});
    exp_q[s][d].push_back(seq_tx[s][d]);
    seq_tx[s][d]++;
    foreach (f[k]) begin
      @(negedge clk); in_valid[s] = ($urandom_range(0, 3) != 0); in_data[s] = f[k]; #1;
      while (!(in_valid[s] && in_ready[s])) begin @(negedge clk); in_valid[s] = ($urandom_range(0, 3) != 0); #1; end
    end
    @(negedge clk); in_valid[s] = 0;
  endtask

  // receivers
  logic rx_en = 0;
  int   cur_src [P];
  int   rx_idx [P];
  logic in_pkt [P];
  always begin
    @(negedge clk);
    for (int o = 0; o < P; o++) out_ready[o] = rx_en && (npkt == 0 || $urandom_range(0, 3) != 0);
    #1;
    for (int o = 0; o < P; o++) if (out_valid[o] && out_ready[o]) begin
      if (!in_pkt[o]) begin
        checks++;
        if (out_data[o].data[29:27] != 3'(o)) begin failures++; $display("FAIL header to %0d at %0d", out_data[o].data[29:27], o); end
        cur_src[o] = out_data[o].data[26:24]; rx_idx[o] = 0; in_pkt[o] = !out_data[o].last;
      end else begin
        int s; s = cur_src[o];
        checks++;
        if (out_data[o].data[31:29] != 3'(s) || out_data[o].data[15:8] != 8'(rx_idx[o]) ||
            exp_q[s][o].size() == 0 || out_data[o].data[28:16] != 13'(exp_q[s][o][0]) ||
            out_data[o].last != (rx_idx[o] == out_data[o].data[7:0] - 1)) begin
          failures++; $display("FAIL flit %h at out %0d from %0d idx %0d", out_data[o].data, o, s, rx_idx[o]);
        end
        rx_idx[o]++;
        if (out_data[o].last) begin
          in_pkt[o] = 0; npkt++;
          if (exp_q[s][o].size()) void'(exp_q[s][o].pop_front());
        end
      end
    end
  end

  initial begin
    foreach (in_pkt[o]) in_pkt[o] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (2) @(posedge clk);
    // latency: one flit into the idle crossbar, outputs ready
    rx_en = 1;
    begin
      int n; n = 0;
      @(negedge clk); in_valid[1] = 1; in_data[1] = '{data: mk_header(PT_WRITE, 3'd3, 3'd1, 8'd0), last: 1'b1};
      @(negedge clk); in_valid[1] = 0; n = 1;
      while (!out_valid[3]) begin @(negedge clk); n++; end
      checks++; if (n != 3) begin failures++; $display("FAIL latency %0d", n); end
    end
    fork
      for (int k = 0; k < 60; k++) send_pkt(0, $urandom_range(0, P-1), $urandom_range(1, 20));
      for (int k = 0; k < 60; k++) send_pkt(1, $urandom_range(0, P-1), $urandom_range(1, 20));
      for (int k = 0; k < 60; k++) send_pkt(2, $urandom_range(0, P-1), $urandom_range(1, 20));
      for (int k = 0; k < 60; k++) send_pkt(3, $urandom_range(0, P-1), $urandom_range(1, 20));
      for (int k = 0; k < 60; k++) send_pkt(4, $urandom_range(0, P-1), $urandom_range(1, 20));
    join
    repeat (200) @(negedge clk);
    checks++; if (npkt != P*60) begin failures++; $display("FAIL delivered %0d", npkt); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (60000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

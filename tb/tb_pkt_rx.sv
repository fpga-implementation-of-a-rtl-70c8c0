// tb_pkt_rx: streams random packets (1..12 words plus CRC) into the
// store-and-forward receive buffer, a quarter of them with a corrupted CRC,
// with random stalls on both sides. Checks that exactly the good packets come
// out, in order and complete, that nothing is offered before a packet's CRC
// has arrived, and that every bad packet raises crc_err once.
module tb_pkt_rx;
  import ccsp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, crc_err;
  flit_t in_data = '0, out_data;
  int checks = 0, failures = 0, nbad = 0, nerr = 0, ngood = 0;
  flit_t exp_q [$];

  pkt_rx #(.DEPTH(64)) dut (.*);

  function automatic logic [31:0] crc_step(input logic [31:0] c, input logic [31:0] d);
    logic [31:0] r;
    r = c;
    for (int i = 0; i < 32; i++) begin
      logic b;
      b = r[31] ^ d[31-i];
      r = r << 1;
      if (b) r ^= 32'h04C11DB7;
    end
    return r;
  endfunction

  task automatic send(input flit_t f);
    @(negedge clk); in_valid = 1; in_data = f; #1;
    while (!in_ready) begin @(negedge clk); #1; end
    @(negedge clk); in_valid = 0;
  endtask

  always @(posedge clk) if (rst_n && crc_err) nerr++;

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    // no output before the CRC of a packet is in
    send('{data: 32'h1111, last: 0}); send('{data: 32'h2222, last: 0});
    repeat (3) @(negedge clk);
    checks++; if (out_valid) begin failures++; $display("FAIL early out"); end
    begin
      logic [31:0] c; c = crc_step(crc_step('1, 32'h1111), 32'h2222);
      send('{data: c, last: 1});
      exp_q.push_back('{data: 32'h1111, last: 0}); exp_q.push_back('{data: 32'h2222, last: 0});
      exp_q.push_back('{data: c, last: 1}); ngood++;
    end
    fork
      for (int p = 0; p < 150; p++) begin
        int n; logic [31:0] c; logic bad; flit_t pk [$];
        pk = {}; n = $urandom_range(1, 12); c = '1; bad = ($urandom_range(0, 3) == 0);
        for (int i = 0; i < n; i++) begin
          logic [31:0] d; d = $urandom; c = crc_step(c, d);
          pk.push_back('{data: d, last: 0});
        end
        pk.push_back('{data: bad ? ~c : c, last: 1});
        if (bad) nbad++; else begin ngood++; foreach (pk[i]) exp_q.push_back(pk[i]); end
        foreach (pk[i]) begin
          @(negedge clk); in_valid = ($urandom_range(0, 4) != 0); in_data = pk[i]; #1;
          while (!(in_valid && in_ready)) begin
            @(negedge clk); in_valid = ($urandom_range(0, 4) != 0); #1;
          end
        end
        @(negedge clk); in_valid = 0;
      end
      for (int it = 0; it < 20000; it++) begin
        @(negedge clk); out_ready = ($urandom_range(0, 2) != 0); #1;
        if (out_valid && out_ready) begin
          checks++;
          if (exp_q.size() == 0 || out_data !== exp_q[0]) begin
            failures++; $display("FAIL data %h exp %h", out_data, exp_q.size() ? exp_q[0] : '0);
          end
          if (exp_q.size()) void'(exp_q.pop_front());
        end
      end
    join
    checks++; if (exp_q.size() != 0) begin failures++; $display("FAIL %0d flits missing", exp_q.size()); end
    checks++; if (nerr != nbad) begin failures++; $display("FAIL crc_err %0d vs %0d bad", nerr, nbad); end
    checks++; if (nbad == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

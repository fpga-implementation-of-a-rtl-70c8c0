// tb_l1_cache: processor front end with a behavioural L2 behind it.
// The testbench classifies addresses like the ART of node 0 and answers L2
// requests from a reference memory after random delays (line reads as four
// 64-bit beats). Random loads and stores to a small cacheable range, the
// local scratchpad, a remote scratchpad, the tag space and an unmapped
// region check returned data, write-through, no-allocate on store misses,
// hit-after-fill, remote stores going to the remote-store port, and errors
// for remote loads and unmapped addresses.
module tb_l1_cache;
  import ccsp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cpu_req = 0, cpu_we = 0, cpu_ack, cpu_err;
  logic [31:0] cpu_addr = '0, cpu_wdata = '0, cpu_rdata;
  logic [3:0] cpu_be = '1;
  acc_class_e cls;
  logic [L2_WAYS-1:0] wp_mask = 4'b0101, l2_mask;
  logic l2_valid, l2_ready = 0, l2_rsp_valid = 0, l2_beat_valid = 0, rs_valid, rs_ready = 0, ev_l1_hit, ev_l1_miss;
  l2_op_e l2_op;
  logic [31:0] l2_addr, l2_wdata, l2_rsp_data = '0, rs_addr, rs_data;
  logic [3:0] l2_be;
  logic [1:0] l2_beat_idx = '0;
  logic [63:0] l2_beat_data = '0;
  int checks = 0, failures = 0, nhit = 0, nmiss = 0, nl2 = 0, nrs = 0;

  l1_cache dut (.*);

  always_comb
    unique case (cpu_addr[31:28])
      4'h0: cls = AC_CACHEABLE;
      4'h8: cls = (cpu_addr[25:24] == 2'd0) ? AC_SCRATCH : AC_REMOTE;
      4'h9: cls = AC_TAG;
      default: cls = AC_FAULT;
    endcase

  logic [31:0] mem [logic [31:0]];
  function automatic logic [31:0] rd(input logic [31:0] a);
    a = {a[31:2], 2'b00};
    return mem.exists(a) ? mem[a] : (a ^ 32'h3C3C_0F0F);
  endfunction

  // behavioural L2
  always begin
    @(negedge clk);
    l2_rsp_valid = 0; l2_beat_valid = 0;
    if (l2_valid) begin
      l2_op_e op; logic [31:0] a, d;
      repeat ($urandom_range(0, 3)) @(negedge clk);
      l2_ready = 1; op = l2_op; a = l2_addr; d = l2_wdata; nl2++;
      checks++; if (l2_mask !== wp_mask) begin failures++; $display("FAIL mask"); end
      @(negedge clk); l2_ready = 0;
      unique case (op)
        L2_WR, L2_SPWR: mem[{a[31:2], 2'b00}] = d;
        L2_TAGWR: begin mem[{a[31:2], 2'b00}] = d; l2_rsp_valid = 1; l2_rsp_data = '0; end
        L2_RDLINE: begin
          repeat ($urandom_range(1, 5)) @(negedge clk);
          for (int b = 0; b < 4; b++) begin
            l2_beat_valid = 1; l2_beat_idx = 2'(b);
            l2_beat_data = {rd({a[31:5], 5'b0} + 8*b + 4), rd({a[31:5], 5'b0} + 8*b)};
            @(negedge clk);
          end
          l2_beat_valid = 0; l2_rsp_valid = 1;
        end
        default: begin repeat ($urandom_range(0, 3)) @(negedge clk); l2_rsp_valid = 1; l2_rsp_data = rd(a); end
      endcase
    end
  end
  always @(negedge clk) begin
    if (rst_n && ev_l1_hit) nhit++;
    if (rst_n && ev_l1_miss) nmiss++;
  end

  task automatic acc(input logic we, input logic [31:0] a, input logic [31:0] d,
                     output logic [31:0] q, output logic err);
    @(negedge clk); cpu_req = 1; cpu_we = we; cpu_addr = a; cpu_wdata = d;
    do @(negedge clk); while (!cpu_ack);
    q = cpu_rdata; err = cpu_err; cpu_req = 0;
    #1;
  endtask

  initial begin
    logic [31:0] q; logic e; int l2_before;
    repeat (3) @(posedge clk); rst_n = 1;
    // miss then hit on the same line
    acc(0, 32'h0000_1234, 0, q, e);
    checks++; if (q !== rd(32'h1234) || nmiss != 1) begin failures++; $display("FAIL first miss %h %0d %0d", q, nmiss, nhit); end
    l2_before = nl2;
    acc(0, 32'h0000_1238, 0, q, e);
    checks++; if (q !== rd(32'h1238) || nhit != 1 || nl2 != l2_before) begin failures++; $display("FAIL hit %h %0d %0d %0d", q, nhit, nl2, l2_before); end
    // store hit is written through and updates the L1
    acc(1, 32'h0000_1238, 32'hCAFE_0001, q, e);
    acc(0, 32'h0000_1238, 0, q, e);
    checks++; if (q !== 32'hCAFE_0001 || mem[32'h1238] !== 32'hCAFE_0001) begin failures++; $display("FAIL write-through %h", q); end
    // store miss does not allocate
    acc(1, 32'h0000_2000, 32'h77, q, e);
    l2_before = nmiss;
    acc(0, 32'h0000_2000, 0, q, e);
    checks++; if (nmiss != l2_before + 1 || q !== 32'h77) begin failures++; $display("FAIL no-allocate"); end
    // remote load error, remote store to rs port, unmapped error
    acc(0, 32'h8200_0040, 0, q, e);
    checks++; if (!e) begin failures++; $display("FAIL remote load"); end
    fork
      acc(1, 32'h8300_0044, 32'h55, q, e);
      begin @(negedge clk); while (!rs_valid) @(negedge clk); checks++;
        if (rs_addr !== 32'h8300_0044 || rs_data !== 32'h55) begin failures++; $display("FAIL rs"); end
        rs_ready = 1; @(negedge clk); rs_ready = 0; end
    join
    acc(0, 32'h4000_0000, 0, q, e);
    checks++; if (!e) begin failures++; $display("FAIL unmapped"); end
    // random mix
    for (int i = 0; i < 1500; i++) begin
      logic [31:0] a; logic we; logic [31:0] d; int k;
      k = $urandom_range(0, 9);
      a = (k < 7) ? {18'h0, 3'($urandom), 6'($urandom), 5'($urandom) & 5'h1C}   // aliasing lines
        : (k < 9) ? (32'h8000_0000 | ($urandom & 32'h0000_FFFC))
        :           (32'h9000_0000 | ($urandom & 32'h0000_FFFC));
      we = $urandom_range(0, 2) == 0; d = $urandom;
      wp_mask = 4'($urandom);
      acc(we, a, d, q, e);
      if (!we) begin
        checks++;
        if (q !== rd(a) || e) begin failures++; $display("FAIL rd %h = %h exp %h", a, q, rd(a)); end
      end
    end
    checks++; if (nhit < 100) begin failures++; $display("FAIL few hits %0d", nhit); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("hang st=%0d a=%h op=%0d", dut.st_q, cpu_addr, l2_op); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

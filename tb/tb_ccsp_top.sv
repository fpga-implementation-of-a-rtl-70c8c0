// tb_ccsp_top: end-to-end test of the four-tile system at its default sizes.
//
// A behavioural DRAM node sits on crossbar port 4; four processor models
// drive the tiles' data buses. The test walks through every mechanism:
// L1 hits and misses, L2 fills, write-allocation, write-back of a dirty
// victim, hits under a miss, deferred-write bypass, scratchpad and tag
// accesses, remote stores with coalescing, an RDMA copy segmented into two
// packets with acknowledgements into a counter and a notification at zero,
// messages into a remote queue (one enqueued, one dropped as full), a copy
// whose source is remote (read request served through the pending command
// queue), and a packet with a bad CRC. Every data result is compared with
// values computed here; each mechanism must be seen at least once. The
// latencies of a remote store and of a 4-byte message are measured and
// checked against loose bounds.
`timescale 1ns/1ps
module tb_ccsp_top;
  import ccsp_pkg::*;

  logic clk = 0, clk_noc = 0, rst_n = 0, rst_noc_n = 0;
  always #5 clk = ~clk;
  always #4 clk_noc = ~clk_noc;

  logic  [NODES-1:0]       cpu_req = '0, cpu_we = '0, cpu_ack, cpu_err, init_busy;
  logic  [NODES-1:0][31:0] cpu_addr = '0, cpu_wdata = '0, cpu_rdata;
  logic  [NODES-1:0][3:0]  cpu_be = '0;
  logic  ddr_in_valid, ddr_in_ready, ddr_out_valid, ddr_out_ready;
  flit_t ddr_in_data, ddr_out_data;
  tile_ev_t [NODES-1:0] ev;
  int n_reads, n_writes, n_crc_err;

  ccsp_top dut (.*);

  ddr_model u_ddr (
    .clk(clk_noc), .rst_n(rst_noc_n), .in_valid(ddr_in_valid), .in_ready(ddr_in_ready),
    .in_data(ddr_in_data), .out_valid(ddr_out_valid), .out_ready(ddr_out_ready),
    .out_data(ddr_out_data), .n_reads, .n_writes, .n_crc_err);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ---------------------------------------------------------------- events
  int n_l1_hit, n_l1_miss, n_l2_hit, n_l2_miss, n_hum, n_bypass, n_fill, n_sp, n_cnt,
      n_notify, n_enq, n_qfull, n_read, n_seg, n_crc, n_coal, n_src[5];
  always @(posedge clk) begin
    for (int i = 0; i < NODES; i++) begin
      n_l1_hit += int'(ev[i].l1_hit);   n_l1_miss += int'(ev[i].l1_miss);
      n_l2_hit += int'(ev[i].l2_hit);   n_l2_miss += int'(ev[i].l2_miss);
      n_hum    += int'(ev[i].l2_hit_under_miss); n_bypass += int'(ev[i].l2_bypass);
      n_fill   += int'(ev[i].fill);     n_sp      += int'(ev[i].sp_write);
      n_cnt    += int'(ev[i].counter);  n_notify  += int'(ev[i].notify);
      n_enq    += int'(ev[i].enqueue);  n_qfull   += int'(ev[i].queue_full);
      n_read   += int'(ev[i].read_req); n_seg     += int'(ev[i].segment);
      n_crc    += int'(ev[i].crc_drop); n_coal    += int'(ev[i].rs_coalesce);
      n_src[0] += int'(ev[i].src_cache); n_src[1] += int'(ev[i].src_ack);
      n_src[2] += int'(ev[i].src_rstore); n_src[3] += int'(ev[i].src_cwb);
      n_src[4] += int'(ev[i].src_pcq);
    end
  end

  // ------------------------------------------------------------ addresses
  function automatic logic [31:0] sp(input int n, input int w, input int s, input int word);
    return {4'h8, 2'b00, 2'(n), 8'h00, 2'(w), 9'(s), 3'(word), 2'b00};
  endfunction
  function automatic logic [31:0] tg(input int n, input int w, input int s);
    return {4'h9, 2'b00, 2'(n), 8'h00, 2'(w), 9'(s), 5'b0};
  endfunction
  // tag word: lock bit 17, state in bits 15:14
  function automatic logic [31:0] locked(input line_state_e st);
    return 32'h0002_0000 | (32'(st) << 14);
  endfunction
  function automatic logic [31:0] dram_init(input logic [31:0] a);
    return {a[15:0], ~a[15:0]} ^ 32'h5A00_00A5;
  endfunction

  // ------------------------------------------------------------ processor
  task automatic acc(input int i, input bit we, input logic [31:0] a, input logic [31:0] d,
                     output logic [31:0] r);
    @(negedge clk);
    cpu_req[i] = 1'b1; cpu_we[i] = we; cpu_addr[i] = a; cpu_wdata[i] = d; cpu_be[i] = 4'hF;
    do @(negedge clk); while (!cpu_ack[i]);
    r = cpu_rdata[i];
    cpu_req[i] = 1'b0;
  endtask
  task automatic wr(input int i, input logic [31:0] a, input logic [31:0] d);
    logic [31:0] r;
    acc(i, 1'b1, a, d, r);
  endtask
  task automatic rd(input int i, input logic [31:0] a, output logic [31:0] r);
    acc(i, 1'b0, a, 32'h0, r);
  endtask
  task automatic rd_check(input int i, input logic [31:0] a, input logic [31:0] exp, input string what);
    logic [31:0] r;
    rd(i, a, r);
    check(what, r, exp);
  endtask
  // poll a word until it has the expected value
  task automatic poll(input int i, input logic [31:0] a, input logic [31:0] exp, input string what);
    logic [31:0] r;
    int n;
    n = 0;
    do begin rd(i, a, r); n++; end while (r !== exp && n < 400);
    check(what, r, exp);
  endtask

  // --------------------------------------------------------------- test
  localparam logic [31:0] B0 = 32'h0010_0040;
  function automatic logic [31:0] B(input int k);
    return B0 + 32'(k) * 32'h4000;
  endfunction

  int sp_before, t0, lat_rs, lat_msg;
  int dma_sz [6] = '{4, 8, 16, 32, 64, 128};
  int lat_dma [6];
  logic [31:0] r;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1; rst_noc_n = 1;
    wait (init_busy == '0);
    repeat (2) @(posedge clk);

    // ---- caching (tile 3)
    rd_check(3, B(0), dram_init(B(0)), "L2 fill of B0");
    rd_check(3, B(0) + 4, dram_init(B(0) + 4), "L1 hit B0+4");
    wr(3, B(0), 32'hB000_0000);                      // L1 write hit, write-through
    rd_check(3, B(0), 32'hB000_0000, "L1 after write-through");
    wr(3, B(1), 32'hB111_1111);                      // L2 write miss: allocate
    rd_check(3, B(1), 32'hB111_1111, "read of a line pending under a buffered write (bypass)");
    wr(3, B(3), 32'hB333_3333);
    repeat (100) @(posedge clk);
    wr(3, B(2), 32'hB222_2222);                      // miss outstanding ...
    rd_check(3, B(3), 32'hB333_3333, "hit under miss");  // ... L2 hit meanwhile
    repeat (100) @(posedge clk);
    wr(3, B(4), 32'hB444_4444);                      // 5th tag in a 4-way set: dirty victim
    repeat (150) @(posedge clk);
    rd_check(3, B(1), 32'hB111_1111, "B1 after eviction");
    rd_check(3, B(2), 32'hB222_2222, "B2 after eviction");
    rd_check(3, B(3), 32'hB333_3333, "B3 after eviction");
    rd_check(3, B(4), 32'hB444_4444, "B4");
    rd_check(3, B(0), 32'hB000_0000, "B0 after eviction");
    checks++;
    if (n_writes == 0) begin failures++; $display("FAIL no write-back reached DRAM"); end

    // ---- scratchpad set-up: lock lines, set their states (tag accesses)
    wr(0, tg(0, 3, 0), locked(LS_CMD));      // node 0 command buffer
    for (int s = 8; s < 18; s++) wr(0, tg(0, 3, s), locked(LS_PLAIN));   // copy source
    wr(1, tg(1, 3, 0), locked(LS_PLAIN));    // remote-store target
    wr(1, tg(1, 3, 4), locked(LS_COUNTER));
    wr(1, tg(1, 3, 5), locked(LS_QUEUE));
    wr(1, tg(1, 3, 6), locked(LS_PLAIN));    // notification word
    for (int s = 16; s < 26; s++) wr(1, tg(1, 3, s), locked(LS_PLAIN));  // copy targets (16..25)
    for (int s = 48; s < 50; s++) wr(1, tg(1, 3, s), locked(LS_PLAIN));  // queue slots
    wr(2, tg(2, 3, 0), locked(LS_CMD));
    wr(2, tg(2, 3, 40), locked(LS_PLAIN));
    rd(1, tg(1, 3, 4), r);
    check("tag read-back", r, locked(LS_COUNTER));

    // ---- scratchpad write / read
    for (int k = 0; k < 80; k++) wr(0, sp(0, 3, 8 + k / 8, k % 8), 32'hC0DE_0000 + 32'(k));
    rd_check(0, sp(0, 3, 9, 3), 32'hC0DE_000B, "scratchpad read");

    // ---- counter and queue descriptors at node 1
    wr(1, sp(1, 3, 4, 0), 32'd320);          // counter = bytes expected
    wr(1, sp(1, 3, 4, 1), sp(1, 3, 6, 0));   // notification address
    wr(1, sp(1, 3, 4, 2), 32'h0000_0D0E);    // notification value
    wr(1, sp(1, 3, 5, 0), sp(1, 3, 48, 0));  // queue base
    wr(1, sp(1, 3, 5, 1), 32'd2);            // 2 slots
    wr(1, sp(1, 3, 5, 2), 32'd0);            // head
    wr(1, sp(1, 3, 5, 3), 32'd0);            // tail
    wr(1, sp(1, 3, 6, 0), 32'd0);
    wr(1, sp(1, 3, 49, 0), 32'd0);          // second queue slot starts empty

    // ---- RDMA copy 320 bytes node 0 -> node 1, descriptor stored out of order
    wr(0, sp(0, 3, 0, 3), sp(0, 3, 8, 0));   // source
    wr(0, sp(0, 3, 0, 1), sp(1, 3, 16, 0));  // destination
    wr(0, sp(0, 3, 0, 2), sp(1, 3, 4, 0));   // acknowledgement -> counter
    wr(0, sp(0, 3, 0, 0), {OP_COPY, 12'h0, 16'd320});
    // remote stores issued while the copy is leaving: they coalesce
    wr(0, sp(1, 3, 0, 0), 32'hAAAA_0000);
    wr(0, sp(1, 3, 0, 1), 32'hAAAA_0001);
    wr(0, sp(1, 3, 0, 2), 32'hAAAA_0002);
    poll(1, sp(1, 3, 6, 0), 32'h0000_0D0E, "counter notification");
    rd_check(1, sp(1, 3, 4, 0), 32'd0, "counter back at zero");
    for (int k = 0; k < 80; k += 13)
      rd_check(1, sp(1, 3, 16 + k / 8, k % 8), 32'hC0DE_0000 + 32'(k), "RDMA data");
    rd_check(1, sp(1, 3, 25, 7), 32'hC0DE_004F, "RDMA last word");
    for (int k = 0; k < 3; k++) rd_check(1, sp(1, 3, 0, k), 32'hAAAA_0000 + 32'(k), "remote store");
    poll(0, sp(0, 3, 0, 0), 32'h0, "descriptor released after departure");

    // ---- remote store latency (store issue -> data written at node 1)
    sp_before = n_sp; t0 = int'(cyc);
    wr(0, sp(1, 3, 0, 5), 32'h5555_0005);
    wait (n_sp > sp_before); lat_rs = int'(cyc) - t0;
    rd_check(1, sp(1, 3, 0, 5), 32'h5555_0005, "single remote store");

    // ---- messages into the remote queue: one fits, the next finds it full
    wr(0, sp(0, 3, 0, 3), 32'h1111_1111);
    wr(0, sp(0, 3, 0, 4), 32'h2222_2222);
    wr(0, sp(0, 3, 0, 1), sp(1, 3, 5, 0));
    wr(0, sp(0, 3, 0, 2), 32'h0);
    wr(0, sp(0, 3, 0, 0), {OP_MSG, 12'h0, 16'd8});
    poll(1, sp(1, 3, 5, 3), 32'd1, "queue tail after enqueue");
    rd_check(1, sp(1, 3, 48, 0), 32'h1111_1111, "queue slot 0 word 0");
    rd_check(1, sp(1, 3, 48, 1), 32'h2222_2222, "queue slot 0 word 1");
    poll(0, sp(0, 3, 0, 0), 32'h0, "message descriptor released");
    wr(0, sp(0, 3, 0, 3), 32'h3333_3333);
    wr(0, sp(0, 3, 0, 4), 32'h4444_4444);
    wr(0, sp(0, 3, 0, 1), sp(1, 3, 5, 0));
    wr(0, sp(0, 3, 0, 2), 32'h0);
    wr(0, sp(0, 3, 0, 0), {OP_MSG, 12'h0, 16'd8});
    poll(0, sp(0, 3, 0, 0), 32'h0, "second message departed");
    repeat (80) @(posedge clk);
    rd_check(1, sp(1, 3, 5, 3), 32'd1, "tail unchanged when full");
    rd_check(1, sp(1, 3, 49, 0), 32'h0, "no data in slot 1");

    // ---- message latency (last descriptor store -> data at node 1), 4 bytes
    wr(1, sp(1, 3, 0, 7), 32'h0);
    wr(0, sp(0, 3, 0, 3), 32'h7777_7777);
    wr(0, sp(0, 3, 0, 1), sp(1, 3, 0, 7));
    wr(0, sp(0, 3, 0, 2), 32'h0);
    sp_before = n_sp; t0 = int'(cyc);
    wr(0, sp(0, 3, 0, 0), {OP_MSG, 12'h0, 16'd4});
    wait (n_sp > sp_before); lat_msg = int'(cyc) - t0;
    rd_check(1, sp(1, 3, 0, 7), 32'h7777_7777, "4-byte message");
    poll(0, sp(0, 3, 0, 0), 32'h0, "descriptor released");

    // ---- RDMA-write latency sweep, 4 to 128 bytes, node 0 -> node 1
    foreach (dma_sz[k]) begin
      wr(0, sp(0, 3, 0, 3), sp(0, 3, 8, 0));
      wr(0, sp(0, 3, 0, 1), sp(1, 3, 20, 0));
      wr(0, sp(0, 3, 0, 2), 32'h0);
      sp_before = n_sp; t0 = int'(cyc);
      wr(0, sp(0, 3, 0, 0), {OP_COPY, 12'h0, 16'(dma_sz[k])});
      wait (n_sp > sp_before); lat_dma[k] = int'(cyc) - t0;
      rd_check(1, sp(1, 3, 20, 0) + 32'(dma_sz[k] - 4), 32'hC0DE_0000 + 32'(dma_sz[k] / 4 - 1), "DMA last word");
      poll(0, sp(0, 3, 0, 0), 32'h0, "DMA descriptor released");
    end
    // ---- copy with a remote source: node 2 pulls a line from node 1
    wr(2, sp(2, 3, 0, 3), sp(1, 3, 16, 0));
    wr(2, sp(2, 3, 0, 1), sp(2, 3, 40, 0));
    wr(2, sp(2, 3, 0, 2), 32'h0);
    wr(2, sp(2, 3, 0, 0), {OP_COPY, 12'h0, 16'd32});
    poll(2, sp(2, 3, 40, 7), 32'hC0DE_0007, "remote-read copy last word");
    rd_check(2, sp(2, 3, 40, 0), 32'hC0DE_0000, "remote-read copy first word");

    // ---- corrupted packet: dropped by the receiver
    wr(1, sp(1, 3, 0, 6), 32'h0000_0066);
    u_ddr.inject_bad(sp(1, 3, 0, 6), 32'hDEAD_BEEF);
    repeat (100) @(posedge clk);
    rd_check(1, sp(1, 3, 0, 6), 32'h0000_0066, "bad-CRC packet not delivered");

    // ---- every mechanism seen
    begin
      string names [$];
      int    cnts  [$];
      names = '{"L1 hit", "L1 miss", "L2 hit", "L2 miss", "hit under miss", "write-buffer bypass",
                "cache fill", "scratchpad delivery", "counter update", "counter notification",
                "enqueue", "queue full", "read request", "segmentation", "CRC drop",
                "remote-store coalescing", "cache source", "ack source", "remote-store source",
                "command write buffer source", "pending command queue source"};
      cnts  = '{n_l1_hit, n_l1_miss, n_l2_hit, n_l2_miss, n_hum, n_bypass, n_fill, n_sp, n_cnt,
                n_notify, n_enq, n_qfull, n_read, n_seg, n_crc, n_coal,
                n_src[0], n_src[1], n_src[2], n_src[3], n_src[4]};
      foreach (names[i]) begin
        $display("  %-30s %0d", names[i], cnts[i]);
        checks++;
        if (cnts[i] == 0) begin failures++; $display("FAIL mechanism never happened: %s", names[i]); end
      end
    end
    $display("  remote store 4 B: %0d cycles, message 4 B: %0d cycles", lat_rs, lat_msg);
    foreach (dma_sz[k]) $display("  RDMA write %0d B: %0d cycles", dma_sz[k], lat_dma[k]);
    checks++;
    if (lat_rs > 60 || lat_msg > 60) begin failures++; $display("FAIL latency above 60 cycles"); end
    // larger transfers take longer: store-and-forward at the receiver
    for (int k = 1; k < 6; k++) begin
      checks++;
      if (lat_dma[k] < lat_dma[k-1]) begin failures++; $display("FAIL DMA latency not growing with size"); end
    end
    checks++;
    if (lat_dma[5] > 3 * 76) begin failures++; $display("FAIL 128-byte DMA above three times the prototype's latency"); end
    checks++;
    if (n_crc_err != 0) begin failures++; $display("FAIL DRAM node saw a bad CRC"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

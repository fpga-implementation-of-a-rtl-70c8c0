// tb_out_ni: outgoing NI engine on top of the L2 arrays. The testbench
// preloads the data array (as the highest-priority master), offers requests
// on the five source ports and parses the flit stream: every packet's CRC,
// header fields, addresses and payload are compared with expected packets.
// Covered: a 320-byte copy from the local scratchpad (256 + 64 byte packets)
// and the release of its descriptor, a message, a copy with a remote source
// (READ packet), a cache fill (READ to the DRAM port), a write-back followed
// by a fill, an acknowledgement, a multi-word remote store, and the strict
// priority order when all five sources are ready at once.
module tb_out_ni;
  import ccsp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cc_valid = 0, cc_ready, ack_valid = 0, ack_ready, rs_valid = 0, rs_ready;
  logic cwb_valid = 0, cwb_ready, pcq_valid = 0, pcq_ready;
  cc_req_t cc_req = '0; ack_req_t ack_req = '0; rstore_t rs_req = '0; ni_cmd_t cwb_cmd = '0, pcq_cmd = '0;
  logic out_valid, out_ready = 0, ev_pkt, ev_segment;
  flit_t out_data;
  logic [2:0] ev_src;

  logic [2:0] d_req, d_we, d_gnt, d_rvalid, t_req, t_we, t_gnt, t_rvalid;
  logic [2:0][DADDR_W-1:0] d_addr;
  logic [2:0][63:0] d_wdata;
  logic [2:0][7:0] d_be;
  logic [63:0] d_rdata;
  logic [2:0][TADDR_W-1:0] t_addr;
  l2_tag_t [2:0] t_wdata;
  l2_tag_t t_rdata;
  logic init_busy;
  assign t_req = '0; assign t_we = '0; assign t_addr = '0; assign t_wdata = '0;

  l2_mem u_mem (.clk, .rst_n, .d_req, .d_we, .d_addr, .d_wdata, .d_be, .d_gnt, .d_rvalid, .d_rdata,
                .t_req, .t_we, .t_addr, .t_wdata, .t_gnt, .t_rvalid, .t_rdata, .init_busy);

  out_ni #(.NODE_ID(2'd1)) dut (.clk, .rst_n,
    .cc_valid, .cc_ready, .cc_req, .ack_valid, .ack_ready, .ack_req, .rs_valid, .rs_ready, .rs_req,
    .cwb_valid, .cwb_ready, .cwb_cmd, .pcq_valid, .pcq_ready, .pcq_cmd,
    .d_req(d_req[2]), .d_we(d_we[2]), .d_addr(d_addr[2]), .d_wdata(d_wdata[2]), .d_be(d_be[2]),
    .d_gnt(d_gnt[2]), .d_rvalid(d_rvalid[2]), .d_rdata,
    .out_valid, .out_ready, .out_data, .ev_pkt, .ev_segment, .ev_src);

  logic tb_dreq = 0, tb_dwe = 0;
  logic [DADDR_W-1:0] tb_daddr = '0;
  logic [63:0] tb_dwdata = '0;
  assign d_req[1:0] = {1'b0, tb_dreq}; assign d_we[1:0] = {1'b0, tb_dwe};
  assign d_addr[1:0] = {DADDR_W'(0), tb_daddr}; assign d_wdata[1:0] = {64'h0, tb_dwdata};
  assign d_be[1:0] = {8'h0, 8'hFF};

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  function automatic logic [31:0] crc_step(input logic [31:0] c, input logic [31:0] d);
    logic [31:0] r; r = c;
    for (int i = 0; i < 32; i++) begin
      logic b; b = r[31] ^ d[31-i]; r = r << 1; if (b) r ^= 32'h04C11DB7;
    end
    return r;
  endfunction

  // scratchpad of node 1: word address -> value
  function automatic logic [31:0] spv(input logic [31:0] a);
    return {a[15:0], 16'hC0C0} ^ 32'h1357_9BDF;
  endfunction
  task automatic wr64(input logic [31:0] a, input logic [63:0] v);
    @(negedge clk); tb_dreq = 1; tb_dwe = 1; tb_daddr = sp_daddr(a); tb_dwdata = v;
    @(negedge clk); tb_dreq = 0; tb_dwe = 0;
  endtask
  task automatic rd64(input logic [31:0] a, output logic [63:0] v);
    @(negedge clk); tb_dreq = 1; tb_dwe = 0; tb_daddr = sp_daddr(a);
    @(negedge clk); tb_dreq = 0; #1; v = d_rdata;
  endtask

  // expected packets: flattened words (header, dst, ack, payload...)
  typedef logic [31:0] wq_t [$];
  wq_t exp_pk [$];
  int  npk = 0;
  task automatic expect_pkt(input pkt_type_e ty, input int port, input logic [31:0] dst,
                            input logic [31:0] ack, input logic [31:0] pay [$]);
    wq_t w;
    w.push_back(mk_header(ty, 3'(port), 3'd1, 8'(pay.size())));
    w.push_back(dst); w.push_back(ack);
    foreach (pay[i]) w.push_back(pay[i]);
    exp_pk.push_back(w);
  endtask

  // receiver
  logic [31:0] cur [$];
  always begin
    @(negedge clk); out_ready = ($urandom_range(0, 4) != 0); #1;
    if (out_valid && out_ready) begin
      if (!out_data.last) cur.push_back(out_data.data);
      else begin
        logic [31:0] c; c = '1;
        foreach (cur[i]) c = crc_step(c, cur[i]);
        checks++; if (c !== out_data.data) begin failures++; $display("FAIL crc pkt %0d", npk); end
        checks++;
        if (exp_pk.size() == 0 || cur != exp_pk[0]) begin
          failures++; $display("FAIL pkt %0d: hdr %h dst %h len %0d", npk, cur[0], cur[1], cur.size());
          if (exp_pk.size()) $display("     exp hdr %h dst %h len %0d", exp_pk[0][0], exp_pk[0][1], exp_pk[0].size());
        end
        if (exp_pk.size()) void'(exp_pk.pop_front());
        cur = {}; npk++;
      end
    end
  end
  int srcs [$];
  always @(posedge clk) if (rst_n && ev_src != 0) srcs.push_back(int'(ev_src));

  function automatic logic [31:0] spa(input int n, input int w, input int s, input int word);
    return {4'h8, 2'b00, 2'(n), 8'h00, 2'(w), 9'(s), 3'(word), 2'b00};
  endfunction

  task automatic drain();
    int n; n = 0;
    while ((exp_pk.size() != 0 || out_valid || dut.st_q != 0) && n < 3000) begin @(negedge clk); n++; end
    repeat (5) @(negedge clk);
    check("all expected packets seen", exp_pk.size(), 0);
  endtask

  initial begin
    logic [31:0] pay [$]; logic [63:0] v;
    repeat (3) @(posedge clk); rst_n = 1;
    // preload lines 10..19 of way 2 and the descriptor line 0 of way 2
    for (int s = 10; s < 20; s++) for (int k = 0; k < 8; k += 2)
      wr64(spa(1, 2, s, k), {spv(spa(1, 2, s, k + 1)), spv(spa(1, 2, s, k))});
    wr64(spa(1, 2, 0, 0), {32'h0, 32'h1000_0140});

    // ---- copy 320 bytes local -> node 3, then descriptor released
    pay = {}; for (int k = 0; k < 64; k++) pay.push_back(spv(spa(1, 2, 10, 0) + 4*k));
    expect_pkt(PT_WRITE, 3, spa(3, 1, 0, 0), spa(3, 1, 100, 0), pay);
    pay = {}; for (int k = 64; k < 80; k++) pay.push_back(spv(spa(1, 2, 10, 0) + 4*k));
    expect_pkt(PT_WRITE, 3, spa(3, 1, 0, 0) + 256, spa(3, 1, 100, 0), pay);
    @(negedge clk); cwb_valid = 1;
    cwb_cmd = '{op: OP_COPY, size: 16'd320, dst: spa(3, 1, 0, 0), ack: spa(3, 1, 100, 0),
                src: spa(1, 2, 10, 0), msg: '0, desc: spa(1, 2, 0, 0)};
    #1; while (!cwb_ready) begin @(negedge clk); #1; end
    @(negedge clk); cwb_valid = 0;
    drain();
    rd64(spa(1, 2, 0, 0), v);
    check("descriptor word 0 cleared", v[31:0], 0);

    // ---- message (12 bytes) to node 0
    expect_pkt(PT_WRITE, 0, spa(0, 3, 5, 0), 0, '{32'h11, 32'h22, 32'h33});
    // ---- copy with a remote source: READ to node 2
    expect_pkt(PT_READ, 2, spa(2, 3, 7, 0), spa(1, 3, 9, 0), '{spa(1, 3, 40, 0), 32'd96});
    @(negedge clk); cwb_valid = 1;
    cwb_cmd = '{op: OP_MSG, size: 16'd12, dst: spa(0, 3, 5, 0), ack: 0, src: 32'h11,
                msg: '{32'h0, 32'h0, 32'h33, 32'h22, 32'h11}, desc: 0};
    #1; while (!cwb_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    cwb_cmd = '{op: OP_COPY, size: 16'd96, dst: spa(1, 3, 40, 0), ack: spa(1, 3, 9, 0),
                src: spa(2, 3, 7, 0), msg: '0, desc: 0};
    #1; while (!cwb_ready) begin @(negedge clk); #1; end
    @(negedge clk); cwb_valid = 0;
    drain();

    // ---- fill, then write-back + fill
    expect_pkt(PT_READ, DDR_PORT, 32'h0012_3440, 0, '{spa(1, 0, 10, 0), 32'd32});
    pay = {}; for (int k = 0; k < 8; k++) pay.push_back(spv(spa(1, 2, 11, k)));
    expect_pkt(PT_WRITE, DDR_PORT, 32'h0045_6160, 0, pay);
    expect_pkt(PT_READ, DDR_PORT, 32'h0078_9160, 0, '{spa(1, 2, 11, 0), 32'd32});
    @(negedge clk); cc_valid = 1;
    cc_req = '{op: CC_FILL, line: spa(1, 0, 10, 0), wb_addr: 0, fill_addr: 32'h0012_3440};
    #1; while (!cc_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    cc_req = '{op: CC_WB_FILL, line: spa(1, 2, 11, 0), wb_addr: 32'h0045_6160, fill_addr: 32'h0078_9160};
    #1; while (!cc_ready) begin @(negedge clk); #1; end
    @(negedge clk); cc_valid = 0;
    drain();

    // ---- all five sources at once: strict priority
    srcs = {};
    expect_pkt(PT_READ, DDR_PORT, 32'h0000_0020, 0, '{spa(1, 1, 1, 0), 32'd32});
    expect_pkt(PT_WRITE, 2, spa(2, 0, 0, 0), 0, '{32'd64});
    expect_pkt(PT_WRITE, 3, spa(3, 0, 0, 4), 0, '{32'hAA, 32'hBB, 32'hCC});
    expect_pkt(PT_WRITE, 0, spa(0, 0, 0, 0), 0, '{32'h5});
    pay = {}; for (int k = 0; k < 4; k++) pay.push_back(spv(spa(1, 2, 12, k)));
    expect_pkt(PT_WRITE, 0, spa(0, 1, 0, 0), spa(0, 1, 1, 0), pay);
    @(negedge clk);
    cc_valid = 1; cc_req = '{op: CC_FILL, line: spa(1, 1, 1, 0), wb_addr: 0, fill_addr: 32'h0000_0020};
    ack_valid = 1; ack_req = '{addr: spa(2, 0, 0, 0), value: 32'd64};
    rs_valid = 1; rs_req = '{addr: spa(3, 0, 0, 4), nwords: 4'd3, data: '{0, 0, 0, 0, 0, 32'hCC, 32'hBB, 32'hAA}};
    cwb_valid = 1; cwb_cmd = '{op: OP_MSG, size: 16'd4, dst: spa(0, 0, 0, 0), ack: 0, src: 32'h5,
                               msg: '{0, 0, 0, 0, 32'h5}, desc: 0};
    pcq_valid = 1; pcq_cmd = '{op: OP_COPY, size: 16'd16, dst: spa(0, 1, 0, 0), ack: spa(0, 1, 1, 0),
                               src: spa(1, 2, 12, 0), msg: '0, desc: 0};
    fork
      begin #1; while (!cc_ready) begin @(negedge clk); #1; end @(negedge clk); cc_valid = 0; end
      begin #1; while (!ack_ready) begin @(negedge clk); #1; end @(negedge clk); ack_valid = 0; end
      begin #1; while (!rs_ready) begin @(negedge clk); #1; end @(negedge clk); rs_valid = 0; end
      begin #1; while (!cwb_ready) begin @(negedge clk); #1; end @(negedge clk); cwb_valid = 0; end
      begin #1; while (!pcq_ready) begin @(negedge clk); #1; end @(negedge clk); pcq_valid = 0; end
    join
    drain();
    check("priority order", srcs.size(), 5);
    foreach (srcs[i]) check("priority", srcs[i], i + 1);
    check("packets", npk, 2 + 2 + 3 + 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (30000) @(posedge clk); failures++; $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

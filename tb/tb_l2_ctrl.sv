// tb_l2_ctrl: L2 controller on top of the L2 arrays. The testbench plays the
// processor side and the NI: when the controller loads its cache-transfer
// registers, a responder copies the victim line out of the data array into a
// DRAM model (write-back), writes the new line in from the DRAM model, marks
// the tag valid and pulses fill_done, as the NIs and the DRAM would. Random
// cacheable line reads and partial writes over a few sets with more tags
// than ways (so dirty victims are evicted and refetched) are checked against
// a reference memory, with some ways locked as scratchpad. Scratchpad reads
// and writes, tag reads and writes, the hand-off of command-buffer stores to
// the completion monitor, the deferred-write bypass, hits under a miss and
// the error when every way of a set is locked are checked too.
module tb_l2_ctrl;
  import ccsp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid = 0, req_ready, rsp_valid, beat_valid, no_way_err;
  l2_op_e req_op = L2_RDLINE;
  logic [31:0] req_addr = '0, req_wdata = '0, rsp_data;
  logic [3:0] req_be = '1;
  logic [L2_WAYS-1:0] req_mask = '1;
  logic [1:0] beat_idx;
  logic [63:0] beat_data;
  logic wp_upd, wp_valid;
  logic [SET_W-1:0] wp_set; logic [1:0] wp_way; logic [L2_TAG_W-1:0] wp_tag;
  logic cc_valid, cc_ready = 0, fill_done = 0;
  cc_req_t cc_req;
  logic mon_valid, mon_ready = 1;
  logic [31:0] mon_addr, mon_data;
  logic ev_hit, ev_miss, ev_hit_under_miss, ev_bypass;

  logic [2:0] d_req, d_we, d_gnt, d_rvalid, t_req, t_we, t_gnt, t_rvalid;
  logic [2:0][DADDR_W-1:0] d_addr;
  logic [2:0][63:0] d_wdata;
  logic [2:0][7:0] d_be;
  logic [63:0] d_rdata;
  logic [2:0][TADDR_W-1:0] t_addr;
  l2_tag_t [2:0] t_wdata;
  l2_tag_t t_rdata;
  logic init_busy;

  l2_mem u_mem (.clk, .rst_n, .d_req, .d_we, .d_addr, .d_wdata, .d_be, .d_gnt, .d_rvalid, .d_rdata,
                .t_req, .t_we, .t_addr, .t_wdata, .t_gnt, .t_rvalid, .t_rdata, .init_busy);

  l2_ctrl #(.NODE_ID(2'd0)) dut (.clk, .rst_n, .req_valid, .req_ready, .req_op, .req_addr, .req_wdata,
    .req_be, .req_mask, .rsp_valid, .rsp_data, .beat_valid, .beat_idx, .beat_data, .no_way_err,
    .d_req(d_req[1]), .d_we(d_we[1]), .d_addr(d_addr[1]), .d_wdata(d_wdata[1]), .d_be(d_be[1]),
    .d_gnt(d_gnt[1]), .d_rvalid(d_rvalid[1]), .d_rdata,
    .t_req(t_req[1]), .t_we(t_we[1]), .t_addr(t_addr[1]), .t_wdata(t_wdata[1]),
    .t_gnt(t_gnt[1]), .t_rvalid(t_rvalid[1]), .t_rdata,
    .wp_upd, .wp_valid, .wp_set, .wp_way, .wp_tag, .cc_valid, .cc_ready, .cc_req, .fill_done,
    .mon_valid, .mon_ready, .mon_addr, .mon_data, .ev_hit, .ev_miss, .ev_hit_under_miss, .ev_bypass);

  // responder uses master 0 (tags and data); master 2 unused
  logic r_dreq = 0, r_dwe = 0, r_treq = 0, r_twe = 0;
  logic [DADDR_W-1:0] r_daddr = '0; logic [63:0] r_dwdata = '0;
  logic [TADDR_W-1:0] r_taddr = '0; l2_tag_t r_twdata = '0;
  assign d_req[0] = r_dreq; assign d_we[0] = r_dwe; assign d_addr[0] = r_daddr;
  assign d_wdata[0] = r_dwdata; assign d_be[0] = 8'hFF;
  assign t_req[0] = r_treq; assign t_we[0] = r_twe; assign t_addr[0] = r_taddr; assign t_wdata[0] = r_twdata;
  assign d_req[2] = 0; assign d_we[2] = 0; assign d_addr[2] = '0; assign d_wdata[2] = '0; assign d_be[2] = '0;
  assign t_req[2] = 0; assign t_we[2] = 0; assign t_addr[2] = '0; assign t_wdata[2] = '0;

  int checks = 0, failures = 0;
  int n_hit, n_miss, n_hum, n_byp, n_wb, n_fill, n_mon;
  always @(posedge clk) if (rst_n) begin
    n_hit += int'(ev_hit); n_miss += int'(ev_miss); n_hum += int'(ev_hit_under_miss);
    n_byp += int'(ev_bypass); n_mon += int'(mon_valid && mon_ready);
  end
  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  // DRAM model and reference of the processor-visible values
  logic [31:0] dram [logic [31:0]];
  logic [31:0] refm [logic [31:0]];
  function automatic logic [31:0] dinit(input logic [31:0] a);
    return {a[15:0], ~a[15:0]} ^ 32'h0F0F_A5A5;
  endfunction
  function automatic logic [31:0] dget(input logic [31:0] a);
    return dram.exists(a) ? dram[a] : dinit(a);
  endfunction
  function automatic logic [31:0] rget(input logic [31:0] a);
    return refm.exists(a) ? refm[a] : dinit(a);
  endfunction

  // NI / DRAM responder
  always begin
    @(negedge clk);
    if (cc_valid) begin
      cc_req_t c; logic [TADDR_W-1:0] ta; l2_tag_t t;
      c = cc_req; cc_ready = 1; @(negedge clk); cc_ready = 0;
      repeat ($urandom_range(2, 20)) @(negedge clk);
      if (c.op == CC_WB_FILL) begin
        n_wb++;
        for (int k = 0; k < 4; k++) begin
          r_dreq = 1; r_dwe = 0; r_daddr = sp_daddr(c.line) + k;
          @(negedge clk); r_dreq = 0; #1;
          dram[c.wb_addr + 8*k] = d_rdata[31:0]; dram[c.wb_addr + 8*k + 4] = d_rdata[63:32];
        end
      end
      for (int k = 0; k < 4; k++) begin
        @(negedge clk); r_dreq = 1; r_dwe = 1; r_daddr = sp_daddr(c.line) + k;
        r_dwdata = {dget(c.fill_addr + 8*k + 4), dget(c.fill_addr + 8*k)};
      end
      @(negedge clk); r_dreq = 0; r_dwe = 0;
      ta = sp_taddr(c.line);
      r_treq = 1; r_taddr = ta; @(negedge clk); r_treq = 0; #1; t = t_rdata;
      checks++; if (!t.pending || t.tag != c.fill_addr[27:14]) begin failures++; $display("FAIL pending tag %h", t); end
      t.valid = 1; t.pending = 0; t.dirty = 0;
      @(negedge clk); r_treq = 1; r_twe = 1; r_twdata = t; @(negedge clk); r_treq = 0; r_twe = 0;
      fill_done = 1; n_fill++; @(negedge clk); fill_done = 0;
    end
  end

  // processor side
  task automatic req(input l2_op_e op, input logic [31:0] a, input logic [31:0] d, input logic [3:0] be);
    @(negedge clk); req_valid = 1; req_op = op; req_addr = a; req_wdata = d; req_be = be; #1;
    while (!req_ready) begin @(negedge clk); #1; end
    @(negedge clk); req_valid = 0;
  endtask
  task automatic rdline(input logic [31:0] a);
    logic [7:0] got; got = 0;
    @(negedge clk); req_valid = 1; req_op = L2_RDLINE; req_addr = a; #1;
    while (!req_ready) begin @(negedge clk); #1; end
    @(negedge clk); req_valid = 0;
    forever begin
      #1;
      if (beat_valid) begin
        logic [31:0] la; la = {a[31:5], 5'b0} + 8*beat_idx;
        checks++; got[beat_idx] = 1;
        if (beat_data !== {rget(la + 4), rget(la)}) begin
          failures++; $display("FAIL line %h beat %0d: %h exp %h", a, beat_idx, beat_data, {rget(la + 4), rget(la)});
        end
      end
      if (rsp_valid) break;
      @(negedge clk);
    end
    check("four beats", got, 8'h0F);
  endtask
  task automatic rdword(input l2_op_e op, input logic [31:0] a, output logic [31:0] v);
    @(negedge clk); req_valid = 1; req_op = op; req_addr = a; #1;
    while (!req_ready) begin @(negedge clk); #1; end
    @(negedge clk); req_valid = 0; #1;
    while (!rsp_valid) begin @(negedge clk); #1; end
    v = rsp_data;
  endtask
  function automatic logic [31:0] ca(input int tag, input int set, input int word);
    return {4'h0, 14'(tag), 9'(set), 3'(word), 2'b00};
  endfunction
  function automatic logic [31:0] spa(input int w, input int s, input int word);
    return {4'h8, 4'h0, 8'h00, 2'(w), 9'(s), 3'(word), 2'b00};
  endfunction
  function automatic logic [31:0] tga(input int w, input int s);
    return {4'h9, 4'h0, 8'h00, 2'(w), 9'(s), 5'b0};
  endfunction

  initial begin
    logic [31:0] v;
    repeat (3) @(posedge clk); rst_n = 1;
    wait (!init_busy); repeat (2) @(posedge clk);
    // lock way 3 of sets 0..1 (plain), way 2 of set 0 as a command buffer
    req(L2_TAGWR, tga(3, 0), 32'h0002_0000, 4'hF);
    req(L2_TAGWR, tga(3, 1), 32'h0002_0000, 4'hF);
    req(L2_TAGWR, tga(2, 0), 32'h0002_4000, 4'hF);
    rdword(L2_TAGRD, tga(2, 0), v); check("tag read", v, 32'h0002_4000);
    // scratchpad write/read and bypass from the deferred-write buffer
    req(L2_SPWR, spa(3, 0, 5), 32'h5C5C_0005, 4'hF);
    rdword(L2_SPRD, spa(3, 0, 5), v); check("scratchpad bypass", v, 32'h5C5C_0005);
    repeat (5) @(negedge clk);
    rdword(L2_SPRD, spa(3, 0, 5), v); check("scratchpad", v, 32'h5C5C_0005);
    req(L2_SPWR, spa(3, 0, 6), 32'h0000_00AA, 4'b0001);
    rdword(L2_SPRD, spa(3, 0, 6), v); check("partial scratchpad write", v[7:0], 8'hAA);
    // command-buffer store goes to the monitor
    req(L2_SPWR, spa(2, 0, 1), 32'h1234, 4'hF);
    repeat (5) @(negedge clk);
    check("monitor hand-off", n_mon, 1);
    // random cacheable traffic on sets 0..3 with 7 tags each
    for (int i = 0; i < 1200; i++) begin
      int tg, st, wd; logic [31:0] a, d; logic [3:0] be;
      tg = $urandom_range(0, 6); st = $urandom_range(0, 3); wd = $urandom_range(0, 7);
      a = ca(tg, st, wd);
      if ($urandom_range(0, 2) == 0) rdline(a);
      else begin
        d = $urandom; be = ($urandom_range(0, 3) == 0) ? 4'($urandom) : 4'hF;
        v = rget(a);
        for (int b = 0; b < 4; b++) if (be[b]) v[8*b +: 8] = d[8*b +: 8];
        refm[a] = v;
        req(L2_WR, a, d, be);
      end
    end
    repeat (200) @(negedge clk);
    // read everything back
    for (int tg = 0; tg < 7; tg++) for (int st = 0; st < 4; st++) rdline(ca(tg, st, 0));
    // the scratchpad line survived all the cache traffic in its set
    rdword(L2_SPRD, spa(3, 0, 5), v); check("locked line kept", v, 32'h5C5C_0005);
    // all four ways of set 9 locked: a cacheable access there is refused
    for (int w = 0; w < 4; w++) req(L2_TAGWR, tga(w, 9), 32'h0002_0000, 4'hF);
    fork
      rdline(ca(1, 9, 0));
      begin
        int n; n = 0;
        while (!no_way_err && n < 100) begin @(negedge clk); n++; end
        check("no-way error", no_way_err, 1);
      end
    join_any
    disable fork;
    $display("  hits %0d misses %0d write-backs %0d hit-under-miss %0d bypass %0d", n_hit, n_miss, n_wb, n_hum, n_byp);
    checks++; if (n_hit == 0 || n_miss == 0 || n_wb == 0 || n_hum == 0 || n_byp == 0) begin failures++; $display("FAIL event missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (300000) @(posedge clk); failures++; $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

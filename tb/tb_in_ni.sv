// tb_in_ni: incoming NI engine on top of the L2 arrays. The testbench is the
// second array master (tag and data set-up and read-back) and feeds packets
// straight into the engine. Covered: a cache fill into a pending line (data,
// tag turned valid, fill_done), a plain scratchpad write with an
// acknowledgement carrying the byte count, counter updates with the
// notification when the count reaches zero, queue enqueue with tail
// wrap-around and the drop when full, a write outside the scratchpad region
// (discarded), and a read request turned into a copy command.
module tb_in_ni;
  import ccsp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_ready;
  flit_t in_data = '0;
  logic ack_valid, ack_ready = 0, rsq_valid, rsq_ready = 0, fill_done;
  ack_req_t ack_req;
  ni_cmd_t rsq_cmd;
  logic ev_fill, ev_sp, ev_counter, ev_notify, ev_enq, ev_qfull, ev_read;

  // array ports: master 0 = DUT, master 1 = testbench, master 2 unused
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

  in_ni dut (.clk, .rst_n, .in_valid, .in_ready, .in_data,
    .d_req(d_req[0]), .d_we(d_we[0]), .d_addr(d_addr[0]), .d_wdata(d_wdata[0]), .d_be(d_be[0]),
    .d_gnt(d_gnt[0]), .d_rvalid(d_rvalid[0]), .d_rdata,
    .t_req(t_req[0]), .t_we(t_we[0]), .t_addr(t_addr[0]), .t_wdata(t_wdata[0]),
    .t_gnt(t_gnt[0]), .t_rvalid(t_rvalid[0]), .t_rdata,
    .ack_valid, .ack_ready, .ack_req, .rsq_valid, .rsq_ready, .rsq_cmd, .fill_done,
    .ev_fill, .ev_sp, .ev_counter, .ev_notify, .ev_enq, .ev_qfull, .ev_read);

  logic tb_dreq = 0, tb_dwe = 0, tb_treq = 0, tb_twe = 0;
  logic [DADDR_W-1:0] tb_daddr = '0;
  logic [63:0] tb_dwdata = '0;
  logic [7:0] tb_dbe = '0;
  logic [TADDR_W-1:0] tb_taddr = '0;
  l2_tag_t tb_twdata = '0;
  assign d_req[2:1] = {1'b0, tb_dreq}; assign d_we[2:1] = {1'b0, tb_dwe};
  assign d_addr[2:1] = {DADDR_W'(0), tb_daddr}; assign d_wdata[2:1] = {64'h0, tb_dwdata};
  assign d_be[2:1] = {8'h0, tb_dbe};
  assign t_req[2:1] = {1'b0, tb_treq}; assign t_we[2:1] = {1'b0, tb_twe};
  assign t_addr[2:1] = {TADDR_W'(0), tb_taddr}; assign t_wdata[2:1] = {l2_tag_t'(0), tb_twdata};

  int checks = 0, failures = 0;
  int n_fill, n_sp, n_cnt, n_notify, n_enq, n_qfull, n_read, n_filldone;
  always @(posedge clk) if (rst_n) begin
    n_fill += int'(ev_fill); n_sp += int'(ev_sp); n_cnt += int'(ev_counter);
    n_notify += int'(ev_notify); n_enq += int'(ev_enq); n_qfull += int'(ev_qfull);
    n_read += int'(ev_read); n_filldone += int'(fill_done);
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  // testbench array accesses (word granularity)
  task automatic wr32(input logic [31:0] a, input logic [31:0] v);
    @(negedge clk); tb_dreq = 1; tb_dwe = 1; tb_daddr = sp_daddr(a);
    tb_dwdata = {v, v}; tb_dbe = a[2] ? 8'hF0 : 8'h0F; #1;
    while (!d_gnt[1]) begin @(negedge clk); #1; end
    @(negedge clk); tb_dreq = 0; tb_dwe = 0;
  endtask
  task automatic rd32(input logic [31:0] a, output logic [31:0] v);
    @(negedge clk); tb_dreq = 1; tb_dwe = 0; tb_daddr = sp_daddr(a); #1;
    while (!d_gnt[1]) begin @(negedge clk); #1; end
    @(negedge clk); tb_dreq = 0; #1;
    v = a[2] ? d_rdata[63:32] : d_rdata[31:0];
  endtask
  task automatic twr(input logic [31:0] a, input l2_tag_t t);
    @(negedge clk); tb_treq = 1; tb_twe = 1; tb_taddr = sp_taddr(a); tb_twdata = t; #1;
    while (!t_gnt[1]) begin @(negedge clk); #1; end
    @(negedge clk); tb_treq = 0; tb_twe = 0;
  endtask
  task automatic trd(input logic [31:0] a, output l2_tag_t t);
    @(negedge clk); tb_treq = 1; tb_twe = 0; tb_taddr = sp_taddr(a); #1;
    while (!t_gnt[1]) begin @(negedge clk); #1; end
    @(negedge clk); tb_treq = 0; #1;
    t = t_rdata;
  endtask
  task automatic rd_check(input logic [31:0] a, input logic [31:0] exp, input string what);
    logic [31:0] v; rd32(a, v); check(what, v, exp);
  endtask

  task automatic send(input pkt_type_e ty, input logic [31:0] dst, input logic [31:0] ack,
                      input logic [31:0] pay [$]);
    flit_t f [$];
    f.push_back('{data: mk_header(ty, 3'd0, 3'd1, 8'(pay.size())), last: 0});
    f.push_back('{data: dst, last: 0});
    f.push_back('{data: ack, last: 0});
    foreach (pay[i]) f.push_back('{data: pay[i], last: 0});
    f.push_back('{data: 32'h0BAD_0C0C, last: 1});     // CRC word: already checked upstream
    foreach (f[k]) begin
      @(negedge clk); in_valid = ($urandom_range(0, 3) != 0); in_data = f[k]; #1;
      while (!(in_valid && in_ready)) begin @(negedge clk); in_valid = 1; #1; end
    end
    @(negedge clk); in_valid = 0;
  endtask

  // acknowledgements and read commands are collected
  ack_req_t acks [$];
  ni_cmd_t  cmds [$];
  always begin
    @(negedge clk); ack_ready = $urandom_range(0, 1); rsq_ready = $urandom_range(0, 1); #1;
    if (ack_valid && ack_ready) acks.push_back(ack_req);
    if (rsq_valid && rsq_ready) cmds.push_back(rsq_cmd);
  end

  function automatic logic [31:0] spa(input int w, input int s, input int word);
    return {4'h8, 4'h0, 8'h00, 2'(w), 9'(s), 3'(word), 2'b00};
  endfunction
  function automatic l2_tag_t lk(input line_state_e st);
    return '{valid: 1'b0, dirty: 1'b0, lock: 1'b1, pending: 1'b0, state: st, tag: '0};
  endfunction

  initial begin
    logic [31:0] pay [$]; l2_tag_t t;
    repeat (3) @(posedge clk); rst_n = 1;
    wait (!init_busy); repeat (2) @(posedge clk);

    // ---- cache fill of way 1 set 7 (pending, tag 0x123)
    twr(spa(1, 7, 0), '{valid: 1'b0, dirty: 1'b0, lock: 1'b0, pending: 1'b1, state: LS_PLAIN, tag: 14'h123});
    pay = {}; for (int i = 0; i < 8; i++) pay.push_back(32'hF111_0000 + i);
    send(PT_WRITE, spa(1, 7, 0), 0, pay);
    repeat (30) @(negedge clk);
    for (int i = 0; i < 8; i++) rd_check(spa(1, 7, i), 32'hF111_0000 + i, "fill data");
    trd(spa(1, 7, 0), t);
    check("fill tag", 32'(t), 32'h0008_0123);   // valid, tag 0x123
    check("fill_done", n_filldone, 1);

    // ---- plain write with acknowledgement
    twr(spa(3, 2, 0), lk(LS_PLAIN));
    pay = '{32'hA, 32'hB, 32'hC};
    send(PT_WRITE, spa(3, 2, 4), 32'h8200_0100, pay);
    repeat (30) @(negedge clk);
    rd_check(spa(3, 2, 4), 32'hA, "plain w0"); rd_check(spa(3, 2, 6), 32'hC, "plain w2");
    check("ack count", acks.size(), 1);
    if (acks.size()) begin check("ack addr", acks[0].addr, 32'h8200_0100); check("ack bytes", acks[0].value, 12); end
    acks = {};

    // ---- counter: 100 bytes expected, two acks of 64 and 36
    twr(spa(3, 4, 0), lk(LS_COUNTER));
    wr32(spa(3, 4, 0), 100); wr32(spa(3, 4, 1), 32'h8100_0200); wr32(spa(3, 4, 2), 32'h0000_1234);
    send(PT_WRITE, spa(3, 4, 0), 0, '{32'd64});
    repeat (30) @(negedge clk);
    rd_check(spa(3, 4, 0), 36, "counter after 64");
    check("no notification yet", acks.size(), 0);
    send(PT_WRITE, spa(3, 4, 0), 0, '{32'd36});
    repeat (30) @(negedge clk);
    rd_check(spa(3, 4, 0), 0, "counter zero");
    check("notification", acks.size(), 1);
    if (acks.size()) begin check("notify addr", acks[0].addr, 32'h8100_0200); check("notify value", acks[0].value, 32'h1234); end
    acks = {};

    // ---- queue of 3 slots at line 3/40: two enqueue, third dropped, wrap
    twr(spa(3, 5, 0), lk(LS_QUEUE));
    wr32(spa(3, 42, 0), 0);
    wr32(spa(3, 5, 0), spa(3, 40, 0)); wr32(spa(3, 5, 1), 3); wr32(spa(3, 5, 2), 0); wr32(spa(3, 5, 3), 0);
    for (int m = 0; m < 3; m++) begin
      send(PT_WRITE, spa(3, 5, 0), 0, '{32'h9000_0000 + m, 32'h9100_0000 + m});
      repeat (30) @(negedge clk);
    end
    rd_check(spa(3, 5, 3), 2, "tail after two");
    rd_check(spa(3, 40, 0), 32'h9000_0000, "slot 0"); rd_check(spa(3, 41, 1), 32'h9100_0001, "slot 1");
    rd_check(spa(3, 42, 0), 32'h0, "slot 2 empty (dropped)");
    check("enqueued", n_enq, 2); check("full", n_qfull, 1);
    wr32(spa(3, 5, 2), 1);                               // consumer took one
    send(PT_WRITE, spa(3, 5, 0), 0, '{32'h9000_0003});
    repeat (30) @(negedge clk);
    rd_check(spa(3, 5, 3), 0, "tail wrapped");
    rd_check(spa(3, 42, 0), 32'h9000_0003, "slot 2");

    // ---- write to a non-scratchpad address is discarded, the stream goes on
    send(PT_WRITE, 32'h0001_0000, 0, '{32'h1, 32'h2});
    send(PT_WRITE, spa(3, 2, 0), 0, '{32'h77});
    repeat (30) @(negedge clk);
    rd_check(spa(3, 2, 0), 32'h77, "after discarded packet");

    // ---- read request
    send(PT_READ, spa(3, 2, 0), 32'h8300_0010, '{32'h8100_0400, 32'd64});
    repeat (30) @(negedge clk);
    check("read cmds", cmds.size(), 1);
    if (cmds.size()) begin
      check("rd src", cmds[0].src, spa(3, 2, 0)); check("rd dst", cmds[0].dst, 32'h8100_0400);
      check("rd size", cmds[0].size, 64); check("rd ack", cmds[0].ack, 32'h8300_0010);
      check("rd op", cmds[0].op, OP_COPY);
    end
    check("events", n_fill + n_cnt + n_notify + n_read, 1 + 2 + 1 + 1);
    checks++; if (n_sp == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

// tb_tile: one tile at its default sizes with its NoC output looped back to
// its NoC input, so every packet it sends is received by itself. Through the
// processor bus the test locks scratchpad lines and sets their states with
// tag writes, reads and writes the scratchpad, posts a 320-byte RDMA copy
// (two packets) whose acknowledgements decrement a counter that notifies at
// zero, checks the descriptor release, sends a message into a queue, and
// issues remote stores (addressed to node 1, delivered back here by the
// loopback) that coalesce. Data and event strobes are checked.
`timescale 1ns/1ps
module tb_tile;
  import ccsp_pkg::*;
  logic clk = 0, clk_noc = 0, rst_n = 0, rst_noc_n = 0;
  always #5 clk = ~clk;
  always #4 clk_noc = ~clk_noc;

  logic cpu_req = 0, cpu_we = 0, cpu_ack, cpu_err, init_busy;
  logic [31:0] cpu_addr = '0, cpu_wdata = '0, cpu_rdata;
  logic [3:0] cpu_be = '1;
  logic noc_out_valid, noc_out_ready, noc_in_valid, noc_in_ready;
  flit_t noc_out_data, noc_in_data;
  tile_ev_t ev;

  tile #(.NODE_ID(2'd0)) dut (.*);

  // loopback
  assign noc_in_valid  = noc_out_valid;
  assign noc_in_data   = noc_out_data;
  assign noc_out_ready = noc_in_ready;

  int checks = 0, failures = 0;
  int n_sp, n_cnt, n_notify, n_enq, n_seg, n_coal, n_cwb, n_ack, n_rs, n_pkt;
  always @(posedge clk) if (rst_n) begin
    n_sp += int'(ev.sp_write); n_cnt += int'(ev.counter); n_notify += int'(ev.notify);
    n_enq += int'(ev.enqueue); n_seg += int'(ev.segment); n_coal += int'(ev.rs_coalesce);
    n_cwb += int'(ev.src_cwb); n_ack += int'(ev.src_ack); n_rs += int'(ev.src_rstore);
    n_pkt += int'(ev.pkt_out);
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask
  task automatic acc(input bit we, input logic [31:0] a, input logic [31:0] d, output logic [31:0] r);
    @(negedge clk); cpu_req = 1; cpu_we = we; cpu_addr = a; cpu_wdata = d;
    do @(negedge clk); while (!cpu_ack);
    r = cpu_rdata; cpu_req = 0;
  endtask
  task automatic wr(input logic [31:0] a, input logic [31:0] d);
    logic [31:0] r; acc(1, a, d, r);
  endtask
  task automatic rd_check(input logic [31:0] a, input logic [31:0] exp, input string what);
    logic [31:0] r; acc(0, a, 0, r); check(what, r, exp);
  endtask
  task automatic poll(input logic [31:0] a, input logic [31:0] exp, input string what);
    logic [31:0] r; int n; n = 0;
    do begin acc(0, a, 0, r); n++; end while (r !== exp && n < 400);
    check(what, r, exp);
  endtask
  function automatic logic [31:0] sp(input int n, input int w, input int s, input int word);
    return {4'h8, 2'b00, 2'(n), 8'h00, 2'(w), 9'(s), 3'(word), 2'b00};
  endfunction
  function automatic logic [31:0] tg(input int w, input int s);
    return {4'h9, 4'h0, 8'h00, 2'(w), 9'(s), 5'b0};
  endfunction
  function automatic logic [31:0] locked(input line_state_e st);
    return 32'h0002_0000 | (32'(st) << 14);
  endfunction

  initial begin
    logic [31:0] r;
    repeat (3) @(posedge clk); rst_n = 1; rst_noc_n = 1;
    wait (!init_busy);
    repeat (2) @(posedge clk);
    wr(tg(2, 0), locked(LS_CMD));
    for (int s = 8; s < 18; s++) wr(tg(2, s), locked(LS_PLAIN));
    for (int s = 20; s < 30; s++) wr(tg(2, s), locked(LS_PLAIN));
    wr(tg(2, 4), locked(LS_COUNTER));
    wr(tg(2, 5), locked(LS_QUEUE));
    wr(tg(2, 6), locked(LS_PLAIN));
    wr(tg(2, 1), locked(LS_PLAIN));
    for (int s = 40; s < 43; s++) wr(tg(2, s), locked(LS_PLAIN));
    acc(0, tg(2, 4), 0, r); check("tag read", r, locked(LS_COUNTER));
    for (int k = 0; k < 80; k++) wr(sp(0, 2, 8 + k / 8, k % 8), 32'hD0D0_0000 + 32'(k));
    rd_check(sp(0, 2, 12, 5), 32'hD0D0_0025, "scratchpad");
    // counter: 320 bytes expected, notify 0xBEEF into line 6 word 0
    wr(sp(0, 2, 4, 0), 32'd320); wr(sp(0, 2, 4, 1), sp(0, 2, 6, 0)); wr(sp(0, 2, 4, 2), 32'hBEEF);
    wr(sp(0, 2, 6, 0), 32'h0);
    // copy 320 bytes: lines 8..17 -> 20..29, descriptor words out of order
    wr(sp(0, 2, 0, 2), sp(0, 2, 4, 0));
    wr(sp(0, 2, 0, 0), {OP_COPY, 12'h0, 16'd320});
    wr(sp(0, 2, 0, 3), sp(0, 2, 8, 0));
    wr(sp(0, 2, 0, 1), sp(0, 2, 20, 0));
    poll(sp(0, 2, 6, 0), 32'hBEEF, "notification");
    rd_check(sp(0, 2, 4, 0), 32'd0, "counter zero");
    for (int k = 0; k < 80; k += 7) rd_check(sp(0, 2, 20 + k / 8, k % 8), 32'hD0D0_0000 + 32'(k), "copy data");
    rd_check(sp(0, 2, 29, 7), 32'hD0D0_004F, "copy last word");
    poll(sp(0, 2, 0, 0), 32'h0, "descriptor released");
    check("two segments", 32'(n_seg), 32'd1);
    // queue with 3 slots at line 40; one message of 12 bytes
    wr(sp(0, 2, 5, 0), sp(0, 2, 40, 0)); wr(sp(0, 2, 5, 1), 3); wr(sp(0, 2, 5, 2), 0); wr(sp(0, 2, 5, 3), 0);
    wr(sp(0, 2, 0, 3), 32'hA1); wr(sp(0, 2, 0, 4), 32'hA2); wr(sp(0, 2, 0, 5), 32'hA3);
    wr(sp(0, 2, 0, 1), sp(0, 2, 5, 0)); wr(sp(0, 2, 0, 2), 0);
    wr(sp(0, 2, 0, 0), {OP_MSG, 12'h0, 16'd12});
    poll(sp(0, 2, 5, 3), 32'd1, "queue tail");
    rd_check(sp(0, 2, 40, 2), 32'hA3, "queue data");
    // remote stores to node 1 come back through the loopback into line 1
    for (int k = 0; k < 4; k++) wr(sp(1, 2, 1, k), 32'hE000_0000 + 32'(k));
    repeat (60) @(posedge clk);
    for (int k = 0; k < 4; k++) rd_check(sp(0, 2, 1, k), 32'hE000_0000 + 32'(k), "remote store");
    checks++; if (n_coal == 0 || n_rs == 0 || n_rs >= 4) begin failures++; $display("FAIL coalescing %0d/%0d", n_coal, n_rs); end
    checks++; if (n_cnt != 2 || n_notify != 1 || n_enq != 1 || n_cwb != 2 || n_ack < 2) begin
      failures++; $display("FAIL events cnt=%0d notify=%0d enq=%0d cwb=%0d ack=%0d", n_cnt, n_notify, n_enq, n_cwb, n_ack);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

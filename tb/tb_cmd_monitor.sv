// tb_cmd_monitor: completion monitor. Writes copy and message descriptors word
// by word in random order and checks that the command is released exactly
// when the last required word arrives, with the right fields, that a store to
// another line restarts collection, and that stores wait while a command is
// held.
module tb_cmd_monitor;
  import ccsp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic st_valid = 0, st_ready, cmd_valid, cmd_ready = 0;
  logic [31:0] st_addr = '0, st_data = '0;
  ni_cmd_t cmd;
  int checks = 0, failures = 0;

  cmd_monitor dut (.*);

  task automatic st(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk); st_valid = 1; st_addr = a; st_data = d; #1;
    while (!st_ready) begin @(negedge clk); #1; end
    @(negedge clk); st_valid = 0;
  endtask

  task automatic chk(input logic exp, input string what);
    #1; checks++;
    if (cmd_valid !== exp) begin failures++; $display("FAIL %s: cmd_valid=%b", what, cmd_valid); end
  endtask

  task automatic take();
    @(negedge clk); cmd_ready = 1; @(negedge clk); cmd_ready = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      logic [31:0] line, w [8]; int order [$]; int need; logic msg; int sz;
      order = {}; line = 32'h8000_0000 | ($urandom & 32'h03FF_FFE0);
      msg = $urandom_range(0, 1); sz = msg ? $urandom_range(1, 20) : $urandom_range(1, 4096);
      foreach (w[i]) w[i] = $urandom;
      w[0] = {msg ? 4'(OP_MSG) : 4'(OP_COPY), 12'h0, 16'(sz)};
      need = msg ? 3 + (sz + 3) / 4 : 4;
      for (int i = 0; i < need; i++) order.push_back(i);
      order.shuffle();
      // a stray store to another line first: must not count
      if (t % 5 == 0) begin st(line ^ 32'h20, w[0]); st(line ^ 32'h20, w[0]); end
      foreach (order[k]) begin
        st(line + 4*order[k], w[order[k]]);
        chk(k == need - 1, $sformatf("t%0d k%0d", t, k));
      end
      checks++;
      if (cmd.op != (msg ? OP_MSG : OP_COPY) || cmd.size != 16'(sz) || cmd.dst != w[1] ||
          cmd.ack != w[2] || cmd.desc != line || (!msg && cmd.src != w[3]) ||
          (msg && cmd.msg[0] != w[3])) begin
        failures++; $display("FAIL fields t%0d", t);
      end
      // held command blocks stores
      if (t % 7 == 0) begin
        @(negedge clk); st_valid = 1; st_addr = line; #1;
        checks++; if (st_ready) begin failures++; $display("FAIL store accepted while held"); end
        st_valid = 0;
      end
      take();
      chk(1'b0, "taken");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

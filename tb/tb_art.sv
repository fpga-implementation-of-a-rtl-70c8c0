// tb_art: checks the static address map of a tile (node 1): region, node and
// port decoding for DRAM, local and remote scratchpad, tag space and faults.
module tb_art;
  import ccsp_pkg::*;
  logic [31:0] addr;
  acc_class_e cls;
  logic local_node, perm_ok;
  logic [PORT_W-1:0] port;
  int checks = 0, failures = 0;

  art #(.NODE_ID(2'd1)) dut (.*);

  task automatic t(input logic [31:0] a, input acc_class_e c, input logic [2:0] p);
    addr = a; #1;
    checks++;
    if (cls !== c || port !== p || perm_ok !== (c != AC_FAULT)) begin
      failures++; $display("FAIL %h: cls=%0d port=%0d", a, cls, port);
    end
  endtask

  initial begin
    t(32'h0000_0000, AC_CACHEABLE, 3'd4);
    t(32'h0FFF_FFFC, AC_CACHEABLE, 3'd4);
    t(32'h8100_C020, AC_SCRATCH, 3'd1);
    t(32'h8000_C020, AC_REMOTE, 3'd0);
    t(32'h8300_0000, AC_REMOTE, 3'd3);
    t(32'h9100_4000, AC_TAG, 3'd1);
    t(32'h9200_4000, AC_FAULT, 3'd2);
    t(32'h4000_0000, AC_FAULT, 3'd0);
    for (int i = 0; i < 200; i++) begin
      logic [31:0] a;
      a = {4'h8, $urandom_range(0, 15) == 0 ? 4'h0 : 4'h0, 24'($urandom)};
      addr = a; #1;
      checks++;
      if ((cls == AC_SCRATCH) !== (a[25:24] == 2'd1) || local_node !== (a[25:24] == 2'd1) ||
          port !== {1'b0, a[25:24]}) begin failures++; $display("FAIL random %h", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

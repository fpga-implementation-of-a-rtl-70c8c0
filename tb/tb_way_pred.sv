// tb_way_pred: loads signatures into ways of some sets and checks the
// predicted way masks: hits for the stored tags (no false negatives), the
// expected aliases of the 8-bit XOR fold, clearing, and reset state.
module tb_way_pred;
  import ccsp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [31:0] addr = 0;
  logic [3:0] way_mask;
  logic upd_en = 0, upd_valid = 0;
  logic [8:0] upd_set = 0;
  logic [1:0] upd_way = 0;
  logic [13:0] upd_tag = 0;
  int checks = 0, failures = 0;

  way_pred dut (.*);

  // reference fold written bit by bit: sig[i] = tag[i] ^ tag[i+8]
  function automatic logic [7:0] fold(input logic [13:0] t);
    return {t[7], t[6], t[5] ^ t[13], t[4] ^ t[12], t[3] ^ t[11], t[2] ^ t[10], t[1] ^ t[9], t[0] ^ t[8]};
  endfunction
  function automatic logic [31:0] a_of(input logic [13:0] t, input logic [8:0] s);
    return {4'h0, t, s, 5'h4};
  endfunction

  logic [13:0] tags [4];
  task automatic put(input logic [8:0] s, input logic [1:0] w, input logic [13:0] t, input logic v);
    @(negedge clk); upd_en = 1; upd_set = s; upd_way = w; upd_tag = t; upd_valid = v;
    @(negedge clk); upd_en = 0;
  endtask
  task automatic expect_mask(input logic [31:0] a, input logic [3:0] m, input string what);
    addr = a; #1; checks++;
    if (way_mask !== m) begin failures++; $display("FAIL %s: %b expected %b", what, way_mask, m); end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    expect_mask(a_of(14'h123, 9'd7), 4'b0000, "after reset");
    tags = '{14'h0123, 14'h1A55, 14'h0042, 14'h3FFF};
    for (int w = 0; w < 4; w++) put(9'd7, 2'(w), tags[w], 1'b1);
    for (int w = 0; w < 4; w++) begin
      logic [3:0] m; m = '0;
      for (int k = 0; k < 4; k++) if (fold(tags[k]) == fold(tags[w])) m[k] = 1'b1;
      expect_mask(a_of(tags[w], 9'd7), m, "stored tag");
    end
    // alias: a different tag with the same fold is predicted (false positive allowed)
    expect_mask(a_of(14'h0123 ^ 14'h0101, 9'd7), 4'b0001, "alias");
    expect_mask(a_of(14'h0123, 9'd8), 4'b0000, "other set");
    put(9'd7, 2'd0, 14'h0123, 1'b0);
    expect_mask(a_of(14'h0123, 9'd7), 4'b0000, "cleared");
    // random: never a false negative
    for (int i = 0; i < 200; i++) begin
      logic [13:0] t; logic [8:0] s; logic [1:0] w;
      t = 14'($urandom); s = 9'($urandom); w = 2'($urandom);
      put(s, w, t, 1'b1);
      addr = a_of(t, s); #1; checks++;
      if (!way_mask[w]) begin failures++; $display("FAIL false negative"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

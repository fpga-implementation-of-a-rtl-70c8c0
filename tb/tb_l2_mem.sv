// tb_l2_mem: L2 arrays. Checks the tag clear after reset (init_busy, all tags
// read back zero), fixed-priority grants among the three masters, byte-enable
// writes and one-cycle read data against a reference model, with random
// traffic on all masters.
module tb_l2_mem;
  import ccsp_pkg::*;
  localparam int M = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [M-1:0] d_req = 0, d_we = 0, d_gnt, d_rvalid, t_req = 0, t_we = 0, t_gnt, t_rvalid;
  logic [M-1:0][DADDR_W-1:0] d_addr = '0;
  logic [M-1:0][63:0] d_wdata = '0;
  logic [M-1:0][7:0] d_be = '0;
  logic [63:0] d_rdata;
  logic [M-1:0][TADDR_W-1:0] t_addr = '0;
  l2_tag_t [M-1:0] t_wdata = '0;
  l2_tag_t t_rdata;
  logic init_busy;
  int checks = 0, failures = 0, cyc_init = 0;

  l2_mem dut (.*);

  logic [63:0] dref [logic [DADDR_W-1:0]];
  l2_tag_t     tref [logic [TADDR_W-1:0]];

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    // tag requests are held off during the clear
    @(negedge clk); t_req = 3'b010; t_addr[1] = 5;
    while (init_busy) begin #1; checks++; if (t_gnt != 0) failures++; @(negedge clk); cyc_init++; end
    t_req = 0;
    checks++; if (cyc_init < 2040 || cyc_init > 2050) begin failures++; $display("FAIL init %0d", cyc_init); end
    // fill the part of the data array used below with known values
    for (int a = 0; a < 64; a++) begin
      @(negedge clk); d_req = 3'b001; d_we = 3'b001; d_addr[0] = a; d_be[0] = '1;
      d_wdata[0] = {$urandom, $urandom}; dref[a] = d_wdata[0];
    end
    @(negedge clk); d_req = 0; d_we = 0;
    // random traffic
    for (int c = 0; c < 4000; c++) begin
      logic [M-1:0] eg, et; logic [63:0] exp_d; l2_tag_t exp_t; logic rd_d, rd_t;
      @(negedge clk);
      for (int m = 0; m < M; m++) begin
        d_req[m] = $urandom_range(0, 1); d_we[m] = $urandom_range(0, 1);
        d_addr[m] = $urandom_range(0, 63); d_wdata[m] = {$urandom, $urandom}; d_be[m] = $urandom;
        t_req[m] = $urandom_range(0, 1); t_we[m] = $urandom_range(0, 1);
        t_addr[m] = $urandom_range(0, 31); t_wdata[m] = l2_tag_t'($urandom);
      end
      #1;
      eg = 0; et = 0;
      for (int m = M-1; m >= 0; m--) begin if (d_req[m]) eg = 3'(1) << m; if (t_req[m]) et = 3'(1) << m; end
      checks++; if (d_gnt !== eg || t_gnt !== et) begin failures++; $display("FAIL grant %b/%b exp %b/%b", d_gnt, t_gnt, eg, et); end
      rd_d = 0; rd_t = 0;
      for (int m = 0; m < M; m++) begin
        if (eg[m]) begin
          if (d_we[m]) begin
            for (int b = 0; b < 8; b++) if (d_be[m][b]) dref[d_addr[m]][8*b +: 8] = d_wdata[m][8*b +: 8];
          end else begin rd_d = 1; exp_d = dref[d_addr[m]]; end
        end
        if (et[m]) begin
          if (!tref.exists(t_addr[m])) tref[t_addr[m]] = '0;
          if (t_we[m]) tref[t_addr[m]] = t_wdata[m];
          else begin rd_t = 1; exp_t = tref[t_addr[m]]; end
        end
      end
      @(negedge clk); #1;
      checks++;
      if (d_rvalid !== (eg & ~d_we) || t_rvalid !== (et & ~t_we)) begin failures++; $display("FAIL rvalid"); end
      if (rd_d) begin checks++; if (d_rdata !== exp_d) begin failures++; $display("FAIL dread %h exp %h", d_rdata, exp_d); end end
      if (rd_t) begin checks++; if (t_rdata !== exp_t) begin failures++; $display("FAIL tread %h exp %h", t_rdata, exp_t); end end
      d_req = 0; t_req = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin repeat (30000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

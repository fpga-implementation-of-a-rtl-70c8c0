// l2_mem: L2 tag and data arrays of a tile with their access arbiters.
//
// The data array is 64 KB organised as 8192 words of 64 bits, addressed by
// {way, set, dword}; each 16 KB way is one bank of the cache and, when its
// lines are locked, the scratchpad. The tag array holds one l2_tag_t per line,
// addressed by {way, set}. Three masters share them: 0 = incoming NI,
// 1 = L2 controller, 2 = outgoing NI. Each array grants one master per cycle
// in that fixed priority order (grant is combinational); a granted write
// happens on the clock edge, and granted read data appears on rdata in the
// next cycle together with rvalid for that master. For 2048 cycles after
// reset the tag array clears itself (init_busy) and grants no tag access. Byte enables apply to data
// writes. Array sizes follow the prototype; the arbitration order is this
// design's choice.
module l2_mem
  import ccsp_pkg::*;
#(
  parameter int unsigned WAYS = L2_WAYS,
  parameter int unsigned SETS = L2_SETS,
  parameter int unsigned M    = 3
) (
  input  logic clk,
  input  logic rst_n,
  // data port per master
  input  logic [M-1:0]               d_req,
  input  logic [M-1:0]               d_we,
  input  logic [M-1:0][DADDR_W-1:0]  d_addr,
  input  logic [M-1:0][63:0]         d_wdata,
  input  logic [M-1:0][7:0]          d_be,
  output logic [M-1:0]               d_gnt,
  output logic [M-1:0]               d_rvalid,
  output logic [63:0]                d_rdata,
  // tag port per master
  input  logic [M-1:0]               t_req,
  input  logic [M-1:0]               t_we,
  input  logic [M-1:0][TADDR_W-1:0]  t_addr,
  input  l2_tag_t [M-1:0]            t_wdata,
  output logic [M-1:0]               t_gnt,
  output logic [M-1:0]               t_rvalid,
  output l2_tag_t                    t_rdata,
  output logic                       init_busy   // tag array being cleared after reset
);
  localparam int unsigned DW = WAYS * SETS * 4;
  localparam int unsigned TW = WAYS * SETS;

  logic [63:0] dmem [DW];
  l2_tag_t     tmem [TW];

  // after reset every tag is written invalid, one entry per cycle
  logic [TADDR_W:0] init_q;
  assign init_busy = !init_q[TADDR_W];
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) init_q <= '0;
    else if (init_busy) init_q <= init_q + 1'b1;

  // fixed priority grant
  always_comb begin
    d_gnt = '0;
    t_gnt = '0;
    for (int m = M-1; m >= 0; m--) begin
      if (d_req[m]) d_gnt = M'(1) << m;
      if (t_req[m] && !init_busy) t_gnt = M'(1) << m;
    end
  end

  logic [DADDR_W-1:0] da;
  logic [TADDR_W-1:0] ta;
  logic               dwe, twe;
  logic [63:0]        dwd;
  logic [7:0]         dbe;
  l2_tag_t            twd;
  always_comb begin
    da = '0; dwe = 1'b0; dwd = '0; dbe = '0;
    ta = '0; twe = 1'b0; twd = '0;
    for (int m = 0; m < M; m++) begin
      if (d_gnt[m]) begin da = d_addr[m]; dwe = d_we[m]; dwd = d_wdata[m]; dbe = d_be[m]; end
      if (t_gnt[m]) begin ta = t_addr[m]; twe = t_we[m]; twd = t_wdata[m]; end
    end
  end

  always_ff @(posedge clk) begin
    if (|d_gnt) begin
      if (dwe) begin
        for (int b = 0; b < 8; b++) if (dbe[b]) dmem[da][8*b +: 8] <= dwd[8*b +: 8];
      end else d_rdata <= dmem[da];
    end
    if (init_busy) tmem[init_q[TADDR_W-1:0]] <= '0;
    else if (|t_gnt) begin
      if (twe) tmem[ta] <= twd;
      else     t_rdata  <= tmem[ta];
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      d_rvalid <= '0; t_rvalid <= '0;
    end else begin
      d_rvalid <= d_gnt & ~d_we;
      t_rvalid <= t_gnt & ~t_we;
    end
endmodule

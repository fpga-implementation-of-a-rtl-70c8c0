// way_pred: L2 way predictor placed next to the L1.
//
// For every L2 line it keeps an 8-bit signature of the line's address tag
// plus a valid bit. The signature is the XOR-fold of the 14 tag bits into 8
// bits (sig = tag[7:0] ^ tag[13:8]; the exact fold is this design's choice).
// A lookup compares the signature of the requested address with the four
// stored signatures of its set and returns a mask of the ways that may hit:
// false positives are possible, false negatives are not, because every
// allocation updates the entry. Lookup is combinational (a LUT-RAM read in
// parallel with the L1 tag match); the update port writes on the clock edge
// when the L2 controller allocates a line (miss) or drops one (eviction).
module way_pred
  import ccsp_pkg::*;
#(
  parameter int unsigned SETS  = L2_SETS,
  parameter int unsigned WAYS  = L2_WAYS,
  parameter int unsigned SIG_W = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // lookup
  input  logic [31:0]              addr,
  output logic [WAYS-1:0]          way_mask,
  // update
  input  logic                     upd_en,
  input  logic                     upd_valid,   // 1: line allocated, 0: line dropped
  input  logic [$clog2(SETS)-1:0]  upd_set,
  input  logic [$clog2(WAYS)-1:0]  upd_way,
  input  logic [L2_TAG_W-1:0]      upd_tag
);
  localparam int unsigned SW = $clog2(SETS);

  function automatic logic [SIG_W-1:0] sig_of(input logic [L2_TAG_W-1:0] t);
    logic [SIG_W-1:0] s;
    s = '0;
    for (int i = 0; i < L2_TAG_W; i++) s[i % SIG_W] ^= t[i];
    return s;
  endfunction

  logic [SIG_W-1:0] sig_q [SETS][WAYS];
  logic [WAYS-1:0]  vld_q [SETS];

  logic [SW-1:0]        set;
  logic [SIG_W-1:0]     sig;
  assign set = addr[5 +: SW];
  assign sig = sig_of(addr[27:14]);

  always_comb
    for (int w = 0; w < WAYS; w++)
      way_mask[w] = vld_q[set][w] && (sig_q[set][w] == sig);

  always_ff @(posedge clk)
    if (upd_en) sig_q[upd_set][upd_way] <= sig_of(upd_tag);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) vld_q[s] <= '0;
    end else if (upd_en) begin
      vld_q[upd_set][upd_way] <= upd_valid;
    end
endmodule

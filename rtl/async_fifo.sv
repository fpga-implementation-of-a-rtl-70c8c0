// async_fifo: dual-clock flit FIFO between the tile clock and the NoC clock.
//
// This is the outgoing NoC buffer of the NI (4 KB: 1024 words of 32 bits plus
// a last marker). It absorbs network backpressure and crosses the clock
// domains. Write and read pointers are binary in their own domain and passed
// to the other domain Gray-coded through two flip-flops, so full and empty are
// conservative. A flit written becomes readable 3-4 read-clock cycles later.
// Reads are cut-through: the reader sees flits as soon as they cross, before
// the packet's last flit has been written.
module async_fifo
  import ccsp_pkg::*;
#(
  parameter int unsigned DEPTH = 1024   // power of two
) (
  input  logic  wclk,
  input  logic  wrst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  flit_t in_data,
  input  logic  rclk,
  input  logic  rrst_n,
  output logic  out_valid,
  input  logic  out_ready,
  output flit_t out_data
);
  localparam int unsigned AW = $clog2(DEPTH);
  flit_t mem [DEPTH];

  logic [AW:0] wbin_q, wgray_q, rbin_q, rgray_q;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic logic [AW:0] b2g(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write domain
  logic [AW:0] wbin_n;
  assign in_ready = (wgray_q != {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign wbin_n   = wbin_q + ((in_valid && in_ready) ? 1'b1 : 1'b0);
  always_ff @(posedge wclk) if (in_valid && in_ready) mem[wbin_q[AW-1:0]] <= in_data;
  always_ff @(posedge wclk or negedge wrst_n)
    if (!wrst_n) begin
      wbin_q <= '0; wgray_q <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      wbin_q <= wbin_n; wgray_q <= b2g(wbin_n);
      rgray_w1 <= rgray_q; rgray_w2 <= rgray_w1;
    end

  // read domain
  logic [AW:0] rbin_n;
  assign out_valid = (rgray_q != wgray_r2);
  assign out_data  = mem[rbin_q[AW-1:0]];
  assign rbin_n    = rbin_q + ((out_valid && out_ready) ? 1'b1 : 1'b0);
  always_ff @(posedge rclk or negedge rrst_n)
    if (!rrst_n) begin
      rbin_q <= '0; rgray_q <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      rbin_q <= rbin_n; rgray_q <= b2g(rbin_n);
      wgray_r1 <= wgray_q; wgray_r2 <= wgray_r1;
    end
endmodule

// xbar: input-queued packet crossbar of the NoC (4 tiles + DRAM controller).
//
// Each input has a pipeline register followed by a flit queue. Each output
// has a round-robin arbiter over the inputs whose head flit is bound for it;
// the destination port is read from the header flit of a packet and the
// output stays locked to the winning input until that packet's last flit has
// passed (wormhole switching, so packets are never interleaved). An output
// register drives each output. Under no load a flit needs 3 clock cycles
// from input to output (input register, queue/arbitration, output register),
// matching the prototype's crossbar latency. Port count, 32-bit width,
// round robin and input queueing follow the prototype; queue depth and the
// exact pipelining are this design's choice.
module xbar
  import ccsp_pkg::*;
#(
  parameter int unsigned PORTS  = 5,
  parameter int unsigned QDEPTH = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  [PORTS-1:0] in_valid,
  output logic  [PORTS-1:0] in_ready,
  input  flit_t [PORTS-1:0] in_data,
  output logic  [PORTS-1:0] out_valid,
  input  logic  [PORTS-1:0] out_ready,
  output flit_t [PORTS-1:0] out_data
);
  localparam int unsigned PW = $clog2(PORTS);

  // input register + queue
  logic  [PORTS-1:0] iq_v, fq_in_ready, fq_valid, fq_pop;
  flit_t [PORTS-1:0] iq_d, fq_data;

  // per input: inside a packet, and its destination
  logic [PORTS-1:0]          mid_q;
  logic [PORTS-1:0][PORT_W-1:0] dst_q;
  logic [PORTS-1:0][PORT_W-1:0] head_dst;

  for (genvar i = 0; i < PORTS; i++) begin : g_in
    assign in_ready[i] = !iq_v[i] || fq_in_ready[i];
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) iq_v[i] <= 1'b0;
      else if (in_ready[i]) iq_v[i] <= in_valid[i];
    always_ff @(posedge clk) if (in_ready[i] && in_valid[i]) iq_d[i] <= in_data[i];

    sync_fifo #(.T(flit_t), .DEPTH(QDEPTH)) u_q (
      .clk, .rst_n, .in_valid(iq_v[i]), .in_ready(fq_in_ready[i]), .in_data(iq_d[i]),
      .out_valid(fq_valid[i]), .out_ready(fq_pop[i]), .out_data(fq_data[i]), .count());

    assign head_dst[i] = mid_q[i] ? dst_q[i] : fq_data[i].data[29:27];
  end

  // output arbitration
  logic [PORTS-1:0]          lock_q;
  logic [PORTS-1:0][PW-1:0]  owner_q, rr_q;
  logic [PORTS-1:0]          o_take;
  logic [PORTS-1:0][PW-1:0]  o_sel;

  always_comb begin
    int c;
    c = 0;
    fq_pop = '0;
    for (int o = 0; o < PORTS; o++) begin
      o_take[o] = 1'b0;
      o_sel[o]  = owner_q[o];
      if (!out_valid[o] || out_ready[o]) begin
        if (lock_q[o]) begin
          o_take[o] = fq_valid[owner_q[o]];
        end else begin
          for (int k = PORTS; k >= 1; k--) begin
            c = (int'(rr_q[o]) + k) % PORTS;
            if (fq_valid[c] && !mid_q[c] && head_dst[c] == PORT_W'(o)) begin
              o_take[o] = 1'b1;
              o_sel[o]  = PW'(c);
            end
          end
        end
      end
      if (o_take[o]) fq_pop[o_sel[o]] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      lock_q <= '0; owner_q <= '0; rr_q <= '0; out_valid <= '0; mid_q <= '0; dst_q <= '0;
    end else begin
      for (int o = 0; o < PORTS; o++) begin
        if (out_ready[o]) out_valid[o] <= 1'b0;
        if (o_take[o]) begin
          out_valid[o] <= 1'b1;
          lock_q[o]    <= !fq_data[o_sel[o]].last;
          owner_q[o]   <= o_sel[o];
          if (!lock_q[o]) rr_q[o] <= o_sel[o];
          mid_q[o_sel[o]] <= !fq_data[o_sel[o]].last;
          dst_q[o_sel[o]] <= PORT_W'(o);
        end
      end
    end

  always_ff @(posedge clk)
    for (int o = 0; o < PORTS; o++)
      if (o_take[o]) out_data[o] <= fq_data[o_sel[o]];
endmodule

// l1_cache: processor-side front end of a tile: the L1 data cache and the
// routing of every processor access.
//
// The L1 is 4 KB, direct mapped, with 32-byte lines (128 lines), write-through
// and no-allocate on store misses. A cacheable load that hits is answered in
// the cycle after the request; a miss asks the L2 controller for the line,
// which arrives as four 64-bit beats, and answers when the line is in. A
// cacheable store updates the L1 copy if present and is always passed on to
// the L2 (write-through). Every L2 request carries the way mask produced by
// the way predictor in parallel with the L1 lookup. Accesses classified by
// the ART as scratchpad or tag accesses bypass the L1 (scratchpad is not
// L1-cacheable) and go to the L2 controller; stores to a remote scratchpad go
// to the remote-store buffer. Loads from a remote scratchpad and accesses the
// ART rejects are answered with 0 and cpu_err.
// Processor bus: cpu_req is held with its address/data until cpu_ack, one
// access outstanding at a time. Sizes and policies follow the prototype; the
// bus and the remote-load answer are this design's choices.
module l1_cache
  import ccsp_pkg::*;
#(
  parameter int unsigned LINES = 128
) (
  input  logic        clk,
  input  logic        rst_n,
  // processor
  input  logic        cpu_req,
  input  logic        cpu_we,
  input  logic [31:0] cpu_addr,
  input  logic [31:0] cpu_wdata,
  input  logic [3:0]  cpu_be,
  output logic        cpu_ack,
  output logic [31:0] cpu_rdata,
  output logic        cpu_err,
  // ART and way predictor (combinational, in parallel)
  input  acc_class_e  cls,
  input  logic [L2_WAYS-1:0] wp_mask,
  // L2 controller
  output logic        l2_valid,
  input  logic        l2_ready,
  output l2_op_e      l2_op,
  output logic [31:0] l2_addr,
  output logic [31:0] l2_wdata,
  output logic [3:0]  l2_be,
  output logic [L2_WAYS-1:0] l2_mask,
  input  logic        l2_rsp_valid,
  input  logic [31:0] l2_rsp_data,
  input  logic        l2_beat_valid,
  input  logic [1:0]  l2_beat_idx,
  input  logic [63:0] l2_beat_data,
  // remote-store buffer
  output logic        rs_valid,
  input  logic        rs_ready,
  output logic [31:0] rs_addr,
  output logic [31:0] rs_data,
  // events
  output logic        ev_l1_hit,
  output logic        ev_l1_miss
);
  localparam int unsigned IW = $clog2(LINES);
  localparam int unsigned TW = 28 - 5 - IW;      // DRAM tag bits

  logic [31:0]   data_q [LINES*8];
  logic [TW-1:0] tag_q  [LINES];
  logic [LINES-1:0] val_q;

  typedef enum logic [2:0] { S_IDLE, S_L2REQ, S_L2WAIT, S_FILL, S_RS, S_ACKED } st_e;
  st_e st_q;

  logic [IW-1:0] idx;
  logic [TW-1:0] atag;
  logic          hit;
  assign idx  = cpu_addr[5 +: IW];
  assign atag = cpu_addr[27 -: TW];
  assign hit  = val_q[idx] && tag_q[idx] == atag;

  // the L2 request that the current access needs
  l2_op_e op_n;
  always_comb begin
    unique case (cls)
      AC_CACHEABLE: op_n = cpu_we ? L2_WR : L2_RDLINE;
      AC_SCRATCH:   op_n = cpu_we ? L2_SPWR : L2_SPRD;
      AC_TAG:       op_n = cpu_we ? L2_TAGWR : L2_TAGRD;
      default:      op_n = L2_SPRD;
    endcase
  end

  assign l2_valid = (st_q == S_L2REQ);
  assign l2_op    = op_n;
  assign l2_addr  = cpu_addr;
  assign l2_wdata = cpu_wdata;
  assign l2_be    = cpu_be;
  assign l2_mask  = wp_mask;
  assign rs_valid = (st_q == S_RS);
  assign rs_addr  = cpu_addr;
  assign rs_data  = cpu_wdata;

  always_ff @(posedge clk) begin
    // refill beats
    if (st_q == S_FILL && l2_beat_valid) begin
      data_q[{idx, l2_beat_idx, 1'b0}] <= l2_beat_data[31:0];
      data_q[{idx, l2_beat_idx, 1'b1}] <= l2_beat_data[63:32];
      tag_q[idx] <= atag;
    end
    // write-through update of a hit line
    if (st_q == S_IDLE && cpu_req && cls == AC_CACHEABLE && cpu_we && hit)
      for (int b = 0; b < 4; b++)
        if (cpu_be[b]) data_q[{idx, cpu_addr[4:2]}][8*b +: 8] <= cpu_wdata[8*b +: 8];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st_q <= S_IDLE; val_q <= '0; cpu_ack <= 1'b0; cpu_rdata <= '0; cpu_err <= 1'b0;
      ev_l1_hit <= 1'b0; ev_l1_miss <= 1'b0;
    end else begin
      cpu_ack <= 1'b0; cpu_err <= 1'b0; ev_l1_hit <= 1'b0; ev_l1_miss <= 1'b0;
      unique case (st_q)
        S_IDLE: if (cpu_req) begin
          unique case (cls)
            AC_CACHEABLE:
              if (!cpu_we && hit) begin
                cpu_ack <= 1'b1; cpu_rdata <= data_q[{idx, cpu_addr[4:2]}];
                ev_l1_hit <= 1'b1;
                st_q <= S_ACKED;
              end else begin
                if (!cpu_we) begin ev_l1_miss <= 1'b1; val_q[idx] <= 1'b0; end
                st_q <= S_L2REQ;
              end
            AC_SCRATCH, AC_TAG: st_q <= S_L2REQ;
            AC_REMOTE: if (cpu_we) st_q <= S_RS;
                       else begin cpu_ack <= 1'b1; cpu_rdata <= '0; cpu_err <= 1'b1; st_q <= S_ACKED; end
            default: begin cpu_ack <= 1'b1; cpu_rdata <= '0; cpu_err <= 1'b1; st_q <= S_ACKED; end
          endcase
        end
        S_L2REQ: if (l2_ready) begin
          if (op_n == L2_WR || op_n == L2_SPWR) begin
            cpu_ack <= 1'b1; st_q <= S_ACKED;           // write accepted by the L2 buffer
          end else st_q <= (op_n == L2_RDLINE) ? S_FILL : S_L2WAIT;
        end
        S_L2WAIT: if (l2_rsp_valid) begin
          cpu_ack <= 1'b1; cpu_rdata <= l2_rsp_data; st_q <= S_ACKED;
        end
        S_FILL: if (l2_rsp_valid) begin
          val_q[idx] <= 1'b1;
          cpu_ack <= 1'b1; cpu_rdata <= data_q[{idx, cpu_addr[4:2]}];
          st_q <= S_ACKED;
        end
        S_RS: if (rs_ready) begin cpu_ack <= 1'b1; st_q <= S_ACKED; end
        S_ACKED: st_q <= S_IDLE;         // the processor drops its request
        default: st_q <= S_IDLE;
      endcase
    end
endmodule

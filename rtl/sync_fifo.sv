// sync_fifo: single-clock first-in first-out queue with valid/ready ports.
//
// Used inside the NI for the pending command queue (read-service requests),
// the acknowledgement queue and the crossbar input queues. DEPTH entries of
// any packed type; out_valid is high while the FIFO holds data and out_data
// shows the oldest entry; a push and a pop may happen in the same cycle.
module sync_fifo #(
  parameter type         T     = logic [31:0],
  parameter int unsigned DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  T mem [DEPTH];
  logic [AW-1:0] rd_q, wr_q;
  logic push, pop;

  assign in_ready  = (count < DEPTH);
  assign out_valid = (count != 0);
  assign out_data  = mem[rd_q];
  assign push = in_valid && in_ready;
  assign pop  = out_valid && out_ready;

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) if (push) mem[wr_q] <= in_data;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rd_q <= '0; wr_q <= '0; count <= '0;
    end else begin
      if (push) wr_q <= inc(wr_q);
      if (pop)  rd_q <= inc(rd_q);
      count <= count + (push ? 1'b1 : 1'b0) - (pop ? 1'b1 : 1'b0);
    end
endmodule

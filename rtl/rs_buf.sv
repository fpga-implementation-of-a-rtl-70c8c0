// rs_buf: remote-store buffer of the NI.
//
// Processor stores whose address lies in another tile's scratchpad are not
// sent one by one: they collect here. A store to the word right after the
// last one collected is appended, so a burst of stores to adjacent addresses
// that arrive before the buffer departs leaves as one multi-word write
// packet. The buffer departs when the outgoing NI takes it (out_valid &&
// out_ready); a store that is not adjacent, or that would cross the 32-byte
// line, waits (in_ready low) until then. Stores are whole 32-bit words.
// Coalescing follows the prototype; the one-line limit and word-only stores
// are this design's choice.
module rs_buf
  import ccsp_pkg::*;
#(
  parameter int unsigned MAXW = LINE_WORDS
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [31:0] in_addr,
  input  logic [31:0] in_data,
  output logic        out_valid,
  input  logic        out_ready,
  output rstore_t     out_data,
  output logic        ev_coalesce   // a store was appended to a waiting one
);
  rstore_t q;
  logic    adjacent, take;

  assign out_valid = (q.nwords != 0);
  assign out_data  = q;
  assign take      = out_valid && out_ready;
  assign adjacent  = (in_addr == q.addr + {q.nwords, 2'b00}) &&
                     (32'(q.nwords) < MAXW) &&
                     (in_addr[31:5] == q.addr[31:5]);
  assign in_ready  = !take && (q.nwords == 0 || adjacent);
  assign ev_coalesce = in_valid && in_ready && q.nwords != 0;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) q <= '0;
    else if (take) q.nwords <= '0;
    else if (in_valid && in_ready) begin
      if (q.nwords == 0) begin
        q.addr    <= {in_addr[31:2], 2'b00};
        q.data[0] <= in_data;
        q.nwords  <= 4'd1;
      end else begin
        q.data[q.nwords[2:0]] <= in_data;
        q.nwords <= q.nwords + 4'd1;
      end
    end
endmodule

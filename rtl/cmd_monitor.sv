// cmd_monitor: completion monitor and command write buffer of the NI.
//
// User software posts an RDMA copy or a message by storing the words of a
// descriptor into a line of its scratchpad that is marked (in the L2 tag) as
// an NI command buffer; the stores may come in any order. The L2 controller
// passes each such store here as well as writing it to memory. The monitor
// keeps a copy of the line being filled and a mask of the words written, and
// when the descriptor is complete it hands the whole command to the outgoing
// NI, which therefore never re-reads the descriptor from memory.
// Descriptor (this design's layout): w0 = {opcode, size}, w1 = destination,
// w2 = acknowledgement address, w3 = source (copy) or w3..w7 = message data.
// A copy is complete when w0..w3 are written; a message when w0..w2 and
// ceil(size/4) data words are. A store to a different command line starts a
// new collection. in_ready is low while a finished command waits for the NI.
module cmd_monitor
  import ccsp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        st_valid,
  output logic        st_ready,
  input  logic [31:0] st_addr,      // byte address of the stored word (scratchpad view)
  input  logic [31:0] st_data,
  output logic        cmd_valid,
  input  logic        cmd_ready,
  output ni_cmd_t     cmd
);
  logic [31:0]                 line_q;
  logic [LINE_WORDS-1:0][31:0] w_q, w_n;
  logic [LINE_WORDS-1:0]       m_q, m_n;
  logic                        complete;
  logic [LINE_WORDS-1:0]       need;
  logic [3:0]                  msg_words;

  assign st_ready = !cmd_valid;

  always_comb begin
    w_n = w_q;
    m_n = (st_addr[31:5] == line_q[31:5]) ? m_q : '0;
    w_n[st_addr[4:2]] = st_data;
    m_n[st_addr[4:2]] = 1'b1;
    msg_words = 4'((w_n[0][15:0] + 16'd3) >> 2);
    if (msg_words > 4'd5) msg_words = 4'd5;
    unique case (ni_op_e'(w_n[0][31:28]))
      OP_COPY: need = 8'b0000_1111;
      OP_MSG:  need = 8'b0000_0111 | 8'((9'(1) << (3 + msg_words)) - 9'(8));
      default: need = 8'hFF;                      // not a command: never complete
    endcase
    complete = m_n[0] && ((m_n & need) == need) && (ni_op_e'(w_n[0][31:28]) inside {OP_COPY, OP_MSG});
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      line_q <= '0; w_q <= '0; m_q <= '0; cmd_valid <= 1'b0; cmd <= '0;
    end else begin
      if (cmd_valid && cmd_ready) cmd_valid <= 1'b0;
      if (st_valid && st_ready) begin
        line_q <= {st_addr[31:5], 5'b0};
        w_q    <= w_n;
        m_q    <= complete ? '0 : m_n;
        if (complete) begin
          cmd_valid <= 1'b1;
          cmd.op    <= ni_op_e'(w_n[0][31:28]);
          cmd.size  <= w_n[0][15:0];
          cmd.dst   <= w_n[1];
          cmd.ack   <= w_n[2];
          cmd.src   <= w_n[3];
          cmd.msg   <= {w_n[7], w_n[6], w_n[5], w_n[4], w_n[3]};
          cmd.desc  <= {st_addr[31:5], 5'b0};
        end
      end
    end
endmodule

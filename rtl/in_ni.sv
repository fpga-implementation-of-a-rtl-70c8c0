// in_ni: incoming engine of the integrated network interface / cache
// controller.
//
// It takes whole, CRC-checked packets from the incoming packet buffer and
// decides what to do from the tag of the destination line:
//  * line pending a fill   -> cache fill: the payload is written in place,
//                             the tag becomes valid and fill_done pulses for
//                             the L2 controller;
//  * locked counter line   -> the first payload word is subtracted from the
//                             counter (word 0 of the line); when it reaches 0
//                             a notification write (word 2 to the address in
//                             word 1) is queued for the outgoing NI;
//  * locked queue line     -> the message is stored in the slot at the tail
//                             pointer (slots of 32 bytes from the base address
//                             in word 0, word 1 slots, head in word 2, tail in
//                             word 3); the tail wraps around and a full queue
//                             drops the message (bound check);
//  * anything else         -> plain scratchpad write delivered in place.
// Scratchpad, queue and counter writes with a non-null acknowledgement
// address queue an acknowledgement carrying the payload size in bytes. READ
// packets (remote requests for data held here) go to the read service queue
// as copy commands that the outgoing NI will execute. Payload words are
// written one per cycle as 32-bit writes into the 64-bit array.
// The dispatch on tag state, counters with notification, queues with bound
// check and wrap-around, and read service follow the prototype; the line
// layouts of counters and queues and the drop policy are this design's.
module in_ni
  import ccsp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // from the incoming packet buffer (complete packets only)
  input  logic        in_valid,
  output logic        in_ready,
  input  flit_t       in_data,
  // L2 arrays (highest-priority master)
  output logic        d_req,
  output logic        d_we,
  output logic [DADDR_W-1:0] d_addr,
  output logic [63:0] d_wdata,
  output logic [7:0]  d_be,
  input  logic        d_gnt,
  input  logic        d_rvalid,
  input  logic [63:0] d_rdata,
  output logic        t_req,
  output logic        t_we,
  output logic [TADDR_W-1:0] t_addr,
  output l2_tag_t     t_wdata,
  input  logic        t_gnt,
  input  logic        t_rvalid,
  input  l2_tag_t     t_rdata,
  // acknowledgements / notifications to the outgoing NI
  output logic        ack_valid,
  input  logic        ack_ready,
  output ack_req_t    ack_req,
  // read service queue
  output logic        rsq_valid,
  input  logic        rsq_ready,
  output ni_cmd_t     rsq_cmd,
  // L2 controller
  output logic        fill_done,
  // events
  output logic        ev_fill,
  output logic        ev_sp,
  output logic        ev_counter,
  output logic        ev_notify,
  output logic        ev_enq,
  output logic        ev_qfull,
  output logic        ev_read
);
  typedef enum logic [4:0] {
    S_HDR, S_DST, S_ACK, S_RARG0, S_RARG1, S_RCRC, S_RPUSH,
    S_TAG, S_TAGW, S_QRD0, S_QRD1, S_QWAIT, S_CRD, S_CWAIT,
    S_PAY, S_CRC, S_FILLTAG, S_CWR, S_CNTFY, S_QTAIL, S_ACKQ, S_DROP
  } st_e;
  typedef enum logic [1:0] { M_PLAIN, M_FILL, M_COUNTER, M_QUEUE } mode_e;

  st_e   st_q;
  mode_e mode_q;
  pkt_type_e typ_q;
  logic [7:0]  nw_q, idx_q;
  logic [31:0] dst_q, ack_q, wa_q, word_q, ret_q;
  l2_tag_t     tag_q;
  logic [31:0] q0_q, q1_q, q2_q, q3_q;   // words 0..3 of a queue or counter line
  logic        qfull_q, notify_q;

  // flit consumption
  logic pop;
  always_comb begin
    pop = 1'b0;
    unique case (st_q)
      S_HDR, S_DST, S_ACK, S_RARG0, S_RARG1, S_RCRC, S_CRC: pop = in_valid;
      S_PAY: pop = in_valid && (idx_q != nw_q) && (mode_q == M_COUNTER || d_gnt);
      S_DROP: pop = in_valid;
      default: ;
    endcase
  end
  assign in_ready = pop;

  // slot addressing for queues
  logic [31:0] qtail_next;
  assign qtail_next = (q3_q + 32'd1 >= q1_q) ? 32'd0 : q3_q + 32'd1;

  always_comb begin
    d_req = 1'b0; d_we = 1'b0; d_addr = '0; d_wdata = '0; d_be = '0;
    t_req = 1'b0; t_we = 1'b0; t_addr = '0; t_wdata = '0;
    unique case (st_q)
      S_TAG:  begin t_req = 1'b1; t_addr = sp_taddr(dst_q); end
      S_QRD0: begin d_req = 1'b1; d_addr = sp_daddr({dst_q[31:5], 5'h00}); end
      S_QRD1: begin d_req = 1'b1; d_addr = sp_daddr({dst_q[31:5], 5'h08}); end
      S_CRD:  begin d_req = 1'b1; d_addr = sp_daddr({dst_q[31:5], 5'h00}); end
      // payload words are written as they arrive, one per cycle
      S_PAY: if (in_valid && idx_q != nw_q && mode_q != M_COUNTER) begin
        d_req = 1'b1; d_we = 1'b1; d_addr = sp_daddr(wa_q);
        d_wdata = {2{in_data.data}}; d_be = wa_q[2] ? 8'hF0 : 8'h0F;
      end
      S_CWR: begin
        d_req = 1'b1; d_we = 1'b1; d_addr = sp_daddr({dst_q[31:5], 5'h00});
        d_wdata = {32'h0, q0_q}; d_be = 8'h0F;
      end
      S_QTAIL: begin
        d_req = 1'b1; d_we = 1'b1; d_addr = sp_daddr({dst_q[31:5], 5'h08});
        d_wdata = {qtail_next, 32'h0}; d_be = 8'hF0;
      end
      S_FILLTAG: begin
        t_req = 1'b1; t_we = 1'b1; t_addr = sp_taddr(dst_q);
        t_wdata = tag_q; t_wdata.valid = 1'b1; t_wdata.pending = 1'b0; t_wdata.dirty = 1'b0;
      end
      default: ;
    endcase
  end

  assign ack_valid = (st_q == S_CNTFY) || (st_q == S_ACKQ);
  always_comb begin
    if (st_q == S_CNTFY) ack_req = '{addr: q1_q, value: q2_q};
    else                 ack_req = '{addr: ack_q, value: 32'({nw_q, 2'b00})};
  end
  assign rsq_valid = (st_q == S_RPUSH);
  always_comb begin
    rsq_cmd = '0;
    rsq_cmd.op = OP_COPY; rsq_cmd.src = dst_q; rsq_cmd.dst = ret_q;
    rsq_cmd.size = word_q[15:0]; rsq_cmd.ack = ack_q;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st_q <= S_HDR; mode_q <= M_PLAIN; typ_q <= PT_WRITE; nw_q <= '0; idx_q <= '0;
      dst_q <= '0; ack_q <= '0; wa_q <= '0; word_q <= '0; ret_q <= '0; tag_q <= '0;
      q0_q <= '0; q1_q <= '0; q2_q <= '0; q3_q <= '0; qfull_q <= 1'b0; notify_q <= 1'b0;
      fill_done <= 1'b0; ev_fill <= 1'b0; ev_sp <= 1'b0; ev_counter <= 1'b0; ev_notify <= 1'b0;
      ev_enq <= 1'b0; ev_qfull <= 1'b0; ev_read <= 1'b0;
    end else begin
      fill_done <= 1'b0; ev_fill <= 1'b0; ev_sp <= 1'b0; ev_counter <= 1'b0;
      ev_notify <= 1'b0; ev_enq <= 1'b0; ev_qfull <= 1'b0; ev_read <= 1'b0;
      unique case (st_q)
        S_HDR: if (pop) begin
          typ_q <= pkt_type_e'(in_data.data[31:30]);
          nw_q  <= in_data.data[23:16];
          idx_q <= '0;
          st_q  <= S_DST;
        end
        S_DST: if (pop) begin dst_q <= in_data.data; st_q <= S_ACK; end
        S_ACK: if (pop) begin
          ack_q <= in_data.data;
          if (typ_q == PT_READ) st_q <= S_RARG0;
          else if (dst_q[31:28] != RGN_DATA) st_q <= S_DROP;   // not deliverable here
          else st_q <= S_TAG;
        end
        // ---- read request: becomes a copy command from here to the requester
        S_RARG0: if (pop) begin ret_q <= in_data.data; st_q <= S_RARG1; end
        S_RARG1: if (pop) begin word_q <= in_data.data; st_q <= S_RCRC; end
        S_RCRC:  if (pop) st_q <= S_RPUSH;
        S_RPUSH: if (rsq_ready) begin ev_read <= 1'b1; st_q <= S_HDR; end
        // ---- write packet: look at the destination line's tag
        S_TAG: if (t_gnt) st_q <= S_TAGW;
        S_TAGW: if (t_rvalid) begin
          tag_q <= t_rdata;
          wa_q  <= dst_q;
          qfull_q <= 1'b0; notify_q <= 1'b0;
          if (t_rdata.pending) begin mode_q <= M_FILL; st_q <= S_PAY; end
          else if (t_rdata.lock && t_rdata.state == LS_COUNTER) begin mode_q <= M_COUNTER; st_q <= S_CRD; end
          else if (t_rdata.lock && t_rdata.state == LS_QUEUE) begin mode_q <= M_QUEUE; st_q <= S_QRD0; end
          else begin mode_q <= M_PLAIN; st_q <= S_PAY; end
        end
        S_CRD: if (d_gnt) st_q <= S_CWAIT;
        S_CWAIT: if (d_rvalid) begin
          q0_q <= d_rdata[31:0]; q1_q <= d_rdata[63:32];
          st_q <= S_QRD1;                            // word 2 is the notification value
        end
        S_QRD0: if (d_gnt) st_q <= S_QRD1;
        S_QRD1: begin
          if (d_rvalid) begin q0_q <= d_rdata[31:0]; q1_q <= d_rdata[63:32]; end
          if (d_gnt) st_q <= S_QWAIT;
        end
        S_QWAIT: if (d_rvalid) begin
          q2_q <= d_rdata[31:0]; q3_q <= d_rdata[63:32];
          if (mode_q == M_QUEUE) begin
            // tail + 1 == head (mod slots): full
            if (((d_rdata[63:32] + 32'd1 >= q1_q) ? 32'd0 : d_rdata[63:32] + 32'd1) == d_rdata[31:0]) begin
              qfull_q <= 1'b1;
              st_q <= S_DROP;
            end else begin
              wa_q <= q0_q + {d_rdata[58:32], 5'b0};
              st_q <= S_PAY;
            end
          end else st_q <= S_PAY;
        end
        S_PAY: begin
          if (idx_q == nw_q) st_q <= S_CRC;
          else if (pop) begin
            word_q <= in_data.data;
            idx_q  <= idx_q + 1'b1;
            if (mode_q == M_COUNTER) begin
              if (idx_q == 0) begin
                q0_q <= q0_q - in_data.data;
                notify_q <= (q0_q == in_data.data);
              end
            end else wa_q <= wa_q + 32'd4;
          end
        end
        S_CRC: if (pop) begin
          unique case (mode_q)
            M_FILL:    st_q <= S_FILLTAG;
            M_COUNTER: st_q <= S_CWR;
            M_QUEUE:   st_q <= S_QTAIL;
            default:   begin ev_sp <= 1'b1; st_q <= (ack_q != 0) ? S_ACKQ : S_HDR; end
          endcase
        end
        S_FILLTAG: if (t_gnt) begin fill_done <= 1'b1; ev_fill <= 1'b1; st_q <= S_HDR; end
        S_CWR: if (d_gnt) begin
          ev_counter <= 1'b1;
          st_q <= notify_q ? S_CNTFY : S_HDR;
        end
        S_CNTFY: if (ack_ready) begin ev_notify <= 1'b1; st_q <= S_HDR; end
        S_QTAIL: if (d_gnt) begin ev_enq <= 1'b1; st_q <= (ack_q != 0) ? S_ACKQ : S_HDR; end
        S_ACKQ: if (ack_ready) st_q <= S_HDR;
        S_DROP: if (pop && in_data.last) begin ev_qfull <= qfull_q; st_q <= S_HDR; end
        default: st_q <= S_HDR;
      endcase
    end
endmodule

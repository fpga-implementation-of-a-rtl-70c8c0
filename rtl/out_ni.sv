// out_ni: outgoing engine of the integrated network interface / cache
// controller.
//
// Five sources of outbound traffic are served in strict priority:
//   1. cache transfer registers of the L2 controller (fill, write-back,
//      write-back-and-fill),
//   2. acknowledgements and counter notifications from the incoming NI,
//   3. the remote-store buffer,
//   4. commands completed in the command write buffer (copies and messages),
//   5. the pending command queue (read requests received from other nodes,
//      served as if they were local copy commands).
// Every transfer becomes one or more packets of two kinds: WRITE packets
// carry data and an acknowledgement address; READ packets carry the request
// (address to read, return address, size). A copy whose source is in this
// tile's scratchpad is read from the L2 data array and segmented into
// packets of at most 256 bytes; a copy whose source is elsewhere (another
// tile or DRAM) becomes one READ packet to the owner of the source. A cache
// write-back reads the victim line from the L2; a fill is a READ of the DRAM
// line with the L2 line as return address. Each packet is
//   header, destination, acknowledgement, payload..., CRC-32
// and is streamed into the outgoing NoC FIFO as it is formed (cut-through).
// After the last packet of a command the first word of its descriptor is
// cleared in memory, telling software that the buffer can be reused.
// Priorities, packet kinds, 256-byte segmentation, CRC and descriptor update
// follow the prototype; the packet layout and the descriptor update value are
// this design's choices. Payload from memory is fetched 64 bits at a time.
module out_ni
  import ccsp_pkg::*;
#(
  parameter logic [NODE_W-1:0] NODE_ID       = '0,
  parameter int unsigned       MAX_PKT_BYTES = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  // sources, highest priority first
  input  logic        cc_valid,
  output logic        cc_ready,
  input  cc_req_t     cc_req,
  input  logic        ack_valid,
  output logic        ack_ready,
  input  ack_req_t    ack_req,
  input  logic        rs_valid,
  output logic        rs_ready,
  input  rstore_t     rs_req,
  input  logic        cwb_valid,
  output logic        cwb_ready,
  input  ni_cmd_t     cwb_cmd,
  input  logic        pcq_valid,
  output logic        pcq_ready,
  input  ni_cmd_t     pcq_cmd,
  // L2 data array master
  output logic        d_req,
  output logic        d_we,
  output logic [DADDR_W-1:0] d_addr,
  output logic [63:0] d_wdata,
  output logic [7:0]  d_be,
  input  logic        d_gnt,
  input  logic        d_rvalid,
  input  logic [63:0] d_rdata,
  // to the outgoing NoC FIFO
  output logic        out_valid,
  input  logic        out_ready,
  output flit_t       out_data,
  // events
  output logic        ev_pkt,       // a packet's last flit left
  output logic        ev_segment,   // a copy needed another packet
  output logic [2:0]  ev_src        // source served (1..5), valid with a start
);
  localparam int unsigned MAXW = MAX_PKT_BYTES / 4;

  typedef enum logic [1:0] { P_REGS, P_MEM, P_READ } pay_e;
  typedef enum logic [2:0] { S_IDLE, S_HDR, S_DST, S_ACK, S_PAY, S_CRC, S_NEXT, S_DESC } st_e;

  st_e   st_q;
  pay_e  pay_q;
  logic [31:0] dst_q, ack_q, src_q;
  logic [15:0] rem_q;                       // bytes still to send (P_MEM)
  logic [7:0]  seg_q, idx_q;                // words in this packet / sent
  logic [LINE_WORDS-1:0][31:0] regs_q;      // register payload
  logic [31:0] ret_q;                       // READ: return address
  logic [15:0] rsize_q;                     // READ: size
  logic        fill_q;                      // a fill READ follows
  logic [31:0] fill_addr_q, fill_line_q;
  logic [31:0] desc_q;
  logic [31:0] crc_q, crc_n;
  logic [63:0] buf_q;
  logic        buf_v_q, rd_out_q;

  flit_t cur;
  logic  fire;

  crc32 u_crc (.crc_in(crc_q), .data(cur.data), .crc_out(crc_n));

  // source selection
  logic idle;
  assign idle      = (st_q == S_IDLE);
  assign cc_ready  = idle && cc_valid;
  assign ack_ready = idle && !cc_valid && ack_valid;
  assign rs_ready  = idle && !cc_valid && !ack_valid && rs_valid;
  assign cwb_ready = idle && !cc_valid && !ack_valid && !rs_valid && cwb_valid;
  assign pcq_ready = idle && !cc_valid && !ack_valid && !rs_valid && !cwb_valid && pcq_valid;

  logic    cmd_take;
  ni_cmd_t cmd;
  assign cmd_take = cwb_ready || pcq_ready;
  assign cmd      = cwb_ready ? cwb_cmd : pcq_cmd;

  function automatic logic src_local(input logic [31:0] a);
    return a[31:28] == RGN_DATA && addr_node(a) == NODE_ID;
  endfunction

  function automatic logic [7:0] seg_words(input logic [15:0] bytes);
    logic [15:0] w;
    w = (bytes + 16'd3) >> 2;
    return (w > 16'(MAXW)) ? 8'(MAXW) : w[7:0];
  endfunction

  // flit being offered
  always_comb begin
    cur = '{data: '0, last: 1'b0};
    unique case (st_q)
      S_HDR: cur.data = mk_header(pay_q == P_READ ? PT_READ : PT_WRITE,
                                  addr_port(dst_q), PORT_W'(NODE_ID), seg_q);
      S_DST: cur.data = dst_q;
      S_ACK: cur.data = ack_q;
      S_PAY: unique case (pay_q)
        P_REGS: cur.data = regs_q[idx_q[2:0]];
        P_MEM:  cur.data = src_q[2] ? buf_q[63:32] : buf_q[31:0];
        P_READ: cur.data = (idx_q == 0) ? ret_q : 32'(rsize_q);
        default: ;
      endcase
      S_CRC: begin cur.data = crc_q; cur.last = 1'b1; end
      default: ;
    endcase
  end

  logic pay_ok;
  assign pay_ok    = (pay_q != P_MEM) || buf_v_q;
  assign out_valid = (st_q inside {S_HDR, S_DST, S_ACK, S_CRC}) || (st_q == S_PAY && pay_ok);
  assign out_data  = cur;
  assign fire      = out_valid && out_ready;

  // memory port: payload fetch or descriptor update
  always_comb begin
    d_req = 1'b0; d_we = 1'b0; d_addr = '0; d_wdata = '0; d_be = '0;
    if (st_q == S_PAY && pay_q == P_MEM && !buf_v_q && !rd_out_q) begin
      d_req = 1'b1; d_addr = sp_daddr(src_q);
    end else if (st_q == S_DESC) begin
      d_req = 1'b1; d_we = 1'b1; d_addr = sp_daddr(desc_q);
      d_be = desc_q[2] ? 8'hF0 : 8'h0F;     // word 0 of the descriptor := 0
    end
  end

  assign ev_pkt = fire && cur.last;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st_q <= S_IDLE; pay_q <= P_REGS; dst_q <= '0; ack_q <= '0; src_q <= '0; rem_q <= '0;
      seg_q <= '0; idx_q <= '0; regs_q <= '0; ret_q <= '0; rsize_q <= '0; fill_q <= 1'b0;
      fill_addr_q <= '0; fill_line_q <= '0; desc_q <= '0; crc_q <= '1; buf_q <= '0;
      buf_v_q <= 1'b0; rd_out_q <= 1'b0; ev_segment <= 1'b0; ev_src <= '0;
    end else begin
      ev_segment <= 1'b0; ev_src <= '0;
      if (d_req && d_gnt && !d_we) rd_out_q <= 1'b1;
      if (d_rvalid) begin buf_q <= d_rdata; buf_v_q <= 1'b1; rd_out_q <= 1'b0; end

      unique case (st_q)
        S_IDLE: begin
          crc_q <= '1; idx_q <= '0; buf_v_q <= 1'b0; fill_q <= 1'b0; desc_q <= '0;
          if (cc_ready) begin
            ev_src <= 3'd1;
            fill_addr_q <= cc_req.fill_addr;
            fill_line_q <= cc_req.line;
            if (cc_req.op == CC_FILL) begin
              pay_q <= P_READ; dst_q <= cc_req.fill_addr; ack_q <= '0;
              ret_q <= cc_req.line; rsize_q <= 16'(LINE_WORDS*4); seg_q <= 8'd2;
            end else begin
              pay_q <= P_MEM; dst_q <= cc_req.wb_addr; ack_q <= '0; src_q <= cc_req.line;
              rem_q <= 16'(LINE_WORDS*4); seg_q <= 8'(LINE_WORDS);
              fill_q <= (cc_req.op == CC_WB_FILL);
            end
            st_q <= S_HDR;
          end else if (ack_ready) begin
            ev_src <= 3'd2;
            pay_q <= P_REGS; dst_q <= ack_req.addr; ack_q <= '0;
            regs_q[0] <= ack_req.value; seg_q <= 8'd1; st_q <= S_HDR;
          end else if (rs_ready) begin
            ev_src <= 3'd3;
            pay_q <= P_REGS; dst_q <= rs_req.addr; ack_q <= '0;
            regs_q <= rs_req.data; seg_q <= 8'(rs_req.nwords); st_q <= S_HDR;
          end else if (cmd_take) begin
            ev_src <= cwb_ready ? 3'd4 : 3'd5;
            dst_q <= cmd.dst; ack_q <= cmd.ack; desc_q <= cmd.desc;
            if (cmd.op == OP_MSG) begin
              pay_q <= P_REGS;
              regs_q <= {96'h0, cmd.msg};
              seg_q <= (seg_words(cmd.size) > 8'd5) ? 8'd5 : seg_words(cmd.size);
            end else if (src_local(cmd.src)) begin
              pay_q <= P_MEM; src_q <= cmd.src; rem_q <= cmd.size; seg_q <= seg_words(cmd.size);
            end else begin
              pay_q <= P_READ; ret_q <= cmd.dst; rsize_q <= cmd.size; seg_q <= 8'd2;
              dst_q <= cmd.src;
            end
            st_q <= S_HDR;
          end
        end
        S_HDR: if (fire) begin crc_q <= crc_n; st_q <= S_DST; end
        S_DST: if (fire) begin crc_q <= crc_n; st_q <= S_ACK; end
        S_ACK: if (fire) begin crc_q <= crc_n; st_q <= (seg_q == 0) ? S_CRC : S_PAY; end
        S_PAY: if (fire) begin
          crc_q <= crc_n;
          idx_q <= idx_q + 1'b1;
          if (pay_q == P_MEM) begin
            src_q <= src_q + 32'd4;
            if (src_q[2]) buf_v_q <= 1'b0;
          end
          if (idx_q + 1'b1 == seg_q) st_q <= S_CRC;
        end
        S_CRC: if (fire) begin
          crc_q <= '1; idx_q <= '0;
          st_q <= S_NEXT;
        end
        S_NEXT: begin
          buf_v_q <= 1'b0;
          if (pay_q == P_MEM && rem_q > 16'({seg_q, 2'b00})) begin
            // next segment of the same transfer
            rem_q <= rem_q - 16'({seg_q, 2'b00});
            dst_q <= dst_q + 32'({seg_q, 2'b00});
            seg_q <= seg_words(rem_q - 16'({seg_q, 2'b00}));
            ev_segment <= 1'b1;
            st_q <= S_HDR;
          end else if (fill_q) begin
            fill_q <= 1'b0;
            pay_q <= P_READ; dst_q <= fill_addr_q; ack_q <= '0; ret_q <= fill_line_q;
            rsize_q <= 16'(LINE_WORDS*4); seg_q <= 8'd2;
            st_q <= S_HDR;
          end else if (desc_q != 0) st_q <= S_DESC;
          else st_q <= S_IDLE;
        end
        S_DESC: if (d_gnt) st_q <= S_IDLE;
        default: st_q <= S_IDLE;
      endcase
    end
endmodule

// tile: one node of the chip multiprocessor without its processor.
//
// The processor's data bus enters the L1 front end, which is looked up in
// parallel with the Address Region Table (static address map) and the L2 way
// predictor. Behind it the L2 controller drives the shared L2 tag and data
// arrays, which are at the same time the cache, the scratchpad, the NI
// command buffers, counters and queues. The integrated NI consists of the
// completion monitor with its command write buffer, the remote-store buffer,
// the outgoing engine, the incoming engine, an acknowledgement queue and the
// pending command (read service) queue. Outgoing packets cross into the NoC
// clock through a 4 KB asynchronous FIFO; incoming flits cross back through a
// small asynchronous FIFO into the store-and-forward packet buffer that checks
// the CRC. L2 array masters: incoming NI (highest), L2 controller, outgoing NI.
// The partition follows the prototype's tile; queue depths are this design's.
module tile
  import ccsp_pkg::*;
#(
  parameter logic [NODE_W-1:0] NODE_ID  = '0,
  parameter int unsigned       OFIFO_DEPTH = 1024,   // 4 KB outgoing NoC buffer
  parameter int unsigned       IFIFO_DEPTH = 1024    // incoming packet buffer
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clk_noc,
  input  logic        rst_noc_n,
  // processor data bus
  input  logic        cpu_req,
  input  logic        cpu_we,
  input  logic [31:0] cpu_addr,
  input  logic [31:0] cpu_wdata,
  input  logic [3:0]  cpu_be,
  output logic        cpu_ack,
  output logic [31:0] cpu_rdata,
  output logic        cpu_err,
  output logic        init_busy,      // L2 tags being cleared after reset
  // NoC (clk_noc domain)
  output logic        noc_out_valid,
  input  logic        noc_out_ready,
  output flit_t       noc_out_data,
  input  logic        noc_in_valid,
  output logic        noc_in_ready,
  input  flit_t       noc_in_data,
  output tile_ev_t    ev
);
  // ---------------------------------------------------------- front end
  acc_class_e cls;
  logic [L2_WAYS-1:0] wp_mask;
  art #(.NODE_ID(NODE_ID)) u_art (
    .addr(cpu_addr), .cls(cls), .local_node(), .port(), .perm_ok());

  logic wp_upd, wp_valid;
  logic [SET_W-1:0] wp_set;
  logic [1:0] wp_way;
  logic [L2_TAG_W-1:0] wp_tag;
  way_pred u_wp (
    .clk, .rst_n, .addr(cpu_addr), .way_mask(wp_mask),
    .upd_en(wp_upd), .upd_valid(wp_valid), .upd_set(wp_set), .upd_way(wp_way), .upd_tag(wp_tag));

  logic l2_valid, l2_ready, l2_rsp_valid, l2_beat_valid;
  l2_op_e l2_op;
  logic [31:0] l2_addr, l2_wdata, l2_rsp_data;
  logic [3:0] l2_be;
  logic [L2_WAYS-1:0] l2_mask;
  logic [1:0] l2_beat_idx;
  logic [63:0] l2_beat_data;
  logic rs_in_valid, rs_in_ready;
  logic [31:0] rs_in_addr, rs_in_data;
  l1_cache u_l1 (
    .clk, .rst_n, .cpu_req(cpu_req && !init_busy), .cpu_we, .cpu_addr, .cpu_wdata, .cpu_be,
    .cpu_ack, .cpu_rdata, .cpu_err, .cls, .wp_mask,
    .l2_valid, .l2_ready, .l2_op, .l2_addr, .l2_wdata, .l2_be, .l2_mask,
    .l2_rsp_valid, .l2_rsp_data, .l2_beat_valid, .l2_beat_idx, .l2_beat_data,
    .rs_valid(rs_in_valid), .rs_ready(rs_in_ready), .rs_addr(rs_in_addr), .rs_data(rs_in_data),
    .ev_l1_hit(ev.l1_hit), .ev_l1_miss(ev.l1_miss));

  // ---------------------------------------------------------- L2 arrays
  logic [2:0] d_req, d_we, d_gnt, d_rvalid, t_req, t_we, t_gnt, t_rvalid;
  logic [2:0][DADDR_W-1:0] d_addr;
  logic [2:0][63:0] d_wdata;
  logic [2:0][7:0]  d_be;
  logic [63:0] d_rdata;
  logic [2:0][TADDR_W-1:0] t_addr;
  l2_tag_t [2:0] t_wdata;
  l2_tag_t t_rdata;
  l2_mem u_mem (
    .clk, .rst_n, .d_req, .d_we, .d_addr, .d_wdata, .d_be, .d_gnt, .d_rvalid, .d_rdata,
    .t_req, .t_we, .t_addr, .t_wdata, .t_gnt, .t_rvalid, .t_rdata, .init_busy);
  // the outgoing NI has no tag master
  assign t_req[2] = 1'b0; assign t_we[2] = 1'b0; assign t_addr[2] = '0; assign t_wdata[2] = '0;

  // ---------------------------------------------------------- L2 controller
  logic cc_valid, cc_ready, fill_done;
  cc_req_t cc_req;
  logic mon_valid, mon_ready;
  logic [31:0] mon_addr, mon_data;
  l2_ctrl #(.NODE_ID(NODE_ID)) u_l2 (
    .clk, .rst_n,
    .req_valid(l2_valid), .req_ready(l2_ready), .req_op(l2_op), .req_addr(l2_addr),
    .req_wdata(l2_wdata), .req_be(l2_be), .req_mask(l2_mask),
    .rsp_valid(l2_rsp_valid), .rsp_data(l2_rsp_data), .beat_valid(l2_beat_valid),
    .beat_idx(l2_beat_idx), .beat_data(l2_beat_data), .no_way_err(),
    .d_req(d_req[1]), .d_we(d_we[1]), .d_addr(d_addr[1]), .d_wdata(d_wdata[1]), .d_be(d_be[1]),
    .d_gnt(d_gnt[1]), .d_rvalid(d_rvalid[1]), .d_rdata,
    .t_req(t_req[1]), .t_we(t_we[1]), .t_addr(t_addr[1]), .t_wdata(t_wdata[1]),
    .t_gnt(t_gnt[1]), .t_rvalid(t_rvalid[1]), .t_rdata,
    .wp_upd, .wp_valid, .wp_set, .wp_way, .wp_tag,
    .cc_valid, .cc_ready, .cc_req, .fill_done,
    .mon_valid, .mon_ready, .mon_addr, .mon_data,
    .ev_hit(ev.l2_hit), .ev_miss(ev.l2_miss), .ev_hit_under_miss(ev.l2_hit_under_miss),
    .ev_bypass(ev.l2_bypass));

  // ---------------------------------------------------------- NI
  logic cwb_valid, cwb_ready;
  ni_cmd_t cwb_cmd;
  cmd_monitor u_mon (
    .clk, .rst_n, .st_valid(mon_valid), .st_ready(mon_ready), .st_addr(mon_addr),
    .st_data(mon_data), .cmd_valid(cwb_valid), .cmd_ready(cwb_ready), .cmd(cwb_cmd));

  logic rs_valid, rs_ready;
  rstore_t rs_req;
  rs_buf u_rs (
    .clk, .rst_n, .in_valid(rs_in_valid), .in_ready(rs_in_ready), .in_addr(rs_in_addr),
    .in_data(rs_in_data), .out_valid(rs_valid), .out_ready(rs_ready), .out_data(rs_req),
    .ev_coalesce(ev.rs_coalesce));

  logic aq_in_valid, aq_in_ready, aq_valid, aq_ready;
  ack_req_t aq_in, aq_out;
  sync_fifo #(.T(ack_req_t), .DEPTH(4)) u_ackq (
    .clk, .rst_n, .in_valid(aq_in_valid), .in_ready(aq_in_ready), .in_data(aq_in),
    .out_valid(aq_valid), .out_ready(aq_ready), .out_data(aq_out), .count());

  logic rsq_in_valid, rsq_in_ready, pcq_valid, pcq_ready;
  ni_cmd_t rsq_in, pcq_cmd;
  sync_fifo #(.T(ni_cmd_t), .DEPTH(4)) u_pcq (
    .clk, .rst_n, .in_valid(rsq_in_valid), .in_ready(rsq_in_ready), .in_data(rsq_in),
    .out_valid(pcq_valid), .out_ready(pcq_ready), .out_data(pcq_cmd), .count());

  logic of_valid, of_ready;
  flit_t of_data;
  logic [2:0] ev_src;
  out_ni #(.NODE_ID(NODE_ID)) u_out (
    .clk, .rst_n,
    .cc_valid, .cc_ready, .cc_req,
    .ack_valid(aq_valid), .ack_ready(aq_ready), .ack_req(aq_out),
    .rs_valid, .rs_ready, .rs_req,
    .cwb_valid, .cwb_ready, .cwb_cmd,
    .pcq_valid, .pcq_ready, .pcq_cmd,
    .d_req(d_req[2]), .d_we(d_we[2]), .d_addr(d_addr[2]), .d_wdata(d_wdata[2]), .d_be(d_be[2]),
    .d_gnt(d_gnt[2]), .d_rvalid(d_rvalid[2]), .d_rdata,
    .out_valid(of_valid), .out_ready(of_ready), .out_data(of_data),
    .ev_pkt(ev.pkt_out), .ev_segment(ev.segment), .ev_src);
  assign ev.src_cache  = (ev_src == 3'd1);
  assign ev.src_ack    = (ev_src == 3'd2);
  assign ev.src_rstore = (ev_src == 3'd3);
  assign ev.src_cwb    = (ev_src == 3'd4);
  assign ev.src_pcq    = (ev_src == 3'd5);

  async_fifo #(.DEPTH(OFIFO_DEPTH)) u_ofifo (
    .wclk(clk), .wrst_n(rst_n), .in_valid(of_valid), .in_ready(of_ready), .in_data(of_data),
    .rclk(clk_noc), .rrst_n(rst_noc_n), .out_valid(noc_out_valid), .out_ready(noc_out_ready),
    .out_data(noc_out_data));

  logic ix_valid, ix_ready, ip_valid, ip_ready;
  flit_t ix_data, ip_data;
  async_fifo #(.DEPTH(16)) u_ififo (
    .wclk(clk_noc), .wrst_n(rst_noc_n), .in_valid(noc_in_valid), .in_ready(noc_in_ready),
    .in_data(noc_in_data), .rclk(clk), .rrst_n(rst_n), .out_valid(ix_valid),
    .out_ready(ix_ready), .out_data(ix_data));

  pkt_rx #(.DEPTH(IFIFO_DEPTH)) u_rx (
    .clk, .rst_n, .in_valid(ix_valid), .in_ready(ix_ready), .in_data(ix_data),
    .out_valid(ip_valid), .out_ready(ip_ready), .out_data(ip_data), .crc_err(ev.crc_drop));

  in_ni u_in (
    .clk, .rst_n, .in_valid(ip_valid), .in_ready(ip_ready), .in_data(ip_data),
    .d_req(d_req[0]), .d_we(d_we[0]), .d_addr(d_addr[0]), .d_wdata(d_wdata[0]), .d_be(d_be[0]),
    .d_gnt(d_gnt[0]), .d_rvalid(d_rvalid[0]), .d_rdata,
    .t_req(t_req[0]), .t_we(t_we[0]), .t_addr(t_addr[0]), .t_wdata(t_wdata[0]),
    .t_gnt(t_gnt[0]), .t_rvalid(t_rvalid[0]), .t_rdata,
    .ack_valid(aq_in_valid), .ack_ready(aq_in_ready), .ack_req(aq_in),
    .rsq_valid(rsq_in_valid), .rsq_ready(rsq_in_ready), .rsq_cmd(rsq_in),
    .fill_done,
    .ev_fill(ev.fill), .ev_sp(ev.sp_write), .ev_counter(ev.counter), .ev_notify(ev.notify),
    .ev_enq(ev.enqueue), .ev_qfull(ev.queue_full), .ev_read(ev.read_req));
endmodule

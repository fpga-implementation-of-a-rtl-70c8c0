// l2_ctrl: controller of the configurable L2 cache / scratchpad of one tile.
//
// The 64 KB, 4-way, write-back L2 serves four kinds of processor access:
//  * cacheable line reads (L1 misses) and cacheable writes (L1 write-through):
//    only the ways flagged by the way predictor are probed, one tag per cycle,
//    in increasing way order. A hit returns the line as 4 beats of 64 bits or
//    writes the word and sets the dirty bit. An empty mask, or no matching
//    tag, is a miss: the four tags of the set are read, a victim is chosen
//    among the unlocked ways (an invalid one first, else round robin), its
//    tag is set to "pending" with the new address, the way predictor learns
//    the new signature, and the NI cache-transfer registers are loaded with a
//    fill or a write-back-and-fill. The incoming NI reports the fill
//    (fill_done) and the access is retried.
//  * scratchpad reads and writes: the address names way and line directly.
//    A write to a line whose tag marks it as an NI command buffer is also
//    passed to the completion monitor.
//  * tag reads and writes: software sets lock bits and line states this way.
// Writes (cacheable and scratchpad) are accepted into a single-entry
// deferred-write buffer and acknowledged at once; reads are served ahead of
// the buffered write and take its data where they overlap (bypass). A write
// miss of the buffer releases the controller while the fill is outstanding,
// so later accesses that hit are served under that single miss; a second
// miss waits for the first fill.
// The access mix, way prediction use, write-back policy, deferred-write
// buffer and hit-under-miss follow the prototype; the victim policy, write
// allocation and the exact state sequencing are this design's choices.
// Interface: req_valid/req_ready handshake from the front end; reads answer
// with rsp_valid (+ beat_valid for each 64-bit beat of a line read).
module l2_ctrl
  import ccsp_pkg::*;
#(
  parameter logic [NODE_W-1:0] NODE_ID = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  // front end
  input  logic              req_valid,
  output logic              req_ready,
  input  l2_op_e            req_op,
  input  logic [31:0]       req_addr,
  input  logic [31:0]       req_wdata,
  input  logic [3:0]        req_be,
  input  logic [L2_WAYS-1:0] req_mask,
  output logic              rsp_valid,
  output logic [31:0]       rsp_data,
  output logic              beat_valid,
  output logic [1:0]        beat_idx,
  output logic [63:0]       beat_data,
  output logic              no_way_err,   // cacheable access with every way locked
  // data array master
  output logic              d_req,
  output logic              d_we,
  output logic [DADDR_W-1:0] d_addr,
  output logic [63:0]       d_wdata,
  output logic [7:0]        d_be,
  input  logic              d_gnt,
  input  logic              d_rvalid,
  input  logic [63:0]       d_rdata,
  // tag array master
  output logic              t_req,
  output logic              t_we,
  output logic [TADDR_W-1:0] t_addr,
  output l2_tag_t           t_wdata,
  input  logic              t_gnt,
  input  logic              t_rvalid,
  input  l2_tag_t           t_rdata,
  // way predictor update
  output logic              wp_upd,
  output logic              wp_valid,
  output logic [SET_W-1:0]  wp_set,
  output logic [1:0]        wp_way,
  output logic [L2_TAG_W-1:0] wp_tag,
  // NI cache-transfer registers
  output logic              cc_valid,
  input  logic              cc_ready,
  output cc_req_t           cc_req,
  input  logic              fill_done,
  // completion monitor
  output logic              mon_valid,
  input  logic              mon_ready,
  output logic [31:0]       mon_addr,
  output logic [31:0]       mon_data,
  // event counters' strobes
  output logic              ev_hit,
  output logic              ev_miss,
  output logic              ev_hit_under_miss,
  output logic              ev_bypass
);
  typedef enum logic [3:0] {
    S_IDLE, S_PROBE, S_PCMP, S_LINE, S_WRHIT, S_WRTAG, S_VICT, S_ALLOC, S_CCREQ,
    S_WAITFILL, S_SPRD, S_SPW_TAG, S_SPW_DATA, S_TAGRD, S_TAGWR, S_DONE
  } st_e;

  typedef struct packed {
    l2_op_e             op;
    logic [31:0]        addr;
    logic [31:0]        wdata;
    logic [3:0]         be;
    logic [L2_WAYS-1:0] mask;
  } op_t;

  st_e  st_q;
  op_t  cur_q;          // access being served
  logic cur_dwb_q;      // it is the deferred write
  op_t  dwb_q;          // deferred-write buffer
  logic dwb_v_q, dwb_wait_q;
  logic miss_busy_q;
  logic [1:0] way_q;
  logic [2:0] k_q;      // beat / tag counter
  logic [2:0] rcv_q;
  l2_tag_t [L2_WAYS-1:0] vt_q;   // tags read for the victim choice
  logic [1:0] rr_q;
  l2_tag_t    tag_q;
  logic       mon_done_q;

  logic [SET_W-1:0]    set;
  logic [L2_TAG_W-1:0] atag;
  assign set  = cur_q.addr[13:5];
  assign atag = cur_q.addr[27:14];

  // front-end acceptance
  logic is_wr, take_req, start_dwb;
  assign is_wr     = (req_op == L2_WR) || (req_op == L2_SPWR);
  // bypass: scratchpad read of the exact word held (whole word) in the buffer
  logic sp_bypass;
  assign sp_bypass = (req_op == L2_SPRD) && dwb_v_q && dwb_q.op == L2_SPWR &&
                     dwb_q.addr[31:2] == req_addr[31:2] && dwb_q.be == 4'hF;
  // a read that overlaps a partial buffered scratchpad word waits for the drain
  logic sp_conflict;
  assign sp_conflict = (req_op == L2_SPRD) && dwb_v_q && dwb_q.op == L2_SPWR &&
                       dwb_q.addr[31:3] == req_addr[31:3] && !sp_bypass;
  always_comb begin
    req_ready = 1'b0;
    if (is_wr)                req_ready = !dwb_v_q;
    else if (st_q == S_IDLE)  req_ready = !sp_conflict;
  end
  assign take_req  = req_valid && req_ready && !is_wr;
  assign start_dwb = (st_q == S_IDLE) && !(req_valid && !is_wr && !sp_conflict) &&
                     dwb_v_q && !dwb_wait_q;

  // victim choice from vt_q
  logic [1:0] victim;
  logic       victim_ok;
  always_comb begin
    logic [1:0] c;
    c = '0;
    victim = '0; victim_ok = 1'b0;
    for (int w = L2_WAYS-1; w >= 0; w--)
      if (!vt_q[w].lock && !vt_q[w].pending && !vt_q[w].valid) begin victim = 2'(w); victim_ok = 1'b1; end
    if (!victim_ok)
      for (int k = L2_WAYS; k >= 1; k--) begin
        c = 2'(int'(rr_q) + k);
        if (!vt_q[c].lock && !vt_q[c].pending) begin victim = c; victim_ok = 1'b1; end
      end
  end

  // lowest way left in the probe mask
  logic [1:0] pway;
  logic       pany;
  always_comb begin
    pway = '0; pany = 1'b0;
    for (int w = L2_WAYS-1; w >= 0; w--) if (cur_q.mask[w]) begin pway = 2'(w); pany = 1'b1; end
  end

  // array requests
  always_comb begin
    d_req = 1'b0; d_we = 1'b0; d_addr = '0; d_wdata = '0; d_be = '0;
    t_req = 1'b0; t_we = 1'b0; t_addr = '0; t_wdata = '0;
    unique case (st_q)
      S_PROBE: if (pany) begin t_req = 1'b1; t_addr = {pway, set}; end
      S_LINE:  if (k_q < 3'd4) begin d_req = 1'b1; d_addr = {way_q, set, k_q[1:0]}; end
      S_WRHIT: begin
        d_req = 1'b1; d_we = 1'b1; d_addr = {way_q, set, cur_q.addr[4:3]};
        d_wdata = {2{cur_q.wdata}};
        d_be = cur_q.addr[2] ? {cur_q.be, 4'h0} : {4'h0, cur_q.be};
      end
      S_WRTAG: begin
        t_req = 1'b1; t_we = 1'b1; t_addr = {way_q, set};
        t_wdata = tag_q; t_wdata.dirty = 1'b1;
      end
      S_VICT:  if (k_q < 3'd4) begin t_req = 1'b1; t_addr = {k_q[1:0], set}; end
      S_ALLOC: if (victim_ok) begin
        t_req = 1'b1; t_we = 1'b1; t_addr = {victim, set};
        t_wdata = '{valid: 1'b0, dirty: 1'b0, lock: 1'b0, pending: 1'b1, state: LS_PLAIN, tag: atag};
      end
      S_SPRD:  if (k_q == 0) begin d_req = 1'b1; d_addr = sp_daddr(cur_q.addr); end
      S_SPW_TAG: if (k_q == 0) begin t_req = 1'b1; t_addr = sp_taddr(cur_q.addr); end
      S_SPW_DATA: begin
        // the data write happens together with (or after) the monitor hand-off
        d_req = (mon_done_q || !(tag_q.lock && tag_q.state == LS_CMD)) ? 1'b1 : mon_ready;
        d_we = 1'b1; d_addr = sp_daddr(cur_q.addr);
        d_wdata = {2{cur_q.wdata}};
        d_be = cur_q.addr[2] ? {cur_q.be, 4'h0} : {4'h0, cur_q.be};
      end
      S_TAGRD: if (k_q == 0) begin t_req = 1'b1; t_addr = sp_taddr(cur_q.addr); end
      S_TAGWR: begin
        t_req = 1'b1; t_we = 1'b1; t_addr = sp_taddr(cur_q.addr); t_wdata = l2_tag_t'(cur_q.wdata[19:0]);
      end
      default: ;
    endcase
  end

  assign mon_valid = (st_q == S_SPW_DATA) && tag_q.lock && tag_q.state == LS_CMD && !mon_done_q;
  assign mon_addr  = cur_q.addr;
  assign mon_data  = cur_q.wdata;

  assign cc_valid = (st_q == S_CCREQ);
  always_comb begin
    cc_req.op        = vt_q[way_q].valid && vt_q[way_q].dirty ? CC_WB_FILL : CC_FILL;
    cc_req.line      = line_addr(NODE_ID, way_q, set);
    cc_req.wb_addr   = {RGN_DRAM, vt_q[way_q].tag, set, 5'b0};
    cc_req.fill_addr = {RGN_DRAM, atag, set, 5'b0};
  end

  // way predictor update: on allocation, and on tag writes by software
  always_comb begin
    wp_upd = 1'b0; wp_valid = 1'b0; wp_set = set; wp_way = way_q; wp_tag = atag;
    if (st_q == S_ALLOC && t_gnt) begin wp_upd = 1'b1; wp_valid = 1'b1; wp_way = victim; end
    if (st_q == S_TAGWR && t_gnt) begin
      wp_upd = 1'b1; wp_way = cur_q.addr[15:14];
      wp_tag = cur_q.wdata[13:0];
      wp_valid = cur_q.wdata[19] && !cur_q.wdata[17];   // valid and not locked
    end
  end

  // beat output with bypass from the deferred-write buffer
  logic [63:0] merged;
  logic        merge_hit;
  always_comb begin
    merged = d_rdata;
    merge_hit = dwb_v_q && dwb_q.op == L2_WR && dwb_q.addr[27:5] == cur_q.addr[27:5] &&
                dwb_q.addr[4:3] == rcv_q[1:0];
    if (merge_hit)
      for (int b = 0; b < 4; b++)
        if (dwb_q.be[b]) merged[(dwb_q.addr[2] ? 32 : 0) + 8*b +: 8] = dwb_q.wdata[8*b +: 8];
  end
  assign beat_valid = (st_q == S_LINE) && d_rvalid;
  assign beat_idx   = rcv_q[1:0];
  assign beat_data  = merged;

  assign ev_bypass = (beat_valid && merge_hit) || (take_req && sp_bypass);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st_q <= S_IDLE; cur_q <= '0; cur_dwb_q <= 1'b0; dwb_q <= '0; dwb_v_q <= 1'b0;
      dwb_wait_q <= 1'b0; miss_busy_q <= 1'b0; way_q <= '0; k_q <= '0; rcv_q <= '0;
      vt_q <= '0; rr_q <= '0; tag_q <= '0; mon_done_q <= 1'b0;
      rsp_valid <= 1'b0; rsp_data <= '0; no_way_err <= 1'b0;
      ev_hit <= 1'b0; ev_miss <= 1'b0; ev_hit_under_miss <= 1'b0;
    end else begin
      rsp_valid <= 1'b0; no_way_err <= 1'b0;
      ev_hit <= 1'b0; ev_miss <= 1'b0; ev_hit_under_miss <= 1'b0;

      // deferred-write buffer fill
      if (req_valid && req_ready && is_wr) begin
        dwb_v_q <= 1'b1;
        dwb_q   <= '{op: req_op, addr: req_addr, wdata: req_wdata, be: req_be, mask: req_mask};
      end
      if (fill_done) begin
        miss_busy_q <= 1'b0;
        dwb_wait_q  <= 1'b0;
      end

      unique case (st_q)
        S_IDLE: begin
          k_q <= '0; rcv_q <= '0; mon_done_q <= 1'b0;
          if (take_req) begin
            cur_q <= '{op: req_op, addr: req_addr, wdata: req_wdata, be: req_be, mask: req_mask};
            cur_dwb_q <= 1'b0;
            unique case (req_op)
              L2_RDLINE: st_q <= S_PROBE;
              L2_SPRD:   if (sp_bypass) begin
                           rsp_valid <= 1'b1; rsp_data <= dwb_q.wdata;
                         end else st_q <= S_SPRD;
              L2_TAGRD:  st_q <= S_TAGRD;
              L2_TAGWR:  st_q <= S_TAGWR;
              default:   ;
            endcase
          end else if (start_dwb) begin
            cur_q <= dwb_q;
            cur_dwb_q <= 1'b1;
            st_q <= (dwb_q.op == L2_WR) ? S_PROBE : S_SPW_TAG;
          end
        end

        S_PROBE: if (!pany) st_q <= S_VICT;
                 else if (t_gnt) begin way_q <= pway; st_q <= S_PCMP; end
        S_PCMP: if (t_rvalid) begin
          if (t_rdata.valid && !t_rdata.lock && !t_rdata.pending && t_rdata.tag == atag) begin
            ev_hit <= 1'b1;
            ev_hit_under_miss <= miss_busy_q;
            tag_q <= t_rdata;
            st_q  <= (cur_q.op == L2_RDLINE) ? S_LINE : S_WRHIT;
          end else begin
            cur_q.mask[way_q] <= 1'b0;
            st_q <= S_PROBE;
          end
        end

        S_LINE: begin
          if (d_gnt) k_q <= k_q + 1'b1;
          if (d_rvalid) begin
            rcv_q <= rcv_q + 1'b1;
            if (rcv_q == 3'd3) begin rsp_valid <= 1'b1; st_q <= S_DONE; end
          end
        end
        S_WRHIT: if (d_gnt) st_q <= S_WRTAG;
        S_WRTAG: if (t_gnt) begin
          dwb_v_q <= 1'b0;
          st_q <= S_DONE;
        end

        S_VICT: begin
          if (miss_busy_q) begin
            // a single miss at a time: a read waits here, a write goes back to the buffer
            // (the retry probes every way: the mask may predate the other allocation)
            if (cur_dwb_q) begin dwb_wait_q <= 1'b1; dwb_q.mask <= '1; st_q <= S_IDLE; end
            else begin cur_q.mask <= '1; st_q <= S_WAITFILL; end
          end else begin
            if (t_gnt) k_q <= k_q + 1'b1;
            if (t_rvalid) begin
              vt_q[rcv_q[1:0]] <= t_rdata;
              rcv_q <= rcv_q + 1'b1;
              if (rcv_q == 3'd3) st_q <= S_ALLOC;
            end
          end
        end
        S_ALLOC: begin
          if (!victim_ok) begin
            // every way is pinned as scratchpad: nothing can be cached
            no_way_err <= 1'b1;
            if (cur_dwb_q) dwb_v_q <= 1'b0;
            else begin rsp_valid <= 1'b1; rsp_data <= '0; end
            st_q <= S_DONE;
          end else begin
            if (t_gnt) begin
              way_q <= victim;
              rr_q <= victim;
              ev_miss <= 1'b1;
              st_q <= S_CCREQ;
            end
          end
        end
        S_CCREQ: if (cc_ready) begin
          miss_busy_q <= 1'b1;
          cur_q.mask  <= L2_WAYS'(1) << way_q;   // retry where the line will land
          if (cur_dwb_q) begin
            dwb_q.mask <= L2_WAYS'(1) << way_q;
            dwb_wait_q <= 1'b1;
            st_q <= S_IDLE;
          end else st_q <= S_WAITFILL;
        end
        S_WAITFILL: if (fill_done || !miss_busy_q) begin
          k_q <= '0; rcv_q <= '0;
          st_q <= S_PROBE;
        end

        S_SPRD: begin
          if (d_gnt) k_q <= 3'd1;
          if (d_rvalid) begin
            rsp_valid <= 1'b1;
            rsp_data  <= cur_q.addr[2] ? d_rdata[63:32] : d_rdata[31:0];
            st_q <= S_DONE;
          end
        end
        S_SPW_TAG: begin
          if (t_gnt) k_q <= 3'd1;
          if (t_rvalid) begin tag_q <= t_rdata; st_q <= S_SPW_DATA; end
        end
        S_SPW_DATA: begin
          if (mon_valid && mon_ready) mon_done_q <= 1'b1;
          if (d_req && d_gnt) begin dwb_v_q <= 1'b0; st_q <= S_DONE; end
        end
        S_TAGRD: begin
          if (t_gnt) k_q <= 3'd1;
          if (t_rvalid) begin
            rsp_valid <= 1'b1; rsp_data <= 32'(t_rdata); st_q <= S_DONE;
          end
        end
        S_TAGWR: if (t_gnt) begin rsp_valid <= 1'b1; rsp_data <= '0; st_q <= S_DONE; end
        S_DONE: st_q <= S_IDLE;
        default: st_q <= S_IDLE;
      endcase
    end
endmodule

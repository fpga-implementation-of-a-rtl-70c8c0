// ddr_model: behavioural model of the DRAM controller node on crossbar port 4.
//
// Not synthesizable RTL: it stands in for the DDR2 controller and its memory
// in testbenches. It receives whole packets, checks their CRC, stores WRITE
// payloads in a sparse memory and answers every READ request with WRITE
// packets (at most 256 bytes each) to the return address, carrying the
// request's acknowledgement address. Untouched memory reads as
// init_word(address). A fixed service delay models the DRAM access.
module ddr_model
  import ccsp_pkg::*;
#(
  parameter int unsigned DELAY = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  flit_t in_data,
  output logic  out_valid,
  input  logic  out_ready,
  output flit_t out_data,
  output int    n_reads,
  output int    n_writes,
  output int    n_crc_err
);
  logic [31:0] mem [int unsigned];

  function automatic logic [31:0] init_word(input logic [31:0] a);
    return {a[15:0], ~a[15:0]} ^ 32'h5A00_00A5;
  endfunction

  function automatic logic [31:0] rd(input logic [31:0] a);
    return mem.exists(a) ? mem[a] : init_word(a);
  endfunction

  // bit-serial CRC-32 written independently of the RTL
  function automatic logic [31:0] crc_word(input logic [31:0] c, input logic [31:0] d);
    for (int i = 31; i >= 0; i--) begin
      logic fb;
      fb = c[31] ^ d[i];
      c = {c[30:0], 1'b0};
      if (fb) c = c ^ 32'h04C11DB7;
    end
    return c;
  endfunction

  logic [31:0] rxq [$];
  logic [32:0] txw [$];   // words to send, bit 32 marks the last

  initial begin n_reads = 0; n_writes = 0; n_crc_err = 0; end
  assign in_ready = 1'b1;

  task automatic send_packet(input logic [31:0] hdr, input logic [31:0] dst, input logic [31:0] ack,
                             input logic [31:0] src, input int nw);
    logic [31:0] cc;
    logic [31:0] w;
    cc = 32'hFFFF_FFFF;
    for (int i = 0; i < nw + 3; i++) begin
      w = (i == 0) ? hdr : (i == 1) ? dst : (i == 2) ? ack : rd(src + 32'(4*(i-3)));
      cc = crc_word(cc, w);
      txw.push_back({1'b0, w});
    end
    txw.push_back({1'b1, cc});
  endtask

  task automatic serve(input logic [31:0] p [$]);
    logic [31:0] c, hdr, dst, ack, ret, a;
    int nw, left, seg;
    c = 32'hFFFF_FFFF;
    for (int i = 0; i < p.size() - 1; i++) c = crc_word(c, p[i]);
    if (c != p[p.size()-1]) begin n_crc_err++; return; end
    hdr = p[0]; dst = p[1]; ack = p[2]; nw = int'(hdr[23:16]);
    if (hdr[31:30] == PT_WRITE) begin
      n_writes++;
      for (int i = 0; i < nw; i++) mem[dst + 32'(4*i)] = p[3+i];
    end else begin
      n_reads++;
      ret = p[3]; left = int'(p[4]); a = dst;
      for (int d = 0; d < int'(DELAY); d++) txw.push_back(33'h1_FFFF_FFFF);
      while (left > 0) begin
        seg = (left > 256) ? 64 : (left + 3) / 4;
        send_packet({PT_WRITE, addr_port(ret), 3'(DDR_PORT), 8'(seg), 16'h0}, ret, ack, a, seg);
        ret += 32'(4*seg); a += 32'(4*seg); left -= 4*seg;
      end
    end
  endtask

  always @(posedge clk) begin
    if (!rst_n) rxq = {};
    else if (in_valid && in_ready) begin
      rxq.push_back(in_data.data);
      if (in_data.last) begin
        serve(rxq);
        rxq = {};
      end
    end
  end

  // queue a one-word WRITE packet whose CRC is wrong (receivers must drop it)
  task automatic inject_bad(input logic [31:0] dst, input logic [31:0] val);
    logic [31:0] w [$];
    logic [31:0] cc;
    w = '{{PT_WRITE, addr_port(dst), 3'(DDR_PORT), 8'd1, 16'h0}, dst, 32'h0, val};
    cc = 32'hFFFF_FFFF;
    foreach (w[i]) begin cc = crc_word(cc, w[i]); txw.push_back({1'b0, w[i]}); end
    txw.push_back({1'b1, ~cc});
  endtask

  // sender: entries equal to all ones with bit 32 set are idle cycles
  logic [32:0] e;
  always @(posedge clk) begin
    if (!rst_n) begin out_valid <= 1'b0; end
    else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if ((!out_valid || out_ready) && txw.size() > 0) begin
        e = txw.pop_front();
        if (e != 33'h1_FFFF_FFFF) begin
          out_valid <= 1'b1;
          out_data  <= '{data: e[31:0], last: e[32]};
        end
      end
    end
  end
endmodule

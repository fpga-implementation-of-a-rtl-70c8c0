// pkt_rx: incoming NoC packet buffer with store-and-forward CRC check.
//
// Flits from the network are written into a FIFO while a running CRC-32 is
// computed over every flit but the last; the last flit carries the sender's
// CRC. When it matches, the packet is committed and becomes visible on the
// output side in the following cycle; when it does not, the write pointer is
// rewound so the damaged packet vanishes, and crc_err pulses. The output side
// therefore never shows a flit of a packet that has not arrived completely,
// which is what lets the incoming NI deliver without checking. The CRC word
// is passed on as the last flit of the stored packet. Dropping bad packets is
// this design's choice; the prototype only says that the CRC is checked.
module pkt_rx
  import ccsp_pkg::*;
#(
  parameter int unsigned DEPTH = 1024  // power of two, at least one maximum packet
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  flit_t in_data,
  output logic  out_valid,
  input  logic  out_ready,
  output flit_t out_data,
  output logic  crc_err      // pulse: a packet was dropped
);
  localparam int unsigned AW = $clog2(DEPTH);
  flit_t mem [DEPTH];
  logic [AW:0]  wr_q, commit_q, rd_q;
  logic [31:0]  crc_q, crc_n;
  logic [15:0]  pkts_q;
  logic         push, pop, good;

  crc32 u_crc (.crc_in(crc_q), .data(in_data.data), .crc_out(crc_n));

  assign in_ready  = (wr_q - rd_q) < (AW+1)'(DEPTH);
  assign push      = in_valid && in_ready;
  assign out_valid = (pkts_q != 0);
  assign out_data  = mem[rd_q[AW-1:0]];
  assign pop       = out_valid && out_ready;
  assign good      = push && in_data.last && (in_data.data == crc_q);

  always_ff @(posedge clk) if (push) mem[wr_q[AW-1:0]] <= in_data;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wr_q <= '0; commit_q <= '0; rd_q <= '0; crc_q <= '1; pkts_q <= '0; crc_err <= 1'b0;
    end else begin
      crc_err <= 1'b0;
      if (push) begin
        if (!in_data.last) begin
          wr_q  <= wr_q + 1'b1;
          crc_q <= crc_n;
        end else begin
          crc_q <= '1;
          if (good) begin
            wr_q     <= wr_q + 1'b1;
            commit_q <= wr_q + 1'b1;
          end else begin
            wr_q    <= commit_q;
            crc_err <= 1'b1;
          end
        end
      end
      if (pop) rd_q <= rd_q + 1'b1;
      pkts_q <= pkts_q + (good ? 1'b1 : 1'b0) - ((pop && out_data.last) ? 1'b1 : 1'b0);
    end
endmodule

// crc32: one-word-per-cycle CRC step used to seal and check NoC packets.
//
// Combinational: crc_out is crc_in advanced over the 32 bits of data, most
// significant bit first, with the CRC-32 generator 0x04C11DB7. Senders start
// from 0xFFFFFFFF, feed every word of the packet before the CRC word, and
// send crc_out as the last word; receivers recompute and compare. The packet
// CRC is named by the prototype; the polynomial is this design's choice.
module crc32 (
  input  logic [31:0] crc_in,
  input  logic [31:0] data,
  output logic [31:0] crc_out
);
  localparam logic [31:0] POLY = 32'h04C11DB7;
  always_comb begin
    logic [31:0] c;
    c = crc_in;
    for (int i = 31; i >= 0; i--)
      c = (c[31] ^ data[i]) ? ((c << 1) ^ POLY) : (c << 1);
    crc_out = c;
  end
endmodule

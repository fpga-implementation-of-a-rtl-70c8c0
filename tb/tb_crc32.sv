// tb_crc32: compares the one-word CRC step with a bit-serial shift-register
// model over random words and over chained multi-word packets.
module tb_crc32;
  logic [31:0] crc_in, data, crc_out;
  int checks = 0, failures = 0;
  crc32 dut (.*);

  function automatic logic [31:0] ref_step(input logic [31:0] c, input logic [31:0] d);
    logic [31:0] r;
    r = c;
    for (int i = 0; i < 32; i++) begin
      logic b;
      b = r[31] ^ d[31-i];
      r = r << 1;
      r[0] = b; r[1] ^= b; r[2] ^= b; r[4] ^= b; r[5] ^= b; r[7] ^= b; r[8] ^= b;
      r[10] ^= b; r[11] ^= b; r[12] ^= b; r[16] ^= b; r[22] ^= b; r[23] ^= b; r[26] ^= b;
    end
    return r;
  endfunction

  initial begin
    for (int i = 0; i < 500; i++) begin
      crc_in = $urandom; data = $urandom; #1;
      checks++;
      if (crc_out !== ref_step(crc_in, data)) begin failures++; $display("FAIL %h %h", crc_in, data); end
    end
    // a zero word leaves a zero CRC
    crc_in = 0; data = 0; #1; checks++; if (crc_out !== 0) failures++;
    // chained: 10 words
    begin
      logic [31:0] c, r;
      c = '1; r = '1;
      for (int i = 0; i < 10; i++) begin
        crc_in = c; data = 32'h0101_0101 * i; #1; c = crc_out; r = ref_step(r, 32'h0101_0101 * i);
      end
      checks++; if (c !== r) begin failures++; $display("FAIL chain"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

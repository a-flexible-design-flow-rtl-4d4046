// rfid_tb_pkg: reference functions shared by the testbenches of the RFID tag.
//
// crc16_ref computes the CRC-16 (x^16 + x^12 + x^5 + 1, preset FFFF) of a bit
// string one polynomial division step at a time, written independently of
// the RTL. Bit strings are held right-aligned in a 128-bit vector and sent
// from bit n-1 down to bit 0.
package rfid_tb_pkg;

  function automatic logic [15:0] crc16_ref(input logic [127:0] bits, input int n);
    logic [16:0] r;
    r = {1'b0, 16'hFFFF};
    for (int i = n - 1; i >= 0; i--) begin
      r = {r[15:0], 1'b0};
      if (r[16] ^ bits[i]) r[15:0] = r[15:0] ^ 16'h1021;
      r[16] = 1'b0;
    end
    return r[15:0];
  endfunction

  // A frame with its inverted CRC appended (payload right-aligned, n bits).
  function automatic logic [127:0] with_crc(input logic [127:0] bits, input int n);
    logic [15:0] c;
    c = ~crc16_ref(bits, n);
    return (bits << 16) | 128'(c);
  endfunction

endpackage

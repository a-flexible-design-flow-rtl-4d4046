// crc16: bit-serial CRC-16 generator and checker.
//
// A 16-bit linear feedback shift register for x^16 + x^12 + x^5 + 1, fed one
// bit per clock, MSB first. The control module uses the same unit to check a
// received frame and, later, to generate the CRC of its response:
//   init        loads PRESET (has priority over en)
//   en, din     shift din into the register on this clock edge
//   crc         register value; the transmitter sends ~crc, MSB first
//   residue_ok  register equals RESIDUE: true after a whole error-free frame
//               including its inverted CRC has been shifted in
// The register updates on the clock edge after en; no other latency.
// The 16-bit serial form matches the 16 flip-flops the tag's CRC module has;
// the polynomial, preset and inversion are the ISO 18000-6B CRC-16, which
// the tag follows, and are parameters here.
module crc16
  import rfid_pkg::*;
#(
  parameter logic [15:0] POLY    = CRC_POLY,
  parameter logic [15:0] PRESET  = CRC_PRESET,
  parameter logic [15:0] RESIDUE = CRC_RESIDUE
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic        en,
  input  logic        din,
  output logic [15:0] crc,
  output logic        residue_ok
);

  logic fb;
  assign fb = crc[15] ^ din;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       crc <= PRESET;
    else if (init)    crc <= PRESET;
    else if (en)      crc <= {crc[14:0], 1'b0} ^ (fb ? POLY : 16'h0000);
  end

  assign residue_ok = (crc == RESIDUE);

endmodule

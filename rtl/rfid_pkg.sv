// rfid_pkg: constants and types shared by the blocks of the RFID tag digital
// block.
//
// The command codes READ (0C) and WRITE4BYTE (1B) and the CRC-16 constants are
// those of ISO 18000-6B. The frame layout is this design's own choice:
//   command : CMD(8) ADDR(8) [DATA(32) for WRITE4BYTE] CRC(16), MSB first
//   response: STATUS(8) [DATA(8) for READ] CRC(16), MSB first
// STATUS is 00 on success and FF on error. The CRC is sent inverted, so that
// running the receiver's CRC over a whole good frame leaves CRC_RESIDUE.
package rfid_pkg;

  // Command codes.
  localparam logic [7:0] CMD_READ       = 8'h0C;
  localparam logic [7:0] CMD_WRITE4BYTE = 8'h1B;

  // Bits of the CMD_SET parameter that select which commands are built.
  localparam int CMDSET_READ_BIT   = 0;
  localparam int CMDSET_WRITE4_BIT = 1;

  // Response status bytes.
  localparam logic [7:0] STATUS_OK  = 8'h00;
  localparam logic [7:0] STATUS_ERR = 8'hFF;

  // Frame lengths in bits, CRC included.
  localparam int CRC_W          = 16;
  localparam int READ_FRAME_LEN = 8 + 8 + CRC_W;
  localparam int WR4_FRAME_LEN  = 8 + 8 + 32 + CRC_W;
  localparam int MAX_FRAME_LEN  = WR4_FRAME_LEN;

  // CRC-16 (x^16 + x^12 + x^5 + 1).
  localparam logic [15:0] CRC_POLY    = 16'h1021;
  localparam logic [15:0] CRC_PRESET  = 16'hFFFF;
  localparam logic [15:0] CRC_RESIDUE = 16'h1D0F;

  // Operations of the memory control.
  typedef enum logic {
    MEM_READ_BYTE = 1'b0,
    MEM_WRITE4    = 1'b1
  } mem_op_e;

  // Clocks per half bit for a clock and a bit rate.
  function automatic int half_bit_clks(int clk_hz, int bps);
    return clk_hz / (2 * bps);
  endfunction

endpackage

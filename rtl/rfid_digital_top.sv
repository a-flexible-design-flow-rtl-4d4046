// rfid_digital_top: digital block of a passive UHF RFID tag.
//
// The tag receives Manchester-coded commands from the reader through its ASK
// demodulator, and answers by backscatter with FM0-coded responses. This block
// does everything between those two analog parts:
//
//   demod_in -> decoder -> control <-> mem_ctrl <-> eeprom <- charge_pump
//                            |   \-> crc16 (shared by receive and send)
//                            \-> encoder -> bs_out / bs_active
//
// The decoder synchronises and decodes the 40 or 160 kbit/s line, the control
// module collects the frame and checks its CRC-16, runs READ (one byte) or
// WRITE4BYTE (four bytes) through the memory control on the 512-bit EEPROM
// (8 rows x 4 words x 16 bits, programmed with the charge pump on), and sends
// STATUS [DATA] CRC back through the FM0 encoder at the same rate.
//
// Clock is the 640 kHz local oscillator, rst_n the power-on reset, and
// rate_160k selects 160 kbit/s (1) or 40 kbit/s (0) for both directions.
// crc_error and cmd_done are one-cycle event pulses for observation and test.
// CMD_SET chooses which commands are built (bit 0 READ, bit 1 WRITE4BYTE),
// which is how a reduced, smaller tag is configured. The partition into
// these blocks follows the tag's architecture; the EEPROM and charge pump are
// behavioural models of analog/process-specific parts.
module rfid_digital_top
  import rfid_pkg::*;
#(
  parameter logic [1:0]  CMD_SET          = 2'b11,
  parameter int unsigned CLK_HZ           = 640_000,
  parameter int unsigned EE_WORDS         = 32,
  parameter int unsigned EE_WORD_W        = 16,
  parameter int unsigned EE_PROG_CYCLES   = 64,
  parameter int unsigned PUMP_RAMP_CYCLES = 32
) (
  input  logic clk,
  input  logic rst_n,
  input  logic rate_160k,
  input  logic demod_in,
  output logic bs_out,
  output logic bs_active,
  output logic crc_error,
  output logic cmd_done
);

  localparam int EE_AW = $clog2(EE_WORDS);

  // decoder -> control
  logic sof, bit_valid, bit_data, eof;
  // control <-> crc16
  logic        crc_init, crc_en, crc_din, crc_residue_ok;
  logic [15:0] crc_value;
  // control <-> mem_ctrl
  logic        mem_req, mem_done, mem_err;
  mem_op_e     mem_op;
  logic [7:0]  mem_addr, mem_rdata;
  logic [31:0] mem_wdata;
  // control <-> encoder
  logic tx_valid, tx_bit, tx_last, tx_ready;
  // mem_ctrl <-> eeprom, charge_pump
  logic [EE_AW-1:0]     ee_addr;
  logic                 ee_re, ee_we, ee_busy;
  logic [EE_WORD_W-1:0] ee_rdata, ee_wdata;
  logic                 pump_en, pump_hv_ok;

  decoder #(.CLK_HZ(CLK_HZ)) u_decoder (
    .clk, .rst_n, .rate_160k,
    .rx_in(demod_in),
    .sof, .bit_valid, .bit_data, .eof
  );

  crc16 u_crc16 (
    .clk, .rst_n,
    .init(crc_init), .en(crc_en), .din(crc_din),
    .crc(crc_value), .residue_ok(crc_residue_ok)
  );

  control #(.CMD_SET(CMD_SET)) u_control (
    .clk, .rst_n,
    .sof, .bit_valid, .bit_data, .eof,
    .crc_init, .crc_en, .crc_din, .crc_value, .crc_residue_ok,
    .mem_req, .mem_op, .mem_addr, .mem_wdata, .mem_done, .mem_err, .mem_rdata,
    .tx_valid, .tx_bit, .tx_last, .tx_ready,
    .crc_error, .cmd_done
  );

  mem_ctrl #(.WORDS(EE_WORDS), .WORD_W(EE_WORD_W)) u_mem_ctrl (
    .clk, .rst_n,
    .req(mem_req), .op(mem_op), .addr(mem_addr), .wdata(mem_wdata),
    .done(mem_done), .err(mem_err), .rdata(mem_rdata),
    .ee_addr, .ee_re, .ee_rdata, .ee_we, .ee_wdata, .ee_busy,
    .pump_en, .pump_hv_ok
  );

  eeprom #(.WORDS(EE_WORDS), .WORD_W(EE_WORD_W), .PROG_CYCLES(EE_PROG_CYCLES)) u_eeprom (
    .clk, .rst_n,
    .addr(ee_addr), .re(ee_re), .rdata(ee_rdata),
    .we(ee_we), .wdata(ee_wdata), .hv_ok(pump_hv_ok), .busy(ee_busy)
  );

  charge_pump #(.RAMP_CYCLES(PUMP_RAMP_CYCLES)) u_charge_pump (
    .clk, .rst_n, .en(pump_en), .hv_ok(pump_hv_ok)
  );

  encoder #(.CLK_HZ(CLK_HZ)) u_encoder (
    .clk, .rst_n, .rate_160k,
    .tx_valid, .tx_bit, .tx_last, .tx_ready,
    .bs_out, .bs_active
  );

endmodule

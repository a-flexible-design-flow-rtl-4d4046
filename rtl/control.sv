// control: command interpreter of the tag (the "control module").
//
// Receive: between sof and eof from the decoder, each decoded bit is stored
// MSB first into a 64-bit frame buffer and shifted through the shared CRC-16
// unit. At eof the frame is dropped, with a crc_error pulse, if the CRC
// residue is wrong or the frame overflowed the buffer. A good frame is
// executed if its command is built (see CMD_SET) and its length fits the
// command; anything else is ignored without an answer.
//
// Commands (frame = CMD ADDR [DATA] CRC, response = STATUS [DATA] CRC):
//   READ        CMD=0C, 8-bit byte address; reads one byte.
//               Response: 00 and the byte, or FF and 00 on a bad address.
//   WRITE4BYTE  CMD=1B, 8-bit byte address, 32 data bits; writes four bytes.
//               Response: 00, or FF on a bad or misaligned address.
//
// Transmit: the CRC unit is preset, the status/data bits are handed to the
// FM0 encoder one by one (and shifted into the CRC), then the inverted CRC
// follows MSB first; the last CRC bit carries tx_last. cmd_done pulses when
// the memory operation is over and the response starts. Frames that arrive
// while a command is executed or answered are ignored.
//
// CMD_SET selects the commands built into the tag: bit 0 READ, bit 1
// WRITE4BYTE. A command whose bit is 0 is treated as unknown and its logic
// folds away in synthesis; this is how a reduced tag is configured. The two
// commands, the CRC discard rule and the customisable command set are the
// tag's; codes follow ISO 18000-6B, while the frame layout, status codes and
// the absence of a tag-ID field are this design's choice.
module control
  import rfid_pkg::*;
#(
  parameter logic [1:0] CMD_SET = 2'b11
) (
  input  logic        clk,
  input  logic        rst_n,
  // decoder
  input  logic        sof,
  input  logic        bit_valid,
  input  logic        bit_data,
  input  logic        eof,
  // CRC-16 unit
  output logic        crc_init,
  output logic        crc_en,
  output logic        crc_din,
  input  logic [15:0] crc_value,
  input  logic        crc_residue_ok,
  // memory control
  output logic        mem_req,
  output mem_op_e     mem_op,
  output logic [7:0]  mem_addr,
  output logic [31:0] mem_wdata,
  input  logic        mem_done,
  input  logic        mem_err,
  input  logic [7:0]  mem_rdata,
  // encoder
  output logic        tx_valid,
  output logic        tx_bit,
  output logic        tx_last,
  input  logic        tx_ready,
  // events
  output logic        crc_error,
  output logic        cmd_done
);

  localparam bit HAS_READ   = CMD_SET[CMDSET_READ_BIT];
  localparam bit HAS_WRITE4 = CMD_SET[CMDSET_WRITE4_BIT];
  localparam int NW = $clog2(MAX_FRAME_LEN + 1);

  typedef enum logic [2:0] {
    C_WAIT,      // waiting for a start of frame
    C_RX,        // collecting bits
    C_CHECK,     // CRC and command check
    C_MEM,       // memory operation running
    C_TX_DATA,   // sending status and data
    C_TX_CRCLD,  // latching the response CRC
    C_TX_CRC     // sending the CRC
  } cstate_e;

  cstate_e                  state;
  logic [MAX_FRAME_LEN-1:0] frame;
  logic [NW-1:0]            nbits;
  logic                     overflow;
  logic [15:0]              tx_sh;
  logic [4:0]               tx_left;    // bits left in the current field

  logic [7:0]  f_cmd, f_addr;
  logic [31:0] f_data;
  assign f_cmd  = frame[MAX_FRAME_LEN-1 -: 8];
  assign f_addr = frame[MAX_FRAME_LEN-9 -: 8];
  assign f_data = frame[MAX_FRAME_LEN-17 -: 32];

  logic is_read, is_write4;
  assign is_read   = HAS_READ   && f_cmd == CMD_READ       && int'(nbits) == READ_FRAME_LEN;
  assign is_write4 = HAS_WRITE4 && f_cmd == CMD_WRITE4BYTE && int'(nbits) == WR4_FRAME_LEN;

  logic handshake;
  assign handshake = tx_valid && tx_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= C_WAIT;
      frame     <= '0;
      nbits     <= '0;
      overflow  <= 1'b0;
      tx_sh     <= '0;
      tx_left   <= '0;
      mem_req   <= 1'b0;
      mem_op    <= MEM_READ_BYTE;
      mem_addr  <= '0;
      mem_wdata <= '0;
      crc_error <= 1'b0;
      cmd_done  <= 1'b0;
    end else begin
      mem_req   <= 1'b0;
      crc_error <= 1'b0;
      cmd_done  <= 1'b0;
      unique case (state)
        C_WAIT: if (sof) begin
          frame    <= '0;
          nbits    <= '0;
          overflow <= 1'b0;
          state    <= C_RX;
        end
        C_RX: begin
          if (bit_valid) begin
            if (int'(nbits) == MAX_FRAME_LEN) begin
              overflow <= 1'b1;
            end else begin
              frame[MAX_FRAME_LEN-1-int'(nbits)] <= bit_data;
              nbits <= nbits + 1'b1;
            end
          end
          if (eof) state <= C_CHECK;
        end
        C_CHECK: begin
          if (overflow || !crc_residue_ok) begin
            crc_error <= overflow ? 1'b0 : 1'b1;
            state     <= C_WAIT;
          end else if (is_read || is_write4) begin
            mem_req   <= 1'b1;
            mem_op    <= is_write4 ? MEM_WRITE4 : MEM_READ_BYTE;
            mem_addr  <= f_addr;
            mem_wdata <= f_data;
            state     <= C_MEM;
          end else begin
            state <= C_WAIT;
          end
        end
        C_MEM: if (mem_done) begin
          cmd_done <= 1'b1;
          if (mem_op == MEM_READ_BYTE) begin
            tx_sh   <= mem_err ? {STATUS_ERR, 8'h00} : {STATUS_OK, mem_rdata};
            tx_left <= 5'd16;
          end else begin
            tx_sh   <= {mem_err ? STATUS_ERR : STATUS_OK, 8'h00};
            tx_left <= 5'd8;
          end
          state <= C_TX_DATA;
        end
        C_TX_DATA: if (handshake) begin
          tx_sh   <= {tx_sh[14:0], 1'b0};
          tx_left <= tx_left - 1'b1;
          if (tx_left == 5'd1) state <= C_TX_CRCLD;
        end
        C_TX_CRCLD: begin
          tx_sh   <= ~crc_value;
          tx_left <= 5'd16;
          state   <= C_TX_CRC;
        end
        C_TX_CRC: if (handshake) begin
          tx_sh   <= {tx_sh[14:0], 1'b0};
          tx_left <= tx_left - 1'b1;
          if (tx_left == 5'd1) state <= C_WAIT;
        end
        default: state <= C_WAIT;
      endcase
    end
  end

  // The CRC unit checks while receiving and generates while sending data.
  always_comb begin
    crc_init = 1'b0;
    crc_en   = 1'b0;
    crc_din  = 1'b0;
    if (state == C_WAIT && sof) begin
      crc_init = 1'b1;
    end else if (state == C_RX) begin
      crc_en  = bit_valid && int'(nbits) < MAX_FRAME_LEN;
      crc_din = bit_data;
    end else if (state == C_MEM) begin
      crc_init = mem_done;
    end else if (state == C_TX_DATA) begin
      crc_en  = handshake;
      crc_din = tx_sh[15];
    end
  end

  assign tx_valid = (state == C_TX_DATA) || (state == C_TX_CRC);
  assign tx_bit   = tx_sh[15];
  assign tx_last  = (state == C_TX_CRC) && (tx_left == 5'd1);

endmodule

// mem_ctrl: memory control between the control module and the EEPROM.
//
// It turns the two memory operations of the tag's commands into EEPROM word
// accesses and returns their result:
//   MEM_READ_BYTE  reads the word holding byte addr and returns that byte.
//   MEM_WRITE4     writes four bytes at a 4-byte aligned addr: it switches the
//                  charge pump on, waits for programming voltage, programs the
//                  two 16-bit words one after the other, waiting while the
//                  EEPROM is busy, and switches the pump off again.
// The byte address is {word address, byte in word}; the word address is
// {row, column} of the 8-row by 4-word array, and byte 0 of a word is its
// upper half. An address past the memory, or a misaligned write, ends the
// operation with err and touches nothing.
//
// Handshake: req (one cycle, only while idle) with op, addr and wdata; done
// pulses for one cycle with err and rdata valid. A read takes 3 cycles from
// req to done; a write takes the pump ramp plus two programming times plus a
// few cycles. The role of the block is the tag's; the address map, alignment
// rule and the sequence are this design's choice.
module mem_ctrl
  import rfid_pkg::*;
#(
  parameter int unsigned WORDS  = 32,
  parameter int unsigned WORD_W = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // control module side
  input  logic                     req,
  input  mem_op_e                  op,
  input  logic [7:0]               addr,
  input  logic [31:0]              wdata,
  output logic                     done,
  output logic                     err,
  output logic [7:0]               rdata,
  // EEPROM side
  output logic [$clog2(WORDS)-1:0] ee_addr,
  output logic                     ee_re,
  input  logic [WORD_W-1:0]        ee_rdata,
  output logic                     ee_we,
  output logic [WORD_W-1:0]        ee_wdata,
  input  logic                     ee_busy,
  // charge pump side
  output logic                     pump_en,
  input  logic                     pump_hv_ok
);

  localparam int AW    = $clog2(WORDS);
  localparam int BYTES = WORDS * WORD_W / 8;

  typedef enum logic [2:0] {
    M_IDLE, M_READ, M_READ_DATA, M_PUMP, M_PROG, M_PROG_WAIT, M_DONE
  } mstate_e;

  mstate_e       state;
  logic [7:0]    addr_q;
  logic [31:0]   wdata_q;
  logic          second;     // programming the second word of a write
  logic          busy_seen;  // EEPROM has started the current programming

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= M_IDLE;
      addr_q    <= '0;
      wdata_q   <= '0;
      second    <= 1'b0;
      busy_seen <= 1'b0;
      done      <= 1'b0;
      err       <= 1'b0;
      rdata     <= '0;
      pump_en   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        M_IDLE: if (req) begin
          addr_q  <= addr;
          wdata_q <= wdata;
          err     <= 1'b0;
          rdata   <= '0;
          if (int'(addr) >= BYTES || (op == MEM_WRITE4 && addr[1:0] != 2'b00)) begin
            err   <= 1'b1;
            state <= M_DONE;
          end else if (op == MEM_READ_BYTE) begin
            state <= M_READ;
          end else begin
            pump_en <= 1'b1;
            second  <= 1'b0;
            state   <= M_PUMP;
          end
        end
        M_READ:      state <= M_READ_DATA;     // ee_re issued this cycle
        M_READ_DATA: begin
          rdata <= addr_q[0] ? ee_rdata[7:0] : ee_rdata[15:8];
          state <= M_DONE;
        end
        M_PUMP: if (pump_hv_ok) begin
          busy_seen <= 1'b0;
          state     <= M_PROG;
        end
        M_PROG: begin                           // ee_we issued this cycle
          state <= M_PROG_WAIT;
        end
        M_PROG_WAIT: begin
          if (ee_busy) busy_seen <= 1'b1;
          if (busy_seen && !ee_busy) begin
            busy_seen <= 1'b0;
            if (!second) begin
              second <= 1'b1;
              state  <= M_PROG;
            end else begin
              pump_en <= 1'b0;
              state   <= M_DONE;
            end
          end
        end
        M_DONE: begin
          done  <= 1'b1;
          state <= M_IDLE;
        end
        default: state <= M_IDLE;
      endcase
    end
  end

  // Word address of the access in progress.
  always_comb begin
    ee_addr  = AW'(addr_q >> 1);
    ee_wdata = second ? wdata_q[15:0] : wdata_q[31:16];
    if (state == M_PROG || state == M_PROG_WAIT)
      ee_addr = AW'((addr_q >> 1) + {7'd0, second});
  end

  assign ee_re = (state == M_READ);
  assign ee_we = (state == M_PROG);

  a_req_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
    req |-> state == M_IDLE)
    else $error("mem_ctrl: request while busy");

endmodule

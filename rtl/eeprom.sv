// eeprom: behavioural model of the tag's 512-bit EEPROM macro.
//
// 512 bits arranged as 8 rows of 4 words of 16 bits; the 5-bit word address is
// {row, column}. This model replaces a process-specific non-volatile macro and
// keeps its digital behaviour only:
//   read : re with addr; rdata holds the word from the next clock edge on.
//   write: we with addr and wdata starts programming if hv_ok (charge pump at
//          programming voltage) is high; busy is high for PROG_CYCLES clocks,
//          and the word changes when programming ends. A we while busy, or
//          while hv_ok is low, is ignored.
// The organisation follows the tag; the read latency, programming time and
// initial content (byte n of the memory holds the value n) are this model's
// choices. It is written as an array with no delays, so it is synthesizable.
module eeprom #(
  parameter int unsigned WORDS       = 32,
  parameter int unsigned WORD_W      = 16,
  parameter int unsigned PROG_CYCLES = 64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  logic                     re,
  output logic [WORD_W-1:0]        rdata,
  input  logic                     we,
  input  logic [WORD_W-1:0]        wdata,
  input  logic                     hv_ok,
  output logic                     busy
);

  localparam int AW = $clog2(WORDS);
  localparam int PW = $clog2(PROG_CYCLES + 1);
  localparam int BYTES_PER_WORD = WORD_W / 8;

  logic [WORD_W-1:0] mem [WORDS];
  logic [PW-1:0]     prog_cnt;
  logic [AW-1:0]     prog_addr;
  logic [WORD_W-1:0] prog_data;

  // Factory content: byte n holds n (first byte of a word in its upper bits).
  initial begin
    for (int w = 0; w < int'(WORDS); w++)
      for (int b = 0; b < BYTES_PER_WORD; b++)
        mem[w][WORD_W-1-8*b -: 8] = 8'(w * BYTES_PER_WORD + b);
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[addr];
    if (rst_n && busy && prog_cnt == PW'(1)) mem[prog_addr] <= prog_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      prog_cnt  <= '0;
      prog_addr <= '0;
      prog_data <= '0;
    end else if (busy) begin
      prog_cnt <= prog_cnt - 1'b1;
      if (prog_cnt == PW'(1)) busy <= 1'b0;
    end else if (we && hv_ok) begin
      busy      <= 1'b1;
      prog_cnt  <= PW'(PROG_CYCLES);
      prog_addr <= addr;
      prog_data <= wdata;
    end
  end

endmodule

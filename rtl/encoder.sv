// encoder: FM0 encoder of the return link (tag to reader).
//
// FM0 (bi-phase space) inverts the line at every bit boundary and inverts it
// once more in the middle of a 0 bit, so a 1 is one level for the whole bit
// and a 0 has two. The control module offers bits with a valid/ready
// handshake: the encoder takes a bit (tx_ready high for one cycle) when it is
// idle and tx_valid is high, and again at the end of every bit it sends. A bit
// lasts 2*HALF clocks (16 at 40 kbit/s, 4 at 160 kbit/s with a 640 kHz
// clock), so the next bit must be offered within that time. A bit offered
// with tx_last ends the frame; if no bit is offered at a boundary the frame
// also ends, which the handshake assertion reports.
//
// bs_out is the level for the backscatter modulator and rests at 0 between
// frames; bs_active is high while a frame is sent. The line changes on the
// clock edge after the bit is taken. FM0 coding is the tag's; the idle level,
// the handshake and the rate (the forward-link rate) are this design's
// choice.
module encoder
  import rfid_pkg::*;
#(
  parameter int unsigned CLK_HZ      = 640_000,
  parameter int unsigned RATE_LO_BPS = 40_000,
  parameter int unsigned RATE_HI_BPS = 160_000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic rate_160k,
  input  logic tx_valid,
  input  logic tx_bit,
  input  logic tx_last,
  output logic tx_ready,
  output logic bs_out,
  output logic bs_active
);

  localparam int HALF_LO = half_bit_clks(CLK_HZ, RATE_LO_BPS);
  localparam int HALF_HI = half_bit_clks(CLK_HZ, RATE_HI_BPS);
  localparam int CW      = $clog2(2 * HALF_LO + 1);

  logic [CW-1:0] half;
  assign half = rate_160k ? CW'(HALF_HI) : CW'(HALF_LO);

  logic [CW-1:0] cnt;
  logic          cur_bit;
  logic          cur_last;
  logic          bit_end;

  assign bit_end  = bs_active && (cnt == 2 * half - 1);
  assign tx_ready = (!bs_active || (bit_end && !cur_last)) && tx_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bs_out    <= 1'b0;
      bs_active <= 1'b0;
      cnt       <= '0;
      cur_bit   <= 1'b0;
      cur_last  <= 1'b0;
    end else if (tx_ready) begin
      // Start of a bit: boundary inversion.
      bs_active <= 1'b1;
      bs_out    <= ~bs_out;
      cnt       <= '0;
      cur_bit   <= tx_bit;
      cur_last  <= tx_last;
    end else if (bit_end) begin
      // Frame over: return to rest.
      bs_active <= 1'b0;
      bs_out    <= 1'b0;
      cnt       <= '0;
    end else if (bs_active) begin
      cnt <= cnt + 1'b1;
      if (cnt == half - 1 && !cur_bit)
        bs_out <= ~bs_out;               // mid-bit inversion of a 0
    end
  end

  // The control module must keep bits coming until it marks the last one.
  a_no_underrun: assert property (@(posedge clk) disable iff (!rst_n)
    (bit_end && !cur_last) |-> tx_valid)
    else $error("encoder: no bit offered at a bit boundary");

endmodule

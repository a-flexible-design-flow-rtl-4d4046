// decoder: Manchester decoder of the forward link (reader to tag).
//
// The ASK demodulator delivers Manchester-coded data at 40 or 160 kbit/s,
// asynchronous to the tag's 640 kHz clock. The decoder first synchronises the
// line to the clock with two flip-flops, then oversamples it: a half bit lasts
// HALF_LO = 8 clocks at 40 kbit/s and HALF_HI = 2 clocks at 160 kbit/s. Each
// half bit is sampled in its middle; a bit is 1 for high-then-low and 0 for
// low-then-high.
//
// Framing: the line idles high. After at least two idle bit times, a falling
// edge starts a start delimiter that stays low for two bit times (something
// Manchester data never does); the first data bit follows at once. The first
// bit time whose two halves are equal (no mid-bit transition) ends the frame.
// At the slow rate the bit counter re-aligns to each mid-bit transition that
// falls within a quarter of a half bit of where it is expected.
//
// Outputs, all one-cycle pulses: sof when the delimiter has been checked,
// bit_valid with bit_data in the middle of the second half of each bit, eof
// when the frame-ending bit time has been seen. rate_160k must be stable
// during a frame. The rates, the synchronisation to the 640 kHz clock and
// Manchester coding are the tag's; polarity, delimiter and frame end are this
// design's choice.
module decoder
  import rfid_pkg::*;
#(
  parameter int unsigned CLK_HZ      = 640_000,
  parameter int unsigned RATE_LO_BPS = 40_000,
  parameter int unsigned RATE_HI_BPS = 160_000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic rate_160k,
  input  logic rx_in,
  output logic sof,
  output logic bit_valid,
  output logic bit_data,
  output logic eof
);

  localparam int HALF_LO = half_bit_clks(CLK_HZ, RATE_LO_BPS);
  localparam int HALF_HI = half_bit_clks(CLK_HZ, RATE_HI_BPS);
  localparam int CW      = $clog2(4 * HALF_LO + 1);

  typedef enum logic [1:0] {S_IDLE, S_HUNT, S_DELIM, S_BITS} state_e;

  logic [1:0]    sync;
  logic          line, line_d;
  state_e        state;
  logic [CW-1:0] cnt;
  logic          first_half;

  logic [CW-1:0] half;       // clocks per half bit at the selected rate
  logic [CW-1:0] tol;        // re-alignment window around the mid-bit edge
  assign half = rate_160k ? CW'(HALF_HI) : CW'(HALF_LO);
  assign tol  = half >> 2;

  logic [CW-1:0] mid1, mid2;  // sampling points of the two halves of a bit
  assign mid1 = half >> 1;
  assign mid2 = half + (half >> 1);

  assign line = sync[1];

  logic edge_seen;
  assign edge_seen = line ^ line_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync       <= 2'b11;
      line_d     <= 1'b1;
      state      <= S_IDLE;
      cnt        <= '0;
      first_half <= 1'b0;
      sof        <= 1'b0;
      bit_valid  <= 1'b0;
      bit_data   <= 1'b0;
      eof        <= 1'b0;
    end else begin
      sync      <= {sync[0], rx_in};
      line_d    <= line;
      sof       <= 1'b0;
      bit_valid <= 1'b0;
      eof       <= 1'b0;
      unique case (state)
        // Wait for two bit times of idle (high) line.
        S_IDLE: begin
          if (!line)                      cnt <= '0;
          else if (cnt == 4 * half - 1)   state <= S_HUNT;
          else                            cnt <= cnt + 1'b1;
        end
        // Armed: a falling edge starts the delimiter (this sample is index 0).
        S_HUNT: begin
          if (!line) begin
            state <= S_DELIM;
            cnt   <= CW'(1);
          end
        end
        // Delimiter: low for four half bits, checked in the middle of the
        // second and the fourth half bit.
        S_DELIM: begin
          if ((cnt == mid2 || cnt == 2 * half + mid2) && line) begin
            state <= S_IDLE;
            cnt   <= '0;
          end else if (cnt == 4 * half - 1) begin
            state <= S_BITS;
            cnt   <= '0;
            sof   <= 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        // Data bits: sample each half in its middle.
        S_BITS: begin
          if (cnt == mid1)
            first_half <= line;
          if (cnt == mid2 && first_half == line) begin
            // No mid-bit transition: end of frame.
            eof   <= 1'b1;
            state <= S_IDLE;
            cnt   <= '0;
          end else begin
            if (cnt == mid2) begin
              bit_valid <= 1'b1;
              bit_data  <= first_half;
            end
            if (edge_seen && tol != '0 && cnt != half
                && cnt + tol >= half && cnt <= half + tol)
              cnt <= half + 1'b1;          // mid-bit edge: re-align
            else if (cnt == 2 * half - 1)
              cnt <= '0;
            else
              cnt <= cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

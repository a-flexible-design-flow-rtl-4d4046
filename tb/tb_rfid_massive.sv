// tb_rfid_massive: long random verification session of the tag's digital
// block at its default parameters.
//
// NCMD (10,000) random commands, each at a randomly chosen link rate (40 or
// 160 kbit/s): READ of any byte address (in range or not), WRITE4BYTE at
// aligned, misaligned or out-of-range addresses, frames with a corrupted CRC,
// unknown commands. The reader side and the checks are those of the
// end-to-end test: Manchester frames in, FM0 answers decoded and compared bit
// by bit, CRC included, with a byte-wide shadow of the EEPROM as the
// reference model; at the end the whole memory is read back. The session
// counts each kind of command and fails if one never occurred.
module tb_rfid_massive;
  import rfid_pkg::*;
  import rfid_tb_pkg::*;

  localparam int RAMP = 32, PROG = 64;   // the top's defaults
  localparam int NCMD = 10_000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic rate_160k = 1'b0, demod_in = 1'b1;
  logic bs_out, bs_active, crc_error, cmd_done;
  int checks = 0, failures = 0;

  rfid_digital_top dut (.clk, .rst_n, .rate_160k, .demod_in, .bs_out, .bs_active,
                        .crc_error, .cmd_done);

  always #781 clk = ~clk;   // about 640 kHz

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------------- events
  int cyc = 0, n_crc_err = 0, n_done = 0, t_done = 0, t_frame_end = 0;
  always @(posedge clk) begin
    cyc++;
    if (crc_error) n_crc_err++;
    if (cmd_done) begin
      n_done++;
      t_done = cyc;
    end
  end

  // ------------------------------------------------------- FM0 receiver
  logic rx_lvl [$];
  int   t_rsp_start = 0, n_rsp = 0;
  logic active_d = 1'b0;
  always @(posedge clk) begin
    active_d <= bs_active;
    if (bs_active) begin
      if (!active_d) t_rsp_start = cyc;
      rx_lvl.push_back(bs_out);
    end else if (active_d) begin
      n_rsp++;
    end
  end

  // Decode the recorded levels (half = clocks per half bit).
  task automatic fm0_decode(input int half, output logic bits [$], output bit ok);
    int nb;
    logic prev;
    ok = (rx_lvl.size() % (2 * half) == 0);
    nb = rx_lvl.size() / (2 * half);
    prev = 1'b0;
    bits.delete();
    for (int k = 0; k < nb; k++) begin
      logic a, b;
      a = rx_lvl[k * 2 * half + half / 2];
      b = rx_lvl[k * 2 * half + half + half / 2];
      if (a == prev) ok = 1'b0;          // no inversion at the boundary
      bits.push_back(a == b);
      prev = b;
    end
  endtask

  // ---------------------------------------------------- Manchester sender
  task automatic hold(input logic v, input int n);
    @(negedge clk);
    demod_in = v;
    repeat (n - 1) @(negedge clk);
  endtask

  task automatic send_frame(input logic [127:0] f, input int n, input int half);
    hold(1'b1, 6 * half);
    hold(1'b0, 4 * half);
    for (int i = n - 1; i >= 0; i--) begin
      hold(f[i], half);
      hold(~f[i], half);
    end
    t_frame_end = cyc;
    hold(1'b1, 2 * half);
  endtask

  // Wait for the tag to go quiet: 400 clocks without backscatter, more than
  // the longest command (a write: pump ramp plus two programming times).
  task automatic settle();
    int quiet;
    quiet = 0;
    while (quiet < 400) begin
      @(posedge clk);
      quiet = bs_active ? 0 : quiet + 1;
    end
  endtask

  // -------------------------------------------------------------- tests
  logic [7:0] shadow [64];
  int m_rate40 = 0, m_rate160 = 0, m_read = 0, m_write = 0, m_read_err = 0, m_write_err = 0;
  int m_crc = 0, m_unknown = 0, m_overflow = 0, m_pump_wait = 0;

  // Send a command and check the response (payload right-aligned, n bits).
  task automatic transact(input logic [127:0] cmd, input int ncmd, input bit expect_answer,
                          input logic [127:0] rsp, input int nrsp);
    int half, r0, d0;
    logic bits [$];
    bit ok;
    logic [127:0] full;
    half = rate_160k ? 2 : 8;
    r0 = n_rsp;
    d0 = n_done;
    rx_lvl.delete();
    send_frame(with_crc(cmd, ncmd), ncmd + 16, half);
    settle();
    if (!expect_answer) begin
      check(n_rsp == r0 && n_done == d0, "no answer expected");
      return;
    end
    check(n_rsp == r0 + 1, "one answer");
    check(t_rsp_start - t_done >= 0 && t_rsp_start - t_done <= 4,
          $sformatf("answer starts %0d clocks after cmd_done", t_rsp_start - t_done));
    fm0_decode(half, bits, ok);
    check(ok, "FM0 line: one bit time per bit and a level change at every boundary");
    full = with_crc(rsp, nrsp);
    check(bits.size() == nrsp + 16, $sformatf("answer has %0d bits, expected %0d", bits.size(), nrsp + 16));
    if (bits.size() == nrsp + 16)
      for (int i = 0; i < nrsp + 16; i++)
        check(bits[i] == full[nrsp + 15 - i], $sformatf("answer bit %0d", i));
    if (rate_160k) m_rate160++; else m_rate40++;
  endtask

  task automatic do_read(input logic [7:0] a);
    if (a < 64) begin
      transact({CMD_READ, a}, 16, 1'b1, {STATUS_OK, shadow[a]}, 16);
      m_read++;
    end else begin
      transact({CMD_READ, a}, 16, 1'b1, {STATUS_ERR, 8'h00}, 16);
      m_read_err++;
    end
  endtask

  task automatic do_write(input logic [7:0] a, input logic [31:0] d);
    if (a < 64 && a[1:0] == 2'b00) begin
      transact({CMD_WRITE4BYTE, a, d}, 48, 1'b1, {STATUS_OK}, 8);
      check(t_done - t_frame_end >= RAMP + 2 * PROG,
            $sformatf("write took %0d clocks", t_done - t_frame_end));
      if (t_done - t_frame_end >= RAMP + 2 * PROG) m_pump_wait++;
      for (int b = 0; b < 4; b++) shadow[a + b] = d[31 - 8 * b -: 8];
      m_write++;
    end else begin
      transact({CMD_WRITE4BYTE, a, d}, 48, 1'b1, {STATUS_ERR}, 8);
      m_write_err++;
    end
  endtask

  task automatic do_bad_crc(input logic [7:0] a);
    int c0, r0, half;
    half = rate_160k ? 2 : 8;
    c0 = n_crc_err;
    r0 = n_rsp;
    send_frame(with_crc({CMD_READ, a}, 16) ^ (128'd1 << ($urandom % 32)), 32, half);
    settle();
    check(n_crc_err == c0 + 1, "CRC error reported");
    check(n_rsp == r0, "frame with CRC error discarded");
    if (n_crc_err == c0 + 1) m_crc++;
  endtask

  initial begin
    for (int b = 0; b < 64; b++) shadow[b] = 8'(b);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    for (int t = 0; t < NCMD; t++) begin
      rate_160k = 1'($urandom);
      case ($urandom % 8)
        0, 1, 2: do_read(8'($urandom % 64));
        3:       do_read(8'($urandom));
        4, 5:    do_write(8'($urandom % 16) * 4, $urandom);
        6:       do_write(8'($urandom), $urandom);
        default: begin
          if ($urandom % 2) do_bad_crc(8'($urandom));
          else begin
            transact({8'h20 + 8'($urandom % 64), 8'($urandom)}, 16, 1'b0, '0, 0);
            m_unknown++;
          end
        end
      endcase
    end
    rate_160k = 1'b1;
    // Every byte of the memory against the shadow.
    for (int b = 0; b < 64; b++) do_read(8'(b));

    $display("mechanisms: rate40=%0d rate160=%0d read=%0d write=%0d read_err=%0d write_err=%0d crc=%0d unknown=%0d overflow=%0d pump_wait=%0d",
             m_rate40, m_rate160, m_read, m_write, m_read_err, m_write_err, m_crc, m_unknown, m_overflow, m_pump_wait);
    check(m_rate40 > 0,    "40 kbit/s link used");
    check(m_rate160 > 0,   "160 kbit/s link used");
    check(m_read > 0,      "READ executed");
    check(m_write > 0,     "WRITE4BYTE executed");
    check(m_read_err > 0,  "READ error answered");
    check(m_write_err > 0, "WRITE4BYTE error answered");
    check(m_crc > 0,       "CRC error discard");
    check(m_unknown > 0,   "unknown command ignored");
    check(m_pump_wait > 0, "charge pump and programming wait");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

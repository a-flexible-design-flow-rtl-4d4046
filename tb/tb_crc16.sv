// tb_crc16: self-checking test of the serial CRC-16.
//
// Shifts in the ASCII string "123456789" and checks the known check value
// 29B1 of this CRC; then random messages are compared with an independent
// reference, and the message followed by its inverted CRC must leave the
// residue 1D0F (residue_ok), while a message with one flipped bit must not.
// Also checks that init restores the preset and en=0 holds the register.
module tb_crc16;
  import rfid_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic init = 1'b0, en = 1'b0, din = 1'b0;
  logic [15:0] crc;
  logic residue_ok;
  int checks = 0, failures = 0;

  crc16 dut (.clk, .rst_n, .init, .en, .din, .crc, .residue_ok);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  task automatic shift_bits(input logic [127:0] bits, input int n);
    for (int i = n - 1; i >= 0; i--) begin
      @(negedge clk);
      en  = 1'b1;
      din = bits[i];
    end
    @(negedge clk);
    en = 1'b0;
  endtask

  task automatic restart();
    @(negedge clk);
    init = 1'b1;
    @(negedge clk);
    init = 1'b0;
  endtask

  logic [127:0] msg, fr;
  int n;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    check(crc == 16'hFFFF, "preset after reset");
    shift_bits(128'h313233343536373839, 72);
    check(crc == 16'h29B1, $sformatf("check value of 123456789: %h", crc));
    repeat (3) @(posedge clk);
    check(crc == 16'h29B1, "register holds while en is low");
    restart();
    check(crc == 16'hFFFF, "init reloads preset");
    for (int t = 0; t < 200; t++) begin
      n   = 8 + ($urandom % 12) * 4;
      msg = {$urandom, $urandom, $urandom, $urandom};
      msg = msg & ((128'd1 << n) - 1);
      restart();
      shift_bits(msg, n);
      check(crc == crc16_ref(msg, n), $sformatf("crc of %0d-bit message", n));
      fr = with_crc(msg, n);
      restart();
      shift_bits(fr, n + 16);
      check(residue_ok && crc == 16'h1D0F, "residue of good frame");
      restart();
      shift_bits(fr ^ (128'd1 << ($urandom % (n + 16))), n + 16);
      check(!residue_ok, "residue of corrupted frame");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_encoder: self-checking test of the FM0 encoder.
//
// Offers random frames bit by bit at 40 and 160 kbit/s (8 and 2 clocks per
// half bit at 640 kHz), with a random delay before each bit is offered that
// still meets the encoder's deadline. The line is sampled every clock while
// bs_active is high and compared with an FM0 waveform built independently:
// invert at each bit start, hold a half bit, invert again for a 0, hold a
// half bit. The frame must last exactly 2*half clocks per bit, and bs_out must
// rest at 0 afterwards.
module tb_encoder;

  logic clk = 1'b0, rst_n = 1'b0;
  logic rate_160k = 1'b0;
  logic tx_valid = 1'b0, tx_bit = 1'b0, tx_last = 1'b0;
  logic tx_ready, bs_out, bs_active;
  int checks = 0, failures = 0;

  encoder dut (.clk, .rst_n, .rate_160k, .tx_valid, .tx_bit, .tx_last, .tx_ready,
               .bs_out, .bs_active);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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

  // Line recorder.
  logic line [$];
  always @(posedge clk) if (bs_active) line.push_back(bs_out);

  task automatic run_frame(input int nbits, input bit fast);
    logic bits [];
    logic exp [$];
    logic lvl;
    int   half;
    half      = fast ? 2 : 8;
    rate_160k = fast;
    bits      = new[nbits];
    foreach (bits[i]) bits[i] = 1'($urandom);
    line.delete();
    // Offer the bits.
    foreach (bits[i]) begin
      if (i == 0) repeat ($urandom % 5) @(negedge clk);
      @(negedge clk);
      tx_valid = 1'b1;
      tx_bit   = bits[i];
      tx_last  = (i == nbits - 1);
      do @(posedge clk); while (!tx_ready);
      @(negedge clk);
      tx_valid = 1'b0;
      // wait a little before offering the next bit, inside the bit time
      repeat ($urandom % (2 * half - 2)) @(negedge clk);
    end
    while (bs_active) @(posedge clk);
    @(posedge clk);
    // Reference waveform.
    lvl = 1'b0;
    foreach (bits[i]) begin
      lvl = ~lvl;
      repeat (half) exp.push_back(lvl);
      if (!bits[i]) lvl = ~lvl;
      repeat (half) exp.push_back(lvl);
    end
    check(line.size() == exp.size(),
          $sformatf("frame length %0d clocks, expected %0d", line.size(), exp.size()));
    if (line.size() == exp.size())
      foreach (exp[k]) check(line[k] == exp[k], $sformatf("level at clock %0d", k));
    check(bs_out == 1'b0, "line rests at 0");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    check(!bs_active && !bs_out, "idle after reset");
    for (int t = 0; t < 15; t++) run_frame(1 + $urandom % 40, 1'b0);
    for (int t = 0; t < 15; t++) run_frame(1 + $urandom % 40, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

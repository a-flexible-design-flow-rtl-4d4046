// tb_decoder: self-checking test of the Manchester decoder.
//
// Drives frames of random bits at 40 and 160 kbit/s (a 640 kHz clock gives
// 8 and 2 clocks per half bit), each as: idle high, start delimiter low for
// two bit times, Manchester bits (1 = high-low), idle high. The decoded bits
// are compared with the sent ones, and sof/eof must appear once per frame.
// Also checked: the time from the delimiter's falling edge to sof (2 clocks
// of synchronisation, the two-bit delimiter and one clock of output register),bit spacing equal to the
// bit time, a 40 kbit/s frame whose mid-bit edges wander by one clock, and a
// too-short low pulse that must not start a frame.
module tb_decoder;

  logic clk = 1'b0, rst_n = 1'b0;
  logic rate_160k = 1'b0, rx_in = 1'b1;
  logic sof, bit_valid, bit_data, eof;
  int checks = 0, failures = 0;

  decoder dut (.clk, .rst_n, .rate_160k, .rx_in, .sof, .bit_valid, .bit_data, .eof);

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

  // Monitor.
  logic got [$];
  int   n_sof = 0, n_eof = 0;
  int   cyc = 0, t_fall = 0, t_sof = 0, t_last_bit = -1, bad_spacing = 0;
  int   half_now = 8;
  always @(posedge clk) begin
    cyc++;
    if (bit_valid) begin
      got.push_back(bit_data);
      if (t_last_bit >= 0 && cyc - t_last_bit != 4 * half_now) begin
        // spacing is exact only without jitter; recorded per frame
        bad_spacing++;
      end
      t_last_bit = cyc;
    end
    if (sof) begin
      n_sof++;
      t_sof = cyc;
      t_last_bit = -1;
    end
    if (eof) n_eof++;
  end

  // Hold the line for n clocks (changes just after a falling clock edge).
  task automatic hold(input logic v, input int n);
    @(negedge clk);
    rx_in = v;
    repeat (n - 1) @(negedge clk);
  endtask

  // Send one frame; jitter moves each mid-bit edge by -1, 0 or +1 clock.
  task automatic send_frame(input logic bits [], input int half, input bit jitter);
    int d;
    hold(1'b1, 6 * half);
    @(negedge clk);
    rx_in  = 1'b0;
    t_fall = cyc;
    repeat (4 * half - 1) @(negedge clk);
    foreach (bits[i]) begin
      d = jitter ? int'($urandom % 3) - 1 : 0;
      hold(bits[i], half + d);
      hold(~bits[i], half - d);
    end
    hold(1'b1, 6 * half);
  endtask

  task automatic run_frame(input int nbits, input bit fast, input bit jitter);
    logic bits [];
    int   half, s0, e0;
    half      = fast ? 2 : 8;
    half_now  = jitter ? 0 : half / 2;  // 4*half_now = clocks per bit
    rate_160k = fast;
    bits      = new[nbits];
    foreach (bits[i]) bits[i] = 1'($urandom);
    got.delete();
    s0 = n_sof;
    e0 = n_eof;
    bad_spacing = 0;
    send_frame(bits, half, jitter);
    check(n_sof == s0 + 1, $sformatf("one sof (rate %0d)", fast));
    check(n_eof == e0 + 1, $sformatf("one eof (rate %0d)", fast));
    check(got.size() == nbits, $sformatf("bit count %0d of %0d", got.size(), nbits));
    if (got.size() == nbits)
      foreach (bits[i]) check(got[i] == bits[i], $sformatf("bit %0d", i));
    if (!jitter) begin
      check(bad_spacing == 0, "one bit per bit time");
      check(t_sof - t_fall == 4 * half + 3, $sformatf("sof latency %0d", t_sof - t_fall));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 20; t++) run_frame(8 + $urandom % 57, 1'b0, 1'b0);
    for (int t = 0; t < 20; t++) run_frame(8 + $urandom % 57, 1'b1, 1'b0);
    for (int t = 0; t < 10; t++) run_frame(8 + $urandom % 57, 1'b0, 1'b1);
    // A low pulse shorter than the delimiter starts nothing.
    begin
      int s0;
      s0 = n_sof;
      rate_160k = 1'b0;
      hold(1'b1, 64);
      hold(1'b0, 12);
      hold(1'b1, 200);
      check(n_sof == s0, "short pulse is not a delimiter");
    end
    // And a good frame still follows.
    run_frame(32, 1'b0, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

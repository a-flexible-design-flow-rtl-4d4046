// tb_charge_pump: self-checking test of the charge pump model.
//
// hv_ok must rise exactly RAMP_CYCLES clocks after en rises, stay high while
// en is high, fall one clock after en falls, and a short enable pulse must
// never raise it. Run with the default RAMP_CYCLES and with 5.
module tb_charge_pump;

  logic clk = 1'b0, rst_n = 1'b0;
  logic en_a = 1'b0, en_b = 1'b0;
  logic ok_a, ok_b;
  int checks = 0, failures = 0;

  charge_pump            dut_a (.clk, .rst_n, .en(en_a), .hv_ok(ok_a));
  charge_pump #(.RAMP_CYCLES(5)) dut_b (.clk, .rst_n, .en(en_b), .hv_ok(ok_b));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
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

  // Measure the clocks from en rising to hv_ok rising.
  task automatic ramp(input bit which, input int expect_cycles);
    int n;
    @(negedge clk);
    if (which) en_b = 1'b1; else en_a = 1'b1;
    n = 0;
    do begin
      @(posedge clk);
      #1 n++;
    end while (!(which ? ok_b : ok_a) && n < 1000);
    check(n == expect_cycles, $sformatf("ramp %0d clocks, expected %0d", n, expect_cycles));
    repeat (10) @(posedge clk);
    #1 check(which ? ok_b : ok_a, "stays up while enabled");
    @(negedge clk);
    if (which) en_b = 1'b0; else en_a = 1'b0;
    @(posedge clk);
    #1 check(!(which ? ok_b : ok_a), "drops when disabled");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1 check(!ok_a && !ok_b, "off after reset");
    for (int t = 0; t < 3; t++) begin
      ramp(1'b0, 32);
      ramp(1'b1, 5);
    end
    // Short pulse: 3 clocks on the 5-clock pump.
    @(negedge clk);
    en_b = 1'b1;
    repeat (3) @(negedge clk);
    en_b = 1'b0;
    repeat (10) begin
      @(posedge clk);
      #1 check(!ok_b, "short pulse gives no voltage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

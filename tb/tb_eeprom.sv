// tb_eeprom: self-checking test of the EEPROM model.
//
// Reads all 32 words and compares them with the factory pattern (byte n
// holds n); programs random words with hv_ok high and checks busy lasts
// PROG_CYCLES clocks and that the word reads back; checks that a write with
// hv_ok low, or while busy, changes nothing. A shadow array is the reference.
module tb_eeprom;

  localparam int PROG = 10;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [4:0]  addr = '0;
  logic        re = 1'b0, we = 1'b0, hv_ok = 1'b0;
  logic [15:0] wdata = '0, rdata;
  logic        busy;
  logic [15:0] shadow [32];
  int checks = 0, failures = 0;

  eeprom #(.PROG_CYCLES(PROG)) dut (.clk, .rst_n, .addr, .re, .rdata, .we, .wdata, .hv_ok, .busy);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  task automatic read_check(input int a);
    @(negedge clk);
    addr = 5'(a);
    re   = 1'b1;
    @(negedge clk);
    re = 1'b0;
    check(rdata == shadow[a], $sformatf("word %0d: %h, expected %h", a, rdata, shadow[a]));
  endtask

  task automatic write(input int a, input logic [15:0] d, input logic hv, input bit expect_prog);
    int n;
    @(negedge clk);
    hv_ok = hv;
    addr  = 5'(a);
    wdata = d;
    we    = 1'b1;
    @(negedge clk);
    we = 1'b0;
    // A second write while busy must be ignored.
    we    = 1'b1;
    wdata = ~d;
    @(negedge clk);
    we = 1'b0;
    n = 2;
    while (busy && n < 1000) begin
      @(negedge clk);
      n++;
    end
    if (expect_prog) begin
      check(n == PROG + 1, $sformatf("programming took %0d clocks", n - 1));
      shadow[a] = d;
    end else begin
      check(n == 2 && !busy, "no programming without voltage");
    end
    hv_ok = 1'b0;
  endtask

  initial begin
    for (int w = 0; w < 32; w++) shadow[w] = {8'(2 * w), 8'(2 * w + 1)};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    check(!busy, "idle after reset");
    for (int w = 0; w < 32; w++) read_check(w);
    for (int t = 0; t < 40; t++) begin
      int a;
      a = $urandom % 32;
      write(a, 16'($urandom), 1'b1, 1'b1);
      read_check(a);
      a = $urandom % 32;
      write(a, 16'($urandom), 1'b0, 1'b0);
      read_check(a);
    end
    for (int w = 0; w < 32; w++) read_check(w);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mem_ctrl: self-checking test of the memory control with the EEPROM and
// charge pump models attached.
//
// A byte-wide shadow memory (factory pattern: byte n holds n) is the
// reference. Random READ_BYTE and WRITE4 requests, including addresses past
// the 64-byte memory and misaligned writes, are issued; rdata and err are
// compared with the shadow. Timing: a read must take 3 clocks from req to
// done; a write must keep the pump on and take at least the pump ramp plus
// two programming times. The pump must be off when no write is running.
module tb_mem_ctrl;
  import rfid_pkg::*;

  localparam int RAMP = 6, PROG = 9;

  logic clk = 1'b0, rst_n = 1'b0;
  logic        req = 1'b0;
  mem_op_e     op = MEM_READ_BYTE;
  logic [7:0]  addr = '0, rdata;
  logic [31:0] wdata = '0;
  logic        done, err;
  logic [4:0]  ee_addr;
  logic        ee_re, ee_we, ee_busy, pump_en, pump_hv_ok;
  logic [15:0] ee_rdata, ee_wdata;
  logic [7:0]  shadow [64];
  int checks = 0, failures = 0;

  mem_ctrl dut (.clk, .rst_n, .req, .op, .addr, .wdata, .done, .err, .rdata,
                .ee_addr, .ee_re, .ee_rdata, .ee_we, .ee_wdata, .ee_busy,
                .pump_en, .pump_hv_ok);
  eeprom #(.PROG_CYCLES(PROG)) u_ee (.clk, .rst_n, .addr(ee_addr), .re(ee_re), .rdata(ee_rdata),
                                     .we(ee_we), .wdata(ee_wdata), .hv_ok(pump_hv_ok), .busy(ee_busy));
  charge_pump #(.RAMP_CYCLES(RAMP)) u_cp (.clk, .rst_n, .en(pump_en), .hv_ok(pump_hv_ok));

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

  // Issue one request and wait for done; returns the clocks it took.
  task automatic issue(input mem_op_e o, input logic [7:0] a, input logic [31:0] d, output int n);
    @(negedge clk);
    req   = 1'b1;
    op    = o;
    addr  = a;
    wdata = d;
    @(negedge clk);
    req = 1'b0;
    n = 1;
    while (!done && n < 10000) begin
      @(negedge clk);
      n++;
    end
  endtask

  int n_rd = 0, n_wr = 0, n_err = 0;

  task automatic do_read(input logic [7:0] a);
    int n;
    logic bad;
    bad = (a >= 64);
    issue(MEM_READ_BYTE, a, '0, n);
    check(err == bad, $sformatf("read %0d err=%0d", a, err));
    if (!bad) begin
      check(rdata == shadow[a], $sformatf("read %0d: %h, expected %h", a, rdata, shadow[a]));
      check(n == 4, $sformatf("read took %0d clocks", n - 1));
      n_rd++;
    end else n_err++;
  endtask

  task automatic do_write(input logic [7:0] a, input logic [31:0] d);
    int n;
    logic bad;
    bad = (a >= 64) || (a[1:0] != 0);
    issue(MEM_WRITE4, a, d, n);
    check(err == bad, $sformatf("write %0d err=%0d", a, err));
    if (!bad) begin
      for (int b = 0; b < 4; b++) shadow[a + b] = d[31 - 8 * b -: 8];
      check(n > RAMP + 2 * PROG, $sformatf("write took %0d clocks", n - 1));
      n_wr++;
    end else n_err++;
    check(!pump_en, "pump off after the write");
  endtask

  // The pump may only run during a write.
  logic in_write = 1'b0;
  always @(posedge clk) begin
    if (req && op == MEM_WRITE4) in_write <= 1'b1;
    if (done) in_write <= 1'b0;
    if (rst_n && pump_en && !in_write && !(req && op == MEM_WRITE4)) begin
      failures++;
      $display("FAIL: pump on outside a write");
    end
  end

  initial begin
    for (int b = 0; b < 64; b++) shadow[b] = 8'(b);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < 64; b += 7) do_read(8'(b));
    for (int t = 0; t < 60; t++) begin
      logic [7:0] a;
      case ($urandom % 4)
        0: a = 8'($urandom % 16) * 4;         // aligned, in range
        1: a = 8'($urandom % 64);             // possibly misaligned
        2: a = 8'($urandom);                  // possibly out of range
        default: a = 8'($urandom % 16) * 4;
      endcase
      if ($urandom % 2) do_write(a, $urandom);
      else              do_read(a);
      do_read(8'($urandom % 64));
    end
    for (int b = 0; b < 64; b++) do_read(8'(b));
    check(n_rd > 0 && n_wr > 0 && n_err > 0, $sformatf("reads %0d writes %0d errors %0d", n_rd, n_wr, n_err));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

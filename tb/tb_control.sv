// tb_control: self-checking test of the control module with its CRC-16 unit.
//
// Two tags are driven with the same decoded-bit stream: tag 0 built with both
// commands (CMD_SET = 11), tag 1 reduced to READ only (CMD_SET = 01). Each
// has a small memory-control model (done 3 clocks after req; read data is
// addr XOR A5; err for addresses from 64 on) and an encoder model that takes
// one bit every 4 clocks. Frames carry random addresses and data with a
// correct CRC, a corrupted CRC, an unknown command, a wrong length, or more
// than 64 bits. Expected responses (status, data and CRC) and expected memory
// requests are computed here from the reference CRC.
module tb_control;
  import rfid_pkg::*;
  import rfid_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic sof = 1'b0, bit_valid = 1'b0, bit_data = 1'b0, eof = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
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

  // Per-tag observations.
  logic        rsp_bits [2][$];
  int          rsp_frames [2];
  int          mem_reqs [2];
  mem_op_e     last_op [2];
  logic [7:0]  last_addr [2];
  logic [31:0] last_wdata [2];
  int          crc_errs [2];
  int          dones [2];

  for (genvar g = 0; g < 2; g++) begin : g_tag
    logic        crc_init, crc_en, crc_din, crc_residue_ok;
    logic [15:0] crc_value;
    logic        mem_req, mem_done = 1'b0, mem_err = 1'b0;
    mem_op_e     mem_op;
    logic [7:0]  mem_addr, mem_rdata = '0;
    logic [31:0] mem_wdata;
    logic        tx_valid, tx_bit, tx_last, tx_ready;
    logic        crc_error, cmd_done;
    int          tick = 0, mem_wait = 0;

    control #(.CMD_SET(g == 0 ? 2'b11 : 2'b01)) dut (
      .clk, .rst_n, .sof, .bit_valid, .bit_data, .eof,
      .crc_init, .crc_en, .crc_din, .crc_value, .crc_residue_ok,
      .mem_req, .mem_op, .mem_addr, .mem_wdata, .mem_done, .mem_err, .mem_rdata,
      .tx_valid, .tx_bit, .tx_last, .tx_ready, .crc_error, .cmd_done);
    crc16 u_crc (.clk, .rst_n, .init(crc_init), .en(crc_en), .din(crc_din),
                 .crc(crc_value), .residue_ok(crc_residue_ok));

    assign tx_ready = tx_valid && (tick % 4 == 0);

    always @(posedge clk) begin
      tick <= tick + 1;
      mem_done <= 1'b0;
      if (rst_n) begin
        if (mem_req) begin
          mem_reqs[g]++;
          last_op[g]    = mem_op;
          last_addr[g]  = mem_addr;
          last_wdata[g] = mem_wdata;
          mem_wait <= 3;
        end else if (mem_wait > 0) begin
          mem_wait <= mem_wait - 1;
          if (mem_wait == 1) begin
            mem_done  <= 1'b1;
            mem_err   <= (last_addr[g] >= 64);
            mem_rdata <= last_addr[g] ^ 8'hA5;
          end
        end
        if (tx_valid && tx_ready) begin
          rsp_bits[g].push_back(tx_bit);
          if (tx_last) rsp_frames[g]++;
        end
        if (crc_error) crc_errs[g]++;
        if (cmd_done) dones[g]++;
      end
    end
  end

  // Send a frame as decoded bits (right-aligned in f, n bits).
  task automatic send(input logic [127:0] f, input int n);
    @(negedge clk);
    sof = 1'b1;
    @(negedge clk);
    sof = 1'b0;
    for (int i = n - 1; i >= 0; i--) begin
      repeat ($urandom % 3) @(negedge clk);
      bit_valid = 1'b1;
      bit_data  = f[i];
      @(negedge clk);
      bit_valid = 1'b0;
    end
    eof = 1'b1;
    @(negedge clk);
    eof = 1'b0;
    repeat (250) @(negedge clk);     // execution and 24..32 response bits
  endtask

  // Compare tag g's response with a payload (right-aligned, n bits) + CRC.
  task automatic expect_rsp(input int g, input logic [127:0] payload, input int n, input int frames0);
    logic [127:0] full;
    full = with_crc(payload, n);
    check(rsp_frames[g] == frames0 + 1, $sformatf("tag %0d answers", g));
    check(rsp_bits[g].size() == n + 16, $sformatf("tag %0d response %0d bits", g, rsp_bits[g].size()));
    if (rsp_bits[g].size() == n + 16)
      for (int i = 0; i < n + 16; i++)
        check(rsp_bits[g][i] == full[n + 15 - i], $sformatf("tag %0d response bit %0d", g, i));
  endtask

  int kind_seen [6];

  initial begin
    for (int g = 0; g < 2; g++) begin
      rsp_frames[g] = 0; mem_reqs[g] = 0; crc_errs[g] = 0; dones[g] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 120; t++) begin
      logic [7:0]   a;
      logic [31:0]  d;
      logic [127:0] f;
      int kind, n, fr0, fr1, rq0, rq1, ce0, ce1;
      kind = $urandom % 6;
      a    = ($urandom % 4 == 0) ? 8'($urandom) : 8'($urandom % 64);
      d    = $urandom;
      fr0 = rsp_frames[0]; fr1 = rsp_frames[1];
      rq0 = mem_reqs[0];   rq1 = mem_reqs[1];
      ce0 = crc_errs[0];   ce1 = crc_errs[1];
      for (int g = 0; g < 2; g++) rsp_bits[g].delete();
      kind_seen[kind]++;
      case (kind)
        0: begin  // READ
          f = with_crc({CMD_READ, a}, 16);
          send(f, 32);
          for (int g = 0; g < 2; g++) begin
            check(mem_reqs[g] == (g == 0 ? rq0 : rq1) + 1, "read reaches memory");
            check(last_op[g] == MEM_READ_BYTE && last_addr[g] == a, "read request");
            if (a >= 64) expect_rsp(g, {STATUS_ERR, 8'h00}, 16, g == 0 ? fr0 : fr1);
            else         expect_rsp(g, {STATUS_OK, a ^ 8'hA5}, 16, g == 0 ? fr0 : fr1);
          end
        end
        1: begin  // WRITE4BYTE
          f = with_crc({CMD_WRITE4BYTE, a, d}, 48);
          send(f, 64);
          check(mem_reqs[0] == rq0 + 1, "write reaches memory");
          check(last_op[0] == MEM_WRITE4 && last_addr[0] == a && last_wdata[0] == d, "write request");
          expect_rsp(0, {(a >= 64) ? STATUS_ERR : STATUS_OK}, 8, fr0);
          check(mem_reqs[1] == rq1 && rsp_frames[1] == fr1, "reduced tag ignores WRITE4BYTE");
        end
        2: begin  // bad CRC
          f = with_crc({CMD_READ, a}, 16) ^ (128'd1 << ($urandom % 32));
          send(f, 32);
          check(crc_errs[0] == ce0 + 1 && crc_errs[1] == ce1 + 1, "CRC error flagged");
          check(mem_reqs[0] == rq0 && rsp_frames[0] == fr0, "bad frame discarded");
        end
        3: begin  // unknown command
          f = with_crc({8'h55, a}, 16);
          send(f, 32);
          check(mem_reqs[0] == rq0 && rsp_frames[0] == fr0 && crc_errs[0] == ce0, "unknown command ignored");
        end
        4: begin  // READ with the WRITE4BYTE length
          f = with_crc({CMD_READ, a, d}, 48);
          send(f, 64);
          check(mem_reqs[0] == rq0 && rsp_frames[0] == fr0, "wrong length ignored");
        end
        default: begin  // 80-bit frame: overflow
          f = with_crc({CMD_READ, a, d, d}, 80);
          send(f, 96);
          check(mem_reqs[0] == rq0 && rsp_frames[0] == fr0 && crc_errs[0] == ce0, "overlong frame dropped");
        end
      endcase
    end
    for (int k = 0; k < 6; k++) check(kind_seen[k] > 0, $sformatf("frame kind %0d exercised", k));
    check(dones[0] == mem_reqs[0], "cmd_done once per executed command");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

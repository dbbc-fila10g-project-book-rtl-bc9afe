// tb_plb_regs: writes every writable register and reads it back one clock
// later, checks reset values, the one-clock arm pulse (ARM not stored),
// read-only registers ignoring writes and live values of the status,
// RTC and frame monitors.
// The VDIF field register is written with all upper bits set to check
// that only its 20 bits are kept.
module tb_plb_regs;
  import fila10g_pkg::*;
  logic clk = 0, rst = 1;
  logic [3:0] bus_addr = '0;
  logic bus_wr = 0, bus_rd = 0;
  logic [31:0] bus_wdata = '0, bus_rdata;
  logic [31:0] rtc_base, config_bits, dest_ip, ref_rate;
  logic [7:0] years;
  logic arm_pulse;
  logic [15:0] dest_port, station_id;
  logic [19:0] vdif_cfg;
  logic [31:0] rtc_now = 32'h1234_5678, status_bits = 32'h0000_0043;
  logic [31:0] frames_sent = 32'd99, frame_sec = 32'd77;
  int checks = 0, failures = 0, arm_count = 0;

  always #5 clk = ~clk;
  plb_regs dut (.*);

  always @(posedge clk) if (arm_pulse) arm_count++;

  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  task automatic wr(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk); bus_addr = a; bus_wdata = d; bus_wr = 1;
    @(negedge clk); bus_wr = 0;
  endtask

  task automatic rd(input logic [3:0] a, output logic [31:0] d);
    @(negedge clk); bus_addr = a; bus_rd = 1;
    @(negedge clk); bus_rd = 0; d = bus_rdata;
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [31:0] v;
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    check(ref_rate == 32'd150_000_000, "reference rate reset value");
    check(config_bits == 32'h80, "configuration reset value (TVG on)");
    check(vdif_cfg == VDIF_CFG_RESET, "VDIF fields reset value");
    rd(REG_REF_RATE, v); check(v == 150_000_000, "read reset rate");
    wr(REG_RTC_BASE, 32'd1_275_264_000);
    wr(REG_YEARS, 32'h0000_010A);
    wr(REG_DEST_IP, 32'hC0A8_0102);
    wr(REG_DEST_PORT, 32'hABCD_2EE0);
    wr(REG_STATION, 32'h0000_4566);
    wr(REG_REF_RATE, 32'd100_000_000);
    wr(REG_VDIF, 32'hFFF3_2805);
    check(rtc_base == 32'd1_275_264_000 && years == 8'h0A && dest_ip == 32'hC0A8_0102 &&
          dest_port == 16'h2EE0 && station_id == 16'h4566 && ref_rate == 100_000_000 &&
          vdif_cfg == 20'h3_2805,
          "register outputs after writes");
    rd(REG_RTC_BASE, v);  check(v == 32'd1_275_264_000, "read base");
    rd(REG_YEARS, v);     check(v == 32'h0A, "read years (8 bits)");
    rd(REG_DEST_IP, v);   check(v == 32'hC0A8_0102, "read ip");
    rd(REG_DEST_PORT, v); check(v == 32'h2EE0, "read port (16 bits)");
    rd(REG_STATION, v);   check(v == 32'h4566, "read station");
    rd(REG_VDIF, v);      check(v == 32'h3_2805, "read VDIF fields (20 bits)");
    // configuration with ARM
    wr(REG_CONFIG, 32'h0000_0083);
    @(negedge clk);
    check(arm_count == 1, "arm pulse count after ARM write");
    check(config_bits == 32'h82 && !arm_pulse, "ARM bit not stored, pulse one clock");
    rd(REG_CONFIG, v); check(v == 32'h82, "read config");
    wr(REG_CONFIG, 32'h0000_0042);
    check(arm_count == 1, "no arm pulse without ARM bit");
    // read-only registers
    wr(REG_RTC_NOW, 32'hFFFF_FFFF);
    rd(REG_RTC_NOW, v); check(v == 32'h1234_5678, "rtc now");
    rtc_now = 32'd5;
    rd(REG_RTC_NOW, v); check(v == 32'd5, "rtc now live");
    rd(REG_STATUS, v);  check(v == 32'h43, "status");
    rd(REG_FRAMES, v);  check(v == 32'd99, "frames");
    rd(REG_FRAME_SEC, v); check(v == 32'd77, "frame second");
    rd(4'hF, v); check(v == 0, "unmapped reads 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

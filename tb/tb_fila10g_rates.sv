// tb_fila10g_rates: runs the FiLa10G user logic, at its default parameters,
// at each VSI-H input rate it is meant to carry, with the user logic at
// 150 MHz and no back pressure from the 10GbE side. Configurations: one
// port (32-bit) or two ports (64-bit) at 32, 64 and 128 MHz, all in Mark5B,
// and two ports at 128 MHz once more in VDIF, whose longer header makes it
// the tightest case (128 M words/s into a framer that takes
// PAYLOAD_WORDS + 5 clocks per frame). Then the user logic is slowed to
// 100 MHz, the lower-power option, and runs the two 4.096 Gb/s setups:
// one port at 128 MHz and two ports at 64 MHz.
//
// A simulated second is 10000 VSI clocks: 4 frames in 1xVSI mode and 8 in
// 2xVSI mode. The RTC reference rate is set to the user clocks in such a
// second, rounded (46875, 23438, 11719 at 150 MHz). For each configuration the data
// path is halted, the VSI clock changed, the RTC armed with a new base
// second, and three complete seconds of frames checked: every second must
// hold exactly its 4 or 8 frames numbered from 0, the payload must
// continue the VSI sample sequence without a gap, the header must carry
// the expected second (Mark5B time code and CRC, or VDIF seconds from the
// 2000 epoch), and no input FIFO may overflow and no 1PPS fall inside a
// frame. Port #2 is delayed by 1 ns against port #1 (cable skew).
module tb_fila10g_rates;
  import fila10g_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;
  localparam int PW = MK5B_PAYLOAD_WORDS;
  localparam int SEC_VSI = 10000;
  localparam int SECONDS = 3;

  logic user_clk = 0, user_rst = 1;
  logic [1:0] vsi_clk = '0, vsi_pps = '0, vsi_valid = '1;
  logic [1:0][31:0] vsi_data = '0;
  logic [3:0] bus_addr = '0;
  logic bus_wr = 0, bus_rd = 0;
  logic [31:0] bus_wdata = '0, bus_rdata;
  logic [63:0] tx_data;
  logic tx_valid, tx_eof;
  logic [31:0] tx_dest_ip;
  logic [15:0] tx_dest_port;
  logic tx_afull = 0, link_up = 1;

  int checks = 0, failures = 0;
  realtime vsi_half = 15.625, user_half = 1000.0 / 300.0;

  always #(user_half) user_clk = ~user_clk;
  initial forever #(vsi_half) vsi_clk[0] = ~vsi_clk[0];
  initial begin #1; forever #(vsi_half) vsi_clk[1] = ~vsi_clk[1]; end

  fila10g_top dut (.*);

  task automatic fail(string m); failures++; if (failures < 30) $display("FAIL: %s", m); endtask
  task automatic check(bit c, string m); checks++; if (!c) fail(m); endtask

  // ---------------- VSI sources: real data, a sample count per port ----------------
  int vsi_k[2] = '{0, 0};
  for (genvar p = 0; p < 2; p++) begin : g_src
    always @(posedge vsi_clk[p]) vsi_k[p] <= (vsi_k[p] >= SEC_VSI - 1) ? 0 : vsi_k[p] + 1;
    always @(negedge vsi_clk[p]) begin
      vsi_pps[p]  <= (vsi_k[p] == 0);
      vsi_data[p] <= (p == 0 ? 32'hA000_0000 : 32'hB000_0000) | 32'(vsi_k[p]);
    end
  end
  int pps_count = 0;
  always @(posedge vsi_clk[0]) if (vsi_pps[0]) pps_count++;

  // ---------------- register bus ----------------
  task automatic wr(input logic [3:0] a, input logic [31:0] d);
    @(negedge user_clk); bus_addr = a; bus_wdata = d; bus_wr = 1;
    @(negedge user_clk); bus_wr = 0;
  endtask
  task automatic rd(input logic [3:0] a, output logic [31:0] d);
    @(negedge user_clk); bus_addr = a; bus_rd = 1;
    @(negedge user_clk); bus_rd = 0; d = bus_rdata;
  endtask
  function automatic logic [31:0] cfg(bit mode64, bit halt, bit arm, logic [3:0] fmt);
    logic [31:0] c = '0;
    c[CFG_MODE64] = mode64; c[CFG_HALT] = halt; c[CFG_ARM] = arm;
    c[CFG_FMT_LSB +: 4] = fmt;
    return c;
  endfunction

  // ---------------- reference helpers ----------------
  function automatic logic [15:0] crc_ref(input logic [47:0] d);
    logic [15:0] c = 16'h0000;
    for (int i = 47; i >= 0; i--) begin
      logic f = d[i] ^ c[15];
      c = c << 1;
      c[0] = f; c[2] = c[2] ^ f; c[15] = c[15] ^ f;
    end
    return c;
  endfunction
  function automatic logic [31:0] timecode(input logic [31:0] t);
    int unsigned mjd = t / 86400 + 40587, sod = t % 86400;
    logic [31:0] r;
    for (int d = 0; d < 5; d++) begin r[4*d +: 4] = 4'(sod % 10); sod /= 10; end
    for (int d = 5; d < 8; d++) begin r[4*d +: 4] = 4'(mjd % 10); mjd /= 10; end
    return r;
  endfunction

  // ---------------- 10GbE side ----------------
  bit cur_mode64 = 0, cur_vdif = 0, running = 0;
  int beat = 0, exp_num = 0, in_sec = 0, full_secs = 0, secs_seen = 0;
  int trig_idx = 0;
  logic [31:0] base_sec, exp_sec;
  logic [63:0] hdr[4], prev_word;
  bit have_prev = 0;
  int hb;

  always @(posedge user_clk) begin
    hb = cur_vdif ? 4 : 2;
    if (tx_valid && !user_rst && running) begin
      if (beat < hb) hdr[beat] = tx_data;
      else begin
        if (cur_mode64) check(tx_data[63:32] == (tx_data[31:0] ^ 32'h1000_0000), "2x halves");
        else check(tx_data[63:32] == tx_data[31:0] + 1, "1x pair");
        if (have_prev && tx_data[27:0] != 0) begin
          logic [27:0] step;
          step = cur_mode64 ? 28'd1 : 28'd2;
          check(tx_data[27:0] == prev_word[27:0] + step,
                $sformatf("payload gap %h after %h", tx_data, prev_word));
        end
        if (beat == hb) begin
          if (tx_data[27:0] == 0) begin
            // a new second: the one before must have been complete
            if (secs_seen > 0) begin
              check(in_sec == (cur_mode64 ? 8 : 4),
                    $sformatf("%0d frames in a second", in_sec));
              full_secs++;
            end
            secs_seen++;
            in_sec = 0;
            exp_num = 0;
            exp_sec = base_sec + 32'(pps_count - trig_idx);
          end else begin
            check(have_prev, "stream did not start at a 1PPS");
            exp_num++;
          end
          in_sec++;
        end
        prev_word = tx_data; have_prev = 1;
      end
      check(tx_eof == (beat == PW + hb - 1), "tx_eof placement");
      if (beat == PW + hb - 1) begin
        if (!cur_vdif) begin
          check(hdr[0] == {16'h4566, 1'b0, 15'(exp_num), MK5B_SYNC},
                $sformatf("Mark5B word 0-1 %h, frame %0d", hdr[0], exp_num));
          check(hdr[1][31:0] == timecode(exp_sec),
                $sformatf("time code %h expected %h", hdr[1][31:0], timecode(exp_sec)));
          check(hdr[1][47:32] == crc_ref({hdr[1][31:0], hdr[1][63:48]}), "CRC");
        end else begin
          // years register 0: epoch 2000-01-01 = Unix 946684800
          check(hdr[0] == {2'b00, 6'd0, 24'(exp_num), 2'b00, 30'(exp_sec - 32'd946684800)},
                $sformatf("VDIF words 0-1 %h", hdr[0]));
          check(hdr[1][23:0] == 24'(PW + 4), "VDIF frame length");
        end
        check(tx_dest_ip == 32'h0A00_0001 && tx_dest_port == 16'd2630, "destination");
        beat = 0;
      end else beat++;
    end
  end

  // ---------------- scenario ----------------
  initial begin
    #60ms; fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int n_runs = 0;
  task automatic run(bit mode64, int mhz, bit vdif, logic [31:0] sec0, int user_mhz = 150);
    logic [31:0] v;
    int rate;
    wr(REG_CONFIG, cfg(mode64, 1, 0, FMT_MARK5B));
    running = 0;
    vsi_half = 500.0 / mhz;
    user_half = 500.0 / user_mhz;
    repeat (200) @(negedge user_clk);
    rate = (SEC_VSI * user_mhz + mhz / 2) / mhz;
    wr(REG_REF_RATE, 32'(rate));
    wr(REG_RTC_BASE, sec0);
    beat = 0; have_prev = 0; in_sec = 0; full_secs = 0; secs_seen = 0;
    cur_mode64 = mode64; cur_vdif = vdif; base_sec = sec0;
    running = 1;
    trig_idx = pps_count + 1;
    wr(REG_CONFIG, cfg(mode64, 0, 1, vdif ? FMT_VDIF : FMT_MARK5B));
    while (full_secs < SECONDS) @(negedge user_clk);
    rd(REG_STATUS, v);
    check(v[ST_PPS_SYNC] && v[ST_SENDING], "status sync/sending");
    check(!v[ST_FIFO0_OVF] && !v[ST_FIFO1_OVF], "input FIFO overflow");
    check(!v[ST_PPS_MISAL], "1PPS inside a frame");
    check(!v[ST_INVALID], "invalid word flagged");
    $display("%t %0dx32 bit @ %0d MHz %s, user clock %0d MHz: %0d seconds of %0d frames, %0d ns per second",
             $time, mode64 ? 2 : 1, mhz, vdif ? "VDIF" : "Mark5B", user_mhz, full_secs,
             mode64 ? 8 : 4, SEC_VSI * 1000 / mhz);
    n_runs++;
  endtask

  initial begin
    repeat (5) @(negedge user_clk);
    user_rst = 0;
    repeat (10) @(negedge user_clk);
    wr(REG_STATION, 32'h4566);
    wr(REG_DEST_IP, 32'h0A00_0001);
    wr(REG_DEST_PORT, 32'd2630);
    wr(REG_YEARS, 32'd0);
    run(0, 32, 0, 32'd1_300_000_000);
    run(0, 64, 0, 32'd1_300_086_390);
    run(0, 128, 0, 32'd1_300_172_000);
    run(1, 32, 0, 32'd1_300_258_000);
    run(1, 64, 0, 32'd1_300_344_000);
    run(1, 128, 0, 32'd1_300_430_000);
    run(1, 128, 1, 32'd1_300_516_000);
    run(0, 128, 0, 32'd1_300_602_000, 100);
    run(1, 64, 0, 32'd1_300_688_000, 100);
    check(n_runs == 9, "not every configuration ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fila10g_top: end-to-end test of the FiLa10G user logic at its default
// parameters (Mark5B frames of 1250 payload words, 512-word input FIFOs).
//
// Clocks: user logic 6.4 ns; two VSI ports at 10 ns from one source, port
// #2 delayed by 3 ns (cable skew). A simulated "second" is 10000 VSI
// clocks; software sets the RTC reference rate to the matching 15625 user
// clocks through the register bus, so every second holds 4 frames in
// 1xVSI mode and 8 in 2xVSI mode.
//
// The testbench plays the processor (register bus) and the 10GbE core
// (tx_afull back pressure, frame capture). Every received frame is checked
// independently of the design: sync word, station ID, T bit, frame
// number (0 on a new second, else previous + 1), VLBA time code of the
// expected second, CRC (Mark5B) or seconds since the 2010 epoch and the
// VDIF fields (VDIF), destination, and payload continuity for the test
// vector counters or the driven VSI data in either input mode.
// Scenario: arm the RTC, 1xVSI test vectors with random back pressure;
// one 1PPS arrives a clock early (1PPS inside a frame, half-word
// realignment); 2xVSI test vectors; 2xVSI real data with one invalid word;
// back pressure long enough to overflow the input FIFO; an unsupported
// output format (Mark5C); VDIF frames from 2xVSI real data; halt between
// phases. Each mechanism is counted, and one
// that never happened counts as a failure.
module tb_fila10g_top;
  import fila10g_pkg::*;
  localparam int PW = MK5B_PAYLOAD_WORDS;
  localparam int SEC_VSI = 10000;               // VSI clocks per second
  localparam logic [31:0] S0 = 32'd1_275_350_395;

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

  always #3.2 user_clk = ~user_clk;
  initial forever #5 vsi_clk[0] = ~vsi_clk[0];
  initial begin #3; forever #5 vsi_clk[1] = ~vsi_clk[1]; end

  fila10g_top dut (.*);

  task automatic fail(string m); failures++; if (failures < 30) $display("FAIL: %s", m); endtask
  task automatic check(bit c, string m); checks++; if (!c) fail(m); endtask

  // ---------------- VSI sources ----------------
  int vsi_k[2] = '{0, 0};     // clock index within the second, per port
  bit early_pps = 0;          // shorten one second by one clock
  int bad_valid_at = -1;      // clock index that gets Valid low (port #1)
  for (genvar p = 0; p < 2; p++) begin : g_src
    always @(posedge vsi_clk[p]) begin
      int len;
      len = (early_pps && p == 0) ? SEC_VSI - 1 : SEC_VSI;
      if (vsi_k[p] >= len - 1) begin
        vsi_k[p] <= 0;
        if (p == 0 && early_pps) early_pps <= 0;
      end else vsi_k[p] <= vsi_k[p] + 1;
    end
    always @(negedge vsi_clk[p]) begin
      vsi_pps[p]   <= (vsi_k[p] == 0);
      vsi_data[p]  <= (p == 0 ? 32'hA000_0000 : 32'hB000_0000) | 32'(vsi_k[p]);
      vsi_valid[p] <= !(p == 0 && vsi_k[p] == bad_valid_at);
    end
  end

  // ---------------- register bus ----------------
  task automatic wr(input logic [3:0] a, input logic [31:0] d);
    @(negedge user_clk); bus_addr = a; bus_wdata = d; bus_wr = 1;
    @(negedge user_clk); bus_wr = 0;
  endtask
  task automatic rd(input logic [3:0] a, output logic [31:0] d);
    @(negedge user_clk); bus_addr = a; bus_rd = 1;
    @(negedge user_clk); bus_rd = 0; d = bus_rdata;
  endtask

  function automatic logic [31:0] cfg(bit mode64, bit tvg, bit halt, bit arm, logic [3:0] fmt);
    logic [31:0] c = '0;
    c[CFG_MODE64] = mode64; c[CFG_TVG] = tvg; c[CFG_HALT] = halt; c[CFG_ARM] = arm;
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

  // ---------------- 10GbE side: frame capture and checks ----------------
  bit cur_mode64 = 0, cur_tvg = 1, random_bp = 0, hold_bp = 0;
  int beat = 0, exp_num = 0, frames = 0;
  bit have_prev = 0, cross_pending = 0, new_run = 1;
  int pps_count = 0, trig_idx = 0;
  always @(posedge vsi_clk[0]) if (vsi_pps[0]) pps_count++;
  int n_realign = 0;
  always @(posedge vsi_clk[0]) if (dut.u_pack.realign) n_realign++;
  logic [31:0] exp_sec;
  logic [63:0] hdr[4], prev_word;
  bit cur_vdif = 0;
  int hb;
  int n_vdif = 0, n_mk5b = 0;
  // mechanism counters
  int n_1x = 0, n_2x = 0, n_tvg = 0, n_real = 0, n_cross = 0, n_stall = 0;
  int n_misal = 0, n_ovf = 0, n_fmt = 0, n_halt = 0, n_invalid = 0;

  // true when w is the first word of a second, for the current mode
  function automatic bit is_sec_start(input logic [63:0] w);
    return cur_tvg ? (w[31:0] == 0) : (w[27:0] == 0);
  endfunction

  function automatic logic [31:0] low_seq(input logic [63:0] w);
    return cur_tvg ? w[31:0] : {4'h0, w[27:0]};
  endfunction

  always @(negedge user_clk) begin
    if (hold_bp) tx_afull <= 1;
    else tx_afull <= random_bp && ($urandom_range(0, 7) == 0);
  end

  always @(posedge user_clk) begin
    if (tx_afull && dut.sending) n_stall++;
    hb = cur_vdif ? 4 : 2;
    if (tx_valid && !user_rst) begin
      if (beat < hb) hdr[beat] = tx_data;
      else begin
        // ---- payload ----
        if (cur_mode64) begin
          if (cur_tvg) check(tx_data[63:32] == tx_data[31:0], "2x TVG halves differ");
          else check(tx_data[63:32] == (tx_data[31:0] ^ 32'h1000_0000), "2x real halves");
        end else begin
          if (cur_tvg) check(tx_data[63:32] == tx_data[31:0] + 1, "1x TVG pair");
          else check(tx_data[63:32] == tx_data[31:0] + 1, "1x real pair");
        end
        if (have_prev && !is_sec_start(tx_data)) begin
          logic [31:0] step;
          step = cur_mode64 ? 1 : 2;
          check(low_seq(tx_data) == low_seq(prev_word) + step,
                $sformatf("payload gap %h after %h", tx_data, prev_word));
        end
        if (beat == hb) begin
          if (is_sec_start(tx_data) || cross_pending || new_run) begin
            exp_num = 0;
            // frame 0 belongs to the second opened by the latest VSI#1 1PPS;
            // the RTC took S0 at the first 1PPS after arming
            if (!new_run) n_cross++;
            exp_sec = S0 + 32'(pps_count - trig_idx);
          end else exp_num++;
          cross_pending = 0;
          new_run = 0;
        end else if (is_sec_start(tx_data)) begin
          cross_pending = 1;
        end
        prev_word = tx_data; have_prev = 1;
      end
      check(tx_eof == (beat == PW + hb - 1), "tx_eof placement");
      if (beat == PW + hb - 1) begin
        frames++;
        if (cur_mode64) n_2x++; else n_1x++;
        if (cur_tvg) n_tvg++; else n_real++;
        if (!cur_vdif) begin
          n_mk5b++;
          check(hdr[0][31:0] == MK5B_SYNC, "sync word");
          check(hdr[0][63:32] == {16'h4566, cur_tvg, 15'(exp_num)},
                $sformatf("word1 %h expected frame %0d", hdr[0][63:32], exp_num));
          check(hdr[1][31:0] == timecode(exp_sec),
                $sformatf("time code %h expected %h", hdr[1][31:0], timecode(exp_sec)));
          check(hdr[1][47:32] == crc_ref({hdr[1][31:0], hdr[1][63:48]}), "CRC");
        end else begin
          // VDIF, epoch 2010-01-01 = Unix 1262304000 (years register = 10)
          n_vdif++;
          check(hdr[0] == {2'b00, 6'd20, 24'(exp_num), 2'b00, 30'(exp_sec - 32'd1262304000)},
                $sformatf("VDIF words 0-1 %h", hdr[0]));
          check(hdr[1] == {1'b0, 5'd1, 10'd0, 16'h4566, 3'd0, 5'd4, 24'(PW + 4)},
                $sformatf("VDIF words 2-3 %h", hdr[1]));
          check(hdr[2] == 0 && hdr[3] == 0, "VDIF extended user data");
        end
        check(tx_dest_ip == 32'hC0A8_0A02 && tx_dest_port == 16'd46227, "destination");
        beat = 0;
      end else beat++;
    end
  end

  // ---------------- scenario ----------------
  initial begin
    #60ms; fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic restart(bit mode64, bit tvg, bit vdif = 0);
    wr(REG_CONFIG, cfg(mode64, tvg, 1, 0, FMT_MARK5B));
    n_halt++;
    repeat (20) @(negedge user_clk);
    // a frame cut short by the halt is discarded; the stream restarts
    // with frame 0 of whatever second comes next
    beat = 0;
    cur_mode64 = mode64; cur_tvg = tvg; have_prev = 0; new_run = 1; cross_pending = 0;
    cur_vdif = vdif;
    wr(REG_CONFIG, cfg(mode64, tvg, 0, 0, vdif ? FMT_VDIF : FMT_MARK5B));
  endtask

  task automatic wait_frames(int n);
    int f0 = frames;
    while (frames < f0 + n) @(negedge user_clk);
  endtask

  logic [31:0] v;
  int f_before;
  initial begin
    repeat (5) @(negedge user_clk);
    user_rst = 0;
    repeat (10) @(negedge user_clk);
    rd(REG_STATUS, v);
    check(!v[ST_PPS_SYNC], "synced before arming");
    wr(REG_STATION, 32'h4566);
    wr(REG_DEST_IP, 32'hC0A8_0A02);
    wr(REG_DEST_PORT, 32'd46227);
    wr(REG_REF_RATE, 32'd15625);
    wr(REG_RTC_BASE, S0);
    // phase 1: 1xVSI test vectors, arm the RTC
    trig_idx = pps_count + 1;
    wr(REG_CONFIG, cfg(0, 1, 0, 1, FMT_MARK5B));
    random_bp = 1;
    $display("%t phase 1", $time);
    wait_frames(10);
    rd(REG_STATUS, v);
    check(v[ST_PPS_SYNC] && v[ST_LINK_UP] && v[ST_SENDING], "status after start");
    rd(REG_RTC_NOW, v);
    check(v >= S0 && v <= exp_sec + 1, $sformatf("RTC %0d vs frames %0d", v, exp_sec));
    // one 1PPS a clock early: 1PPS inside a frame and a half-word realign
    early_pps = 1;
    wait_frames(10);
    rd(REG_STATUS, v);
    if (v[ST_PPS_MISAL]) n_misal++;
    random_bp = 0;
    // phase 2: 2xVSI test vectors
    $display("%t phase 2", $time);
    restart(1, 1);
    wait_frames(12);
    // phase 3: 2xVSI real data with one invalid word
    $display("%t phase 3", $time);
    bad_valid_at = 777;
    restart(1, 0);
    wait_frames(12);
    rd(REG_STATUS, v);
    if (v[ST_INVALID]) n_invalid++;
    bad_valid_at = -1;
    // phase 4: 1xVSI real data, then back pressure until the FIFO overflows
    $display("%t 1xVSI real data", $time);
    restart(0, 0);
    wait_frames(6);
    while (beat < 100) @(negedge user_clk);
    hold_bp = 1;
    repeat (2000) @(negedge user_clk);
    rd(REG_STATUS, v);
    if (v[ST_FIFO0_OVF]) n_ovf++;
    hold_bp = 0;
    // phase 5: unsupported output format stops the output
    $display("%t unsupported output", $time);
    wr(REG_CONFIG, cfg(0, 1, 1, 0, FMT_MARK5B));
    repeat (20) @(negedge user_clk);
    beat = 0;
    rd(REG_STATUS, v);
    check(!v[ST_FIFO0_OVF], "halt did not clear overflow");
    wr(REG_CONFIG, cfg(0, 1, 0, 0, FMT_MARK5C));
    f_before = frames;
    repeat (5000) @(negedge user_clk);
    rd(REG_STATUS, v);
    if (v[ST_FMT_BAD]) n_fmt++;
    check(frames == f_before && !tx_valid, "frames sent in an unsupported format");
    // phase 6: VDIF, 2xVSI real data
    $display("%t VDIF", $time);
    wr(REG_YEARS, 32'd10);
    restart(1, 0, 1);
    wait_frames(12);
    // back to Mark5B, 1xVSI test vectors
    $display("%t back to Mark5B", $time);
    restart(0, 1);
    wait_frames(5);
    rd(REG_FRAMES, v);
    check(v > 0, "frames counter");

    $display("frames=%0d 1x=%0d 2x=%0d tvg=%0d real=%0d crossings=%0d stalls=%0d realign=%0d",
             frames, n_1x, n_2x, n_tvg, n_real, n_cross, n_stall, n_realign);
    $display("misaligned=%0d overflow=%0d fmt_bad=%0d halts=%0d invalid=%0d mark5b=%0d vdif=%0d",
             n_misal, n_ovf, n_fmt, n_halt, n_invalid, n_mk5b, n_vdif);
    check(n_1x > 0, "no 1xVSI frames");
    check(n_2x > 0, "no 2xVSI frames");
    check(n_tvg > 0, "no test vector frames");
    check(n_real > 0, "no real-data frames");
    check(n_cross > 0, "no second crossing");
    check(n_stall > 0, "no back-pressure stall");
    check(n_realign > 0, "no 32:64 realignment");
    check(n_misal > 0, "no misaligned 1PPS");
    check(n_ovf > 0, "no FIFO overflow");
    check(n_fmt > 0, "no unsupported-format stop");
    check(n_halt > 0, "no halt");
    check(n_vdif > 0, "no VDIF frames");
    check(n_mk5b > 0, "no Mark5B frames");
    check(n_invalid > 0, "no invalid-data flag");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_vsi_framer: drives the framer with a generated 64-bit stream (word
// i carries {~i, i}; a 1PPS marks each second boundary) and checks every
// frame on the transmit side against values computed here. The whole
// scenario runs twice, first in Mark5B and then in VDIF format:
//  - Mark5B: sync word, station ID, T bit, frame number (0 at each
//    second, then counting), the BCD MJD/second-of-day of the expected
//    second, a valid BCD fraction rising within a second, the CRC-16;
//  - VDIF: seconds since the reference epoch (computed here year by year
//    from the calendar), epoch, 24-bit frame number, frame length,
//    channel/bit/thread/station fields, zero extended user data;
//  - the payload is the unbroken input stream from the first 1PPS on;
//  - tx_eof on the last payload beat, destination address and port;
//  - nothing sent in a cycle after tx_afull was high;
//  - at full rate a frame takes PAYLOAD_WORDS + 3 (Mark5B) or + 5 (VDIF)
//    clocks.
// One second is made 4 words longer than the rest, so a 1PPS falls inside
// a frame; the next frame must then be frame 0 of the next second.
module tb_vsi_framer;
  import fila10g_pkg::*;
  localparam int PW = 8;
  localparam int PRE = 13;                    // words before the first 1PPS
  localparam int NSEC = 7;
  localparam int SEC_LEN[NSEC] = '{40, 40, 40, 44, 40, 40, 40};
  localparam logic [31:0] S0 = 32'd1_275_350_397;   // two seconds before midnight

  logic clk = 0, rst = 1, enable = 1, tvg_mode = 1;
  logic [15:0] station_id = 16'h4566;
  logic [31:0] dest_ip = 32'h0A00_0002;
  logic [15:0] dest_port = 16'd46227;
  logic [31:0] ref_rate = 32'd20000;
  logic rtc_synced = 0, rtc_armed = 0, rtc_trig = 0;
  logic [31:0] rtc_sec_near = S0;
  vsi64_word_t in_word;
  logic in_valid = 0, in_ready;
  logic [63:0] tx_data;
  logic tx_valid, tx_eof;
  logic [31:0] tx_dest_ip;
  logic [15:0] tx_dest_port;
  logic tx_afull = 0;
  logic sending, invalid_seen, pps_misaligned;
  logic [31:0] frame_sec, frames_sent;
  logic [23:0] frame_num;
  logic fmt_vdif = 0;
  logic [7:0] years = 8'd10;
  logic [19:0] vdif_cfg = {5'd3, 5'd1, 10'd517};

  int checks = 0, failures = 0;
  int total;
  bit pps_at[$];
  int idx = 0;
  bit full_rate = 0;

  always #5 clk = ~clk;

  vsi_framer #(.PAYLOAD_WORDS(PW)) dut (.*);

  // Unix time of 1 January of year 2000 + y, summed year by year
  function automatic logic [31:0] epoch_ref(input int y);
    longint t = 946684800;
    for (int k = 0; k < y; k++) begin
      int yr = 2000 + k;
      bit leap = (yr % 4 == 0) && ((yr % 100 != 0) || (yr % 400 == 0));
      t += (leap ? 366 : 365) * 86400;
    end
    return 32'(t);
  endfunction

  task automatic fail(string m); failures++; if (failures < 20) $display("FAIL: %s at %0t", m, $time); endtask
  task automatic check(bit c, string m); checks++; if (!c) fail(m); endtask

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

  function automatic bit bcd_ok(input logic [15:0] v);
    for (int d = 0; d < 4; d++) if (v[4*d +: 4] > 9) return 0;
    return 1;
  endfunction

  // ---------------- stimulus ----------------
  initial begin
    for (int i = 0; i < PRE; i++) pps_at.push_back(0);
    foreach (SEC_LEN[s]) for (int i = 0; i < SEC_LEN[s]; i++) pps_at.push_back(i == 0);
    total = pps_at.size();
  end

  always_comb begin
    in_word.data  = {~32'(idx), 32'(idx)};
    in_word.pps   = (idx < total) ? pps_at[idx] : 1'b0;
    in_word.valid = 1'b1;
  end

  initial begin
    #400000; fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (5) @(negedge clk);
    rtc_synced = 1; rtc_trig = 1;
    @(negedge clk) rtc_trig = 0;
  end

  always @(negedge clk) begin
    if (!rst) begin
      in_valid <= (idx < total) && (full_rate || $urandom_range(0, 4) != 0);
      tx_afull <= !full_rate && ($urandom_range(0, 5) == 0);
    end
  end

  logic afull_q;
  always @(posedge clk) begin
    afull_q <= tx_afull;
    if (in_valid && in_ready) idx <= idx + 1;
  end

  // ---------------- monitor ----------------
  int beat = 0, frames = 0, exp_idx = PRE, crossings = 0, exp_num = 0;
  bit cross_pending = 0, first = 1;
  logic [63:0] hdr[4];
  logic [15:0] last_frac;
  int last_eof_t = -1, cyc = 0, period_checks = 0;
  bit last_eof_full = 0;
  int last_num = -1;
  int hb;
  logic [31:0] s_exp;

  always @(posedge clk) begin
    cyc++;
    hb = fmt_vdif ? 4 : 2;
    if (tx_valid && !rst) begin
      check(!afull_q, "beat sent while tx_afull was high");
      if (beat < hb) hdr[beat] = tx_data;
      else begin
        if (beat == hb) begin
          // frame numbering decided by where the 1PPS words fell
          if (pps_at[exp_idx] || cross_pending || first) begin
            crossings++; exp_num = 0;
          end else exp_num++;
          cross_pending = 0; first = 0;
        end
        check(tx_data == {~32'(exp_idx), 32'(exp_idx)},
              $sformatf("payload word %0d: %h", exp_idx, tx_data));
        if (beat > hb && pps_at[exp_idx]) cross_pending = 1;
        exp_idx++;
      end
      check(tx_eof == (beat == PW + hb - 1), "tx_eof placement");
      if (beat == PW + hb - 1) begin
        frames++;
        s_exp = S0 + crossings - 1;
        if (!fmt_vdif) begin
          check(hdr[0][31:0] == MK5B_SYNC, "sync word");
          check(hdr[0][63:32] == {station_id, 1'b1, 15'(exp_num)},
                $sformatf("word1 %h, expected frame %0d", hdr[0][63:32], exp_num));
          check(hdr[1][31:0] == timecode(s_exp),
                $sformatf("time code %h vs %h", hdr[1][31:0], timecode(s_exp)));
          check(bcd_ok(hdr[1][63:48]), "fraction not BCD");
          if (exp_num != 0) check(hdr[1][63:48] > last_frac, "fraction not rising");
          last_frac = hdr[1][63:48];
          check(hdr[1][47:32] == crc_ref({hdr[1][31:0], hdr[1][63:48]}), "time code CRC");
        end else begin
          check(hdr[0][31:0] == {2'b00, 30'(s_exp - epoch_ref(int'(years)))},
                $sformatf("VDIF seconds %0d", hdr[0][29:0]));
          check(hdr[0][63:32] == {2'b00, 6'(2 * years), 24'(exp_num)}, "VDIF epoch/frame");
          check(hdr[1][31:0] == {3'd0, vdif_cfg[19:15], 24'(PW + 4)}, "VDIF word 2");
          check(hdr[1][63:32] == {1'b0, vdif_cfg[14:10], vdif_cfg[9:0], station_id}, "VDIF word 3");
          check(hdr[2] == 0 && hdr[3] == 0, "VDIF extended user data");
        end
        check(tx_dest_ip == dest_ip && tx_dest_port == dest_port, "destination");
        if (full_rate && last_eof_full && exp_num != 0 && last_num != -1) begin
          check(cyc - last_eof_t == PW + hb + 1,
                $sformatf("frame period %0d clocks", cyc - last_eof_t));
          period_checks++;
        end
        last_eof_t = cyc; last_eof_full = full_rate; last_num = exp_num;
        beat = 0;
      end else beat++;
    end
  end

  task automatic run_pass();
    wait (idx > PRE + 160);
    full_rate = 1;
    wait (idx >= total);
    repeat (40) @(posedge clk);
    check(frames >= (total - PRE) / PW - 1, $sformatf("only %0d frames", frames));
    check(frames_sent == 32'(frames), "frames_sent counter");
    check(crossings == NSEC, $sformatf("%0d second crossings", crossings));
    check(pps_misaligned, "misaligned 1PPS not flagged");
    check(period_checks > 0, "no full-rate frame period measured");
    check(!invalid_seen, "invalid flagged");
    $display("fmt_vdif=%0d frames=%0d crossings=%0d period_checks=%0d",
             fmt_vdif, frames, crossings, period_checks);
  endtask

  initial begin
    run_pass();
    // second pass in VDIF format, from reset
    @(negedge clk);
    rst = 1; fmt_vdif = 1; full_rate = 0;
    rtc_synced = 0;
    @(negedge clk);
    idx = 0; beat = 0; frames = 0; exp_idx = PRE; crossings = 0; exp_num = 0;
    cross_pending = 0; first = 1; last_eof_t = -1; last_eof_full = 0; last_num = -1;
    period_checks = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    repeat (5) @(negedge clk);
    rtc_synced = 1; rtc_trig = 1;
    @(negedge clk) rtc_trig = 0;
    run_pass();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

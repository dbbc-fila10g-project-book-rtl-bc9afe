// vsi_framer: packs the combined 64-bit VSI stream into Mark5B or VDIF
// frames and hands them, one frame per UDP payload, to the 10GbE UDP/IP
// core. fmt_vdif selects the format; both share the payload size, the
// 1PPS alignment and the flow control.
//
// Mark5B frame (64-bit words, earlier 32-bit word in bits [31:0]):
//   beat 0 : {word1, word0}  word0 = sync word 0xABADDEED
//                            word1 = {user 16 bits = station ID, T = test
//                                     vector mode, frame number [14:0]}
//   beat 1 : {word3, word2}  word2 = VLBA time code JJJSSSSS (BCD MJD mod
//                                     1000, BCD second of day)
//                            word3 = {.SSSS fraction (BCD, 0.1 ms),
//                                     CRC-16 of the 48 time-code bits}
// VDIF 1.0 frame (32-byte header, extended user data version 0):
//   beat 0 : {word1, word0}  word0 = {invalid 0, legacy 0, seconds since
//                                     the reference epoch [29:0]}
//                            word1 = {2'b00, reference epoch (half-years
//                                     since 2000) [5:0], frame number [23:0]}
//   beat 1 : {word3, word2}  word2 = {version 0, log2(channels) [4:0],
//                                     frame length in 8-byte units [23:0]}
//                            word3 = {real data 0, bits per sample - 1
//                                     [4:0], thread ID [9:0], station ID}
//   beats 2, 3 : zero (extended user data)
// then PAYLOAD_WORDS beats of VSI data, unchanged (10000 bytes = 1250
// words at the default size); tx_eof marks the last payload beat.
// The VDIF reference epoch is 1 January of the year 2000 + years; its Unix
// time is 946684800 + 86400 * (365 * years + number of leap days before
// it), valid for years 0 to 31.
//
// Seconds: frames are aligned to the 1PPS carried in the data. A word with
// 1PPS starts frame 0 of a new second. The framer keeps its own second
// count: at the first 1PPS word after the RTC has been (re)triggered it
// loads the RTC value rounded to the nearest second (rtc_sec_near), and
// after that adds one at every 1PPS word. A 1PPS word that turns up in the
// middle of a frame is sent as data and the next frame is numbered 0 of
// the next second. Each new second is converted to the BCD time code by
// unix_to_vlba while the 1PPS word waits at the input (about 50 clocks,
// absorbed by the input FIFOs); the fraction of second is read from a
// subsec_timer that restarts at each 1PPS word.
//
// Start-up: while disabled, or before the RTC is synchronised, input words
// are read and dropped; the first frame starts at a 1PPS word.
// Flow control: nothing is emitted while tx_afull is high; input words are
// taken only while a payload beat can be sent (in_valid/in_ready, a word
// moves when both are high). tx_* outputs are registered. At full rate a
// frame takes PAYLOAD_WORDS + 3 (Mark5B) or + 5 (VDIF) clocks.
// The header contents (Mark5B sync word, frame number reset at each
// second, VLBA BCD time; VDIF seconds from an epoch given by years since
// 2000) follow the formats the design targets; the station ID in the
// Mark5B user field, the T bit source, the CRC bit order, the fraction
// source, the whole-year VDIF epoch and the VDIF channel/bit fields taken
// from a register are choices made here.
module vsi_framer
  import fila10g_pkg::*;
#(
  parameter int unsigned PAYLOAD_WORDS = MK5B_PAYLOAD_WORDS
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  input  logic        fmt_vdif,    // 0: Mark5B, 1: VDIF
  input  logic        tvg_mode,
  input  logic [7:0]  years,       // years since 2000 (VDIF epoch)
  input  logic [19:0] vdif_cfg,    // {log2 channels[4:0], bits-1[4:0], thread[9:0]}
  input  logic [15:0] station_id,
  input  logic [31:0] dest_ip,
  input  logic [15:0] dest_port,
  input  logic [31:0] ref_rate,
  // RTC
  input  logic        rtc_synced,
  input  logic        rtc_armed,
  input  logic        rtc_trig,
  input  logic [31:0] rtc_sec_near,
  // combined VSI stream
  input  vsi64_word_t in_word,
  input  logic        in_valid,
  output logic        in_ready,
  // 10GbE UDP core transmit side
  output logic [63:0] tx_data,
  output logic        tx_valid,
  output logic        tx_eof,
  output logic [31:0] tx_dest_ip,
  output logic [15:0] tx_dest_port,
  input  logic        tx_afull,
  // status
  output logic        sending,
  output logic        invalid_seen,
  output logic        pps_misaligned,
  output logic [31:0] frame_sec,
  output logic [23:0] frame_num,
  output logic [31:0] frames_sent
);
  typedef enum logic [2:0] {S_WAIT, S_CONV, S_HDR, S_PAY, S_NEXT} state_e;
  state_e state;

  localparam int unsigned CW = $clog2(PAYLOAD_WORDS + 1);
  logic [CW-1:0] beat;
  logic          seeded, pending, conv_start;
  logic [15:0]   frac_bcd, frac_q;
  logic [11:0]   mjd_bcd;
  logic [19:0]   sod_bcd;
  logic          conv_busy, conv_done, tmr_clear;
  logic [31:0]   word1, word2, word3;
  logic [1:0]    hbeat;     // header beat
  logic [63:0]   hdr_beat;  // header beat being sent
  logic [31:0]   epoch_unix, vdif_sec;
  logic [63:0]   vdif_b0, vdif_b1;
  logic [23:0]   vdif_len;
  logic          new_sec;   // head word opens a new second

  assign new_sec = in_valid && (in_word.pps || pending);

  unix_to_vlba u_conv (
    .clk, .rst,
    .start   (conv_start),
    .unix_sec(frame_sec),
    .busy    (conv_busy),
    .done    (conv_done),
    .mjd_bcd (mjd_bcd),
    .sod_bcd (sod_bcd)
  );

  subsec_timer u_frac (
    .clk, .rst,
    .clear   (tmr_clear),
    .ref_rate(ref_rate),
    .frac_bcd(frac_bcd)
  );

  assign word1 = {station_id, tvg_mode, frame_num[14:0]};
  assign word2 = {mjd_bcd, sod_bcd};
  assign word3 = {frac_q, vlba_crc16({word2, frac_q})};

  // VDIF epoch: 1 January of 2000 + years, in Unix seconds. Leap days
  // before that date: years 2000, 2004, ... i.e. (years + 3) / 4.
  assign epoch_unix = 32'd946_684_800 +
                      32'd86400 * (32'd365 * 32'(years) + ((32'(years) + 32'd3) >> 2));
  assign vdif_sec   = frame_sec - epoch_unix;
  assign vdif_len   = 24'(PAYLOAD_WORDS + 4);
  assign vdif_b0    = {2'b00, 6'(years << 1), frame_num,
                       1'b0, 1'b0, vdif_sec[29:0]};
  assign vdif_b1    = {1'b0, vdif_cfg[14:10], vdif_cfg[9:0], station_id,
                       3'd0, vdif_cfg[19:15], vdif_len};

  always_comb begin
    unique case ({fmt_vdif, hbeat})
      3'b0_00: hdr_beat = {word1, MK5B_SYNC};
      3'b0_01: hdr_beat = {word3, word2};
      3'b1_00: hdr_beat = vdif_b0;
      3'b1_01: hdr_beat = vdif_b1;
      default: hdr_beat = '0;
    endcase
  end

  // Input handshake: drop words while waiting for 1PPS, pass payload.
  always_comb begin
    in_ready = 1'b0;
    unique case (state)
      S_WAIT:  in_ready = !(enable && rtc_synced && in_word.pps);
      S_PAY:   in_ready = !tx_afull;
      default: in_ready = 1'b0;
    endcase
  end

  assign tmr_clear = enable && (
                       ((state == S_WAIT || state == S_NEXT) && rtc_synced && new_sec) ||
                       (state == S_PAY && in_valid && in_ready && in_word.pps && beat != '0));
  assign sending   = (state != S_WAIT);

  always_ff @(posedge clk) begin
    if (rst) begin
      state          <= S_WAIT;
      beat           <= '0;
      hbeat          <= '0;
      seeded         <= 1'b0;
      pending        <= 1'b0;
      conv_start     <= 1'b0;
      frame_sec      <= '0;
      frame_num      <= '0;
      frac_q         <= '0;
      frames_sent    <= '0;
      invalid_seen   <= 1'b0;
      pps_misaligned <= 1'b0;
      tx_data        <= '0;
      tx_valid       <= 1'b0;
      tx_eof         <= 1'b0;
      tx_dest_ip     <= '0;
      tx_dest_port   <= '0;
    end else begin
      conv_start <= 1'b0;
      tx_valid   <= 1'b0;
      tx_eof     <= 1'b0;
      if (rtc_trig) seeded <= 1'b0;

      if (!enable) begin
        state   <= S_WAIT;
        hbeat   <= '0;
        pending <= 1'b0;
      end else begin
        unique case (state)
          S_WAIT, S_NEXT: begin
            if (state == S_WAIT && !rtc_synced) begin
              // keep dropping input until the RTC is synchronised
            end else if (new_sec) begin
              // first word of a new second: frame 0, new time code
              if (!seeded || rtc_trig) begin
                frame_sec <= rtc_sec_near;
                seeded    <= !rtc_armed && !rtc_trig;
              end else begin
                frame_sec <= frame_sec + 32'd1;
              end
              frame_num  <= '0;
              pending    <= 1'b0;
              conv_start <= 1'b1;
              state      <= S_CONV;
            end else if (state == S_NEXT && in_valid) begin
              frame_num <= frame_num + 24'd1;
              state     <= S_HDR;
            end
          end
          S_CONV: begin
            if (conv_done && !conv_busy && !conv_start) state <= S_HDR;
          end
          S_HDR: begin
            if (!tx_afull) begin
              tx_data  <= hdr_beat;
              tx_valid <= 1'b1;
              if (hbeat == 2'd0) begin
                tx_dest_ip   <= dest_ip;
                tx_dest_port <= dest_port;
                frac_q       <= frac_bcd;
              end
              hbeat <= hbeat + 2'd1;
              if (hbeat == (fmt_vdif ? 2'd3 : 2'd1)) begin
                hbeat <= '0;
                beat  <= '0;
                state <= S_PAY;
              end
            end
          end
          S_PAY: begin
            if (in_valid && !tx_afull) begin
              tx_data  <= in_word.data;
              tx_valid <= 1'b1;
              if (!in_word.valid) invalid_seen <= 1'b1;
              if (in_word.pps && beat != '0) begin
                pending        <= 1'b1;
                pps_misaligned <= 1'b1;
              end
              if (beat == CW'(PAYLOAD_WORDS - 1)) begin
                tx_eof      <= 1'b1;
                frames_sent <= frames_sent + 32'd1;
                state       <= S_NEXT;
              end else begin
                beat <= beat + 1'b1;
              end
            end
          end
          default: state <= S_WAIT;
        endcase
      end
    end
  end

endmodule

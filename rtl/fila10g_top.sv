// fila10g_top: FiLa10G user logic. Takes one (32-bit) or two (64-bit)
// VSI-H ports, frames the samples as Mark5B or VDIF and streams the
// frames, one per UDP payload, to a 10GbE UDP/IP core.
//
// Clock domains:
//   vsi_clk[0], vsi_clk[1] : VSI-H port clocks, 16..128 MHz, unrelated
//                            phase (separate cables)
//   user_clk               : user logic, 150 MHz (100 MHz also works up
//                            to 6.4 Gb/s of input); also the register bus
// Data path: per port, vsi_tvg (real data or counter test vectors) gives
// {1PPS, Valid, data} words. Port #1 goes through vsi_pack into a 64-bit
// async_fifo (the 32:64 input FIFO: pairs in 1xVSI mode, single words in
// 2xVSI mode); port #2 goes into a 32-bit async_fifo. In user_clk the
// input_combiner passes port #1's packed words on (1xVSI) or reads both
// FIFOs side by side (2xVSI); vsi_framer adds the headers and drives
// tx_*. The combiner takes one 64-bit word per user clock in both modes. Time: the VSI#1
// 1PPS, moved into user_clk by pulse_sync, triggers the rtc, whose seconds
// the framer turns into the VLBA BCD time code. plb_regs holds the
// software-visible configuration and status.
// Configuration bit HALT holds the whole data path in reset (FIFOs,
// test vector generators, combiner, framer) and clears the sticky
// overflow flags. Port #2's FIFO is written only in 2xVSI mode. The
// Mark5C output format is not built: selecting it (or any unknown format)
// stops the data path and raises ST_FMT_BAD.
// The 10GbE core, the processor and the clock managers are outside this
// module: the 10GbE transmit port follows the common 64-bit
// data/valid/end-of-frame/destination style with an almost-full back
// pressure, which is a choice made here.
module fila10g_top
  import fila10g_pkg::*;
#(
  parameter int unsigned PAYLOAD_WORDS    = MK5B_PAYLOAD_WORDS,
  parameter int unsigned FIFO_ADDR_W      = 9,
  parameter logic [31:0] REF_RATE_DEFAULT = 32'd150_000_000
) (
  input  logic             user_clk,
  input  logic             user_rst,
  // VSI-H ports
  input  logic [1:0]       vsi_clk,
  input  logic [1:0]       vsi_pps,
  input  logic [1:0]       vsi_valid,
  input  logic [1:0][31:0] vsi_data,
  // processor register bus (user_clk)
  input  logic [3:0]       bus_addr,
  input  logic             bus_wr,
  input  logic [31:0]      bus_wdata,
  input  logic             bus_rd,
  output logic [31:0]      bus_rdata,
  // 10GbE UDP core transmit interface
  output logic [63:0]      tx_data,
  output logic             tx_valid,
  output logic             tx_eof,
  output logic [31:0]      tx_dest_ip,
  output logic [15:0]      tx_dest_port,
  input  logic             tx_afull,
  input  logic             link_up
);
  logic        sending, invalid_seen, pps_misaligned;
  logic [31:0] frame_sec, frames_sent;
  logic [23:0] frame_num;
  logic [19:0] vdif_cfg;

  // ---------------- registers ----------------
  logic [31:0] rtc_base, config_bits, dest_ip, ref_rate, rtc_now, status_bits;
  logic [7:0]  years;
  logic [15:0] dest_port, station_id;
  logic        arm_pulse;

  plb_regs #(.REF_RATE_DEFAULT(REF_RATE_DEFAULT)) u_regs (
    .clk(user_clk), .rst(user_rst),
    .bus_addr, .bus_wr, .bus_wdata, .bus_rd, .bus_rdata,
    .rtc_base, .years, .config_bits, .arm_pulse, .dest_ip, .dest_port,
    .station_id, .ref_rate, .vdif_cfg, .rtc_now, .status_bits, .frames_sent, .frame_sec
  );

  logic        halt, mode64, tvg_en, fmt_ok, dp_rst, dp_enable;
  out_format_e fmt;
  assign halt      = config_bits[CFG_HALT];
  assign mode64    = config_bits[CFG_MODE64];
  assign tvg_en    = config_bits[CFG_TVG];
  assign fmt       = out_format_e'(config_bits[CFG_FMT_LSB +: 4]);
  assign fmt_ok    = (fmt == FMT_MARK5B) || (fmt == FMT_VDIF);
  assign dp_rst    = user_rst || halt;
  assign dp_enable = fmt_ok;

  // ---------------- VSI port domains ----------------
  vsi_word_t        src_word [2];   // per port, from vsi_tvg
  logic [1:0]       vrst, ven, vtvg, vmode64;
  vsi64_word_t      pack_word;      // port #1 after 32:64 packing
  logic             pack_we, pack_realign;
  vsi64_word_t      f0_rdata;
  vsi_word_t        f1_rdata;
  logic [1:0]       fifo_empty, fifo_pop, fifo_ovf, fifo_ovf_u;
  logic [FIFO_ADDR_W:0] fifo_count [2];

  for (genvar p = 0; p < 2; p++) begin : g_port
    logic [3:0] ctl;   // {port enabled, 2xVSI mode, test vector mode, reset}
    sync_2ff #(.WIDTH(4)) u_ctl (
      .clk(vsi_clk[p]), .rst(1'b0),
      .d({(p == 0) || mode64, mode64, tvg_en, dp_rst}),
      .q(ctl)
    );
    assign {ven[p], vmode64[p], vtvg[p], vrst[p]} = ctl;

    vsi_tvg u_tvg (
      .clk(vsi_clk[p]), .rst(vrst[p]), .tvg_en(vtvg[p]),
      .vsi_pps(vsi_pps[p]), .vsi_valid(vsi_valid[p]), .vsi_data(vsi_data[p]),
      .out_word(src_word[p])
    );
  end

  // port #1: 32:64 input FIFO (packer on the VSI side, 64-bit FIFO)
  vsi_pack u_pack (
    .clk(vsi_clk[0]), .rst(vrst[0]), .mode64(vmode64[0]),
    .in_word(src_word[0]), .out_word(pack_word), .out_we(pack_we),
    .realign(pack_realign)
  );

  async_fifo #(.WIDTH($bits(vsi64_word_t)), .ADDR_W(FIFO_ADDR_W)) u_fifo0 (
    .wr_clk(vsi_clk[0]), .wr_rst(vrst[0]), .wr_en(pack_we),
    .wr_data(pack_word), .wr_full(), .wr_overflow(fifo_ovf[0]),
    .rd_clk(user_clk), .rd_rst(dp_rst), .rd_en(fifo_pop[0]),
    .rd_data(f0_rdata), .rd_empty(fifo_empty[0]), .rd_count(fifo_count[0])
  );

  // port #2: 32-bit input FIFO, written only in 2xVSI mode
  async_fifo #(.WIDTH($bits(vsi_word_t)), .ADDR_W(FIFO_ADDR_W)) u_fifo1 (
    .wr_clk(vsi_clk[1]), .wr_rst(vrst[1]), .wr_en(ven[1]),
    .wr_data(src_word[1]), .wr_full(), .wr_overflow(fifo_ovf[1]),
    .rd_clk(user_clk), .rd_rst(dp_rst), .rd_en(fifo_pop[1]),
    .rd_data(f1_rdata), .rd_empty(fifo_empty[1]), .rd_count(fifo_count[1])
  );

  sync_2ff #(.WIDTH(2)) u_ovf_sync (
    .clk(user_clk), .rst(dp_rst), .d(fifo_ovf), .q(fifo_ovf_u)
  );

  // ---------------- 1PPS and real-time clock ----------------
  logic pps_u, rtc_synced, rtc_armed, rtc_trig, rtc_tick;
  logic [31:0] rtc_sec_near;

  pulse_sync u_pps_sync (
    .src_clk(vsi_clk[0]), .src_rst(1'b0), .src_pulse(vsi_pps[0]),
    .dst_clk(user_clk), .dst_rst(user_rst), .dst_pulse(pps_u)
  );

  rtc u_rtc (
    .clk(user_clk), .rst(user_rst), .arm(arm_pulse),
    .base_second(rtc_base), .ref_rate(ref_rate), .pps(pps_u),
    .seconds(rtc_now), .sec_near(rtc_sec_near), .synced(rtc_synced),
    .armed(rtc_armed), .trig(rtc_trig), .tick(rtc_tick)
  );

  // ---------------- combiner and framer ----------------
  vsi64_word_t comb_word;
  logic        comb_valid, comb_ready, realign;

  input_combiner #(.ADDR_W(FIFO_ADDR_W)) u_comb (
    .clk(user_clk), .rst(dp_rst), .enable(dp_enable), .mode64,
    .f0_data(f0_rdata), .f0_empty(fifo_empty[0]), .f0_count(fifo_count[0]),
    .f0_pop(fifo_pop[0]),
    .f1_data(f1_rdata), .f1_count(fifo_count[1]), .f1_pop(fifo_pop[1]),
    .out_word(comb_word), .out_valid(comb_valid), .out_ready(comb_ready),
    .realign
  );

  vsi_framer #(.PAYLOAD_WORDS(PAYLOAD_WORDS)) u_framer (
    .clk(user_clk), .rst(dp_rst), .enable(dp_enable),
    .fmt_vdif(fmt == FMT_VDIF), .tvg_mode(tvg_en), .years, .vdif_cfg,
    .station_id, .dest_ip, .dest_port, .ref_rate,
    .rtc_synced, .rtc_armed, .rtc_trig, .rtc_sec_near,
    .in_word(comb_word), .in_valid(comb_valid), .in_ready(comb_ready),
    .tx_data, .tx_valid, .tx_eof, .tx_dest_ip, .tx_dest_port, .tx_afull,
    .sending, .invalid_seen, .pps_misaligned, .frame_sec, .frame_num,
    .frames_sent
  );

  // ---------------- status ----------------
  always_comb begin
    status_bits               = '0;
    status_bits[ST_PPS_SYNC]  = rtc_synced;
    status_bits[ST_LINK_UP]   = link_up;
    status_bits[ST_FIFO0_OVF] = fifo_ovf_u[0];
    status_bits[ST_FIFO1_OVF] = fifo_ovf_u[1];
    status_bits[ST_FMT_BAD]   = !fmt_ok;
    status_bits[ST_INVALID]   = invalid_seen;
    status_bits[ST_SENDING]   = sending;
    status_bits[ST_PPS_MISAL] = pps_misaligned;
  end

endmodule

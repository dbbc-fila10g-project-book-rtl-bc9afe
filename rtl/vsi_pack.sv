// vsi_pack: write side of the 32:64 input FIFO of VSI port #1.
//
// Runs in the port's VSI clock domain, between the data source (vsi_tvg)
// and the port's 64-bit input FIFO, and produces the FIFO's write word and
// write enable. Packing before the FIFO lets the user-logic side read a
// whole 64-bit word per clock in both modes, so the user clock need only
// exceed the 64-bit word rate.
// 1xVSI (mode64 = 0): two consecutive 32-bit words become one 64-bit word,
//   the earlier one in bits [31:0], written on the clock after the second
//   word arrives (one write every other clock). 1PPS and Valid of the pair
//   are those of the lower word and the AND of both Valid bits. A word
//   carrying 1PPS always starts a new pair: if it arrives while a lower
//   word is held, that word is discarded and realign pulses for one clock.
//   Every VSI-H rate gives an even number of words per second, so after
//   start-up this happens only if a 1PPS is lost or misplaced.
// 2xVSI (mode64 = 1): every word is written on its own, in bits [31:0] of
//   the 64-bit word with the upper half zero.
// mode64 must be static while rst is low (it changes only while the data
// path is halted). Latency: one clock from in_word to the write.
// The 32:64 input FIFO for 1xVSI mode follows the design; the packing
// order and the 1PPS realignment are choices here.
module vsi_pack
  import fila10g_pkg::*;
(
  input  logic        clk,       // VSI port clock
  input  logic        rst,
  input  logic        mode64,    // already synchronised into clk
  input  vsi_word_t   in_word,   // one word every clock
  output vsi64_word_t out_word,
  output logic        out_we,
  output logic        realign
);
  vsi_word_t low_q;
  logic      have_low;

  always_ff @(posedge clk) begin
    if (rst) begin
      low_q    <= '0;
      have_low <= 1'b0;
      out_word <= '0;
      out_we   <= 1'b0;
      realign  <= 1'b0;
    end else if (mode64) begin
      have_low <= 1'b0;
      out_word <= '{pps: in_word.pps, valid: in_word.valid, data: {32'd0, in_word.data}};
      out_we   <= 1'b1;
      realign  <= 1'b0;
    end else begin
      out_word <= '{pps: low_q.pps, valid: low_q.valid & in_word.valid,
                    data: {in_word.data, low_q.data}};
      out_we   <= have_low && !in_word.pps;
      realign  <= have_low && in_word.pps;
      if (!have_low || in_word.pps) begin
        low_q    <= in_word;             // a new pair starts here
        have_low <= 1'b1;
      end else begin
        have_low <= 1'b0;
      end
    end
  end

endmodule

// input_combiner: reads the two VSI input FIFOs in the user-logic clock
// domain and delivers one 64-bit stream {1PPS, Valid, data[63:0]}.
//
// 2xVSI (mode64 = 1): the two ports come over separate cables, so their
//   data can arrive with a phase offset. Both FIFOs are popped together,
//   and only while each holds more than THRESH words; the pair forms one
//   word {port #2, port #1}. 1PPS is taken from port #1, Valid is the AND
//   of both ports. Because the two FIFOs may start filling a clock apart,
//   the ports are first lined up on the 1PPS: each FIFO is emptied up to
//   its next 1PPS word, and pairing starts when both heads carry it. A
//   pair whose 1PPS flags differ drops the alignment (realign pulses) and
//   the search starts again. Port #1's FIFO is 64 bits wide; in this mode
//   only its bits [31:0] are used.
// 1xVSI (mode64 = 0): port #1 alone. Its words were already packed 32:64
//   on the write side of the FIFO (vsi_pack), so each FIFO word is passed
//   on as it is, one per clock.
// The handshake out_valid/out_ready is combinational from the FIFO heads
// (first-word-fall-through); a word moves when both are high. enable low
// (global halt) stops all reads.
// Reading both FIFOs only above a fill of 4 follows the design; the 1PPS
// alignment of the two ports is a choice here.
module input_combiner
  import fila10g_pkg::*;
#(
  parameter int unsigned ADDR_W = 9,
  parameter int unsigned THRESH = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              enable,
  input  logic              mode64,
  // FIFO of VSI port #1 (64 bits wide, see vsi_pack)
  input  vsi64_word_t       f0_data,
  input  logic              f0_empty,
  input  logic [ADDR_W:0]   f0_count,
  output logic              f0_pop,
  // FIFO of VSI port #2
  input  vsi_word_t         f1_data,
  input  logic [ADDR_W:0]   f1_count,
  output logic              f1_pop,
  // combined stream
  output vsi64_word_t       out_word,
  output logic              out_valid,
  input  logic              out_ready,
  output logic              realign
);
  logic      aligned;     // 2xVSI: ports lined up on a common 1PPS

  logic both_ready;
  assign both_ready = (f0_count > (ADDR_W+1)'(THRESH)) &&
                      (f1_count > (ADDR_W+1)'(THRESH));

  always_comb begin
    out_word  = '0;
    out_valid = 1'b0;
    f0_pop    = 1'b0;
    f1_pop    = 1'b0;
    realign   = 1'b0;
    if (enable) begin
      if (mode64) begin
        out_word.pps   = f0_data.pps;
        out_word.valid = f0_data.valid & f1_data.valid;
        out_word.data  = {f1_data.data, f0_data.data[31:0]};
        if (!aligned) begin
          f0_pop = !f0_empty && !f0_data.pps;
          f1_pop = (f1_count != '0) && !f1_data.pps;
        end else if (both_ready && (f0_data.pps != f1_data.pps)) begin
          realign = 1'b1;
        end else begin
          out_valid = both_ready;
          f0_pop    = both_ready && out_ready;
          f1_pop    = both_ready && out_ready;
        end
      end else begin
        out_word  = f0_data;
        out_valid = !f0_empty;
        f0_pop    = !f0_empty && out_ready;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst || !enable || !mode64) begin
      aligned <= 1'b0;
    end else if (!aligned) begin
      aligned <= !f0_empty && (f1_count != '0) && f0_data.pps && f1_data.pps;
    end else if (realign) begin
      aligned <= 1'b0;
    end
  end

endmodule

// vsi_tvg: data source selection for one VSI-H port, with the test vector
// generator.
//
// Runs in the port's VSI clock domain and produces, every clock, the
// {1PPS, Valid, 32-bit data} word written into that port's input FIFO.
// With tvg_en low the real VSI port signals pass through, registered once.
// With tvg_en high the data is a 32-bit counter that advances every clock
// and restarts at 0 on the clock that carries the 1PPS, so both ports of a
// 64-bit setup produce identical, aligned counts; Valid is forced high and
// the real 1PPS is kept so frame timing still follows the station second.
// The two input methods (real VSI data or counter test data) follow the
// design; the counter pattern and its restart at 1PPS are choices here.
// Latency: one clock from the VSI pins to out_word.
module vsi_tvg
  import fila10g_pkg::*;
(
  input  logic        clk,       // VSI port clock
  input  logic        rst,
  input  logic        tvg_en,    // already synchronised into clk
  input  logic        vsi_pps,
  input  logic        vsi_valid,
  input  logic [31:0] vsi_data,
  output vsi_word_t   out_word
);
  logic [31:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt      <= '0;
      out_word <= '0;
    end else begin
      if (vsi_pps) cnt <= 32'd1;
      else         cnt <= cnt + 32'd1;
      if (tvg_en) begin
        out_word.pps   <= vsi_pps;
        out_word.valid <= 1'b1;
        out_word.data  <= vsi_pps ? 32'd0 : cnt;
      end else begin
        out_word.pps   <= vsi_pps;
        out_word.valid <= vsi_valid;
        out_word.data  <= vsi_data;
      end
    end
  end
endmodule

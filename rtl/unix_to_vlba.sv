// unix_to_vlba: converts a Unix time in seconds into the VLBA BCD time
// code used in Mark5B headers: the last three decimal digits of the
// Modified Julian Date (JJJ) and the five-digit second of the day (SSSSS).
//
// Sequential, started by a start pulse, done after 51 clocks:
//   1. 32 steps of restoring division by 86400: days since 1970-01-01 and
//      the remainder, the second of the day;
//   2. MJD = days + 40587;
//   3. 17 steps of shift-and-add-3 (double dabble) turn MJD and the second
//      of day into BCD at the same time; the low three MJD digits are kept.
// Outputs hold their value, with done high, until the next start; busy is
// high meanwhile. The conversion itself is what the design asks for; the
// serial divider and double dabble are this design's choice, taken
// because a result is needed only once per second.
module unix_to_vlba
  import fila10g_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [31:0] unix_sec,
  output logic        busy,
  output logic        done,
  output logic [11:0] mjd_bcd,   // JJJ
  output logic [19:0] sod_bcd    // SSSSS
);
  typedef enum logic [1:0] {S_IDLE, S_DIV, S_BCD} state_e;
  state_e state;

  logic [5:0]  step;
  logic [31:0] quo;        // dividend shifting out, quotient shifting in
  logic [17:0] rem;
  logic [16:0] mjd_bin, sod_bin;
  logic [23:0] mjd_sh;     // 6 BCD digits
  logic [19:0] sod_sh;     // 5 BCD digits

  localparam logic [17:0] DAY = 18'd86400;

  function automatic logic [23:0] add3_24(input logic [23:0] v);
    logic [23:0] r;
    r = v;
    for (int d = 0; d < 6; d++)
      if (r[4*d +: 4] >= 4'd5) r[4*d +: 4] = r[4*d +: 4] + 4'd3;
    return r;
  endfunction

  function automatic logic [19:0] add3_20(input logic [19:0] v);
    logic [19:0] r;
    r = v;
    for (int d = 0; d < 5; d++)
      if (r[4*d +: 4] >= 4'd5) r[4*d +: 4] = r[4*d +: 4] + 4'd3;
    return r;
  endfunction

  logic [17:0] rem_sh;
  logic [23:0] mjd_adj;
  logic [19:0] sod_adj;
  assign rem_sh  = {rem[16:0], quo[31]};
  assign mjd_adj = add3_24(mjd_sh);
  assign sod_adj = add3_20(sod_sh);

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      step    <= '0;
      quo     <= '0;
      rem     <= '0;
      mjd_bin <= '0;
      sod_bin <= '0;
      mjd_sh  <= '0;
      sod_sh  <= '0;
      done    <= 1'b0;
      mjd_bcd <= '0;
      sod_bcd <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (start) begin
            quo   <= unix_sec;
            rem   <= '0;
            step  <= '0;
            done  <= 1'b0;
            state <= S_DIV;
          end
        end
        S_DIV: begin
          if (rem_sh >= DAY) begin
            rem <= rem_sh - DAY;
            quo <= {quo[30:0], 1'b1};
          end else begin
            rem <= rem_sh;
            quo <= {quo[30:0], 1'b0};
          end
          if (step == 6'd31) begin
            step  <= '0;
            state <= S_BCD;
            // final quotient/remainder are formed on this edge; capture
            // them into the binary shift registers on the next state
          end else begin
            step <= step + 6'd1;
          end
          mjd_sh <= '0;
          sod_sh <= '0;
        end
        S_BCD: begin
          if (step == 6'd0) begin
            mjd_bin <= 17'(quo + MJD_UNIX_EPOCH);
            sod_bin <= rem[16:0];
            step    <= 6'd1;
          end else begin
            mjd_sh  <= {mjd_adj[22:0], mjd_bin[16]};
            sod_sh  <= {sod_adj[18:0], sod_bin[16]};
            mjd_bin <= {mjd_bin[15:0], 1'b0};
            sod_bin <= {sod_bin[15:0], 1'b0};
            if (step == 6'd17) begin
              state   <= S_IDLE;
              done    <= 1'b1;
              mjd_bcd <= {mjd_adj[10:0], mjd_bin[16]};
              sod_bcd <= {sod_adj[18:0], sod_bin[16]};
            end
            step <= step + 6'd1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule

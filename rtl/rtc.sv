// rtc: real-time clock of the user logic, a 32-bit Unix seconds counter
// with arm / trigger / count.
//
// Software writes the Unix second of the next 1PPS (base_second) and the
// reference clock rate in Hz (ref_rate, the user-logic clock frequency),
// then pulses arm. The next pps pulse (VSI#1 1PPS, already synchronised
// into clk) loads base_second, clears the tick counter, sets synced and
// pulses trig. From then on the counter runs from the reference clock
// alone: every ref_rate clocks seconds advances by one and tick pulses.
// Arming again re-triggers on the following 1PPS. Before the first trigger
// the counter runs from reset value 0 with synced low.
// sec_near is seconds rounded to the nearest second boundary (plus one in
// the second half of a second), for consumers that sample the RTC at an
// event that may fall just before or after the RTC's own tick.
// Arm, trigger from the first 1PPS, base second and reference rate
// registers follow the design; reset values and the trig/tick outputs are
// choices here. Timing: seconds changes on the clock after the qualifying
// pps or terminal count.
module rtc (
  input  logic        clk,
  input  logic        rst,
  input  logic        arm,
  input  logic [31:0] base_second,
  input  logic [31:0] ref_rate,
  input  logic        pps,
  output logic [31:0] seconds,
  output logic [31:0] sec_near,
  output logic        synced,
  output logic        armed,
  output logic        trig,
  output logic        tick
);
  logic [31:0] cnt;

  assign sec_near = seconds + {31'd0, (cnt >= (ref_rate >> 1))};

  always_ff @(posedge clk) begin
    if (rst) begin
      seconds <= '0;
      cnt     <= '0;
      synced  <= 1'b0;
      armed   <= 1'b0;
      trig    <= 1'b0;
      tick    <= 1'b0;
    end else begin
      trig <= 1'b0;
      tick <= 1'b0;
      if (armed && pps) begin
        seconds <= base_second;
        cnt     <= '0;
        armed   <= 1'b0;
        synced  <= 1'b1;
        trig    <= 1'b1;
      end else begin
        if (arm) armed <= 1'b1;
        if (cnt >= ref_rate - 32'd1) begin
          cnt     <= '0;
          seconds <= seconds + 32'd1;
          tick    <= 1'b1;
        end else begin
          cnt <= cnt + 32'd1;
        end
      end
    end
  end
endmodule

// subsec_timer: fraction of the current second as four BCD digits in units
// of 0.1 ms (the ".SSSS" field of the VLBA time code in a Mark5B header).
//
// A phase accumulator adds 10000 per clock and wraps at ref_rate (the clock
// frequency in Hz), so the BCD count advances exactly 10000 times per
// ref_rate clocks without a divider. clear (the 1PPS word of the data
// stream) restarts the fraction at .0000 on the following clock. ref_rate
// must be at least 10000. The VLBA time-code field is the design's; how it
// is produced is this design's choice.
module subsec_timer (
  input  logic        clk,
  input  logic        rst,
  input  logic        clear,
  input  logic [31:0] ref_rate,
  output logic [15:0] frac_bcd
);
  localparam logic [31:0] STEP = 32'd10000;

  logic [31:0] acc;
  logic [32:0] acc_next;
  logic        adv;

  assign acc_next = {1'b0, acc} + {1'b0, STEP};
  assign adv      = acc_next >= {1'b0, ref_rate};

  // Increment a 4-digit BCD number, wrapping 9999 -> 0000.
  function automatic logic [15:0] bcd_inc(input logic [15:0] v);
    logic [15:0] r;
    logic        c;
    r = v;
    c = 1'b1;
    for (int d = 0; d < 4; d++) begin
      if (c) begin
        if (r[4*d +: 4] == 4'd9) r[4*d +: 4] = 4'd0;
        else begin
          r[4*d +: 4] = r[4*d +: 4] + 4'd1;
          c = 1'b0;
        end
      end
    end
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      acc      <= '0;
      frac_bcd <= '0;
    end else if (adv) begin
      acc      <= 32'(acc_next - {1'b0, ref_rate});
      frac_bcd <= bcd_inc(frac_bcd);
    end else begin
      acc <= acc_next[31:0];
    end
  end
endmodule

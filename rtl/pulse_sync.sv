// pulse_sync: carries single-cycle events from src_clk into dst_clk.
// Each src_pulse flips a toggle register; the toggle is synchronised with
// two flops in dst_clk and every change produces one dst_pulse cycle, three
// to four dst_clk edges later. Events must be at least three dst_clk cycles
// apart (a 1PPS strobe is one second apart).
module pulse_sync (
  input  logic src_clk,
  input  logic src_rst,
  input  logic src_pulse,
  input  logic dst_clk,
  input  logic dst_rst,
  output logic dst_pulse
);
  logic       tog;
  logic [2:0] sync;

  always_ff @(posedge src_clk) begin
    if (src_rst)        tog <= 1'b0;
    else if (src_pulse) tog <= ~tog;
  end

  always_ff @(posedge dst_clk) begin
    if (dst_rst) sync <= '0;
    else         sync <= {sync[1:0], tog};
  end

  assign dst_pulse = sync[2] ^ sync[1];
endmodule

// async_fifo: VSI-H input FIFO, one per VSI port.
//
// Moves words written in a VSI port clock domain (16..128 MHz) into the
// user-logic clock domain. Classic dual-clock design: binary pointers one
// bit wider than the address, exchanged between domains as Gray code
// through two-flop synchronisers. Storage is a plain array (512 x 34 for
// port #2; port #1's 32:64 FIFO uses it 66 bits wide).
//
// Write side: wr_en is ignored while wr_full; such a lost write sets the
// sticky wr_overflow flag. Read side: rd_data shows the word at the head
// (first-word-fall-through) whenever !rd_empty; rd_en pops it. rd_count is
// the number of words the read side knows about; it lags writes by two to
// three rd_clk edges, so it never over-states the fill. The combiner uses
// it to start reading both ports only when each holds more than 4 words.
// The FIFO's purpose and the dual-port arrangement follow the design's
// system diagram; depth, Gray pointers and fall-through are choices here.
module async_fifo #(
  parameter int unsigned WIDTH = 34,
  parameter int unsigned ADDR_W = 9
) (
  input  logic              wr_clk,
  input  logic              wr_rst,
  input  logic              wr_en,
  input  logic [WIDTH-1:0]  wr_data,
  output logic              wr_full,
  output logic              wr_overflow,

  input  logic              rd_clk,
  input  logic              rd_rst,
  input  logic              rd_en,
  output logic [WIDTH-1:0]  rd_data,
  output logic              rd_empty,
  output logic [ADDR_W:0]   rd_count
);
  localparam int unsigned DEPTH = 1 << ADDR_W;

  logic [WIDTH-1:0] mem [DEPTH];

  logic [ADDR_W:0] wr_bin, wr_gray, rd_bin, rd_gray;
  logic [ADDR_W:0] wr_gray_s1, wr_gray_s2;   // write pointer seen in rd_clk
  logic [ADDR_W:0] rd_gray_s1, rd_gray_s2;   // read pointer seen in wr_clk
  logic [ADDR_W:0] wr_bin_rd, rd_bin_wr;

  function automatic logic [ADDR_W:0] bin2gray(input logic [ADDR_W:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [ADDR_W:0] gray2bin(input logic [ADDR_W:0] g);
    logic [ADDR_W:0] b;
    b[ADDR_W] = g[ADDR_W];
    for (int i = int'(ADDR_W) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write domain ----------------
  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      rd_gray_s1 <= '0;
      rd_gray_s2 <= '0;
    end else begin
      rd_gray_s1 <= rd_gray;
      rd_gray_s2 <= rd_gray_s1;
    end
  end

  assign rd_bin_wr = gray2bin(rd_gray_s2);
  assign wr_full   = (wr_bin[ADDR_W] != rd_bin_wr[ADDR_W]) &&
                     (wr_bin[ADDR_W-1:0] == rd_bin_wr[ADDR_W-1:0]);

  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      wr_bin      <= '0;
      wr_gray     <= '0;
      wr_overflow <= 1'b0;
    end else if (wr_en) begin
      if (wr_full) begin
        wr_overflow <= 1'b1;
      end else begin
        wr_bin  <= wr_bin + 1'b1;
        wr_gray <= bin2gray(wr_bin + 1'b1);
      end
    end
  end

  always_ff @(posedge wr_clk) begin
    if (wr_en && !wr_full) mem[wr_bin[ADDR_W-1:0]] <= wr_data;
  end

  // ---------------- read domain ----------------
  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      wr_gray_s1 <= '0;
      wr_gray_s2 <= '0;
    end else begin
      wr_gray_s1 <= wr_gray;
      wr_gray_s2 <= wr_gray_s1;
    end
  end

  assign wr_bin_rd = gray2bin(wr_gray_s2);
  assign rd_count  = wr_bin_rd - rd_bin;
  assign rd_empty  = (rd_count == '0);
  assign rd_data   = mem[rd_bin[ADDR_W-1:0]];

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      rd_bin  <= '0;
      rd_gray <= '0;
    end else if (rd_en && !rd_empty) begin
      rd_bin  <= rd_bin + 1'b1;
      rd_gray <= bin2gray(rd_bin + 1'b1);
    end
  end

endmodule

// tb_vsi_pack: checks the write side of the 32:64 input FIFO.
// A counter stream, one 32-bit word per clock, is fed with 1PPS flags at
// positions of both parities and random Valid bits. The expected writes
// come from the word positions alone: counting from the last 1PPS word,
// the word at an odd position completes a pair {this word, previous word}
// with the previous word's 1PPS and the AND of both Valid bits; a 1PPS
// word that follows an unpaired word must raise realign. In 2xVSI mode
// every word must be written on its own with a zero upper half. All
// outputs are checked right after the clock edge that takes the word
// (one register stage).
module tb_vsi_pack;
  import fila10g_pkg::*;
  logic clk = 0, rst = 1, mode64 = 0;
  vsi_word_t in_word = '0;
  vsi64_word_t out_word;
  logic out_we, realign;
  int checks = 0, failures = 0, writes = 0, realigns = 0;

  always #5 clk = ~clk;

  vsi_pack dut (.clk, .rst, .mode64, .in_word, .out_word, .out_we, .realign);

  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; if (failures < 20) $display("FAIL: %s", m); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stream state of the reference
  vsi_word_t prev;
  int pos;              // position of the current word since the last 1PPS
  bit exp_we, exp_realign;
  vsi64_word_t exp_word;

  task automatic run(bit m64, int n);
    @(negedge clk); rst = 1; mode64 = m64;
    @(negedge clk); rst = 0;
    pos = -1;
    exp_we = 0; exp_realign = 0;
    for (int i = 0; i < n; i++) begin
      vsi_word_t w;
      // 1PPS spacing alternates between odd and even lengths
      w.pps   = (i % 37 == 5) || (i % 37 == 20);
      w.valid = ($urandom_range(0, 9) != 0);
      w.data  = 32'hC000_0000 | i;
      in_word = w;
      @(posedge clk);
      #1;
      // reference for the word just taken
      if (m64) begin
        exp_we = 1; exp_realign = 0;
        exp_word = '{pps: w.pps, valid: w.valid, data: {32'd0, w.data}};
      end else begin
        exp_realign = w.pps && (pos >= 0) && (pos % 2 == 0);
        pos = w.pps ? 0 : pos + 1;
        exp_we = (pos % 2 == 1);
        exp_word = '{pps: prev.pps, valid: prev.valid & w.valid, data: {w.data, prev.data}};
      end
      // the registered outputs now belong to this word
      check(out_we == exp_we, $sformatf("word %0d: write enable %0d", i, out_we));
      check(realign == exp_realign, $sformatf("word %0d: realign %0d", i, realign));
      if (exp_we) check(out_word == exp_word,
                        $sformatf("word %0d: wrote %h expected %h", i, out_word, exp_word));
      if (out_we) writes++;
      if (realign) realigns++;
      prev = w;
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    run(0, 2000);
    check(realigns > 10, $sformatf("only %0d realignments", realigns));
    check(writes > 900, $sformatf("1xVSI: only %0d writes", writes));
    writes = 0; realigns = 0;
    run(1, 500);
    check(writes == 500 && realigns == 0, $sformatf("2xVSI: %0d writes", writes));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

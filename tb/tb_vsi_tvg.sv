// tb_vsi_tvg: checks the VSI source selection. Real-data mode must pass
// {1PPS, Valid, data} through with one clock of latency; test-vector mode
// must output Valid high and a counter that restarts at 0 on the 1PPS
// clock and rises by one per clock, with the 1PPS kept.
module tb_vsi_tvg;
  import fila10g_pkg::*;
  logic clk = 0, rst = 1, tvg_en = 0, vsi_pps = 0, vsi_valid = 0;
  logic [31:0] vsi_data = '0;
  vsi_word_t out_word;
  int checks = 0, failures = 0;
  logic [33:0] prev_in;
  int unsigned exp_cnt;
  bit cnt_known;

  always #5 clk = ~clk;

  vsi_tvg dut (.clk, .rst, .tvg_en, .vsi_pps, .vsi_valid, .vsi_data, .out_word);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // real data
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      vsi_pps = ($urandom_range(0, 30) == 0);
      vsi_valid = $urandom_range(0, 1);
      vsi_data = $urandom();
      prev_in = {vsi_pps, vsi_valid, vsi_data};
      @(negedge clk);
      checks++;
      if (out_word !== prev_in) begin
        failures++;
        $display("FAIL passthrough %h vs %h", out_word, prev_in);
      end
    end
    // test vectors
    @(negedge clk) tvg_en = 1; vsi_valid = 0; vsi_data = 32'hDEAD_BEEF;
    cnt_known = 0;
    for (int i = 0; i < 300; i++) begin
      vsi_pps = (i % 97 == 5);
      @(posedge clk);
      #1;
      if (i > 0) begin
        checks++;
        if (!out_word.valid) begin failures++; $display("FAIL valid low in TVG"); end
        if (out_word.pps) begin
          checks++;
          if (out_word.data != 0) begin failures++; $display("FAIL pps word not 0"); end
          exp_cnt = 1; cnt_known = 1;
        end else if (cnt_known) begin
          checks++;
          if (out_word.data != exp_cnt) begin
            failures++;
            $display("FAIL counter %0d vs %0d", out_word.data, exp_cnt);
          end
          exp_cnt++;
        end
        checks++;
        if (out_word.pps != ((i % 97) == 5)) begin failures++; $display("FAIL pps lost"); end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_input_combiner: checks both reading modes of the input combiner
// against queue models of the two FIFOs.
// 2xVSI: port #2's queue starts with three stray words; the combiner must
// discard them and line the ports up on the 1PPS. Words are then pushed
// into the two queues at random times; every output word must be
// {port #2, port #1} of the next pair with matching sequence numbers, and
// a word may only be offered while both queues hold more than 4 entries.
// 1xVSI: port #1's FIFO already holds packed 64-bit words; each must come
// out unchanged and in order, one per clock whenever the FIFO is not
// empty, and port #2's FIFO must not be read.
// Port #1's FIFO is 64 bits wide; in 2xVSI mode only its low half is
// meaningful, and the upper half is filled with junk to show it is unused.
module tb_input_combiner;
  import fila10g_pkg::*;
  localparam int AW = 6;
  logic clk = 0, rst = 1, enable = 1, mode64 = 1, out_ready = 0;
  vsi64_word_t f0_data;
  vsi_word_t f1_data;
  logic f0_empty, f0_pop, f1_pop, out_valid, realign;
  logic [AW:0] f0_count, f1_count;
  vsi64_word_t out_word;
  vsi64_word_t q0[$];
  vsi_word_t q1[$];
  int checks = 0, failures = 0, pairs = 0, pairs_seen = 0, words_1x = 0;
  int unsigned seq0 = 0, seq1 = 0;
  logic p0, p1;

  always #5 clk = ~clk;

  assign f0_data  = (q0.size() > 0) ? q0[0] : '0;
  assign f1_data  = (q1.size() > 0) ? q1[0] : '0;
  assign f0_empty = (q0.size() == 0);
  assign f0_count = (AW+1)'(q0.size());
  assign f1_count = (AW+1)'(q1.size());

  // once aligned, the pair rule must offer data whenever both exceed 4
  always @(negedge clk) begin
    #2;
    if (mode64 && enable && dut.aligned && !dut.realign) begin
      checks++;
      if (out_valid != (q0.size() > 4 && q1.size() > 4)) fail("2x: >4 rule not followed");
    end
  end

  input_combiner #(.ADDR_W(AW)) dut (
    .clk, .rst, .enable, .mode64,
    .f0_data, .f0_empty, .f0_count, .f0_pop,
    .f1_data, .f1_count, .f1_pop,
    .out_word, .out_valid, .out_ready, .realign
  );

  task automatic fail(string m);
    failures++; $display("FAIL: %s", m);
  endtask

  initial begin
    #400000;
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected streams
  int unsigned exp_lo;   // next expected port-#1 value in 1xVSI mode

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // ---------------- 2xVSI ----------------
    for (int j = 0; j < 3; j++) q1.push_back('{pps: 1'b0, valid: 1'b1, data: 32'hFFFF_0000 + j});
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      out_ready = ($urandom_range(0, 3) != 0);
      #1;
      // checks on the combinational outputs before the edge
      checks++;
      if (out_valid && !(q0.size() > 4 && q1.size() > 4)) fail("2x: out_valid vs >4 rule");
      if (out_valid) begin
        pairs_seen++;
        checks++;
        if (out_word.data[62:32] !== out_word.data[30:0]) fail("2x: ports not aligned");
        checks++;
        if (out_word.data !== {q1[0].data, q0[0].data[31:0]} || out_word.pps !== q0[0].pps ||
            out_word.valid !== (q0[0].valid & q1[0].valid))
          fail("2x: wrong pair");
        checks++;
        if (f0_pop != out_ready || f1_pop != out_ready) fail("2x: pops not together");
      end
      p0 = f0_pop; p1 = f1_pop;
      @(posedge clk);
      #1;
      if (p0) void'(q0.pop_front());
      if (p1) begin void'(q1.pop_front()); pairs++; end
      // pushes with a skew between the ports
      if (cyc < 1900 && $urandom_range(0, 2) != 0 && q0.size() < 60) begin
        q0.push_back('{pps: (seq0 % 50 == 0), valid: 1'b1, data: {~seq0, seq0}}); seq0++;
      end
      if (cyc < 1900 && $urandom_range(0, 2) != 0 && q1.size() < 60 && seq1 < seq0 + 3) begin
        q1.push_back('{pps: (seq1 % 50 == 0), valid: (seq1 % 77 != 3), data: 32'h8000_0000 | seq1}); seq1++;
      end
    end
    checks++;
    if (pairs < 500) fail($sformatf("2x: only %0d pairs", pairs));
    checks++;
    if (q0.size() > 4 && q1.size() > 4)
      fail("2x: did not drain to threshold");
    // ---------------- 1xVSI ----------------
    @(negedge clk);
    enable = 0; q0.delete(); q1.delete();
    @(negedge clk);
    enable = 1; mode64 = 0;
    seq0 = 0; exp_lo = 0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      out_ready = ($urandom_range(0, 3) != 0);
      #1;
      checks++;
      if (out_valid != (q0.size() > 0)) fail("1x: out_valid does not follow the FIFO");
      checks++;
      if (f1_pop) fail("1x: port #2 FIFO read");
      if (out_valid) begin
        checks++;
        if (out_word.data !== {32'(exp_lo + 1), 32'(exp_lo)} ||
            out_word.pps !== (exp_lo % 100 == 6) || out_word.valid !== (exp_lo % 74 != 2))
          fail($sformatf("1x: word %h, expected low %0d", out_word.data, exp_lo));
        checks++;
        if (f0_pop != out_ready) fail("1x: pop does not follow out_ready");
      end
      p0 = f0_pop;
      if (out_valid && out_ready) begin exp_lo += 2; words_1x++; end
      @(posedge clk);
      #1;
      if (p0) void'(q0.pop_front());
      if (cyc < 2900 && $urandom_range(0, 1) != 0) begin
        q0.push_back('{pps: (seq0 % 100 == 6), valid: (seq0 % 74 != 2),
                       data: {32'(seq0 + 1), 32'(seq0)}});
        seq0 += 2;
      end
    end
    checks++;
    if (words_1x < 1000) fail($sformatf("1x: only %0d words", words_1x));
    $display("pairs=%0d words_1x=%0d", pairs, words_1x);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

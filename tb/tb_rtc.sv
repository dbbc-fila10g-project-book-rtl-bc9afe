// tb_rtc: checks the arm / trigger / count behaviour of the real-time
// clock with a reference rate of 20 clocks per second: no load without
// arm, load of the base second on the first 1PPS after arm, then one
// increment every 20 clocks exactly, re-trigger after a second arm, and
// the rounded sec_near output.
module tb_rtc;
  logic clk = 0, rst = 1, arm = 0, pps = 0;
  logic [31:0] base_second = 32'd1_300_000_000, ref_rate = 32'd20;
  logic [31:0] seconds, sec_near;
  logic synced, armed, trig, tick;
  int checks = 0, failures = 0;
  int t_trig, t;

  always #5 clk = ~clk;
  rtc dut (.*);

  task automatic fail(string m); failures++; $display("FAIL: %s", m); endtask
  task automatic check(bit c, string m); checks++; if (!c) fail(m); endtask

  initial begin
    #100000; fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // 1PPS without arm does nothing
    @(negedge clk) pps = 1; @(negedge clk) pps = 0;
    check(!synced && seconds != base_second, "loaded without arm");
    @(negedge clk) arm = 1; @(negedge clk) arm = 0;
    check(armed, "not armed");
    repeat (7) @(negedge clk);
    pps = 1; @(negedge clk) pps = 0;
    check(seconds == base_second, "base not loaded at 1PPS");
    check(synced && !armed, "synced/armed flags");
    // count: seconds advance every 20 clocks after trigger
    for (int s = 1; s <= 5; s++) begin
      repeat (19) begin
        check(seconds == base_second + s - 1, $sformatf("early tick in second %0d", s));
        @(negedge clk);
      end
      @(negedge clk);
      check(seconds == base_second + s, $sformatf("seconds %0d after %0d s", seconds, s));
    end
    // sec_near: in the second half of a second it anticipates the tick
    repeat (12) @(negedge clk);
    check(sec_near == seconds + 1, "sec_near in second half");
    repeat (10) @(negedge clk);
    check(sec_near == seconds, "sec_near in first half");
    // re-arm with a new base, re-trigger
    base_second = 32'd42;
    @(negedge clk) arm = 1; @(negedge clk) arm = 0;
    repeat (5) @(negedge clk);
    check(seconds != 42, "re-armed clock loaded before 1PPS");
    pps = 1; @(negedge clk) pps = 0;
    check(seconds == 42 && synced, "re-trigger");
    repeat (20) @(negedge clk);
    check(seconds == 43, "count after re-trigger");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

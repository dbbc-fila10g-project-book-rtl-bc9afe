// tb_unix_to_vlba: converts fixed and random Unix times and compares the
// BCD MJD (last 3 digits) and BCD second of day with values computed in
// the testbench by integer division (MJD = floor(t / 86400) + 40587).
// Also checks that each conversion completes within 52 clocks.
module tb_unix_to_vlba;
  logic clk = 0, rst = 1, start = 0, busy, done;
  logic [31:0] unix_sec = '0;
  logic [11:0] mjd_bcd;
  logic [19:0] sod_bcd;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  unix_to_vlba dut (.*);

  function automatic logic [23:0] to_bcd(input int unsigned v, input int digits);
    logic [23:0] r = '0;
    for (int d = 0; d < digits; d++) begin
      r[4*d +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic convert(input logic [31:0] t);
    int unsigned days, sod, mjd, n;
    days = t / 86400; sod = t % 86400; mjd = days + 40587;
    @(negedge clk); unix_sec = t; start = 1;
    @(negedge clk); start = 0;
    n = 1;
    while (!done) begin @(negedge clk); n++; end
    checks++;
    if (n > 52) begin failures++; $display("FAIL: took %0d clocks", n); end
    checks++;
    if (mjd_bcd !== to_bcd(mjd % 1000, 3) || sod_bcd !== 20'(to_bcd(sod, 5))) begin
      failures++;
      $display("FAIL: t=%0d got %h %h expected MJD %0d SOD %0d", t, mjd_bcd, sod_bcd, mjd, sod);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    convert(32'd0);                 // MJD 40587, 00000
    convert(32'd1_275_264_000);     // 2010-05-31 00:00:00, MJD 55347
    convert(32'd1_275_350_399);     // last second of that day
    convert(32'd4_294_967_295);
    for (int i = 0; i < 200; i++) convert($urandom());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

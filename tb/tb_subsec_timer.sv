// tb_subsec_timer: the BCD fraction must equal floor(n * 10000 / rate)
// mod 10000 after n clocks since clear, for an integer (2 clocks per step)
// and a non-integer (2.7 clocks per step) ratio, and clear must restart it.
module tb_subsec_timer;
  logic clk = 0, rst = 1, clear = 0;
  logic [31:0] ref_rate = 32'd20000;
  logic [15:0] frac_bcd;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  subsec_timer dut (.*);

  function automatic logic [15:0] to_bcd4(input longint unsigned v);
    logic [15:0] r;
    for (int d = 0; d < 4; d++) begin r[4*d +: 4] = 4'(v % 10); v = v / 10; end
    return r;
  endfunction

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(input int unsigned rate, input int n_clocks);
    @(negedge clk); ref_rate = rate; clear = 1;
    @(negedge clk); clear = 0;
    for (int n = 0; n < n_clocks; n++) begin
      checks++;
      if (frac_bcd !== to_bcd4((longint'(n) * 10000) / rate)) begin
        failures++;
        if (failures < 10) $display("FAIL rate %0d n %0d: %h", rate, n, frac_bcd);
      end
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    run(20000, 21000);   // wraps past .9999
    run(27000, 5000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

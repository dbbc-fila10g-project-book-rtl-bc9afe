// tb_async_fifo: self-checking test of the dual-clock VSI input FIFO.
// Two unrelated clocks (write 7 ns, read 5 ns). Phase 1 streams 3000 words
// with random write gaps and random read stalls and compares every word
// read against a queue model, checking that rd_count never exceeds the
// true fill. Phase 2 stops reading, writes past the depth and checks
// wr_full, the sticky overflow flag and that the stored words survive.
module tb_async_fifo;
  localparam int AW = 4;
  localparam int W  = 34;
  localparam int DEPTH = 1 << AW;

  logic wclk = 0, rclk = 0, wrst = 1, rrst = 1;
  logic wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic wr_full, wr_overflow, rd_empty;
  logic [AW:0] rd_count;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];
  int written = 0, readn = 0;
  bit stop_reads = 0;

  always #3.5 wclk = ~wclk;
  always #2.5 rclk = ~rclk;

  async_fifo #(.WIDTH(W), .ADDR_W(AW)) dut (
    .wr_clk(wclk), .wr_rst(wrst), .wr_en, .wr_data, .wr_full, .wr_overflow,
    .rd_clk(rclk), .rd_rst(rrst), .rd_en, .rd_data, .rd_empty, .rd_count
  );

  task automatic fail(string msg);
    failures++;
    $display("FAIL: %s", msg);
  endtask

  initial begin
    #200000;
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  initial begin
    repeat (4) @(posedge wclk);
    wrst = 0;
    repeat (4) @(posedge wclk);
    while (written < 3000) begin
      @(negedge wclk);
      wr_en = ($urandom_range(0, 3) != 0);
      wr_data = {$urandom_range(0, 3), $urandom()};
      @(posedge wclk);
      if (wr_en && !wr_full) begin
        model.push_back(wr_data);
        written++;
      end
    end
    @(negedge wclk); wr_en = 0;
  end

  // reader
  initial begin
    repeat (4) @(posedge rclk);
    rrst = 0;
    while (!stop_reads) begin
      @(negedge rclk);
      rd_en = ($urandom_range(0, 4) != 0);
      checks++;
      if (int'(rd_count) > model.size()) fail("rd_count above true fill");
      @(posedge rclk);
      if (rd_en && !rd_empty) begin
        checks++;
        if (model.size() == 0) fail("read from FIFO the model says is empty");
        else begin
          if (rd_data !== model[0])
            fail($sformatf("data mismatch at %0d: %h vs %h", readn, rd_data, model[0]));
          void'(model.pop_front());
        end
        readn++;
      end
    end
  end

  initial begin
    wait (readn == 3000);
    stop_reads = 1;
    @(negedge rclk); rd_en = 0;
    checks++;
    if (wr_overflow) fail("overflow flagged during streaming");
    // Phase 2: fill to full and beyond
    repeat (DEPTH + 4) begin
      @(negedge wclk);
      wr_en = 1; wr_data = {2'b01, 32'(written)};
      @(posedge wclk);
      if (!wr_full) begin model.push_back(wr_data); written++; end
    end
    @(negedge wclk); wr_en = 0;
    checks++;
    if (!wr_full) fail("wr_full not set after writing past depth");
    checks++;
    if (!wr_overflow) fail("overflow not flagged");
    checks++;
    if (model.size() != DEPTH) fail($sformatf("model holds %0d, expected %0d", model.size(), DEPTH));
    repeat (6) @(posedge rclk);
    checks++;
    if (int'(rd_count) != DEPTH) fail($sformatf("rd_count %0d when full", rd_count));
    while (model.size() > 0) begin
      @(negedge rclk); rd_en = 1;
      @(posedge rclk);
      checks++;
      if (rd_data !== model[0]) fail("data mismatch after overflow");
      void'(model.pop_front());
    end
    @(negedge rclk); rd_en = 0;
    repeat (2) @(posedge rclk);
    checks++;
    if (!rd_empty) fail("not empty after draining");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_nc_fifo: dual-clock FIFO with a slow writer clock and a fast reader
// clock. Random pushes and pops; checks order, that no word is lost or
// duplicated, that the writer sees full (ready low) after DEPTH words with no
// reads, that the count reaches DEPTH, and that empty stops the reader.
module tb_nc_fifo;
  localparam int DW = 64, DEPTH = 512, AW = $clog2(DEPTH);
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  always #5 wclk = ~wclk;
  always #2 rclk = ~rclk;
  logic s_valid = 0, s_ready, r_pop = 0, r_empty;
  logic [DW-1:0] s_data = 0, r_data;
  logic [AW:0] r_count;
  nc_fifo dut (.*);

  int checks = 0, failures = 0, full_seen = 0;
  logic [DW-1:0] q[$];
  int max_count = 0;
  initial begin
    repeat (200000) @(posedge wclk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit rd_on = 0;
  int rd_pct = 50;
  // reader
  always @(negedge rclk) r_pop <= rd_on && !r_empty && ($urandom_range(99) < rd_pct);
  always @(posedge rclk) if (rrst_n) begin
    if (r_count > max_count) max_count = r_count;
    if (r_pop && !r_empty) begin
      checks++;
      if (q.size() == 0) begin failures++; $display("FAIL: read from model-empty FIFO"); end
      else if (r_data !== q.pop_front()) begin failures++; $display("FAIL: order/data"); end
    end
  end
  // writer
  always @(posedge wclk) if (wrst_n && s_valid && s_ready) q.push_back(s_data);

  task automatic write_words(input int n, input int pct);
    int sent = 0;
    while (sent < n) begin
      @(negedge wclk);
      s_valid = ($urandom_range(99) < pct);
      s_data = {$urandom, $urandom};
      @(posedge wclk);
      if (s_valid && s_ready) sent++;
      if (!s_ready) full_seen++;
      #1 s_valid = 0;
    end
  endtask

  initial begin
    repeat (3) @(posedge wclk);
    wrst_n = 1; rrst_n = 1;
    // fill with the reader stopped: must go full at DEPTH words
    write_words(DEPTH, 100);
    repeat (6) @(posedge wclk);
    checks++; if (s_ready) begin failures++; $display("FAIL: not full after DEPTH words"); end
    checks++; if (r_count != DEPTH) begin failures++; $display("FAIL: count %0d", r_count); end
    // drain and stream with random rates
    rd_on = 1;
    write_words(3000, 70);
    rd_pct = 100;
    wait (q.size() == 0);
    repeat (10) @(posedge rclk);
    checks++; if (!r_empty) begin failures++; $display("FAIL: not empty at end"); end
    checks++; if (full_seen == 0 || max_count != DEPTH) begin failures++; $display("FAIL: full %0d max %0d", full_seen, max_count); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_nc_scatter: sends streams of several lengths through the scatter unit
// with several core counts and burst sizes, random readiness of the cores
// and gaps on the input. Each core's received words are compared with the
// round-robin burst split worked out here, including the pad words that
// complete the last round. A final part switches on replication and checks
// that every active core receives each word exactly once, and no other core
// receives anything, while the cores become ready at random times.
module tb_nc_scatter;
  localparam int N = 8, DW = 64, CW = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [CW:0] cfg_ncores = 1;
  logic [15:0] cfg_burst = 1;
  logic [DW-1:0] cfg_pad = 64'hDEAD_BEEF_0000_0000;
  logic cfg_replicate = 0;
  logic s_valid = 0, s_ready, s_last = 0, padding;
  logic [DW-1:0] s_data = 0, m_data;
  logic [N-1:0] m_valid, m_ready;
  nc_scatter dut (.*);

  int checks = 0, failures = 0, pad_words = 0;
  logic [DW-1:0] expq [N][$];
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) m_ready <= N'({$urandom}) | N'({$urandom});
  always @(posedge clk) if (rst_n) begin
    checks++;
    if (!cfg_replicate && !$onehot0(m_valid)) begin failures++; $display("FAIL: several valids"); end
    if (cfg_replicate && (m_valid >> cfg_ncores) != 0) begin
      failures++; $display("FAIL: word offered to an inactive core");
    end
    for (int c = 0; c < N; c++) if (m_valid[c] && m_ready[c]) begin
      if (padding) pad_words++;
      checks++;
      if (expq[c].size() == 0) begin failures++; $display("FAIL: extra word on core %0d", c); end
      else if (m_data !== expq[c].pop_front()) begin failures++; $display("FAIL: core %0d data", c); end
    end
  end

  task automatic run_stream(input int nc, input int burst, input int len);
    int k, core, round;
    cfg_ncores = (CW+1)'(nc); cfg_burst = 16'(burst);
    // model
    round = nc * burst;
    if (cfg_replicate) begin
      for (k = 0; k < len; k++)
        for (core = 0; core < nc; core++) expq[core].push_back(DW'(64'h1000 * nc + k));
    end else
    for (k = 0; k < ((len + round - 1) / round) * round; k++) begin
      core = (k / burst) % nc;
      expq[core].push_back(k < len ? DW'(64'h1000 * nc + k) : cfg_pad);
    end
    for (k = 0; k < len; k++) begin
      @(negedge clk);
      while ($urandom_range(3) == 0) @(negedge clk);
      s_valid = 1; s_data = DW'(64'h1000 * nc + k); s_last = (k == len - 1);
      do @(posedge clk); while (!s_ready);
      #1 s_valid = 0; s_last = 0;
    end
    // wait until all expected words (including pad) arrived
    for (int c = 0; c < N; c++) wait (expq[c].size() == 0);
    repeat (3) @(posedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_stream(8, 1, 16);    // whole rounds, no padding
    run_stream(3, 4, 25);    // padding in the last round
    run_stream(5, 3, 7);
    run_stream(1, 2, 9);     // single core, pad one word
    run_stream(8, 5, 123);
    checks++;
    if (pad_words != (12*3 - 25) + (15 - 7) + 1 + (40*4 - 123)) begin
      failures++; $display("FAIL: pad words %0d", pad_words);
    end
    cfg_replicate = 1;
    run_stream(8, 1, 50);    // copy to all cores
    run_stream(3, 4, 41);    // copy to the first three; burst has no effect
    run_stream(1, 1, 10);
    checks++;
    if (pad_words != (12*3 - 25) + (15 - 7) + 1 + (40*4 - 123)) begin
      failures++; $display("FAIL: padding in replicate mode");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

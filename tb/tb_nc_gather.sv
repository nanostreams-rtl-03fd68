// tb_nc_gather: cores offer result words at random times; the gather unit
// must forward them in round-robin burst order, stop after the batch total
// with m_last on the final word, drop the pad results of the last round, and
// pulse batch_done once per batch. The output is sometimes not ready.
module tb_nc_gather;
  localparam int N = 8, DW = 64, CW = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [CW:0] cfg_ncores = 1;
  logic [15:0] cfg_burst = 1;
  logic [31:0] cfg_total = 1;
  logic [N-1:0] s_valid, s_ready;
  logic [DW-1:0] s_data [N];
  logic [DW-1:0] m_data;
  logic m_valid, m_ready = 1, m_last, dropping, batch_done;
  nc_gather dut (.*);

  int checks = 0, failures = 0, dropped = 0, batches = 0;
  logic [DW-1:0] srcq [N][$];
  logic [DW-1:0] expq [$];
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // core models: offer the head of their queue at random
  bit offer [N];
  always @(negedge clk) begin
    for (int c = 0; c < N; c++) offer[c] = (srcq[c].size() > 0) && ($urandom_range(2) != 0);
    m_ready <= ($urandom_range(3) != 0);
  end
  always_comb for (int c = 0; c < N; c++) begin
    s_valid[c] = offer[c];
    s_data[c]  = (srcq[c].size() > 0) ? srcq[c][0] : '0;
  end
  always @(posedge clk) if (rst_n) begin
    if (batch_done) batches++;
    for (int c = 0; c < N; c++) if (s_valid[c] && s_ready[c]) begin
      void'(srcq[c].pop_front());
      if (dropping) dropped++;
    end
    if (m_valid && m_ready) begin
      checks++;
      if (expq.size() == 0) begin failures++; $display("FAIL: extra output"); end
      else begin
        logic [DW-1:0] e;
        e = expq.pop_front();
        if (m_data !== e) begin failures++; $display("FAIL: data %h exp %h", m_data, e); end
        checks++;
        if (m_last !== (expq.size() == 0)) begin failures++; $display("FAIL: m_last"); end
      end
    end
  end

  task automatic run_batch(input int nc, input int burst, input int total);
    int round = nc * burst, all;
    cfg_ncores = (CW+1)'(nc); cfg_burst = 16'(burst); cfg_total = total;
    all = ((total + round - 1) / round) * round;
    for (int k = 0; k < all; k++) begin
      logic [DW-1:0] w;
      w = (k < total) ? DW'(64'h5000 * nc + k) : 64'hBAD0_0000 + k;
      srcq[(k / burst) % nc].push_back(w);
      if (k < total) expq.push_back(w);
    end
    wait (expq.size() == 0);
    for (int c = 0; c < N; c++) wait (srcq[c].size() == 0);
    repeat (4) @(posedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_batch(8, 1, 16);
    run_batch(3, 2, 13);
    run_batch(5, 1, 1);
    run_batch(8, 4, 100);
    checks++;
    if (dropped != (18 - 13) + 4 + (128 - 100)) begin failures++; $display("FAIL: dropped %0d", dropped); end
    checks++;
    if (batches != 4) begin failures++; $display("FAIL: batches %0d", batches); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

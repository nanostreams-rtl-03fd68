// bop_bench: one complete option-pricing run on an Analytics-on-Chip fabric
// of N_CORES cores, used by tb_bop_workload to run the same workload at
// several fabric sizes. After reset the controller loads the kernel into
// every core; the bench checks the load, sets up the split (one option of
// NSTEP+4 words per core per round, one result each), streams NOPT options
// with GO issued as a write that collides with a status read, and compares
// every result bit-exactly with a fixed-point walk done here and within 5e-6
// with a floating-point walk (every level truncates at 2^-30, so over a few
// hundred levels the fixed-point price drifts by up to about 1e-6 from the
// real one). It prints the batch time and the core cycles per tree node,
// checks the batch time against the kernel's cycle budget, raises fin when
// done, and reports its check and failure counts on its outputs.
module bop_bench #(
  parameter int N_CORES = 8,       // fabric size
  parameter int NSTEP   = 511,     // binomial steps per option
  parameter int NOPT    = 8        // options in the batch
) (
  output logic fin,                // run finished
  output int   n_checks,
  output int   n_failures
);
  localparam int DW = 64;
  localparam int CW = $clog2(N_CORES);

  logic clk = 0, sys_clk = 0, rst_n = 0, sys_rst_n = 0;
  always #2 if (!fin) clk = ~clk;  // 250 MHz cores, stopped when the run is over
  always #5 if (!fin) sys_clk = ~sys_clk;  // 100 MHz system side

  logic s_axil_awvalid = 0, s_axil_awready, s_axil_wvalid = 0, s_axil_wready;
  logic s_axil_bvalid, s_axil_bready = 1, s_axil_arvalid = 0, s_axil_arready;
  logic s_axil_rvalid, s_axil_rready = 1;
  logic [31:0] s_axil_awaddr = 0, s_axil_araddr = 0;
  logic [DW-1:0] s_axil_wdata = 0, s_axil_rdata;
  logic [1:0] s_axil_bresp, s_axil_rresp;
  logic s_axis_tvalid = 0, s_axis_tready, s_axis_tlast = 0;
  logic [DW-1:0] s_axis_tdata = 0;
  logic m_axis_tvalid, m_axis_tready = 1, m_axis_tlast;
  logic [DW-1:0] m_axis_tdata;
  logic done, scatter_padding, gather_dropping, bus_collision;
  logic [1:0] ctrl_state;

  aoc_top #(.N_CORES(N_CORES)) dut (.*);

  int checks = 0, failures = 0;
  assign n_checks = checks;
  assign n_failures = failures;
  initial fin = 1'b0;
  task automatic chk(input bit ok, input string w);
    checks++; if (!ok) begin failures++; $display("FAIL: AoC-%0d: %s", N_CORES, w); end
  endtask

  // ---------------- AXI4-Lite master ----------------
  function automatic logic [31:0] core_addr(input int c, input int rgn, input int i);
    return ((32'(c) << 12) | (32'(rgn) << 10) | 32'(i)) << 3;
  endfunction
  function automatic logic [31:0] glb_addr(input int i);
    return ((32'd1 << (12 + CW)) | 32'(i)) << 3;
  endfunction
  task automatic axi_wr(input logic [31:0] a, input logic [DW-1:0] d);
    @(negedge sys_clk); s_axil_awvalid = 1; s_axil_wvalid = 1; s_axil_awaddr = a; s_axil_wdata = d;
    do @(posedge sys_clk); while (!s_axil_awready);
    #1 s_axil_awvalid = 0; s_axil_wvalid = 0;
    while (!s_axil_bvalid) @(posedge sys_clk);
    @(posedge sys_clk);
  endtask
  task automatic axi_rd(input logic [31:0] a, output logic [DW-1:0] d);
    @(negedge sys_clk); s_axil_arvalid = 1; s_axil_araddr = a;
    do @(posedge sys_clk); while (!s_axil_arready);
    #1 s_axil_arvalid = 0;
    while (!s_axil_rvalid) @(posedge sys_clk);
    #1 d = s_axil_rdata;
    @(posedge sys_clk);
  endtask

  // ---------------- mechanism counters ----------------
  int n_pad = 0, n_drop = 0, n_coll = 0, n_blk_in = 0, n_blk_out = 0, n_reprog = 0, n_boot = 0;
  always @(posedge sys_clk) if (sys_rst_n) begin
    if (scatter_padding && dut.sc_valid != 0 && dut.sc_ready != 0) n_pad++;
    if (gather_dropping && (dut.ga_valid & dut.ga_ready) != 0) n_drop++;
    if (bus_collision) n_coll++;
  end

  // ---------------- streams ----------------
  logic [DW-1:0] in_words[$], exp_out[$];
  int n_out = 0;
  always @(posedge sys_clk) if (sys_rst_n && m_axis_tvalid && m_axis_tready) begin
    n_out++;
    if (exp_out.size() == 0) chk(0, "unexpected result word");
    else begin
      logic [DW-1:0] e;
      e = exp_out.pop_front();
      chk(m_axis_tdata == e, $sformatf("result %0d: got %h exp %h", n_out, m_axis_tdata, e));
      chk(m_axis_tlast == (exp_out.size() == 0), "tlast on the last result");
    end
  end
  task automatic send_stream();
    int k = 0, total = in_words.size();
    while (in_words.size() > 0) begin
      @(negedge sys_clk);
      if ($urandom_range(4) == 0) continue;
      s_axis_tvalid = 1; s_axis_tdata = in_words[0]; s_axis_tlast = (k == total - 1);
      do @(posedge sys_clk); while (!s_axis_tready);
      void'(in_words.pop_front());
      k++;
      #1 s_axis_tvalid = 0; s_axis_tlast = 0;
    end
  endtask

  // ---------------- binomial reference ----------------
  // values in Q33.31, weights in Q1.63; one node as the kernel forms it
  function automatic logic [DW-1:0] to_fx(input real x);
    return DW'(longint'(x * 2147483648.0));
  endfunction
  function automatic logic [DW-1:0] to_coef(input real x);
    return DW'(longint'(x * 9223372036854775808.0));
  endfunction
  function automatic logic [DW-1:0] node(input logic [DW-1:0] a, input logic [DW-1:0] b,
                                         input logic [DW-1:0] s0, input logic [DW-1:0] s1);
    logic signed [127:0] p0, p1;
    p0 = $signed({{64{a[63]}}, a}) * $signed({{64{s0[63]}}, s0});
    p1 = $signed({{64{b[63]}}, b}) * $signed({{64{s1[63]}}, s1});
    return (p0[127:64] + p1[127:64]) << 1;
  endfunction

  real price_real [NOPT];
  task automatic make_option(input int o);
    real s0, k, sig, r, dt, u, d, p, disc, sr [NSTEP+1];
    logic [DW-1:0] a, b, sf [NSTEP+1];
    s0 = 100.0; k = 80.0 + 2.5 * o; sig = 0.2 + 0.01 * o; r = 0.05;
    dt = 1.0 / NSTEP;
    u = $exp(sig * $sqrt(dt)); d = 1.0 / u;
    p = ($exp(r * dt) - d) / (u - d);
    disc = $exp(-r * dt);
    a = to_coef(disc * (1.0 - p)); b = to_coef(disc * p);
    in_words.push_back(DW'(NSTEP)); in_words.push_back(a); in_words.push_back(b);
    for (int j = 0; j <= NSTEP; j++) begin
      real st;
      st = s0 * $pow(u, j) * $pow(d, NSTEP - j);
      sr[j] = (st > k) ? st - k : 0.0;
      sf[j] = to_fx(sr[j]);
      in_words.push_back(sf[j]);
    end
    for (int i = NSTEP; i >= 1; i--)
      for (int j = 0; j < i; j++) begin
        sf[j] = node(a, b, sf[j], sf[j+1]);
        sr[j] = disc * ((1.0 - p) * sr[j] + p * sr[j+1]);
      end
    exp_out.push_back(sf[0]);
    price_real[o] = sr[0];
  endtask

  real got_r;
  int  opt_idx = 0;
  always @(posedge sys_clk) if (sys_rst_n && m_axis_tvalid && m_axis_tready && opt_idx < NOPT
                                && ctrl_state != 2'd0 && dut.cfg_in_burst != 1) begin
    got_r = real'($signed(m_axis_tdata)) / 2147483648.0;
    chk(got_r - price_real[opt_idx] < 5e-6 && price_real[opt_idx] - got_r < 5e-6,
        $sformatf("option %0d price %f vs %f", opt_idx, got_r, price_real[opt_idx]));
    opt_idx++;
  end

  logic [DW-1:0] rd;
  int t0, t1, walk;
  initial begin
    repeat (5) @(posedge sys_clk);
    rst_n = 1; sys_rst_n = 1;
    // boot: the controller loads the kernel into every core
    chk(ctrl_state == 2'd0, "controller starts in INIT");
    wait (ctrl_state == 2'd1);
    n_boot++;
    axi_rd(core_addr(5, 0, 12), rd);
    chk(rd[31:0] == 32'h0029_0400, "core 5 holds the kernel (word 12 = MEMR R9,[R4])");
    axi_rd(core_addr(3, 2, 0), rd);
    chk(rd[0] == 1'b1, "core 3 running after boot");
    repeat (20) @(posedge sys_clk);
    axi_rd(core_addr(2, 2, 1), rd);
    chk(rd[1] == 1'b1, "core 2 waits on its empty input FIFO");
    if (rd[1]) n_blk_in++;

    // ---- phase 1: a batch of options ----
    axi_wr(glb_addr(0), N_CORES);
    axi_wr(glb_addr(1), NSTEP + 4);
    axi_wr(glb_addr(2), 1);
    axi_wr(glb_addr(3), NOPT);
    axi_wr(glb_addr(4), NSTEP);          // pad option: every word = n, consumes exactly one burst
    for (int o = 0; o < NOPT; o++) make_option(o);
    // a write and a read on the control port at the same time
    @(negedge sys_clk);
    s_axil_awvalid = 1; s_axil_wvalid = 1; s_axil_awaddr = glb_addr(5); s_axil_wdata = 1;   // GO
    s_axil_arvalid = 1; s_axil_araddr = glb_addr(5);
    do @(posedge sys_clk); while (!s_axil_awready);
    #1 s_axil_awvalid = 0; s_axil_wvalid = 0;
    do @(posedge sys_clk); while (!s_axil_arready);
    #1 s_axil_arvalid = 0;
    while (!s_axil_rvalid) @(posedge sys_clk);
    chk(s_axil_rdata[1:0] == 2'd2, "read after colliding write sees SEND");
    @(posedge sys_clk);
    t0 = $time;
    send_stream();
    wait (done);
    t1 = $time;
    chk(exp_out.size() == 0, "all results out");
    chk(opt_idx == NOPT, "all prices compared");
    $display("AoC-%0d: batch of %0d options, %0d steps: %0d ns", N_CORES, NOPT, NSTEP, t1 - t0);

    $display("AoC-%0d: per option: %0d core cycles, about %0d core cycles per tree node",
             N_CORES, (t1 - t0) / 4, (t1 - t0) / 4 / (NSTEP * (NSTEP + 1) / 2));
    // The walk alone costs 58 cycles per node plus 11 per level (JEQ, two
    // LDC, SUB, JMP), from the per-word delays; loading the leaves and the
    // staggered arrival of each core's burst may add up to 5 % on top.
    walk = 58 * (NSTEP * (NSTEP + 1) / 2) + 11 * NSTEP;
    chk((t1 - t0) / 4 >= walk && (t1 - t0) / 4 <= walk + walk / 20,
        $sformatf("batch took %0d core cycles, walk alone is %0d", (t1 - t0) / 4, walk));
    fin = 1'b1;
  end
endmodule

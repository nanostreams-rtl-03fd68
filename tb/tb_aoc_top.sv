// tb_aoc_top: end-to-end test of the Analytics-on-Chip fabric at its
// default size (8 cores, 64-bit).
//
// Phase 1 prices a batch of European call options with the kernel that the
// controller loads at start-up. For each option the test builds the leaf
// values of a binomial tree (Q33.31) and the discounted up/down weights
// (Q1.63), streams them in (the scatter unit hands one option to each
// core and pads the last round), and compares every result from the gather
// unit with a fixed-point walk done here, and with a floating-point walk
// to within 1e-6. Phase 2 reprograms core 0 through the AXI4-Lite port with
// an echo program and holds the output back until the core blocks on its
// full output FIFO. Phase 3 loads a copy program into cores 0 and 1, turns
// on stream replication and checks that each input word comes back twice,
// once from each core. The test counts how often each mechanism happened -
// boot load, scatter padding, gather drop of pad results, blocking on an
// empty input FIFO, blocking on a full output FIFO, read/write collision on
// the control port, reprogramming, replication - and fails any that never
// did.
module tb_aoc_top;
  localparam int DW = 64;
  localparam int NSTEP = 24;       // binomial steps per option
  localparam int NOPT  = 17;       // options in the batch (not a multiple of 8)

  logic clk = 0, sys_clk = 0, rst_n = 0, sys_rst_n = 0;
  always #2 clk = ~clk;            // 250 MHz cores
  always #5 sys_clk = ~sys_clk;    // 100 MHz system side

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

  aoc_top dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string w);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", w); end
  endtask
  initial begin
    repeat (200000) @(posedge sys_clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- AXI4-Lite master ----------------
  function automatic logic [31:0] core_addr(input int c, input int rgn, input int i);
    return {16'd0, 1'b0, 3'(c), 2'(rgn), 10'(i)} << 3;
  endfunction
  function automatic logic [31:0] glb_addr(input int i);
    return ((32'd1 << 15) | 32'(i)) << 3;
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
  int n_pad = 0, n_drop = 0, n_coll = 0, n_blk_in = 0, n_blk_out = 0, n_reprog = 0, n_boot = 0, n_repl = 0;
  always @(posedge sys_clk) if (sys_rst_n) begin
    if (scatter_padding && dut.sc_valid != 0 && dut.sc_ready != 0) n_pad++;
    if (gather_dropping && (dut.ga_valid & dut.ga_ready) != 0) n_drop++;
    if (bus_collision) n_coll++;
    if (dut.cfg_replicate && s_axis_tvalid && s_axis_tready && $countones(dut.sc_valid | dut.u_scatter.sent) > 1) n_repl++;
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
    chk(got_r - price_real[opt_idx] < 1e-6 && price_real[opt_idx] - got_r < 1e-6,
        $sformatf("option %0d price %f vs %f", opt_idx, got_r, price_real[opt_idx]));
    opt_idx++;
  end

  logic [DW-1:0] rd;
  int t0, t1;
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
    axi_wr(glb_addr(0), 8);
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
    $display("batch of %0d options, %0d steps: %0d ns", NOPT, NSTEP, t1 - t0);

    // ---- phase 2: reprogram core 0 as an echo and fill its output FIFO ----
    axi_wr(core_addr(0, 2, 0), 2);                                         // reset core 0
    axi_wr(core_addr(0, 0, 0), 64'hE400_0011);                             // JMP 0 ; IN R1 ; OUT R1 (no in_en yet)
    axi_wr(core_addr(0, 0, 0), 64'hEC00_0011);                             // JMP 0 ; IN R1 ; OUT R1
    axi_rd(core_addr(0, 0, 0), rd);
    chk(rd[31:0] == 32'hEC00_0011, "reprogrammed word read back");
    n_reprog++;
    axi_wr(core_addr(0, 2, 0), 1);                                         // run
    axi_wr(glb_addr(0), 1);
    axi_wr(glb_addr(1), 1);
    axi_wr(glb_addr(3), 600);
    exp_out.push_back('0);                     // echo lags one word behind its input
    for (int i = 0; i < 600; i++) begin
      logic [DW-1:0] w;
      w = {$urandom, $urandom};
      in_words.push_back(w);
      if (i < 599) exp_out.push_back(w);
    end
    m_axis_tready = 0;
    axi_wr(glb_addr(5), 1);                    // GO
    fork
      send_stream();
      begin
        wait (dut.g_core[0].u_core.u_out_fifo.s_ready == 1'b0);
        repeat (10) @(posedge sys_clk);
        axi_rd(core_addr(0, 2, 1), rd);
        chk(rd[2] == 1'b1, "core 0 blocked on its full output FIFO");
        if (rd[2]) n_blk_out++;
        m_axis_tready = 1;
      end
    join
    wait (done);
    chk(exp_out.size() == 0, "echo complete");

    // ---- phase 3: replicate the stream to two cores running a copy program ----
    for (int c = 0; c < 2; c++) begin
      axi_wr(core_addr(c, 2, 0), 2);                                       // reset
      axi_wr(core_addr(c, 0, 0), 64'h0800_0001);                           // IN R1
      axi_wr(core_addr(c, 0, 1), 64'hE400_0010);                           // OUT R1 ; JMP 0
      axi_wr(core_addr(c, 2, 0), 1);                                       // run
    end
    axi_wr(glb_addr(0), 2);
    axi_wr(glb_addr(1), 1);
    axi_wr(glb_addr(2), 1);
    axi_wr(glb_addr(3), 2 * 200);
    axi_wr(glb_addr(6), 1);
    axi_rd(glb_addr(6), rd);
    chk(rd[0] == 1'b1, "replicate bit reads back");
    for (int i = 0; i < 200; i++) begin
      logic [DW-1:0] w;
      w = {$urandom, $urandom};
      in_words.push_back(w);
      exp_out.push_back(w);                    // from core 0
      exp_out.push_back(w);                    // and the same word from core 1
    end
    axi_wr(glb_addr(5), 1);                    // GO
    send_stream();
    wait (done);
    chk(exp_out.size() == 0, "replicated stream complete");
    axi_wr(glb_addr(6), 0);

    $display("mechanisms: boot %0d pad %0d drop %0d blk_in %0d blk_out %0d collision %0d reprogram %0d replicate %0d",
             n_boot, n_pad, n_drop, n_blk_in, n_blk_out, n_coll, n_reprog, n_repl);
    chk(n_boot > 0, "boot load happened");
    chk(n_pad > 0, "scatter padding happened");
    chk(n_drop > 0, "gather dropped pad results");
    chk(n_blk_in > 0, "blocking on empty input happened");
    chk(n_blk_out > 0, "blocking on full output happened");
    chk(n_coll > 0, "control port collision happened");
    chk(n_reprog > 0, "run-time reprogramming happened");
    chk(n_repl > 0, "stream replication happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

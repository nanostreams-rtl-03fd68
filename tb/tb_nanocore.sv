// tb_nanocore: self-checking test of one Nanocore.
//
// Phase 1 loads a program through the control bus that applies every
// register operation to operands taken from the input stream, stores and
// reloads a value through scratch memory, takes and skips conditional jumps,
// and packs input read, output write and an operation into one word. The
// output stream is compared with results worked out here, and the number of
// core cycles of every word with the delay table. Phase 2 runs an echo
// program and checks that the core blocks on an empty input FIFO and on a
// full output FIFO and then loses no word. Phase 3 checks pause, status and
// master read-back of the instruction and scratch memories.
module tb_nanocore;
  import nc_pkg::*;

  localparam int DW = 64;
  localparam int ITER = 20;

  logic clk = 0, sys_clk = 0, rst_n = 0, sys_rst_n = 0;
  always #2 clk = ~clk;        // core clock faster than the system clock
  always #5 sys_clk = ~sys_clk;

  logic          cb_req = 0, cb_we = 0;
  logic [11:0]   cb_addr = 0;
  logic [DW-1:0] cb_wdata = 0, cb_rdata;
  logic          s_valid = 0, s_ready, m_valid, m_ready = 1;
  logic [DW-1:0] s_data = 0, m_data;

  nanocore dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge sys_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cb_wr(input logic [11:0] a, input logic [DW-1:0] d);
    @(negedge sys_clk); cb_req = 1; cb_we = 1; cb_addr = a; cb_wdata = d;
    @(negedge sys_clk); cb_req = 0; cb_we = 0;
  endtask
  task automatic cb_rd(input logic [11:0] a, output logic [DW-1:0] d);
    @(negedge sys_clk); cb_req = 1; cb_we = 0; cb_addr = a;
    @(negedge sys_clk); cb_req = 0; d = cb_rdata;
  endtask
  function automatic logic [11:0] A_IMEM(input int i); return {2'b00, 10'(i)}; endfunction
  function automatic logic [11:0] A_SCR(input int i);  return {2'b01, 10'(i)}; endfunction
  function automatic logic [11:0] A_CR(input int i);   return {2'b10, 8'd0, 2'(i)}; endfunction

  // ---- phase 1 program ----
  logic [31:0] prog [30];
  int          dly  [30];
  initial begin
    prog[0]  = enc_b(OP_NOP, 0, 0, 0, 1, 1);           dly[0] = 4;
    prog[1]  = enc_b(OP_NOP, 0, 0, 0, 1, 2);           dly[1] = 4;
    prog[2]  = enc_b(OP_ADD, 3, 1, 2);                 dly[2] = 5;
    prog[3]  = enc_b(OP_SUB, 3, 1, 2, 0, 0, 1, 3);     dly[3] = 5;
    prog[4]  = enc_b(OP_SHL, 3, 1, 2, 0, 0, 1, 3);     dly[4] = 5;
    prog[5]  = enc_b(OP_SHR, 3, 1, 2, 0, 0, 1, 3);     dly[5] = 5;
    prog[6]  = enc_b(OP_SRA, 3, 1, 2, 0, 0, 1, 3);     dly[6] = 5;
    prog[7]  = enc_b(OP_CMPGT, 3, 1, 2, 0, 0, 1, 3);   dly[7] = 5;
    prog[8]  = enc_b(OP_CMPLT, 3, 1, 2, 0, 0, 1, 3);   dly[8] = 5;
    prog[9]  = enc_b(OP_SCMPGT, 3, 1, 2, 0, 0, 1, 3);  dly[9] = 5;
    prog[10] = enc_b(OP_SCMPLT, 3, 1, 2, 0, 0, 1, 3);  dly[10] = 5;
    prog[11] = enc_b(OP_INV, 3, 1, 2, 0, 0, 1, 3);     dly[11] = 5;
    prog[12] = enc_b(OP_OR, 3, 1, 2, 0, 0, 1, 3);      dly[12] = 5;
    prog[13] = enc_b(OP_AND, 3, 1, 2, 0, 0, 1, 3);     dly[13] = 5;
    prog[14] = enc_b(OP_XOR, 3, 1, 2, 0, 0, 1, 3);     dly[14] = 5;
    prog[15] = enc_b(OP_MUL, 3, 1, 2, 0, 0, 1, 3);     dly[15] = 8;
    prog[16] = enc_b(OP_MULH, 3, 1, 2, 0, 0, 1, 3);    dly[16] = 9;
    prog[17] = enc_a(CLS_LDC, 14'd5, 4, 0, 0, 1, 3);   dly[17] = 2;
    prog[18] = enc_b(OP_MEMW, 0, 4, 1);                dly[18] = 6;
    prog[19] = enc_b(OP_MEMR, 6, 4, 0);                dly[19] = 3;
    prog[20] = enc_a(CLS_LDC, -14'sd3, 7, 0, 0, 1, 6); dly[20] = 2;
    prog[21] = enc_a(CLS_LDC, 14'd0, 8, 0, 0, 1, 7);   dly[21] = 2;
    prog[22] = enc_a(CLS_JEQ, 14'd25, 8);              dly[22] = 3;
    prog[23] = enc_a(CLS_LDC, 14'd111, 9);             dly[23] = 1;
    prog[24] = enc_b(OP_NOP, 0, 0, 0, 0, 0, 1, 9);     dly[24] = 2;
    prog[25] = enc_a(CLS_JNE, 14'd23, 8);              dly[25] = 3;
    prog[26] = enc_a(CLS_LDC, 14'd222, 9);             dly[26] = 1;
    prog[27] = enc_b(OP_ADD, 11, 1, 1, 1, 10, 1, 9);   dly[27] = 5;
    prog[28] = enc_b(OP_XOR, 12, 10, 11, 0, 0, 1, 11); dly[28] = 5;
    prog[29] = enc_a(CLS_JMP, 14'd0, 0, 0, 0, 1, 12);  dly[29] = 2;
  end

  logic [DW-1:0] exp_q[$];
  logic [DW-1:0] in_q[$];

  function automatic logic [DW-1:0] mulh(input logic [DW-1:0] a, input logic [DW-1:0] b);
    logic signed [127:0] p;
    p = $signed({{64{a[63]}}, a}) * $signed({{64{b[63]}}, b});
    return p[127:64];
  endfunction

  task automatic push_expected(input logic [DW-1:0] r1, input logic [DW-1:0] r2, input logic [DW-1:0] r10);
    int sh = int'(r2[5:0]);
    exp_q.push_back(r1 + r2);
    exp_q.push_back(r1 - r2);
    exp_q.push_back(r1 << sh);
    exp_q.push_back(r1 >> sh);
    exp_q.push_back(DW'($signed(r1) >>> sh));
    exp_q.push_back((r1 > r2) ? 64'd1 : 64'd0);
    exp_q.push_back((r1 < r2) ? 64'd1 : 64'd0);
    exp_q.push_back(($signed(r1) > $signed(r2)) ? 64'd1 : 64'd0);
    exp_q.push_back(($signed(r1) < $signed(r2)) ? 64'd1 : 64'd0);
    exp_q.push_back(~r1);
    exp_q.push_back(r1 | r2);
    exp_q.push_back(r1 & r2);
    exp_q.push_back(r1 ^ r2);
    exp_q.push_back(r1 * r2);
    exp_q.push_back(mulh(r1, r2));
    exp_q.push_back(r1);
    exp_q.push_back(-64'sd3);
    exp_q.push_back(64'd222);
    exp_q.push_back(r1 + r1);
    exp_q.push_back(r10 ^ (r1 + r1));
  endtask

  // output monitor
  int n_out = 0;
  bit out_check_on = 1;
  always @(posedge sys_clk) if (sys_rst_n && m_valid && m_ready && out_check_on) begin
    n_out++;
    if (exp_q.size() == 0) check(0, $sformatf("unexpected output word %0d %h at %t", n_out, m_data, $time));
    else begin
      logic [DW-1:0] e;
      e = exp_q.pop_front();
      check(m_data == e, $sformatf("output %0d: got %h exp %h", n_out, m_data, e));
    end
  end

  // cycle-per-word monitor (phase 1 only)
  int  since = 0, words_timed = 0;
  bit  time_on = 0;
  always @(posedge clk) if (time_on && dut.run) begin
    since++;
    if (dut.last) begin
      check(since == dly[dut.pc], $sformatf("pc %0d took %0d cycles, table says %0d", dut.pc, since, dly[dut.pc]));
      words_timed++;
      since = 0;
    end
  end

  task automatic stream_in(input logic [DW-1:0] w);
    @(negedge sys_clk); s_valid = 1; s_data = w;
    do @(posedge sys_clk); while (!s_ready);
    @(negedge sys_clk); s_valid = 0;
  endtask

  logic [DW-1:0] rd, st, w1, w2;
  int blk_in_seen = 0, blk_out_seen = 0;

  initial begin
    repeat (5) @(posedge sys_clk);
    rst_n = 1; sys_rst_n = 1;
    repeat (3) @(posedge sys_clk);
    for (int i = 0; i < 30; i++) cb_wr(A_IMEM(i), DW'(prog[i]));
    cb_rd(A_IMEM(7), rd);
    check(rd[31:0] == prog[7], "instruction memory read-back");
    // operands, with some fixed corner cases
    for (int it = 0; it < ITER; it++) begin
      logic [DW-1:0] a, b, c;
      a = {$urandom, $urandom}; b = {$urandom, $urandom}; c = {$urandom, $urandom};
      if (it == 0) begin a = 64'd0; b = 64'd7; end
      if (it == 1) begin a = -64'sd5; b = 64'd3; end
      if (it == 2) begin a = 64'h8000_0000_0000_0000; b = 64'h7fff_ffff_ffff_ffff; end
      in_q.push_back(a); in_q.push_back(b); in_q.push_back(c);
      push_expected(a, b, c);
    end
    foreach (in_q[i]) stream_in(in_q[i]);
    repeat (10) @(posedge sys_clk);
    time_on = 1;
    cb_wr(A_CR(0), 1);                        // run
    wait (exp_q.size() == 0);
    repeat (20) @(posedge sys_clk);
    cb_rd(A_CR(1), st);
    check(st[1] == 1'b1, "core blocked on empty input after phase 1");
    check(words_timed > ITER * 20, $sformatf("words timed %0d", words_timed));
    time_on = 0;
    cb_wr(A_CR(0), 0);                        // stop
    cb_rd(A_SCR(5), rd);
    check(rd == in_q[3*(ITER-1)], "scratch read-back by master");

    // ---- phase 2: echo program, blocking on empty in / full out ----
    cb_wr(A_CR(0), 2);                        // reset
    repeat (4) @(posedge sys_clk);
    cb_wr(A_IMEM(0), DW'(enc_a(CLS_JMP, 14'd0, 0, 1, 1, 1, 1)));   // JMP 0 ; IN R1 ; OUT R1
    cb_wr(A_CR(0), 1);
    repeat (20) @(posedge sys_clk);
    cb_rd(A_CR(1), st);
    check(st[1] == 1 && st[31:16] == 0, "blocked on empty input FIFO at pc 0");
    if (st[1]) blk_in_seen++;
    m_ready = 0;
    // an output write sends the register as it was before the word, so the
    // echo lags by one word: first the cleared R1, and the last input stays
    exp_q.push_back('0);
    for (int i = 0; i < 600; i++) begin
      logic [DW-1:0] w;
      w = {$urandom, $urandom};
      if (i < 599) exp_q.push_back(w);
      stream_in(w);
    end
    repeat (100) @(posedge sys_clk);
    cb_rd(A_CR(1), st);
    check(st[2] == 1, "blocked on full output FIFO");
    if (st[2]) blk_out_seen++;
    check(exp_q.size() == 600, "nothing left while output held");
    m_ready = 1;
    wait (exp_q.size() == 0);
    check(n_out == ITER * 20 + 600, $sformatf("total outputs %0d", n_out));

    // ---- phase 3: pause keeps the retired-word count ----
    cb_wr(A_CR(0), 0);
    repeat (10) @(posedge sys_clk);
    cb_rd(A_CR(2), w1);
    repeat (50) @(posedge sys_clk);
    cb_rd(A_CR(2), w2);
    check(w1 == w2 && w1 == 64'd600, $sformatf("paused word count %0d %0d", w1, w2));
    check(blk_in_seen == 1 && blk_out_seen == 1, "both blocking cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

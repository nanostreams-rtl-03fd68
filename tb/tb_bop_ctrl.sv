// tb_bop_ctrl: follows the controller through its four states. In INIT it
// must write the whole kernel into every core's instruction memory (address
// and word checked, a few words against hand-encoded literals) and then set
// each core's run bit, one bus write per cycle; then IDLE waits for go, SEND
// opens the stream gate until the last input word, WALK waits for the
// gather unit, and done is raised on return to IDLE.
module tb_bop_ctrl;
  import nc_pkg::*;
  import bop_pkg::*;
  localparam int N = 8, DW = 64, CW = 3, TAW = 12 + CW + 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic go = 0, in_last_taken = 0, batch_done = 0;
  logic gate_open, bus_own, cb_req, cb_we, done;
  logic [TAW-1:0] cb_addr;
  logic [DW-1:0] cb_wdata;
  logic [1:0] state_o;
  bop_ctrl dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit ok, input string w);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", w); end
  endtask

  int nwr = 0, init_cycles = 0;
  int seen_states [4];
  logic [31:0] img [N][64];
  bit run_set [N];
  always @(posedge clk) if (rst_n) begin
    seen_states[state_o]++;
    if (state_o == 2'd0) init_cycles++;
    if (cb_req) begin
      chk(bus_own && cb_we && !cb_addr[TAW-1], "bus write only while owning the bus");
      if (cb_addr[11:10] == 2'd0) img[cb_addr[14:12]][cb_addr[5:0]] = cb_wdata[31:0];
      else if (cb_addr[11:10] == 2'd2 && cb_addr[1:0] == 2'd0 && cb_wdata == 1) run_set[cb_addr[14:12]] = 1;
      nwr++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (state_o == 2'd1);
    @(negedge clk);
    chk(nwr == N * (BOP_PROG_LEN + 1), $sformatf("%0d writes in INIT", nwr));
    chk(init_cycles == N * (BOP_PROG_LEN + 1), "one write per cycle");
    for (int c = 0; c < N; c++) begin
      chk(run_set[c], $sformatf("core %0d started", c));
      for (int i = 0; i < BOP_PROG_LEN; i++) chk(img[c][i] == bop_word(i), "program word");
      chk(img[c][0]  == 32'h0800_0001, "word 0 is IN R1");
      chk(img[c][BOP_PROG_LEN-1] == 32'hE400_0090, "last word is JMP 0 with OUT R9");
    end
    chk(!bus_own && !gate_open && !done, "idle outputs");
    repeat (5) @(negedge clk);
    chk(state_o == 2'd1, "stays idle without go");
    go = 1; @(negedge clk); go = 0;
    chk(state_o == 2'd2 && gate_open, "SEND after go");
    repeat (5) @(negedge clk);
    in_last_taken = 1; @(negedge clk); in_last_taken = 0;
    chk(state_o == 2'd3 && !gate_open, "WALK after last input");
    repeat (5) @(negedge clk);
    chk(!done, "not done before the batch");
    batch_done = 1; @(negedge clk); batch_done = 0;
    chk(state_o == 2'd1 && done, "IDLE and done after the batch");
    go = 1; @(negedge clk); go = 0;
    chk(!done, "done cleared by next go");
    chk(seen_states[0] > 0 && seen_states[1] > 0 && seen_states[2] > 0 && seen_states[3] > 0, "all four states");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_nc_ctrl_regs: writes run and reset through the register port and
// checks they reach the core clock after the two-flop synchroniser (two to
// three core clocks), reads CTRL back, and reads STATUS and WORDS after
// changing the status inputs.
module tb_nc_ctrl_regs;
  localparam int DW = 64;
  logic sys_clk = 0, core_clk = 0, sys_rst_n = 0, core_rst_n = 0;
  always #5 sys_clk = ~sys_clk;
  always #2 core_clk = ~core_clk;
  logic req = 0, we = 0;
  logic [1:0] addr = 0;
  logic [DW-1:0] wdata = 0, rdata;
  logic core_run, core_clr;
  logic st_running = 0, st_blk_in = 0, st_blk_out = 0;
  logic [9:0] st_pc = 0;
  logic [31:0] st_words = 0;
  nc_ctrl_regs dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (10000) @(posedge sys_clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit ok, input string w);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", w); end
  endtask
  task automatic wr(input logic [1:0] a, input logic [DW-1:0] d);
    @(negedge sys_clk); req = 1; we = 1; addr = a; wdata = d;
    @(negedge sys_clk); req = 0; we = 0;
  endtask
  task automatic rd(input logic [1:0] a, output logic [DW-1:0] d);
    @(negedge sys_clk); req = 1; we = 0; addr = a;
    @(negedge sys_clk); req = 0; d = rdata;
  endtask

  logic [DW-1:0] d;
  int lat;
  initial begin
    repeat (3) @(posedge sys_clk);
    sys_rst_n = 1; core_rst_n = 1;
    chk(!core_run && !core_clr, "idle after reset");
    for (int k = 0; k < 4; k++) begin
      logic [1:0] v;
      v = 2'(k);
      wr(2'd0, DW'(v));
      lat = 0;
      while ({core_clr, core_run} != v && lat < 10) begin @(posedge core_clk); #0.1 lat++; end
      chk({core_clr, core_run} == v && lat <= 3, $sformatf("ctrl %0d reached core after %0d core clocks", k, lat));
      rd(2'd0, d);
      chk(d == DW'(v), "CTRL read-back");
    end
    for (int k = 0; k < 20; k++) begin
      st_running = 1'($urandom); st_blk_in = 1'($urandom); st_blk_out = 1'($urandom);
      st_pc = 10'($urandom); st_words = $urandom;
      repeat (4) @(posedge sys_clk);
      rd(2'd1, d);
      chk(d == DW'({16'(st_pc), 13'd0, st_blk_out, st_blk_in, st_running}), "STATUS");
      rd(2'd2, d);
      chk(d == DW'(st_words), "WORDS");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

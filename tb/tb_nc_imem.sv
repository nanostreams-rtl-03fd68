// tb_nc_imem: both ports of the dual-clock memory on unrelated clocks; port
// A writes and reads back, port B reads what A wrote (and, for scratch,
// writes that A reads back); read latency of one clock is checked.
module tb_nc_imem;
  localparam int DEPTH = 1024;
  localparam int W = 32;
  localparam int AW = $clog2(DEPTH);
  logic clk_a = 0, clk_b = 0;
  always #5 clk_a = ~clk_a;
  always #3 clk_b = ~clk_b;
  logic a_en = 0, a_we = 0;
  logic [AW-1:0] a_addr = 0, b_addr = 0;
  logic [W-1:0] a_wdata = 0, a_rdata, b_rdata;
  nc_imem dut (.*);
  int checks = 0, failures = 0;
  logic [W-1:0] model [DEPTH];
  initial begin
    repeat (200000) @(posedge clk_a);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input logic [W-1:0] got, input logic [W-1:0] e, input string w);
    checks++;
    if (got !== e) begin failures++; $display("FAIL: %s got %h exp %h", w, got, e); end
  endtask
  initial begin
    foreach (model[i]) model[i] = '0;
    // fill through port A
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk_a); a_en = 1; a_we = 1; a_addr = AW'(i); a_wdata = W'({$urandom, $urandom});
      model[i] = a_wdata;
    end
    @(negedge clk_a); a_en = 0; a_we = 0;
    // read back through port A: data one clock after the address
    for (int n = 0; n < 300; n++) begin
      @(negedge clk_a); a_en = 1; a_addr = AW'($urandom);
      @(posedge clk_a); #1;
      chk(a_rdata, model[a_addr], "port A read");
    end
    @(negedge clk_a); a_en = 0;
    // port B reads
    for (int n = 0; n < 300; n++) begin
      @(negedge clk_b); b_addr = AW'($urandom);
      @(posedge clk_b); #1;
      chk(b_rdata, model[b_addr], "port B read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

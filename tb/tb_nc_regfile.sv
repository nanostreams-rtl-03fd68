// tb_nc_regfile: random writes on both ports (with collisions), reads on all
// three ports, reset and synchronous clear, against a model array.
module tb_nc_regfile;
  localparam int DW = 64;
  logic clk = 0, rst_n = 0, clr = 0;
  always #5 clk = ~clk;
  logic [3:0] ra_addr = 0, rb_addr = 0, ro_addr = 0, w0_addr = 0, w1_addr = 0;
  logic [DW-1:0] ra_data, rb_data, ro_data, w0_data = 0, w1_data = 0;
  logic w0_en = 0, w1_en = 0;
  nc_regfile dut (.*);

  int checks = 0, failures = 0, collisions = 0;
  logic [DW-1:0] m [16];
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input logic [DW-1:0] got, input logic [DW-1:0] e, input string w);
    checks++;
    if (got !== e) begin failures++; $display("FAIL: %s got %h exp %h", w, got, e); end
  endtask

  initial begin
    foreach (m[i]) m[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      ra_addr = 4'($urandom); rb_addr = 4'($urandom); ro_addr = 4'($urandom);
      #1;
      chk(ra_data, m[ra_addr], "ra"); chk(rb_data, m[rb_addr], "rb"); chk(ro_data, m[ro_addr], "ro");
      w0_en = 1'($urandom); w1_en = 1'($urandom);
      w0_addr = 4'($urandom); w1_addr = (n % 7 == 0) ? w0_addr : 4'($urandom);
      w0_data = {$urandom, $urandom}; w1_data = {$urandom, $urandom};
      clr = (n == 1500);
      if (w0_en && w1_en && w0_addr == w1_addr) collisions++;
      @(posedge clk);
      if (clr) foreach (m[i]) m[i] = '0;
      else begin
        if (w0_en) m[w0_addr] = w0_data;
        if (w1_en) m[w1_addr] = w1_data;   // operation result wins
      end
    end
    @(negedge clk); w0_en = 0; w1_en = 0; clr = 0;
    checks++; if (collisions == 0) begin failures++; $display("FAIL: no collision"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

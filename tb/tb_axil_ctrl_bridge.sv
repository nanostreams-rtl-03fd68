// tb_axil_ctrl_bridge: an AXI4-Lite master issues writes, reads and
// simultaneous write+read pairs to a model of the single control port (a
// word memory with registered read data). Checks: read data, that a write
// arriving together with a read is performed first (write priority), that
// only one transfer is ever outstanding, that hold keeps transfers out, and
// the OKAY responses.
module tb_axil_ctrl_bridge;
  localparam int AW = 32, DW = 64;
  logic clk = 0, rst_n = 0, hold = 0;
  always #5 clk = ~clk;
  logic awvalid = 0, awready, wvalid = 0, wready, bvalid, bready = 0;
  logic arvalid = 0, arready, rvalid, rready = 0, cb_req, cb_we, collision;
  logic [AW-1:0] awaddr = 0, araddr = 0;
  logic [DW-1:0] wdata = 0, rdata, cb_wdata, cb_rdata;
  logic [1:0] bresp, rresp;
  logic [AW-4:0] cb_addr;
  axil_ctrl_bridge dut (.*);

  // control port model: 256 words
  logic [DW-1:0] mem [256];
  always_ff @(posedge clk) if (cb_req) begin
    if (cb_we) mem[cb_addr[7:0]] <= cb_wdata;
    cb_rdata <= mem[cb_addr[7:0]];
  end

  int checks = 0, failures = 0, collisions = 0, req_while_hold = 0;
  logic [DW-1:0] model [256];
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit ok, input string w);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", w); end
  endtask
  always @(posedge clk) if (rst_n) begin
    if (collision) collisions++;
    if (hold && cb_req) req_while_hold++;
  end

  // write and read issued in the same cycle to the same address
  task automatic wr_rd(input bit do_w, input bit do_r, input logic [7:0] a, input logic [DW-1:0] d);
    bit wdone = !do_w, rdone = !do_r;
    logic [DW-1:0] got;
    @(negedge clk);
    awvalid = do_w; wvalid = do_w; awaddr = {21'd0, a, 3'b000}; wdata = d;
    arvalid = do_r; araddr = {21'd0, a, 3'b000};
    bready = 1; rready = 1;
    while (!(wdone && rdone)) begin
      bit t_aw, t_w, t_ar, t_b, t_r;
      #4;  // sample the handshakes just before the rising edge
      t_aw = awvalid && awready; t_w = wvalid && wready; t_ar = arvalid && arready;
      t_b = bvalid && bready; t_r = rvalid && rready;
      chk(!(bvalid && rvalid), "one transfer at a time");
      if (t_aw) chk(t_w, "aw and w taken together");
      if (t_aw) model[a] = d;
      if (t_b) begin chk(bresp == 2'b00, "bresp"); wdone = 1; end
      if (t_r) begin
        chk(rresp == 2'b00, "rresp");
        chk(rdata == model[a], $sformatf("read data %h exp %h", rdata, model[a]));
        rdone = 1;
      end
      @(posedge clk);
      #1;
      if (t_aw) begin awvalid = 0; wvalid = 0; end
      if (t_ar) arvalid = 0;
      @(negedge clk);
    end
    @(negedge clk); bready = 0; rready = 0;
  endtask

  initial begin
    foreach (mem[i]) mem[i] = '0;
    foreach (model[i]) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      int kind;
      kind = $urandom_range(2);
      wr_rd(kind != 1, kind != 0, 8'($urandom_range(15)), {$urandom, $urandom});
    end
    // hold blocks acceptance
    @(negedge clk); hold = 1; arvalid = 1; araddr = 0;
    repeat (5) @(posedge clk);
    chk(!arready && req_while_hold == 0, "hold blocks the port");
    @(negedge clk); hold = 0; arvalid = 0;
    chk(collisions > 50, $sformatf("collisions seen %0d", collisions));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

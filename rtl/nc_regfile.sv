// nc_regfile: the 16 general registers R0-R15 of a Nanocore.
//
// Registers are the only operand path into the datapath. Three read ports
// (RA and RB for the ALU, RO for the output-stream write) are combinational,
// and two write ports update on the clock: port 0 takes the input-stream
// read (RI), port 1 the operation result (RD); when both name the same
// register the operation result wins. All registers clear on reset and on the synchronous clear input. The
// count of 16 follows the document; port counts and the write priority are
// this design's choice.
module nc_regfile #(
  parameter int unsigned DATA_W = 64,
  parameter int unsigned N_REGS = 16,
  localparam int unsigned RW    = $clog2(N_REGS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic [RW-1:0]     ra_addr,
  output logic [DATA_W-1:0] ra_data,
  input  logic [RW-1:0]     rb_addr,
  output logic [DATA_W-1:0] rb_data,
  input  logic [RW-1:0]     ro_addr,
  output logic [DATA_W-1:0] ro_data,
  input  logic              w0_en,
  input  logic [RW-1:0]     w0_addr,
  input  logic [DATA_W-1:0] w0_data,
  input  logic              w1_en,
  input  logic [RW-1:0]     w1_addr,
  input  logic [DATA_W-1:0] w1_data
);
  logic [DATA_W-1:0] r [N_REGS];

  assign ra_data = r[ra_addr];
  assign rb_data = r[rb_addr];
  assign ro_data = r[ro_addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N_REGS); i++) r[i] <= '0;
    end else if (clr) begin
      for (int i = 0; i < int'(N_REGS); i++) r[i] <= '0;
    end else begin
      for (int i = 0; i < int'(N_REGS); i++) begin
        if (w1_en && w1_addr == RW'(i))      r[i] <= w1_data;
        else if (w0_en && w0_addr == RW'(i)) r[i] <= w0_data;
      end
    end
  end
endmodule

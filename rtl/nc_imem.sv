// nc_imem: Nanocore instruction memory.
//
// A true dual-port memory with one clock per port, as the core runs on its
// own clock while the master that (re)programs it sits on the system clock.
// Port A (master, clk_a) reads and writes program words; port B (core,
// clk_b) only fetches. Both read ports are synchronous: data appears one
// clock after the address. The depth (1024 words) follows the document; the
// 32-bit word is the instruction width (the four spare bits of a 36-bit block
// RAM word are not stored). A write and a read of the same word on
// different ports in the same cycle return the old word on port B.
// Contents start at zero (the NOP word).
module nc_imem #(
  parameter int unsigned DEPTH  = 1024,
  parameter int unsigned WORD_W = 32,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk_a,
  input  logic              a_en,
  input  logic              a_we,
  input  logic [AW-1:0]     a_addr,
  input  logic [WORD_W-1:0] a_wdata,
  output logic [WORD_W-1:0] a_rdata,
  input  logic              clk_b,
  input  logic [AW-1:0]     b_addr,
  output logic [WORD_W-1:0] b_rdata
);
  logic [WORD_W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
  end

  always_ff @(posedge clk_a) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      a_rdata <= mem[a_addr];
    end
  end

  always_ff @(posedge clk_b) b_rdata <= mem[b_addr];
endmodule

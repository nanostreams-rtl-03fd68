// nc_scratch: Nanocore scratch memory.
//
// Read-write, addressable store of a core for intermediate results and as a
// stack. True dual-port with one clock per port: port A belongs to the
// master (system clock) for loading data and for debug reads, port B to the
// core (core clock). Both ports read synchronously, one clock after the
// address, and return the old word when written in the same cycle. The
// depth of 512 words follows the document (the word doubles to 64 bits in
// the 64-bit core); the read-old-data behaviour and zero initial contents
// are this design's choice. The array is written from two processes on two
// clocks, which is what a true dual-port block RAM is; lint tools report it
// as a signal with several drivers, and that report stands. Writing the
// same word from both ports in the same instant leaves it undefined.
module nc_scratch #(
  parameter int unsigned DEPTH  = 512,
  parameter int unsigned DATA_W = 64,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk_a,
  input  logic              a_en,
  input  logic              a_we,
  input  logic [AW-1:0]     a_addr,
  input  logic [DATA_W-1:0] a_wdata,
  output logic [DATA_W-1:0] a_rdata,
  input  logic              clk_b,
  input  logic              b_en,
  input  logic              b_we,
  input  logic [AW-1:0]     b_addr,
  input  logic [DATA_W-1:0] b_wdata,
  output logic [DATA_W-1:0] b_rdata
);
  logic [DATA_W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
  end

  always_ff @(posedge clk_a) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      a_rdata <= mem[a_addr];
    end
  end

  always_ff @(posedge clk_b) begin
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_wdata;
      b_rdata <= mem[b_addr];
    end
  end
endmodule

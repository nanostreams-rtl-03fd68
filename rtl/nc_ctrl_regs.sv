// nc_ctrl_regs: control and status registers of one Nanocore.
//
// The master starts, stops (pauses) and resets a core through these
// registers, which sit on the control bus in the system clock domain:
//   CTRL   (index 0, read/write) bit 0 run, bit 1 reset (held while set)
//   STATUS (index 1, read only)  bit 0 running, bit 1 blocked on an empty
//                                input FIFO, bit 2 blocked on a full output
//                                FIFO, bits [31:16] program counter
//   WORDS  (index 2, read only)  instruction words retired since reset
// Run and reset reach the core clock through two-flop synchronisers; status
// comes back the same way and is exact once the core is stopped (while it
// runs a multi-bit value may be read mid-change). A bus access is a
// one-cycle request; read data is registered and valid on the next cycle.
// That the master can start, stop and reset the core follows the document;
// the register layout is this design's choice. Both resets must be asserted
// together.
module nc_ctrl_regs #(
  parameter int unsigned DATA_W = 64,
  parameter int unsigned PC_W   = 10
) (
  input  logic              sys_clk,
  input  logic              sys_rst_n,
  input  logic              req,
  input  logic              we,
  input  logic [1:0]        addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata,
  input  logic              core_clk,
  input  logic              core_rst_n,
  output logic              core_run,
  output logic              core_clr,
  input  logic              st_running,
  input  logic              st_blk_in,
  input  logic              st_blk_out,
  input  logic [PC_W-1:0]   st_pc,
  input  logic [31:0]       st_words
);
  import nc_pkg::*;

  logic       run_q, rst_q;
  logic [1:0] run_s, rst_s;
  logic [2:0] flags_s1, flags_s2;
  logic [PC_W-1:0] pc_s1, pc_s2;
  logic [31:0]     words_s1, words_s2;

  // system side
  always_ff @(posedge sys_clk or negedge sys_rst_n) begin
    if (!sys_rst_n) begin
      run_q <= 1'b0; rst_q <= 1'b0; rdata <= '0;
      flags_s1 <= '0; flags_s2 <= '0; pc_s1 <= '0; pc_s2 <= '0;
      words_s1 <= '0; words_s2 <= '0;
    end else begin
      flags_s1 <= {st_blk_out, st_blk_in, st_running};
      flags_s2 <= flags_s1;
      pc_s1    <= st_pc;     pc_s2    <= pc_s1;
      words_s1 <= st_words;  words_s2 <= words_s1;
      if (req && we && addr == CR_CTRL) begin
        run_q <= wdata[0];
        rst_q <= wdata[1];
      end
      if (req && !we) begin
        case (addr)
          CR_CTRL:   rdata <= DATA_W'({rst_q, run_q});
          CR_STATUS: rdata <= DATA_W'({16'(pc_s2), 13'd0, flags_s2});
          CR_WORDS:  rdata <= DATA_W'(words_s2);
          default:   rdata <= '0;
        endcase
      end
    end
  end

  // core side
  always_ff @(posedge core_clk or negedge core_rst_n) begin
    if (!core_rst_n) begin
      run_s <= '0; rst_s <= '0;
    end else begin
      run_s <= {run_s[0], run_q};
      rst_s <= {rst_s[0], rst_q};
    end
  end
  assign core_run = run_s[1];
  assign core_clr = rst_s[1];
endmodule

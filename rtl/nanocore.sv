// nanocore: one Nanocore, a small data-driven processor for stream kernels.
//
// The core fetches 32-bit instruction words from its own instruction memory
// and executes them one at a time (decode stage 1 holds the program counter;
// nc_alu is decode stage 2 and the execute units). A word may carry, side by
// side: a read of the input stream into register RI, a write of register RO
// to the output stream, and either a constant load, a jump or one register
// operation (see nc_pkg for the encoding). Operands come only from the 16
// registers; the scratch memory is reached by the memory read/write
// operations.
//
// Timing: a word occupies the core for exactly the cycles of the delay
// table (1 for NOP/jump/constant load, 4 input read, 2 output write,
// 6 memory write, 3 memory read, 3 conditional jump, 5 shift, compare,
// logic and add/sub, 8 multiply, 9 multiply high); a word with several
// parts takes the largest of their delays. Registers, scratch, the streams
// and the program counter are all updated on the word's last cycle, so every
// operand of a word sees the values from before it. The next word is
// fetched on that same cycle so there is no fetch bubble. Reads from an
// empty input FIFO and writes to a full output FIFO suspend the core in the
// word's first cycle until they can proceed (blocking stream I/O).
//
// Clocks: the core, its register file and the core-side ports of its
// memories and FIFOs run on clk. The control bus, the master-side ports of
// the instruction and scratch memories, and the stream sides of the FIFOs
// run on sys_clk. Control bus word map (addr[11:10]): 0 instruction memory,
// 1 scratch memory, 2 control registers (nc_ctrl_regs). A bus request is one
// cycle; read data is valid on the next sys_clk cycle. Streams use
// valid/ready handshakes. The core runs while the CTRL run bit is set and
// returns to address 0 with cleared registers while the reset bit is set.
// Which operations exist, their delays, the 16 registers, the memory sizes
// and the blocking stream reads and writes follow the document; the
// instruction encoding, multi-cycle sequencing and bus map are this
// design's choice.
module nanocore
  import nc_pkg::*;
#(
  parameter int unsigned DATA_W        = 64,
  parameter int unsigned IMEM_DEPTH    = 1024,
  parameter int unsigned SCRATCH_DEPTH = 512,
  parameter int unsigned FIFO_DEPTH    = 512,
  localparam int unsigned PC_W         = $clog2(IMEM_DEPTH),
  localparam int unsigned SA_W         = $clog2(SCRATCH_DEPTH),
  localparam int unsigned FC_W         = $clog2(FIFO_DEPTH) + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sys_clk,
  input  logic              sys_rst_n,
  // control bus (sys_clk)
  input  logic              cb_req,
  input  logic              cb_we,
  input  logic [CB_AW-1:0]  cb_addr,
  input  logic [DATA_W-1:0] cb_wdata,
  output logic [DATA_W-1:0] cb_rdata,
  // input stream (sys_clk)
  input  logic              s_valid,
  output logic              s_ready,
  input  logic [DATA_W-1:0] s_data,
  // output stream (sys_clk)
  output logic              m_valid,
  input  logic              m_ready,
  output logic [DATA_W-1:0] m_data
);
  // ---------------- control bus decode (sys_clk) ----------------
  cb_region_e        rgn, rgn_q;
  logic [31:0]       imem_a_rdata;
  logic [DATA_W-1:0] scr_a_rdata, ctrl_rdata;

  assign rgn = cb_region_e'(cb_addr[11:10]);
  always_ff @(posedge sys_clk or negedge sys_rst_n)
    if (!sys_rst_n) rgn_q <= RGN_IMEM;
    else if (cb_req) rgn_q <= rgn;

  always_comb begin
    case (rgn_q)
      RGN_IMEM:    cb_rdata = DATA_W'(imem_a_rdata);
      RGN_SCRATCH: cb_rdata = scr_a_rdata;
      RGN_CTRL:    cb_rdata = ctrl_rdata;
      default:     cb_rdata = '0;
    endcase
  end

  // ---------------- sequencer state (clk) ----------------
  logic [PC_W-1:0] pc, next_pc, fetch_addr;
  logic [3:0]      cnt;
  logic [31:0]     iword, words;
  instr_t          d;
  logic            run, clr, blocked, blk_in, blk_out, last;
  int unsigned     dly;

  logic [DATA_W-1:0] ra_data, rb_data, ro_data, alu_y, scr_b_rdata, in_data;
  logic [DATA_W-1:0] w1_data;
  logic              w1_en;
  logic              out_ready;
  logic [FC_W-1:0]   in_count;

  assign d   = decode(iword);
  assign dly = word_delay(d);

  assign blk_in  = d.in_en  && (in_count == '0);
  assign blk_out = d.out_en && !out_ready;
  assign blocked = (cnt == 4'd0) && (blk_in || blk_out);
  assign last    = run && !clr && !blocked && (32'(cnt) == dly - 1);

  always_comb begin
    next_pc = pc + PC_W'(1);
    case (d.cls)
      CLS_JMP: next_pc = d.k[PC_W-1:0];
      CLS_JEQ: if (ra_data == '0) next_pc = d.k[PC_W-1:0];
      CLS_JNE: if (ra_data != '0) next_pc = d.k[PC_W-1:0];
      default: ;
    endcase
  end

  // address presented to the instruction memory: the word to run next cycle
  assign fetch_addr = clr ? '0 : (last ? next_pc : pc);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc <= '0; cnt <= '0; words <= '0;
    end else if (clr) begin
      pc <= '0; cnt <= '0; words <= '0;
    end else if (run) begin
      if (last) begin
        pc    <= next_pc;
        cnt   <= '0;
        words <= words + 32'd1;
      end else if (!blocked) begin
        cnt <= cnt + 4'd1;
      end
    end
  end

  // result write (port 1 of the register file)
  always_comb begin
    w1_en   = 1'b0;
    w1_data = alu_y;
    if (last) begin
      if (d.cls == CLS_LDC) begin
        w1_en   = 1'b1;
        w1_data = DATA_W'($signed(d.k));
      end else if (d.cls == CLS_B) begin
        case (d.op)
          OP_NOP, OP_MEMW: w1_en = 1'b0;
          OP_MEMR: begin w1_en = 1'b1; w1_data = scr_b_rdata; end
          default: w1_en = (d.op <= OP_MULH);
        endcase
      end
    end
  end

  // ---------------- datapath ----------------
  nc_imem #(.DEPTH(IMEM_DEPTH), .WORD_W(32)) u_imem (
    .clk_a(sys_clk), .a_en(cb_req && rgn == RGN_IMEM), .a_we(cb_we),
    .a_addr(cb_addr[PC_W-1:0]), .a_wdata(cb_wdata[31:0]), .a_rdata(imem_a_rdata),
    .clk_b(clk), .b_addr(fetch_addr), .b_rdata(iword));

  nc_regfile #(.DATA_W(DATA_W), .N_REGS(N_REGS)) u_rf (
    .clk, .rst_n, .clr,
    .ra_addr(d.ra), .ra_data, .rb_addr(d.rb), .rb_data, .ro_addr(d.ro), .ro_data,
    .w0_en(last && d.in_en), .w0_addr(d.ri), .w0_data(in_data),
    .w1_en, .w1_addr(d.rd), .w1_data);

  nc_alu #(.DATA_W(DATA_W)) u_alu (.op(d.op), .a(ra_data), .b(rb_data), .y(alu_y), .sel());

  nc_scratch #(.DEPTH(SCRATCH_DEPTH), .DATA_W(DATA_W)) u_scratch (
    .clk_a(sys_clk), .a_en(cb_req && rgn == RGN_SCRATCH), .a_we(cb_we),
    .a_addr(cb_addr[SA_W-1:0]), .a_wdata(cb_wdata), .a_rdata(scr_a_rdata),
    .clk_b(clk),
    .b_en(run && !clr && d.cls == CLS_B && (d.op == OP_MEMR || (d.op == OP_MEMW && last))),
    .b_we(d.op == OP_MEMW), .b_addr(ra_data[SA_W-1:0]), .b_wdata(rb_data),
    .b_rdata(scr_b_rdata));

  nc_fifo #(.DATA_W(DATA_W), .DEPTH(FIFO_DEPTH)) u_in_fifo (
    .wclk(sys_clk), .wrst_n(sys_rst_n), .s_valid, .s_ready, .s_data,
    .rclk(clk), .rrst_n(rst_n), .r_pop(last && d.in_en), .r_empty(),
    .r_data(in_data), .r_count(in_count));

  logic              out_empty;
  nc_fifo #(.DATA_W(DATA_W), .DEPTH(FIFO_DEPTH)) u_out_fifo (
    .wclk(clk), .wrst_n(rst_n), .s_valid(last && d.out_en), .s_ready(out_ready),
    .s_data(ro_data),
    .rclk(sys_clk), .rrst_n(sys_rst_n), .r_pop(m_ready && !out_empty), .r_empty(out_empty),
    .r_data(m_data), .r_count());
  assign m_valid = !out_empty;

  nc_ctrl_regs #(.DATA_W(DATA_W), .PC_W(PC_W)) u_ctrl (
    .sys_clk, .sys_rst_n, .req(cb_req && rgn == RGN_CTRL), .we(cb_we), .addr(cb_addr[1:0]),
    .wdata(cb_wdata), .rdata(ctrl_rdata),
    .core_clk(clk), .core_rst_n(rst_n), .core_run(run), .core_clr(clr),
    .st_running(run && !clr), .st_blk_in(run && (cnt == 4'd0) && blk_in),
    .st_blk_out(run && (cnt == 4'd0) && blk_out), .st_pc(pc), .st_words(words));

  // a word never takes longer than the slowest entry of the delay table
  a_cnt_bound: assert property (@(posedge clk) disable iff (!rst_n) cnt < 4'(D_MULH))
    else $error("nanocore: cycle counter overran");
endmodule

// nc_pkg: shared types, instruction encoding and timing of the Nanocore.
//
// A Nanocore instruction is one 32-bit word that can carry up to four
// operations at once: an input-stream read into a register (RI), an
// output-stream write from a register (RO), and either a constant load /
// jump (format A) or one register-to-register operation (format B).
// The field order follows the instruction-word drawing of the Nanocore; the
// field widths, the opcode values and the two enable bits are this design's
// own choice, because the drawing prints no bit positions.
//
//   format A: [31:28] cls  [27] in_en [26] out_en [25:12] const14 [11:8] dest [7:4] RO [3:0] RI
//   format B: [31:28] 0    [27] in_en [26] out_en [25:20] op      [19:16] RD [15:12] RB
//             [11:8] RA [7:4] RO [3:0] RI
//
// Format A classes: LDC (R[dest] = sign-extended const14), JMP (pc = const),
// JEQ (pc = const if R[dest] == 0), JNE (pc = const if R[dest] != 0).
// Every word takes the number of cycles given by the Nanocore's delay table
// (largest delay of the operations it carries), plus any cycles it is
// blocked on an empty input or a full output FIFO.
package nc_pkg;

  localparam int unsigned INSTR_W = 32;
  localparam int unsigned N_REGS  = 16;

  // format A classes, instruction bits [31:28]
  typedef enum logic [3:0] {
    CLS_B   = 4'h0,
    CLS_JNE = 4'hC,
    CLS_JEQ = 4'hD,
    CLS_JMP = 4'hE,
    CLS_LDC = 4'hF
  } cls_e;

  // format B operations, instruction bits [25:20]
  typedef enum logic [5:0] {
    OP_NOP    = 6'd0,
    OP_MEMW   = 6'd1,   // scratch[R[RA]] = R[RB]
    OP_MEMR   = 6'd2,   // R[RD] = scratch[R[RA]]
    OP_SHL    = 6'd3,   // R[RD] = R[RA] << R[RB]
    OP_SHR    = 6'd4,   // logical right shift
    OP_SRA    = 6'd5,   // arithmetic right shift
    OP_CMPGT  = 6'd6,   // R[RD] = (R[RA] >  R[RB]) unsigned
    OP_CMPLT  = 6'd7,   // R[RD] = (R[RA] <  R[RB]) unsigned
    OP_SCMPGT = 6'd8,   // signed compares
    OP_SCMPLT = 6'd9,
    OP_INV    = 6'd10,  // R[RD] = ~R[RA]
    OP_OR     = 6'd11,
    OP_AND    = 6'd12,
    OP_XOR    = 6'd13,
    OP_ADD    = 6'd14,
    OP_SUB    = 6'd15,  // R[RD] = R[RA] - R[RB]
    OP_MUL    = 6'd16,  // low half of signed product
    OP_MULH   = 6'd17   // high half of signed product
  } op_e;

  // ALU output-select groups (the output multiplexer of the datapath)
  typedef enum logic [1:0] {
    SEL_LOGIC = 2'd0,   // bitwise and shift results
    SEL_ADD   = 2'd1,   // DSP adder result
    SEL_MUL   = 2'd2,   // DSP multiplier result
    SEL_CMP   = 2'd3    // comparator result
  } alu_sel_e;

  // Cycle counts of the delay table (32-bit configuration)
  localparam int unsigned D_BASIC = 1;  // NOP, JMP, LDC
  localparam int unsigned D_IN    = 4;
  localparam int unsigned D_OUT   = 2;
  localparam int unsigned D_MEMW  = 6;
  localparam int unsigned D_MEMR  = 3;
  localparam int unsigned D_JCOND = 3;
  localparam int unsigned D_ALU   = 5;  // shift, compare, bitwise, add/sub
  localparam int unsigned D_MUL   = 8;
  localparam int unsigned D_MULH  = 9;

  // Decoded instruction word
  typedef struct packed {
    cls_e       cls;
    logic       in_en;
    logic       out_en;
    op_e        op;
    logic [13:0] k;
    logic [3:0] rd;   // format A: dest / condition register; format B: RD
    logic [3:0] rb;
    logic [3:0] ra;
    logic [3:0] ro;
    logic [3:0] ri;
  } instr_t;

  function automatic instr_t decode(input logic [31:0] w);
    instr_t d;
    d.cls    = cls_e'(w[31:28]);
    d.in_en  = w[27];
    d.out_en = w[26];
    d.op     = op_e'(w[25:20]);
    d.k      = w[25:12];
    d.rd     = (w[31:28] == CLS_B) ? w[19:16] : w[11:8];
    d.rb     = w[15:12];
    d.ra     = w[11:8];
    d.ro     = w[7:4];
    d.ri     = w[3:0];
    return d;
  endfunction

  // Delay of the register operation carried by a word (stream parts excluded)
  function automatic int unsigned op_delay(input instr_t d);
    if (d.cls == CLS_JEQ || d.cls == CLS_JNE) return D_JCOND;
    if (d.cls != CLS_B) return D_BASIC;
    case (d.op)
      OP_NOP:  return D_BASIC;
      OP_MEMW: return D_MEMW;
      OP_MEMR: return D_MEMR;
      OP_MUL:  return D_MUL;
      OP_MULH: return D_MULH;
      OP_SHL, OP_SHR, OP_SRA, OP_CMPGT, OP_CMPLT, OP_SCMPGT, OP_SCMPLT,
      OP_INV, OP_OR, OP_AND, OP_XOR, OP_ADD, OP_SUB: return D_ALU;
      default: return D_BASIC;
    endcase
  endfunction

  // Total cycles of a word: the operations it carries run side by side
  function automatic int unsigned word_delay(input instr_t d);
    int unsigned n;
    n = op_delay(d);
    if (d.in_en  && D_IN  > n) n = D_IN;
    if (d.out_en && D_OUT > n) n = D_OUT;
    return n;
  endfunction

  // ---- encoders (used by the boot program and by testbenches) ----
  function automatic logic [31:0] enc_a(input cls_e c, input logic [13:0] k, input logic [3:0] dst,
                                        input logic in_en = 1'b0, input logic [3:0] ri = 4'd0,
                                        input logic out_en = 1'b0, input logic [3:0] ro = 4'd0);
    return {c, in_en, out_en, k, dst, ro, ri};
  endfunction

  function automatic logic [31:0] enc_b(input op_e op, input logic [3:0] rd, input logic [3:0] ra,
                                        input logic [3:0] rb,
                                        input logic in_en = 1'b0, input logic [3:0] ri = 4'd0,
                                        input logic out_en = 1'b0, input logic [3:0] ro = 4'd0);
    return {CLS_B, in_en, out_en, op, rd, rb, ra, ro, ri};
  endfunction

  // ---- control bus of one core: word address map ----
  // addr[11:10] = 00 instruction memory, 01 scratch memory, 10 control registers
  localparam int unsigned CB_AW = 12;
  typedef enum logic [1:0] {
    RGN_IMEM    = 2'd0,
    RGN_SCRATCH = 2'd1,
    RGN_CTRL    = 2'd2
  } cb_region_e;
  // control register indices (addr[1:0] within RGN_CTRL)
  localparam logic [1:0] CR_CTRL   = 2'd0;  // bit0 run, bit1 reset
  localparam logic [1:0] CR_STATUS = 2'd1;  // see nc_ctrl_regs
  localparam logic [1:0] CR_WORDS  = 2'd2;  // words retired since reset

endpackage

// nc_alu: the "simplified ALU" of the Nanocore (decode stage 2 and execute).
//
// Decode stage 2 turns the operation code into an output-select group. The
// datapath then holds a comparator (COMP), an add/subtract unit (DSP A), a
// multiplier built from two DSP slices (DSP B low product, DSP C high
// product), a bitwise/shift unit, and an output multiplexer that picks the
// result of the selected unit. The operation set (shifts, unsigned and
// signed compares, invert/OR/AND/XOR, add, subtract, multiply and multiply
// high) follows the document; that compares return 1 or 0, that multiplies
// are signed, and that shift counts use the low log2(DATA_W) bits of the
// second operand are this design's choice. The unit is purely
// combinational: the core holds its operands stable for the whole
// multi-cycle duration of an instruction and samples the result on its
// last cycle, which is how the cycle counts of the delay table are met.
module nc_alu
  import nc_pkg::*;
#(
  parameter int unsigned DATA_W = 64,
  localparam int unsigned SW    = $clog2(DATA_W)
) (
  input  op_e               op,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  output logic [DATA_W-1:0] y,
  output alu_sel_e          sel
);
  logic [DATA_W-1:0]   cmp_out, add_out, logic_out, mul_out;
  logic [2*DATA_W-1:0] prod;

  // decode stage 2: output select
  always_comb begin
    case (op)
      OP_CMPGT, OP_CMPLT, OP_SCMPGT, OP_SCMPLT: sel = SEL_CMP;
      OP_ADD, OP_SUB:                           sel = SEL_ADD;
      OP_MUL, OP_MULH:                          sel = SEL_MUL;
      default:                                  sel = SEL_LOGIC;
    endcase
  end

  // COMP
  always_comb begin
    case (op)
      OP_CMPGT:  cmp_out = DATA_W'(a > b);
      OP_CMPLT:  cmp_out = DATA_W'(a < b);
      OP_SCMPGT: cmp_out = DATA_W'($signed(a) > $signed(b));
      OP_SCMPLT: cmp_out = DATA_W'($signed(a) < $signed(b));
      default:   cmp_out = '0;
    endcase
  end

  // DSP A: add / subtract
  assign add_out = (op == OP_SUB) ? a - b : a + b;

  // DSP B / DSP C: signed multiply, low or high half
  logic signed [2*DATA_W-1:0] sa, sb;
  assign sa      = {{DATA_W{a[DATA_W-1]}}, a};
  assign sb      = {{DATA_W{b[DATA_W-1]}}, b};
  assign prod    = sa * sb;
  assign mul_out = (op == OP_MULH) ? prod[2*DATA_W-1:DATA_W] : prod[DATA_W-1:0];

  // bitwise and shift
  always_comb begin
    case (op)
      OP_SHL:  logic_out = a << b[SW-1:0];
      OP_SHR:  logic_out = a >> b[SW-1:0];
      OP_SRA:  logic_out = DATA_W'($signed(a) >>> b[SW-1:0]);
      OP_INV:  logic_out = ~a;
      OP_OR:   logic_out = a | b;
      OP_AND:  logic_out = a & b;
      OP_XOR:  logic_out = a ^ b;
      default: logic_out = '0;
    endcase
  end

  // output select
  always_comb begin
    case (sel)
      SEL_CMP: y = cmp_out;
      SEL_ADD: y = add_out;
      SEL_MUL: y = mul_out;
      default: y = logic_out;
    endcase
  end
endmodule

// bop_pkg: the binomial option pricing kernel that the controller loads into
// every Nanocore at start-up.
//
// The kernel performs the backward walk of a binomial tree in 64-bit signed
// fixed point. Option values use BOP_VAL_FRAC = 31 fractional bits (Q33.31);
// the two weights use BOP_COEF_FRAC = 63 (Q1.63, both are below 1). Per
// option it reads from its input stream: n (number of steps),
// a = exp(-r dt) * p_d, b = exp(-r dt) * p_u, then the n+1 option values at
// the leaves, which it stores in scratch memory. It then applies
// S[j] = a*S[j] + b*S[j+1] for j = 0..i-1, for i = n down to 1, and writes
// S[0] to its output stream. With these formats the high half of each
// signed 128-bit product (one MULH) is a*S at 30 fractional bits, so the two
// high halves are added and shifted left once: a tree node costs
// 58 core cycles (two memory reads, two MULH, add, shift, memory write, two
// index increments, compare and loop jump). The kernel then waits for the
// next option. The walk itself follows the document; the program, the
// number formats and the input layout are this design's own. Leaves need
// n+1 scratch words, so n is at most the scratch depth minus one.
// Register use: R1 i, R2 a, R3 b, R4 j, R5 constant 1, R6 n+1, R7 input
// word, R8 loop flag, R9/R10 node values, R11/R12 products, R15 j+1.
package bop_pkg;
  import nc_pkg::*;

  localparam int unsigned BOP_VAL_FRAC  = 31;
  localparam int unsigned BOP_COEF_FRAC = 63;
  localparam int unsigned BOP_PROG_LEN  = 27;
  localparam int unsigned L_LOAD  = 4;
  localparam int unsigned L_OUTER = 9;
  localparam int unsigned L_INNER = 12;
  localparam int unsigned L_DONE  = 25;

  function automatic logic [31:0] bop_word(input int unsigned i);
    case (i)
      0:  return enc_b(OP_NOP, 0, 0, 0, 1'b1, 4'd1);                      // IN R1 (n)
      1:  return enc_a(CLS_LDC, 14'd1, 4'd5, 1'b1, 4'd2);                 // R5=1 ; IN R2 (a)
      2:  return enc_a(CLS_LDC, 14'd0, 4'd4, 1'b1, 4'd3);                 // R4=0 ; IN R3 (b)
      3:  return enc_b(OP_ADD, 6, 1, 5);                                  // R6=n+1
      4:  return enc_b(OP_NOP, 0, 0, 0, 1'b1, 4'd7);                      // IN R7 (leaf)
      5:  return enc_b(OP_MEMW, 0, 4, 7);                                 // S[R4]=R7
      6:  return enc_b(OP_ADD, 4, 4, 5);                                  // j++
      7:  return enc_b(OP_CMPLT, 8, 4, 6);                                // j<n+1
      8:  return enc_a(CLS_JNE, 14'(L_LOAD), 4'd8);
      9:  return enc_a(CLS_JEQ, 14'(L_DONE), 4'd1);                       // i==0 -> done
      10: return enc_a(CLS_LDC, 14'd0, 4'd4);                             // j=0
      11: return enc_a(CLS_LDC, 14'd1, 4'd15);                            // j+1=1
      12: return enc_b(OP_MEMR, 9, 4, 0);                                 // R9=S[j]
      13: return enc_b(OP_MEMR, 10, 15, 0);                               // R10=S[j+1]
      14: return enc_b(OP_MULH, 11, 2, 9);                                // a*S[j]
      15: return enc_b(OP_MULH, 12, 3, 10);                               // b*S[j+1]
      16: return enc_b(OP_ADD, 11, 11, 12);
      17: return enc_b(OP_SHL, 11, 11, 5);                                // back to Q33.31
      18: return enc_b(OP_MEMW, 0, 4, 11);                                // S[j]=R11
      19: return enc_b(OP_ADD, 4, 4, 5);
      20: return enc_b(OP_ADD, 15, 15, 5);
      21: return enc_b(OP_CMPLT, 8, 4, 1);                                // j<i
      22: return enc_a(CLS_JNE, 14'(L_INNER), 4'd8);
      23: return enc_b(OP_SUB, 1, 1, 5);                                  // i--
      24: return enc_a(CLS_JMP, 14'(L_OUTER), 4'd0);
      25: return enc_b(OP_MEMR, 9, 0, 0);                                 // R9=S[0]
      26: return enc_a(CLS_JMP, 14'd0, 4'd0, 1'b0, 4'd0, 1'b1, 4'd9);     // OUT R9 ; JMP 0
      default: return enc_b(OP_NOP, 0, 0, 0);
    endcase
  endfunction

  // One tree node as the kernel computes it: a*s0 + b*s1 in the formats above
  function automatic logic [63:0] bop_node(input logic [63:0] a, input logic [63:0] b,
                                           input logic [63:0] s0, input logic [63:0] s1);
    logic signed [127:0] p0, p1;
    p0 = $signed({{64{a[63]}}, a}) * $signed({{64{s0[63]}}, s0});
    p1 = $signed({{64{b[63]}}, b}) * $signed({{64{s1[63]}}, s1});
    return (p0[127:64] + p1[127:64]) << (64 - BOP_COEF_FRAC);
  endfunction
endpackage

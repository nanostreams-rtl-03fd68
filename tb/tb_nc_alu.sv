// tb_nc_alu: checks every operation of the Nanocore ALU on random and corner
// operands against results computed here, including the output-select group.
// A second instance in the 32-bit configuration gets the same operations on
// the low halves of the operands (multiply high is then the upper 32 bits
// of the 64-bit product).
module tb_nc_alu;
  import nc_pkg::*;
  localparam int DW = 64;
  op_e           op;
  logic [DW-1:0] a, b, y;
  alu_sel_e      sel;
  nc_alu dut (.*);
  logic [31:0] y32;
  alu_sel_e    sel32;
  nc_alu #(.DATA_W(32)) dut32 (.op, .a(a[31:0]), .b(b[31:0]), .y(y32), .sel(sel32));

  int checks = 0, failures = 0;
  initial begin
    #1000000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [DW-1:0] model(input op_e o, input logic [DW-1:0] x, input logic [DW-1:0] z);
    logic signed [127:0] p;
    p = $signed({{64{x[63]}}, x}) * $signed({{64{z[63]}}, z});
    case (o)
      OP_SHL: return x << z[5:0];
      OP_SHR: return x >> z[5:0];
      OP_SRA: return DW'($signed(x) >>> z[5:0]);
      OP_CMPGT: return {63'd0, x > z};
      OP_CMPLT: return {63'd0, x < z};
      OP_SCMPGT: return {63'd0, $signed(x) > $signed(z)};
      OP_SCMPLT: return {63'd0, $signed(x) < $signed(z)};
      OP_INV: return ~x;
      OP_OR: return x | z;
      OP_AND: return x & z;
      OP_XOR: return x ^ z;
      OP_ADD: return x + z;
      OP_SUB: return x - z;
      OP_MUL: return p[63:0];
      OP_MULH: return p[127:64];
      default: return 'x;
    endcase
  endfunction

  function automatic logic [31:0] model32(input op_e o, input logic [31:0] x, input logic [31:0] z);
    logic signed [63:0] p;
    p = $signed({{32{x[31]}}, x}) * $signed({{32{z[31]}}, z});
    case (o)
      OP_SHL: return x << z[4:0];
      OP_SHR: return x >> z[4:0];
      OP_SRA: return 32'($signed(x) >>> z[4:0]);
      OP_CMPGT: return {31'd0, x > z};
      OP_CMPLT: return {31'd0, x < z};
      OP_SCMPGT: return {31'd0, $signed(x) > $signed(z)};
      OP_SCMPLT: return {31'd0, $signed(x) < $signed(z)};
      OP_INV: return ~x;
      OP_OR: return x | z;
      OP_AND: return x & z;
      OP_XOR: return x ^ z;
      OP_ADD: return x + z;
      OP_SUB: return x - z;
      OP_MUL: return p[31:0];
      OP_MULH: return p[63:32];
      default: return 'x;
    endcase
  endfunction

  op_e ops [15] = '{OP_SHL, OP_SHR, OP_SRA, OP_CMPGT, OP_CMPLT, OP_SCMPGT, OP_SCMPLT,
                    OP_INV, OP_OR, OP_AND, OP_XOR, OP_ADD, OP_SUB, OP_MUL, OP_MULH};
  logic [DW-1:0] corner [8] = '{64'd0, 64'd1, -64'sd1, 64'h8000_0000_0000_0000,
                                64'h7fff_ffff_ffff_ffff, 64'd63,
                                64'h0000_0000_8000_0000, 64'h0000_0000_7fff_ffff};
  initial begin
    for (int n = 0; n < 2000; n++) begin
      op = ops[n % 15];
      if (n < 15 * 64) begin a = corner[(n / 15) % 8]; b = corner[(n / 120) % 8]; end
      else begin a = {$urandom, $urandom}; b = {$urandom, $urandom}; end
      #1;
      checks++;
      if (y !== model(op, a, b)) begin
        failures++;
        $display("FAIL: %s a=%h b=%h y=%h exp=%h", op.name(), a, b, y, model(op, a, b));
      end
      checks++;
      if (y32 !== model32(op, a[31:0], b[31:0])) begin
        failures++;
        $display("FAIL: 32-bit %s a=%h b=%h y=%h exp=%h", op.name(), a[31:0], b[31:0], y32,
                 model32(op, a[31:0], b[31:0]));
      end
      checks++;
      if (sel32 != sel) begin failures++; $display("FAIL: 32-bit select for %s", op.name()); end
      checks++;
      if (sel != ((op inside {OP_CMPGT, OP_CMPLT, OP_SCMPGT, OP_SCMPLT}) ? SEL_CMP :
                  (op inside {OP_ADD, OP_SUB}) ? SEL_ADD :
                  (op inside {OP_MUL, OP_MULH}) ? SEL_MUL : SEL_LOGIC)) begin
        failures++; $display("FAIL: select for %s", op.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

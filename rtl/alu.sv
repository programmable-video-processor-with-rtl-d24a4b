// alu: the datapath's single 32-bit ALU together with its ALU-control decode.
//
// The controller asks for an operation with the 2-bit ALUOp code: 00 add
// (address and PC arithmetic), 01 subtract (beq comparison, PC-4 for the
// wait retry and EPC), 10 "look at the function field" for R-type
// instructions, where add, sub, and, or and slt are decoded. The ALUOp codes
// follow the controller's state diagram; the function-code decode is the
// standard MIPS one and is this design's choice of R-type subset.
// Outputs: the result, Zero (result is all zeros, for beq) and Overflow
// (signed overflow of add or sub under ALUOp 10, which raises the overflow
// exception). Purely combinational.
module alu
  import mips_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  aluop_e      alu_op,
  input  logic [5:0]  funct,
  output logic [31:0] result,
  output logic        zero,
  output logic        overflow
);

  alufn_e fn;

  // ALU control
  always_comb begin
    unique case (alu_op)
      ALUOP_ADD: fn = ALU_ADD;
      ALUOP_SUB: fn = ALU_SUB;
      default: begin
        unique case (funct)
          FN_SUB:  fn = ALU_SUB;
          FN_AND:  fn = ALU_AND;
          FN_OR:   fn = ALU_OR;
          FN_SLT:  fn = ALU_SLT;
          default: fn = ALU_ADD;
        endcase
      end
    endcase
  end

  logic [31:0] sum, diff;
  assign sum  = a + b;
  assign diff = a - b;

  always_comb begin
    unique case (fn)
      ALU_AND: result = a & b;
      ALU_OR:  result = a | b;
      ALU_SUB: result = diff;
      ALU_SLT: result = {31'd0, $signed(a) < $signed(b)};
      default: result = sum;
    endcase
  end

  assign zero = (result == 32'd0);

  // Signed overflow, reported only for R-type add and sub.
  always_comb begin
    overflow = 1'b0;
    if (alu_op == ALUOP_FUNCT) begin
      if (fn == ALU_ADD) overflow = (a[31] == b[31]) && (sum[31]  != a[31]);
      if (fn == ALU_SUB) overflow = (a[31] != b[31]) && (diff[31] != a[31]);
    end
  end

endmodule

// tb_alu: self-checking test of the ALU and its ALU-control decode.
// Applies directed and random operands under ALUOp 00 (add), 01 (subtract)
// and 10 with each R-type function code, and compares result, Zero and
// Overflow with values computed here from the operands.
module tb_alu;
  import mips_pkg::*;

  logic [31:0] a, b, result;
  aluop_e      alu_op;
  logic [5:0]  funct;
  logic        zero, overflow;
  int checks = 0, failures = 0;

  alu dut (.a, .b, .alu_op, .funct, .result, .zero, .overflow);

  task automatic check(input logic [31:0] exp_y, input logic exp_ovf);
    #1;
    checks++;
    if (result !== exp_y || zero !== (exp_y == 0) || overflow !== exp_ovf) begin
      failures++;
      $display("FAIL op=%0d funct=%h a=%h b=%h: y=%h exp %h ovf=%b exp %b",
               alu_op, funct, a, b, result, exp_y, overflow, exp_ovf);
    end
  endtask

  function automatic logic add_ovf(logic [31:0] x, logic [31:0] y);
    logic [32:0] s = {x[31], x} + {y[31], y};
    return s[32] != s[31];
  endfunction
  function automatic logic sub_ovf(logic [31:0] x, logic [31:0] y);
    logic [32:0] s = {x[31], x} - {y[31], y};
    return s[32] != s[31];
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static logic [5:0] fns [5] = '{FN_ADD, FN_SUB, FN_AND, FN_OR, FN_SLT};
    // directed: PC+4, PC-4, beq compare, overflow corners
    a = 32'h100; b = 4; alu_op = ALUOP_ADD; funct = FN_SUB; check(32'h104, 0);
    a = 32'h100; b = 4; alu_op = ALUOP_SUB; funct = FN_ADD; check(32'hFC, 0);
    a = 32'h55;  b = 32'h55; alu_op = ALUOP_SUB; check(0, 0);
    a = 32'h7FFF_FFFF; b = 1; alu_op = ALUOP_FUNCT; funct = FN_ADD; check(32'h8000_0000, 1);
    a = 32'h7FFF_FFFF; b = 1; alu_op = ALUOP_ADD; check(32'h8000_0000, 0);
    a = 32'h8000_0000; b = 1; alu_op = ALUOP_FUNCT; funct = FN_SUB; check(32'h7FFF_FFFF, 1);
    a = 32'hFFFF_FFFF; b = 1; alu_op = ALUOP_FUNCT; funct = FN_SLT; check(1, 0);
    a = 1; b = 32'hFFFF_FFFF; alu_op = ALUOP_FUNCT; funct = FN_SLT; check(0, 0);
    for (int i = 0; i < 2000; i++) begin
      a = $urandom; b = $urandom;
      if (i % 7 == 0) b = a;
      unique case (i % 7)
        0, 1: alu_op = ALUOP_ADD;
        2:    alu_op = ALUOP_SUB;
        default: alu_op = ALUOP_FUNCT;
      endcase
      funct = fns[$urandom_range(0, 4)];
      if (alu_op == ALUOP_ADD) check(a + b, 0);
      else if (alu_op == ALUOP_SUB) check(a - b, 0);
      else unique case (funct)
        FN_ADD: check(a + b, add_ovf(a, b));
        FN_SUB: check(a - b, sub_ovf(a, b));
        FN_AND: check(a & b, 0);
        FN_OR:  check(a | b, 0);
        default: check({31'd0, $signed(a) < $signed(b)}, 0);
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

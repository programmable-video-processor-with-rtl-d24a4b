// tb_control_fsm: self-checking test of the multicycle controller.
// For every instruction class (lw, sw, R-type with and without overflow,
// beq, j, wait and an undefined opcode) it runs the controller from fetch
// back to fetch and compares the visited states with the expected path and,
// in every state, the control word with a table written from the state
// diagram's outputs (memory-address state with the sign-extended offset).
module tb_control_fsm;
  import mips_pkg::*;
  logic clk = 0, rst = 1;
  logic [5:0] opcode;
  logic overflow;
  ctrl_t ctrl;
  state_e state;
  int checks = 0, failures = 0;

  control_fsm dut (.clk, .rst, .opcode, .overflow, .ctrl, .state);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic ctrl_t expect_ctrl(int s, logic ovf);
    ctrl_t c = '0;
    c.alu_op = ALUOP_ADD;
    case (s)
      0: begin c.mem_read = 1; c.ir_write = 1; c.alu_src_b = 2'b01; c.pc_write = 1; end
      1: c.alu_src_b = 2'b11;
      2: begin c.alu_src_a = 1; c.alu_src_b = 2'b10; end
      3: begin c.mem_read = 1; c.iord = 1; end
      4: begin c.reg_write = 1; c.mem_to_reg = 1; end
      5: begin c.mem_write = 1; c.iord = 1; end
      6: begin c.alu_src_a = 1; c.alu_op = ALUOP_FUNCT; end
      7: begin c.reg_dst = 1; c.reg_write = !ovf; end
      8: begin c.alu_src_a = 1; c.alu_op = ALUOP_SUB; c.pc_write_cond = 1; c.pc_source = 2'b01; end
      9: begin c.pc_write = 1; c.pc_source = 2'b10; end
      10, 11: begin c.int_cause = (s == 11); c.cause_write = 1; c.alu_src_b = 2'b01;
                    c.alu_op = ALUOP_SUB; c.epc_write = 1; c.pc_write = 1; c.pc_source = 2'b11; end
      12: begin c.wr_write = 1; c.alu_src_b = 2'b01; c.alu_op = ALUOP_SUB; c.pc_write_nrdy = 1; end
      default: ;
    endcase
    return c;
  endfunction

  task automatic run(input logic [5:0] op, input logic ovf, input int path[$]);
    opcode = op; overflow = ovf;
    foreach (path[i]) begin
      checks++;
      if (int'(state) != path[i] || ctrl !== expect_ctrl(path[i], ovf)) begin
        failures++;
        $display("FAIL op=%h step %0d: state %0d exp %0d ctrl=%h exp %h",
                 op, i, state, path[i], ctrl, expect_ctrl(path[i], ovf));
      end
      @(posedge clk); #1;
    end
    checks++;
    if (state != S_FETCH) begin failures++; $display("FAIL op=%h did not return to fetch", op); end
  endtask

  initial begin
    opcode = 0; overflow = 0;
    @(posedge clk); #1 rst = 0;
    run(OP_LW,    0, '{0, 1, 2, 3, 4});
    run(OP_SW,    0, '{0, 1, 2, 5});
    run(OP_RTYPE, 0, '{0, 1, 6, 7});
    run(OP_RTYPE, 1, '{0, 1, 6, 7, 11});
    run(OP_BEQ,   0, '{0, 1, 8});
    run(OP_J,     0, '{0, 1, 9});
    run(OP_WAIT,  0, '{0, 1, 12});
    run(6'h08,    0, '{0, 1, 10});
    run(6'h3F,    0, '{0, 1, 10});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

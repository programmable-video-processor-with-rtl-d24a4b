// control_fsm: the multicycle controller, a Moore state machine with the
// thirteen states of the processor's state diagram.
//
//   0 fetch: MemRead, IorD=0, IRWrite, ALUSrcA=0, ALUSrcB=01, ALUOp=00,
//            PCWrite, PCSource=00 (PC <- PC+4)
//   1 decode/register fetch: ALUSrcA=0, ALUSrcB=11, ALUOp=00 (branch target)
//   2 memory address: ALUSrcA=1, ALUSrcB=10, ALUOp=00
//   3 load access: MemRead, IorD=1          4 write back: RegWrite, MemtoReg=1, RegDst=0
//   5 store access: MemWrite, IorD=1
//   6 R-type execute: ALUSrcA=1, ALUSrcB=00, ALUOp=10
//   7 R-type completion: RegDst=1, RegWrite, MemtoReg=0; to 11 on overflow
//   8 branch: ALUSrcA=1, ALUSrcB=00, ALUOp=01, PCWriteCond, PCSource=01
//   9 jump: PCWrite, PCSource=10
//  10 undefined instruction: IntCause=0, CauseWrite, ALUSrcA=0, ALUSrcB=01,
//            ALUOp=01, EPCWrite, PCWrite, PCSource=11
//  11 overflow: as 10 with IntCause=1
//  12 wait: WRWrite, ALUSrcA=0, ALUSrcB=01, ALUOp=01
//
// States, their outputs and the decode branches follow the state diagram,
// with one correction: the diagram lists ALUSrcB=01 for state 2, which
// would add 4 to the base register and ignore the offset; state 2 here
// selects the sign-extended offset (10), the only use of that mux input.
// This design's own choices where the diagram is silent: state 12 also
// raises a "PC write if not ready" strobe, so that when the addressed wait
// register is still counting the PC is reloaded with PC-4 (the address of
// the wait instruction, computed by the ALU in that state) and the wait
// instruction runs again; state 12, like the other final states, returns to
// fetch. In state 7 the register write is suppressed when the overflow flag
// (captured by the datapath in state 6) is set, so an overflowing add or sub
// leaves its destination unchanged. Signals not listed for a state are 0.
// Interface: opcode of the instruction register and the overflow flag in,
// a ctrl_t control word and the state out. Synchronous active-high reset
// enters state 0.
module control_fsm
  import mips_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [5:0] opcode,
  input  logic       overflow,
  output ctrl_t      ctrl,
  output state_e     state
);

  state_e next;

  always_ff @(posedge clk) begin
    if (rst) state <= S_FETCH;
    else     state <= next;
  end

  always_comb begin
    next = S_FETCH;
    unique case (state)
      S_FETCH:  next = S_DECODE;
      S_DECODE: begin
        unique case (opcode)
          OP_LW, OP_SW: next = S_MEMADR;
          OP_RTYPE:     next = S_EXEC;
          OP_BEQ:       next = S_BRANCH;
          OP_J:         next = S_JUMP;
          OP_WAIT:      next = S_WAIT;
          default:      next = S_EXC_UNDEF;
        endcase
      end
      S_MEMADR:  next = (opcode == OP_LW) ? S_MEMRD : S_MEMWR;
      S_MEMRD:   next = S_MEMWB;
      S_EXEC:    next = S_RTYPEWB;
      S_RTYPEWB: next = overflow ? S_EXC_OVF : S_FETCH;
      default:   next = S_FETCH;
    endcase
  end

  always_comb begin
    ctrl = '0;
    ctrl.alu_op = ALUOP_ADD;
    unique case (state)
      S_FETCH: begin
        ctrl.mem_read  = 1'b1;
        ctrl.ir_write  = 1'b1;
        ctrl.alu_src_b = 2'b01;
        ctrl.pc_write  = 1'b1;
      end
      S_DECODE: begin
        ctrl.alu_src_b = 2'b11;
      end
      S_MEMADR: begin
        ctrl.alu_src_a = 1'b1;
        ctrl.alu_src_b = 2'b10;
      end
      S_MEMRD: begin
        ctrl.mem_read = 1'b1;
        ctrl.iord     = 1'b1;
      end
      S_MEMWB: begin
        ctrl.reg_write  = 1'b1;
        ctrl.mem_to_reg = 1'b1;
      end
      S_MEMWR: begin
        ctrl.mem_write = 1'b1;
        ctrl.iord      = 1'b1;
      end
      S_EXEC: begin
        ctrl.alu_src_a = 1'b1;
        ctrl.alu_op    = ALUOP_FUNCT;
      end
      S_RTYPEWB: begin
        ctrl.reg_dst   = 1'b1;
        ctrl.reg_write = !overflow;
      end
      S_BRANCH: begin
        ctrl.alu_src_a     = 1'b1;
        ctrl.alu_op        = ALUOP_SUB;
        ctrl.pc_write_cond = 1'b1;
        ctrl.pc_source     = 2'b01;
      end
      S_JUMP: begin
        ctrl.pc_write  = 1'b1;
        ctrl.pc_source = 2'b10;
      end
      S_EXC_UNDEF, S_EXC_OVF: begin
        ctrl.int_cause   = (state == S_EXC_OVF);
        ctrl.cause_write = 1'b1;
        ctrl.alu_src_b   = 2'b01;
        ctrl.alu_op      = ALUOP_SUB;
        ctrl.epc_write   = 1'b1;
        ctrl.pc_write    = 1'b1;
        ctrl.pc_source   = 2'b11;
      end
      S_WAIT: begin
        ctrl.wr_write      = 1'b1;
        ctrl.alu_src_b     = 2'b01;
        ctrl.alu_op        = ALUOP_SUB;
        ctrl.pc_write_nrdy = 1'b1;
        ctrl.pc_source     = 2'b00;
      end
      default: ;
    endcase
  end

  // Every instruction passes through fetch and decode; the wait state and the
  // exception states last one cycle and return to fetch.
  a_decode_after_fetch: assert property (@(posedge clk) disable iff (rst)
    state == S_FETCH |=> state == S_DECODE);
  a_wait_one_cycle: assert property (@(posedge clk) disable iff (rst)
    state inside {S_WAIT, S_EXC_UNDEF, S_EXC_OVF} |=> state == S_FETCH);

endmodule

// mips_datapath: the multicycle MIPS datapath extended with the Wait
// Register File.
//
// State elements: PC, instruction register (IR), memory data register
// (MDR), the A and B operand registers, ALUOut, EPC and Cause, plus the
// general register file and the four wait counters. Multiplexers: IorD
// (memory address = PC or ALUOut), RegDst (write register = rt or rd),
// MemtoReg (write data = ALUOut or MDR), ALUSrcA (PC or A), ALUSrcB (B, 4,
// sign-extended immediate, sign-extended immediate shifted left 2) and
// PCSource (ALU result, ALUOut, jump target, exception vector). The wait
// counters are addressed by instruction[25:21] and loaded with
// instruction[15:0] when WRWrite is high; their Ready flag decides whether
// the wait state reloads the PC with PC-4 to run the wait instruction again.
// The structure follows the datapath schematic; the PCSource=11 exception
// vector value, the Cause encoding, the overflow flag register (captured
// whenever the ALU works on a function field, i.e. in the R-type execute
// state) and the reset PC of 0 are this design's choices.
// Interface: a ctrl_t word from the controller, the opcode and overflow flag
// back to it, and a memory port (address, write data, read data; the
// read is expected in the same cycle). Every register updates on the rising
// clock edge; synchronous active-high reset clears the PC and the
// architectural registers.
module mips_datapath
  import mips_pkg::*;
#(
  parameter logic [31:0] EXC_VECTOR = 32'h8000_0180,
  parameter int unsigned NWAIT      = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        tick,        // wait-counter time base
  input  ctrl_t       ctrl,
  output logic [5:0]  opcode,
  output logic        overflow,    // overflow flag of the last R-type execute
  // memory port
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata,
  input  logic [31:0] mem_rdata,
  // observation
  output logic [31:0] pc,
  output logic [31:0] epc,
  output logic [31:0] cause,
  output logic        wait_ready,
  output logic [NWAIT-1:0] wait_busy
);

  logic [31:0] ir, mdr, a_q, b_q, aluout;
  logic [31:0] rd1, rd2, alu_a, alu_b, alu_y, pc_next, signext, wd;
  logic [4:0]  wa;
  logic        zero, ovf_now, pc_en;

  assign opcode  = ir[31:26];
  assign signext = {{16{ir[15]}}, ir[15:0]};

  // register file
  assign wa = ctrl.reg_dst    ? ir[15:11] : ir[20:16];
  assign wd = ctrl.mem_to_reg ? mdr       : aluout;

  regfile u_rf (
    .clk, .rst,
    .ra1(ir[25:21]), .ra2(ir[20:16]), .rd1, .rd2,
    .reg_write(ctrl.reg_write), .wa, .wd
  );

  // ALU and its operand multiplexers
  assign alu_a = ctrl.alu_src_a ? a_q : pc;
  always_comb begin
    unique case (ctrl.alu_src_b)
      2'b00:   alu_b = b_q;
      2'b01:   alu_b = 32'd4;
      2'b10:   alu_b = signext;
      default: alu_b = {signext[29:0], 2'b00};
    endcase
  end

  alu u_alu (
    .a(alu_a), .b(alu_b), .alu_op(ctrl.alu_op), .funct(ir[5:0]),
    .result(alu_y), .zero, .overflow(ovf_now)
  );

  // wait register file
  wait_regfile #(.NWAIT(NWAIT), .WIDTH(16)) u_wrf (
    .clk, .rst, .tick,
    .wadr(ir[21 +: $clog2(NWAIT)]), .wdata(ir[15:0]), .wload(ctrl.wr_write),
    .ready(wait_ready), .busy(wait_busy)
  );

  // PC source multiplexer and write enable
  always_comb begin
    unique case (ctrl.pc_source)
      2'b00:   pc_next = alu_y;
      2'b01:   pc_next = aluout;
      2'b10:   pc_next = {pc[31:28], ir[25:0], 2'b00};
      default: pc_next = EXC_VECTOR;
    endcase
  end

  assign pc_en = ctrl.pc_write
               | (ctrl.pc_write_cond & zero)
               | (ctrl.pc_write_nrdy & ~wait_ready);

  always_ff @(posedge clk) begin
    if (rst) begin
      pc       <= '0;
      ir       <= '0;
      epc      <= '0;
      cause    <= '0;
      overflow <= 1'b0;
    end else begin
      if (pc_en)            pc    <= pc_next;
      if (ctrl.ir_write)    ir    <= mem_rdata;
      if (ctrl.epc_write)   epc   <= alu_y;
      if (ctrl.cause_write) cause <= ctrl.int_cause ? CAUSE_OVF : CAUSE_UNDEF;
      if (ctrl.alu_op == ALUOP_FUNCT) overflow <= ovf_now;
    end
  end

  // registers written every cycle
  always_ff @(posedge clk) begin
    mdr    <= mem_rdata;
    a_q    <= rd1;
    b_q    <= rd2;
    aluout <= alu_y;
  end

  // memory port
  assign mem_addr  = ctrl.iord ? aluout : pc;
  assign mem_wdata = b_q;

endmodule

// mips_pkg: types and constants shared by the real-time video processor.
//
// The processor is the classic multicycle MIPS (one shared memory, one ALU,
// a five-state-deep controller) extended with a "wait" instruction and four
// down-counting wait registers. This package holds the opcode and function
// codes, the controller state encoding (states 0..12, numbered as in the
// controller's state diagram, state 12 being the added wait state), the
// multiplexer select encodings and the memory map of the two video I/O
// registers. The opcode of "wait", the exception vector and the I/O
// addresses are this design's own choices; the other opcodes and function
// codes are the standard MIPS ones.
package mips_pkg;

  // ---------------- opcodes (instruction[31:26]) ----------------
  typedef enum logic [5:0] {
    OP_RTYPE = 6'h00,
    OP_J     = 6'h02,
    OP_BEQ   = 6'h04,
    OP_WAIT  = 6'h1C,   // new wait instruction: I-format, rs = wait register, imm = count
    OP_LW    = 6'h23,
    OP_SW    = 6'h2B
  } opcode_e;

  // ---------------- R-type function codes ----------------
  localparam logic [5:0] FN_ADD = 6'h20;
  localparam logic [5:0] FN_SUB = 6'h22;
  localparam logic [5:0] FN_AND = 6'h24;
  localparam logic [5:0] FN_OR  = 6'h25;
  localparam logic [5:0] FN_SLT = 6'h2A;

  // ---------------- ALUOp from the controller ----------------
  typedef enum logic [1:0] {
    ALUOP_ADD   = 2'b00,
    ALUOP_SUB   = 2'b01,
    ALUOP_FUNCT = 2'b10
  } aluop_e;

  // ---------------- ALU operations after decoding ----------------
  typedef enum logic [2:0] {
    ALU_AND = 3'b000,
    ALU_OR  = 3'b001,
    ALU_ADD = 3'b010,
    ALU_SUB = 3'b110,
    ALU_SLT = 3'b111
  } alufn_e;

  // ---------------- controller states (numbers of the state diagram) ----------------
  typedef enum logic [3:0] {
    S_FETCH    = 4'd0,
    S_DECODE   = 4'd1,
    S_MEMADR   = 4'd2,
    S_MEMRD    = 4'd3,
    S_MEMWB    = 4'd4,
    S_MEMWR    = 4'd5,
    S_EXEC     = 4'd6,
    S_RTYPEWB  = 4'd7,
    S_BRANCH   = 4'd8,
    S_JUMP     = 4'd9,
    S_EXC_UNDEF= 4'd10,
    S_EXC_OVF  = 4'd11,
    S_WAIT     = 4'd12
  } state_e;

  // ---------------- control word from controller to datapath ----------------
  typedef struct packed {
    logic       pc_write;       // PCWrite
    logic       pc_write_cond;  // PCWriteCond (beq)
    logic       pc_write_nrdy;  // reload PC when the addressed wait register is not ready
    logic       iord;           // IorD: 0 = PC, 1 = ALUOut addresses memory
    logic       mem_read;       // MemRead
    logic       mem_write;      // MemWrite
    logic       ir_write;       // IRWrite
    logic       reg_dst;        // RegDst: 0 = rt, 1 = rd
    logic       reg_write;      // RegWrite
    logic       mem_to_reg;     // MemtoReg: 0 = ALUOut, 1 = MDR
    logic       alu_src_a;      // ALUSrcA: 0 = PC, 1 = A
    logic [1:0] alu_src_b;      // ALUSrcB: 00 B, 01 4, 10 signext, 11 signext<<2
    aluop_e     alu_op;         // ALUOp
    logic [1:0] pc_source;      // PCSource: 00 ALU, 01 ALUOut, 10 jump, 11 exception vector
    logic       int_cause;      // IntCause: 0 undefined instruction, 1 overflow
    logic       cause_write;    // CauseWrite
    logic       epc_write;      // EPCWrite
    logic       wr_write;       // WRWrite: load the addressed wait register
  } ctrl_t;

  // ---------------- memory map ----------------
  // Loads and stores whose address has its upper 16 bits all ones reach the
  // I/O registers below (reachable as negative offsets from r0); everything
  // else goes to the on-chip memory.
  localparam logic [31:0] ADDR_VSR   = 32'hFFFF_FFF0;  // video shift register (store)
  localparam logic [31:0] ADDR_VCTRL = 32'hFFFF_FFF4;  // sync/blank register (store, load)

  // Bits of the sync/blank register (all active low, as on the connector).
  localparam int VCTRL_HSYNC_N = 0;
  localparam int VCTRL_VSYNC_N = 1;
  localparam int VCTRL_BLANK_N = 2;

  // Cause register codes written by the exception states.
  localparam logic [31:0] CAUSE_UNDEF = 32'd0;
  localparam logic [31:0] CAUSE_OVF   = 32'd1;

endpackage

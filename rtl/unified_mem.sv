// unified_mem: the processor's on-chip memory, one array for instructions
// and data, as in the multicycle datapath where a single memory serves
// instruction fetch (IorD = 0) and loads/stores (IorD = 1).
//
// The program, the character RAM (one character code per word) and the font
// RAM (one 8-pixel row pattern per word) all live here; their placement is
// decided by software. Port A is the processor's: a word-aligned byte
// address, an asynchronous read (MemData is valid in the same cycle, as the
// multicycle controller expects) and a write on the rising edge when we_a is
// high. Port B is a host port (Address / DataIn / DataOut) through which a
// program is loaded and through which another agent can change the
// character RAM while the processor runs; its read is asynchronous too and
// its write is clocked. If both ports write the same word in one cycle,
// port A wins. Addresses wrap modulo the memory size (the upper address
// bits are ignored). Contents are not reset.
// Size: WORDS 32-bit words, 8192 by default (32 KiB), a choice of this
// design that holds an 80x30 character screen (2400 words), a 96-glyph
// 16-row font (1536 words) and a program.
module unified_mem #(
  parameter int unsigned WORDS = 8192
) (
  input  logic        clk,
  // processor port
  input  logic [31:0] addr_a,
  input  logic        we_a,
  input  logic [31:0] wdata_a,
  output logic [31:0] rdata_a,
  // host port
  input  logic [31:0] addr_b,
  input  logic        we_b,
  input  logic [31:0] wdata_b,
  output logic [31:0] rdata_b
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  logic [AW-1:0] ia, ib;
  assign ia = addr_a[AW+1:2];
  assign ib = addr_b[AW+1:2];

  always_ff @(posedge clk) begin
    if (we_b && !(we_a && ia == ib)) mem[ib] <= wdata_b;
    if (we_a)                        mem[ia] <= wdata_a;
  end

  assign rdata_a = mem[ia];
  assign rdata_b = mem[ib];

endmodule

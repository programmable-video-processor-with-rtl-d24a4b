// regfile: the 32 x 32-bit general-purpose register file of the processor.
//
// Two asynchronous read ports (Read register 1/2 -> Read data 1/2) and one
// write port written on the rising clock edge when reg_write is high.
// Register 0 always reads as zero and ignores writes, as in MIPS. Reset
// clears all registers (a choice of this design so that simulation starts
// from known values).
module regfile #(
  parameter int unsigned NREGS = 32
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic [$clog2(NREGS)-1:0]  ra1,
  input  logic [$clog2(NREGS)-1:0]  ra2,
  output logic [31:0]               rd1,
  output logic [31:0]               rd2,
  input  logic                      reg_write,
  input  logic [$clog2(NREGS)-1:0]  wa,
  input  logic [31:0]               wd
);

  logic [31:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (reg_write && wa != '0) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = (ra1 == '0) ? 32'd0 : regs[ra1];
  assign rd2 = (ra2 == '0) ? 32'd0 : regs[ra2];

endmodule

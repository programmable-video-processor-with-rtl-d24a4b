// tb_regfile: self-checking test of the general register file. Random
// writes are mirrored in a reference array; both read ports are compared
// with it every cycle, including register 0, which must stay zero.
module tb_regfile;
  logic clk = 0, rst = 1;
  logic [4:0] ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd;
  logic reg_write;
  logic [31:0] ref_regs [32];
  int checks = 0, failures = 0;

  regfile dut (.clk, .rst, .ra1, .ra2, .rd1, .rd2, .reg_write, .wa, .wd);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reg_write = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    foreach (ref_regs[i]) ref_regs[i] = 0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 3000; i++) begin
      reg_write = $urandom_range(0, 1);
      wa = $urandom; wd = $urandom;
      ra1 = $urandom; ra2 = (i % 5 == 0) ? 5'd0 : 5'($urandom);
      #1;
      checks++;
      if (rd1 !== ref_regs[ra1] || rd2 !== ref_regs[ra2]) begin
        failures++;
        $display("FAIL r%0d=%h exp %h, r%0d=%h exp %h", ra1, rd1, ref_regs[ra1], ra2, rd2, ref_regs[ra2]);
      end
      @(posedge clk);
      if (reg_write && wa != 0) ref_regs[wa] = wd;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

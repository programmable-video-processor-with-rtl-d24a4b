// tb_unified_mem: self-checking test of the unified memory. Random writes
// through the processor port and the host port are mirrored in a reference
// array (processor port wins a same-word collision); both asynchronous read
// ports are compared with it, including address wrap-around.
module tb_unified_mem;
  localparam int W = 256;
  logic clk = 0;
  logic [31:0] addr_a, wdata_a, rdata_a, addr_b, wdata_b, rdata_b;
  logic we_a, we_b;
  logic [31:0] ref_mem [W];
  int checks = 0, failures = 0;

  unified_mem #(.WORDS(W)) dut (.clk, .addr_a, .we_a, .wdata_a, .rdata_a, .addr_b, .we_b, .wdata_b, .rdata_b);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we_a = 0; we_b = 0; addr_a = 0; addr_b = 0; wdata_a = 0; wdata_b = 0;
    // fill through the host port
    for (int i = 0; i < W; i++) begin
      addr_b = i * 4; wdata_b = $urandom; we_b = 1;
      @(posedge clk); ref_mem[i] = wdata_b; #1;
    end
    we_b = 0;
    for (int i = 0; i < 8000; i++) begin
      addr_a = {$urandom_range(0, 15), 20'd0, 8'($urandom), 2'b00};   // upper bits ignored
      addr_b = {22'd0, 8'($urandom), 2'b00};
      if (i % 9 == 0) addr_b = {22'd0, addr_a[9:2], 2'b00};
      we_a = ($urandom_range(0, 3) == 0);
      we_b = ($urandom_range(0, 3) == 0);
      wdata_a = $urandom; wdata_b = $urandom;
      #1;
      checks++;
      if (rdata_a !== ref_mem[addr_a[9:2]] || rdata_b !== ref_mem[addr_b[9:2]]) begin
        failures++;
        $display("FAIL a=%h %h exp %h, b=%h %h exp %h", addr_a, rdata_a, ref_mem[addr_a[9:2]], addr_b, rdata_b, ref_mem[addr_b[9:2]]);
      end
      @(posedge clk);
      if (we_b && !(we_a && addr_a[9:2] == addr_b[9:2])) ref_mem[addr_b[9:2]] = wdata_b;
      if (we_a) ref_mem[addr_a[9:2]] = wdata_a;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

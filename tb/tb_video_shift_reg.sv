// tb_video_shift_reg: self-checking test of the video shift register.
// Random bytes are loaded at random moments among pixel ticks; a reference
// byte register (load wins, shift left with zero fill on tick) predicts the
// serial pixel, compared every cycle. A directed part checks that one byte
// leaves MSB first in exactly eight ticks.
module tb_video_shift_reg;
  logic clk = 0, rst = 1;
  logic load, tick, pixel;
  logic [7:0] din, ref_sr;
  int checks = 0, failures = 0;

  video_shift_reg #(.WIDTH(8)) dut (.clk, .rst, .load, .din, .tick, .pixel);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step();
    @(posedge clk);
    if (load) ref_sr = din;
    else if (tick) ref_sr = {ref_sr[6:0], 1'b0};
    #1;
    checks++;
    if (pixel !== ref_sr[7]) begin failures++; $display("FAIL t=%0t pixel=%b exp %b", $time, pixel, ref_sr[7]); end
  endtask

  initial begin
    logic [7:0] got;
    load = 0; tick = 0; din = 0; ref_sr = 0;
    @(posedge clk); #1 rst = 0;
    // directed: 8'hA5 out MSB first
    din = 8'hA5; load = 1; step(); load = 0; tick = 1;
    for (int i = 7; i >= 0; i--) begin
      got[i] = pixel;
      step();
    end
    checks++;
    if (got !== 8'hA5) begin failures++; $display("FAIL serial byte %h", got); end
    checks++;
    if (pixel !== 1'b0) begin failures++; $display("FAIL not empty after 8 ticks"); end
    for (int i = 0; i < 20000; i++) begin
      tick = ($urandom_range(0, 2) == 0);
      load = ($urandom_range(0, 9) == 0);
      din  = $urandom;
      step();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_opb_video_ctrl: self-checking test of the video controller. Random
// register writes and pixels are applied; the register read-back and every
// board pin (one clock later) are compared with values predicted from the
// register layout (bit 0 hsync_n, bit 1 vsync_n, bit 2 blank_n) and the
// white-on-black pixel mapping.
module tb_opb_video_ctrl;
  logic clk = 0, rst = 1;
  logic we, pixel, pclk;
  logic [2:0] wdata, rdata, ref_ctrl;
  logic dac_clk, dac_blank_n, hsync_n, vsync_n;
  logic [9:0] dac_r, dac_g, dac_b;
  int checks = 0, failures = 0;

  opb_video_ctrl #(.DAC_BITS(10)) dut (.clk, .rst, .we, .wdata, .rdata, .pixel, .pclk,
    .dac_clk, .dac_blank_n, .dac_r, .dac_g, .dac_b, .hsync_n, .vsync_n);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev_pix, prev_pclk;
    logic [2:0] prev_ctrl;
    logic [9:0] exp_col;
    we = 0; wdata = 0; pixel = 0; pclk = 0;
    @(posedge clk); #1 rst = 0;
    ref_ctrl = 3'b011;
    checks++;
    if (rdata !== 3'b011 || hsync_n !== 1 || vsync_n !== 1 || dac_blank_n !== 0) begin
      failures++; $display("FAIL reset values");
    end
    for (int i = 0; i < 5000; i++) begin
      we = ($urandom_range(0, 3) == 0);
      wdata = $urandom; pixel = $urandom; pclk = $urandom;
      prev_pix = pixel; prev_pclk = pclk; prev_ctrl = ref_ctrl;
      @(posedge clk);
      if (we) ref_ctrl = wdata;
      #1;
      // pins show the register as it was before this edge
      exp_col = {10{prev_pix & prev_ctrl[2]}};
      checks++;
      if (rdata !== ref_ctrl || hsync_n !== prev_ctrl[0] || vsync_n !== prev_ctrl[1] ||
          dac_blank_n !== prev_ctrl[2] || dac_r !== exp_col || dac_g !== exp_col ||
          dac_b !== exp_col || dac_clk !== prev_pclk) begin
        failures++;
        $display("FAIL t=%0t ctrl=%b pins h=%b v=%b bl=%b r=%h", $time, ref_ctrl, hsync_n, vsync_n, dac_blank_n, dac_r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

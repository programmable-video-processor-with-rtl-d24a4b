// opb_video_ctrl: the video controller between the processor and the board's
// video DAC and VGA connector.
//
// The processor owns all video timing in software. This block gives it one
// 3-bit sync/blank register (bit 0 hsync_n, bit 1 vsync_n, bit 2 blank_n,
// all active low) written by a store (we, wdata) and readable by a load
// (rdata), and turns the serial pixel from the video shift register into
// the DAC's colour inputs: a lit pixel drives all 10 bits of red, green and
// blue to full scale (white text), a dark one drives zero. The DAC pin set
// (CLK, BLANK#, three 10-bit colour buses) and the two sync lines follow the
// board's DAC connection; the register layout, the monochrome mapping and
// the reset value (syncs inactive, blanked) are this design's choices. The
// on-chip-bus protocol the block is named after is not modelled: the
// processor reaches the register through a plain single-cycle store/load
// decode.
// Timing: all pins are registered, one clock after the register write or
// the pixel change. dac_clk is the pixel clock pclk delayed by the same one
// register, so the DAC samples colour and BLANK# in the middle of a pixel.
module opb_video_ctrl #(
  parameter int unsigned DAC_BITS = 10
) (
  input  logic                clk,
  input  logic                rst,
  // register access from the processor
  input  logic                we,
  input  logic [2:0]          wdata,
  output logic [2:0]          rdata,
  // pixel stream
  input  logic                pixel,
  input  logic                pclk,
  // board pins
  output logic                dac_clk,
  output logic                dac_blank_n,
  output logic [DAC_BITS-1:0] dac_r,
  output logic [DAC_BITS-1:0] dac_g,
  output logic [DAC_BITS-1:0] dac_b,
  output logic                hsync_n,
  output logic                vsync_n
);

  logic [2:0] ctrl;

  always_ff @(posedge clk) begin
    if (rst)     ctrl <= 3'b011;
    else if (we) ctrl <= wdata;
  end

  assign rdata = ctrl;

  always_ff @(posedge clk) begin
    if (rst) begin
      dac_clk     <= 1'b0;
      dac_blank_n <= 1'b0;
      dac_r       <= '0;
      dac_g       <= '0;
      dac_b       <= '0;
      hsync_n     <= 1'b1;
      vsync_n     <= 1'b1;
    end else begin
      dac_clk     <= pclk;
      dac_blank_n <= ctrl[2];
      dac_r       <= {DAC_BITS{pixel & ctrl[2]}};
      dac_g       <= {DAC_BITS{pixel & ctrl[2]}};
      dac_b       <= {DAC_BITS{pixel & ctrl[2]}};
      hsync_n     <= ctrl[0];
      vsync_n     <= ctrl[1];
    end
  end

endmodule

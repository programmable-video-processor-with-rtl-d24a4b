// video_shift_reg: the special shift register that turns bytes written by
// the program into a serial pixel stream.
//
// A store to the shift register's address loads the low byte of the store
// data (load). On every pixel tick the register shifts left by one and a
// zero enters at the bottom, so the byte leaves most significant bit first,
// one bit per pixel, and the output falls to 0 once all eight bits are out.
// A load in the same cycle as a tick wins: the new byte's first bit is
// presented until the next tick. The byte width and the load-by-store follow
// the design description; MSB-first order, zero fill and load priority are
// this design's choices.
// Output pixel is the register's top bit, registered (changes on the clock
// edge after a load or tick). Synchronous active-high reset clears it.
module video_shift_reg #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic [WIDTH-1:0] din,
  input  logic             tick,
  output logic             pixel
);

  logic [WIDTH-1:0] sr;

  always_ff @(posedge clk) begin
    if (rst)       sr <= '0;
    else if (load) sr <= din;
    else if (tick) sr <= {sr[WIDTH-2:0], 1'b0};
  end

  assign pixel = sr[WIDTH-1];

endmodule

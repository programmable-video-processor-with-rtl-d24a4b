// wait_regfile: the Wait Register File that gives the "wait" instruction
// its timing.
//
// It holds NWAIT (four) counters. Each counter counts down by one on every
// tick while it is non-zero and stops at zero, its default value. The
// counter addressed by wadr is reported on ready (counter == 0). When the
// controller asserts wload (WRWrite) and the addressed counter is ready, the
// counter is loaded with wdata (the instruction's 16-bit immediate) and
// starts counting down; a load of a counter that is not ready is ignored,
// because the controller then re-executes the wait instruction instead.
// A load wins over a tick in the same cycle.
//
// "wait $wN, V" therefore means: block until the counter N has run out,
// then re-arm it with V. A loop that waits on the same counter runs exactly
// once every V ticks, whatever its body costs, as long as the body fits.
// The number of counters, the 16-bit width (the immediate field) and the
// ready/load behaviour follow the design description; the tick input (one
// per pixel in the video processor) and the address taken from the low bits
// of the instruction's rs field are this design's choices.
// Timing: ready is combinational from the registers; load and count happen
// on the rising clock edge. Synchronous active-high reset clears all counters.
module wait_regfile #(
  parameter int unsigned NWAIT = 4,
  parameter int unsigned WIDTH = 16
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      tick,
  input  logic [$clog2(NWAIT)-1:0]  wadr,
  input  logic [WIDTH-1:0]          wdata,
  input  logic                      wload,
  output logic                      ready,
  output logic [NWAIT-1:0]          busy      // per-counter non-zero flags, for observation
);

  logic [WIDTH-1:0] cnt [NWAIT];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NWAIT; i++) cnt[i] <= '0;
    end else begin
      for (int i = 0; i < NWAIT; i++) begin
        if (wload && wadr == i[$clog2(NWAIT)-1:0] && cnt[i] == '0)
          cnt[i] <= wdata;
        else if (tick && cnt[i] != '0)
          cnt[i] <= cnt[i] - 1'b1;
      end
    end
  end

  assign ready = (cnt[wadr] == '0);

  always_comb
    for (int i = 0; i < NWAIT; i++) busy[i] = (cnt[i] != '0);

  // A counter that is still running is never reloaded: the addressed counter
  // keeps counting down (or holds, without a tick) across a rejected load.
  a_no_reload_while_busy: assert property (@(posedge clk) disable iff (rst)
    (wload && !ready) |=> cnt[$past(wadr)] == $past(cnt[wadr]) - {{(WIDTH-1){1'b0}}, $past(tick)});

endmodule

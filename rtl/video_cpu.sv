// video_cpu: a programmable video processor with predictable timing.
//
// A multicycle MIPS processor generates VGA-style text video in software.
// Real-time behaviour comes from the added "wait $wN, V" instruction and its
// four down-counting wait registers, which tick once per pixel: a loop that
// starts with "wait $w1, 8" runs exactly once per 8 pixels (one character
// cell) however long its body takes, as long as the body fits. Pixels leave
// through the video shift register, which a store to ADDR_VSR loads with one
// font byte; the sync and blank lines are a register in the video
// controller, written by a store to ADDR_VCTRL. Program, character RAM and
// font RAM share the on-chip memory, which also has a host port for loading
// a program and for changing the screen while the processor runs.
//
// Blocks: control_fsm + mips_datapath (which holds the register file, ALU
// and wait registers) form the processor; unified_mem is its memory;
// video_shift_reg and opb_video_ctrl form the video output. A pixel-rate
// tick (one clock in TICK_DIV) drives the wait counters and the shift
// register, and a pixel clock for the DAC with the same period.
// Memory map (byte addresses): upper 16 bits all ones = I/O (ADDR_VSR store
// only, ADDR_VCTRL store and load); anything else = memory, wrapping modulo
// its size. The structure follows the datapath schematic and the
// application block diagram; the I/O decode, the tick divider, its ratio of
// 8 clocks per pixel and the host port are this design's choices.
// Interface: rst holds the processor (not the host port) in reset, so a
// program can be loaded through host_* before rst is released; execution
// starts at address 0. All outputs are registered.
module video_cpu
  import mips_pkg::*;
#(
  parameter int unsigned MEM_WORDS  = 8192,
  parameter int unsigned TICK_DIV   = 8,
  parameter int unsigned NWAIT      = 4,
  parameter logic [31:0] EXC_VECTOR = 32'h8000_0180
) (
  input  logic        clk,
  input  logic        rst,
  // host port of the memory
  input  logic [31:0] host_addr,
  input  logic        host_we,
  input  logic [31:0] host_wdata,
  output logic [31:0] host_rdata,
  // video DAC and VGA connector
  output logic        dac_clk,
  output logic        dac_blank_n,
  output logic [9:0]  dac_r,
  output logic [9:0]  dac_g,
  output logic [9:0]  dac_b,
  output logic        hsync_n,
  output logic        vsync_n,
  // processor status
  output logic [31:0] epc,
  output logic [31:0] cause
);

  // ---------------- pixel tick ----------------
  localparam int unsigned DW = $clog2(TICK_DIV+1);
  localparam logic [DW-1:0] DIV_LAST = DW'(TICK_DIV-1);
  localparam logic [DW-1:0] DIV_HALF = DW'(TICK_DIV/2);
  logic [DW-1:0] div;
  logic tick, pclk;

  always_ff @(posedge clk) begin
    if (rst)                   div <= '0;
    else if (div == DIV_LAST)   div <= '0;
    else                       div <= div + 1'b1;
  end
  assign tick = (div == DIV_LAST);
  assign pclk = (div >= DIV_HALF);

  // ---------------- processor ----------------
  ctrl_t       ctrl;
  state_e      state;
  logic [5:0]  opcode;
  logic        overflow;
  logic [31:0] mem_addr, mem_wdata, mem_rdata, ram_rdata, pc;
  logic        wait_ready;
  logic [NWAIT-1:0] wait_busy;

  control_fsm u_ctrl (
    .clk, .rst, .opcode, .overflow, .ctrl, .state
  );

  mips_datapath #(.EXC_VECTOR(EXC_VECTOR), .NWAIT(NWAIT)) u_dp (
    .clk, .rst, .tick, .ctrl, .opcode, .overflow,
    .mem_addr, .mem_wdata, .mem_rdata,
    .pc, .epc, .cause, .wait_ready, .wait_busy
  );

  // ---------------- address decode ----------------
  logic io, vsr_we, vctrl_we;
  logic [2:0] vctrl_rdata;

  assign io       = (mem_addr[31:16] == 16'hFFFF);
  assign vsr_we   = ctrl.mem_write && io && (mem_addr[7:0] == ADDR_VSR[7:0]);
  assign vctrl_we = ctrl.mem_write && io && (mem_addr[7:0] == ADDR_VCTRL[7:0]);
  assign mem_rdata = io ? {29'd0, vctrl_rdata} : ram_rdata;

  unified_mem #(.WORDS(MEM_WORDS)) u_mem (
    .clk,
    .addr_a(mem_addr), .we_a(ctrl.mem_write && !io), .wdata_a(mem_wdata), .rdata_a(ram_rdata),
    .addr_b(host_addr), .we_b(host_we), .wdata_b(host_wdata), .rdata_b(host_rdata)
  );

  // Instruction fetches never come from the I/O space.
  a_no_fetch_from_io: assert property (@(posedge clk) disable iff (rst)
    (ctrl.ir_write |-> !io));

  // ---------------- video output ----------------
  logic pixel;

  video_shift_reg #(.WIDTH(8)) u_vsr (
    .clk, .rst, .load(vsr_we), .din(mem_wdata[7:0]), .tick, .pixel
  );

  opb_video_ctrl #(.DAC_BITS(10)) u_vctl (
    .clk, .rst,
    .we(vctrl_we), .wdata(mem_wdata[2:0]), .rdata(vctrl_rdata),
    .pixel, .pclk,
    .dac_clk, .dac_blank_n, .dac_r, .dac_g, .dac_b, .hsync_n, .vsync_n
  );

endmodule

// tb_mips_datapath: self-checking test of the datapath together with the
// controller, running a short program from a memory model in this
// testbench. It checks loads, stores, the five R-type operations, a taken
// and a not-taken beq, j, the wait instruction (stall length in cycles with
// a tick every cycle, number of wait-state retries), and both exceptions:
// overflow (destination unchanged, EPC = address of the add, Cause = 1,
// PC = exception vector) and undefined instruction (EPC, Cause = 0).
module tb_mips_datapath;
  import mips_pkg::*;
  import asm_pkg::*;

  localparam logic [31:0] VEC = 32'h0000_0100;   // word 64

  logic clk = 0, rst = 1;
  ctrl_t ctrl;
  state_e state;
  logic [5:0] opcode;
  logic overflow, wait_ready;
  logic [31:0] mem_addr, mem_wdata, mem_rdata, pc, epc, cause;
  logic [3:0] wait_busy;
  logic [31:0] mem [1024];
  int checks = 0, failures = 0;
  longint cycle = 0, mark_a = -1, mark_b = -1;
  int wait_visits = 0, exc_seen = 0;

  control_fsm u_ctrl (.clk, .rst, .opcode, .overflow, .ctrl, .state);
  mips_datapath #(.EXC_VECTOR(VEC), .NWAIT(4)) dut (
    .clk, .rst, .tick(1'b1), .ctrl, .opcode, .overflow,
    .mem_addr, .mem_wdata, .mem_rdata, .pc, .epc, .cause, .wait_ready, .wait_busy);

  assign mem_rdata = mem[mem_addr[11:2]];
  always @(posedge clk) if (ctrl.mem_write) mem[mem_addr[11:2]] <= mem_wdata;

  always #5 clk = ~clk;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h exp %h", what, got, exp); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    cycle++;
    if (state == S_WAIT) wait_visits++;
    if (ctrl.mem_write && mem_addr == 32'h318) mark_a = cycle;
    if (ctrl.mem_write && mem_addr == 32'h31C) mark_b = cycle;
  end

  initial begin
    foreach (mem[i]) mem[i] = 0;
    mem[0]  = lw_(1, 32'h200, 0);
    mem[1]  = lw_(2, 32'h204, 0);
    mem[2]  = add_(3, 1, 2);
    mem[3]  = sub_(4, 2, 1);
    mem[4]  = and_(5, 1, 2);
    mem[5]  = or_(6, 1, 2);
    mem[6]  = slt_(7, 1, 2);
    mem[7]  = sw_(3, 32'h300, 0);
    mem[8]  = sw_(4, 32'h304, 0);
    mem[9]  = sw_(5, 32'h308, 0);
    mem[10] = sw_(6, 32'h30C, 0);
    mem[11] = sw_(7, 32'h310, 0);
    mem[12] = beq_(1, 2, 12, 20);
    mem[13] = beq_(1, 1, 13, 15);
    mem[14] = sw_(1, 32'h314, 0);
    mem[15] = wait_(2, 40);
    mem[16] = sw_(0, 32'h318, 0);
    mem[17] = wait_(2, 0);
    mem[18] = sw_(0, 32'h31C, 0);
    mem[19] = j_(22);
    mem[20] = sw_(1, 32'h320, 0);
    mem[21] = sw_(1, 32'h320, 0);
    mem[22] = lw_(8, 32'h208, 0);
    mem[23] = add_(9, 8, 8);          // overflows
    mem[64] = sw_(9, 32'h324, 0);     // handler
    mem[65] = 32'hFC00_0000;          // undefined opcode 0x3F
    mem[32'h200/4] = 32'd5;
    mem[32'h204/4] = 32'd7;
    mem[32'h208/4] = 32'h7FFF_FFFF;
    mem[32'h314/4] = 32'hDEAD;
    mem[32'h320/4] = 32'hDEAD;
    mem[32'h324/4] = 32'hDEAD;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // first exception: overflow
    do @(negedge clk); while (state != S_EXC_OVF);
    @(posedge clk); #1;
    check("overflow EPC", epc, 32'd23 * 4);
    check("overflow Cause", cause, CAUSE_OVF);
    check("PC at vector", pc, VEC);
    // second exception: undefined instruction in the handler
    do @(negedge clk); while (state != S_EXC_UNDEF);
    @(posedge clk); #1;
    check("undefined EPC", epc, 32'd65 * 4);
    check("undefined Cause", cause, CAUSE_UNDEF);
    check("PC at vector again", pc, VEC);
    check("add", mem[32'h300/4], 12);
    check("sub", mem[32'h304/4], 2);
    check("and", mem[32'h308/4], 5);
    check("or",  mem[32'h30C/4], 7);
    check("slt", mem[32'h310/4], 1);
    check("beq taken skipped store", mem[32'h314/4], 32'hDEAD);
    check("j skipped store", mem[32'h320/4], 32'hDEAD);
    check("overflowing add left r9 unchanged", mem[32'h324/4], 0);
    // wait: loaded with 40 in the wait state, released by the first retry that
    // sees zero (retries every 3 cycles); marker stores 43 cycles apart.
    check("wait stall cycles", 32'(mark_b - mark_a), 43);
    check("wait state visits", wait_visits, 14);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

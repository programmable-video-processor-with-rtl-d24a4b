// tb_wait_regfile: self-checking test of the wait register file.
// A reference model of the four counters (load only when the addressed
// counter is zero, load wins over tick, count down to zero and stop) is run
// beside the block under random loads and ticks, and Ready and the busy
// flags are compared every cycle. A directed part measures that
// "wait $w1, 8" keeps the counter busy for exactly 8 ticks.
module tb_wait_regfile;
  logic clk = 0, rst = 1;
  logic tick, wload, ready;
  logic [1:0] wadr;
  logic [15:0] wdata;
  logic [3:0] busy;
  int unsigned ref_cnt [4];
  int checks = 0, failures = 0;

  wait_regfile #(.NWAIT(4), .WIDTH(16)) dut (.clk, .rst, .tick, .wadr, .wdata, .wload, .ready, .busy);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    logic [3:0] exp_busy;
    for (int i = 0; i < 4; i++) exp_busy[i] = ref_cnt[i] != 0;
    checks++;
    if (ready !== (ref_cnt[wadr] == 0) || busy !== exp_busy) begin
      failures++;
      $display("FAIL t=%0t wadr=%0d ready=%b busy=%b exp %b", $time, wadr, ready, busy, exp_busy);
    end
  endtask

  task automatic step();
    @(posedge clk);
    for (int i = 0; i < 4; i++) begin
      if (wload && wadr == i && ref_cnt[i] == 0) ref_cnt[i] = wdata;
      else if (tick && ref_cnt[i] != 0) ref_cnt[i]--;
    end
    #1;
  endtask

  initial begin
    int n;
    tick = 0; wload = 0; wadr = 0; wdata = 0;
    foreach (ref_cnt[i]) ref_cnt[i] = 0;
    @(posedge clk); #1 rst = 0;
    // directed: load $w1 with 8, tick every cycle, count busy ticks
    wadr = 1; wdata = 8; wload = 1; compare(); step(); wload = 0;
    n = 0; tick = 1;
    while (!ready && n < 20) begin compare(); step(); n++; end
    checks++;
    if (n != 8) begin failures++; $display("FAIL wait 8 lasted %0d ticks", n); end
    // directed: a load while busy is ignored
    wdata = 5; wload = 1; tick = 0; compare(); step();
    wdata = 100; compare(); step(); wload = 0;
    checks++;
    if (ref_cnt[1] != 5) begin failures++; $display("FAIL model"); end
    // random
    for (int i = 0; i < 20000; i++) begin
      tick  = ($urandom_range(0, 3) == 0);
      wload = ($urandom_range(0, 5) == 0);
      wadr  = $urandom;
      wdata = $urandom_range(0, 40);
      compare();
      step();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

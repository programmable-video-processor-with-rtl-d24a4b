// video_bench: end-to-end bench for the video processor, shared by the
// small and the full-size testbenches.
//
// It assembles a text-display program (this design's reference software),
// loads it with a character screen and a font through the host port, runs
// the processor and watches the board pins the way a monitor would: it
// samples colour, BLANK#, HSYNC# and VSYNC# on every rising edge of the DAC
// clock. Checks:
//   - every line is HTOTAL pixels long and its hsync pulse HS pixels wide
//     (+-1 pixel: a wait releases up to three clocks after its counter runs
//     out), each frame has VTOTAL lines of which VS have vsync low;
//   - the visible pixels of every active line are exactly the font rows of
//     the characters on that text row, MSB first, and they start at the same
//     pixel offset on every line;
//   - a character-RAM update written through the host port during vertical
//     blanking appears in the next frame;
//   - after the program's frame loop is replaced by an undefined
//     instruction, the undefined-instruction and overflow exceptions report
//     the right EPC and Cause.
// It counts the mechanisms the design is built from (wait stalls, waits
// that pass, shift-register loads, sync/blank writes, host writes, taken
// branches, jumps, both exceptions) and fails any that never happened.
//
// Placement of the stores: a wait is released 1 to 3 clocks after its
// counter runs out. The program places each store to the shift register
// 32 clocks after a release (1 to 3 clocks after a pixel tick, before the
// middle of the pixel) and each store to the sync/blank register 4 or 22
// clocks after one, so that this jitter never moves a pixel edge: with 8
// clocks per pixel the store always takes effect at the same pixel.
//
// Memory layout used by the program (byte addresses): 0 jump to main, 0x100
// constants, 0x180 exception handler, 0x200 main program, 0x2000 character
// RAM (one code per word, row-major), 0x4800 font RAM (one 8-pixel row per
// word, laid out [font row][glyph]). Glyph row bytes follow the formula in
// glyph() below, with bits 7 and 0 always set so each character's extent
// is visible.
module video_bench #(
  parameter int COLS = 4,    // characters per text row
  parameter int ROWS = 2,    // text rows
  parameter int FROWS = 4,   // pixel rows per character
  parameter int HS = 8, HBP = 8, HFP = 16,   // horizontal sync, back/front porch (pixels)
  parameter int VS = 2, VBP = 3, VFP = 2,    // vertical sync, back/front porch (lines)
  parameter int MAX_CYCLES = 200000
) ();
  import mips_pkg::*;
  import asm_pkg::*;

  localparam int NGLYPH = 96;
  localparam int HACT = COLS * 8;
  localparam int HTOTAL = HS + HBP + HACT + HFP;
  localparam int VACT = ROWS * FROWS;
  localparam int VTOTAL = VACT + VFP + VS + VBP;
  localparam int CHAR_BASE = 32'h2000;
  localparam int FONT_BASE = 32'h4800;
  localparam int CB = 64;          // constant block, word address
  localparam int HANDLER = 96;     // exception vector 0x80000180 wraps to this word
  localparam int MAIN = 128;

  logic clk = 0, rst = 1;
  logic [31:0] host_addr = 0, host_wdata = 0, host_rdata;
  logic host_we = 0;
  logic dac_clk, dac_blank_n, hsync_n, vsync_n;
  logic [9:0] dac_r, dac_g, dac_b;
  logic [31:0] epc, cause;

  video_cpu dut (
    .clk, .rst, .host_addr, .host_we, .host_wdata, .host_rdata,
    .dac_clk, .dac_blank_n, .dac_r, .dac_g, .dac_b, .hsync_n, .vsync_n, .epc, .cause
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL [cycle %0d] %s", cycle, msg);
  endtask

  // ---------------- screen contents ----------------
  function automatic logic [7:0] glyph(int code, int frow);
    return 8'h81 | 8'((code * 37 + frow * 11 + (code >> 2)) & 8'h7E);
  endfunction
  function automatic int char_code(int version, int idx);
    return (idx * 5 + version * 17 + 3) % NGLYPH;
  endfunction

  // ---------------- program ----------------
  logic [31:0] prog [$];
  int  lbl [string];
  int  pc_w, pass;

  function automatic int L(string name);
    return lbl.exists(name) ? lbl[name] : 0;
  endfunction
  task automatic at(int w);       pc_w = w; endtask
  task automatic label(string n); if (pass == 0) lbl[n] = pc_w; endtask
  task automatic e(logic [31:0] w);
    if (pass == 1) host_write(pc_w * 4, w);
    pc_w++;
  endtask

  localparam int VSR   = -16;  // 0xFFFFFFF0
  localparam int VCTRL = -12;  // 0xFFFFFFF4

  // one line of vertical blanking; increments r27 and leaves when it equals rn
  task automatic blank_lines(string name, int r_lo, int r_hi, int rn);
    e(add_(27, 0, 0));
    label(name);
    e(wait_(0, HTOTAL));
    e(sw_(r_lo, VCTRL, 0));
    e(wait_(2, HS));
    e(wait_(2, 0));
    e(sw_(r_hi, VCTRL, 0));
    e(add_(27, 27, 8));
    e(beq_(27, rn, pc_w, L({name, "_done"})));
    e(j_(L(name)));
    label({name, "_done"});
  endtask

  task automatic gen_program();
    for (pass = 0; pass < 2; pass++) begin
      at(0);
      e(j_(MAIN));
      at(HANDLER);
      e(lw_(28, (CB + 16) * 4, 0));
      e(add_(29, 28, 28));            // overflows
      e(j_(HANDLER));
      at(MAIN);
      e(lw_(1, (CB + 0) * 4, 0));
      for (int r = 2; r <= 8; r++) e(lw_(r, (CB + r - 1) * 4, 0));
      for (int r = 10; r <= 17; r++) e(lw_(r, (CB + r - 2) * 4, 0));
      label("frame");
      e(add_(20, 2, 0));              // text row pointer
      label("textrow");
      e(add_(21, 3, 0));              // font row pointer
      label("fontrow");
      e(wait_(0, HTOTAL));            // line anchor
      e(sw_(10, VCTRL, 0));           // hsync low
      e(wait_(2, HS));
      e(wait_(2, 0));
      e(sw_(11, VCTRL, 0));           // hsync high, blanked
      e(wait_(1, HBP));
      e(add_(23, 20, 0));             // character pointer
      e(add_(24, 20, 4));             // end of the text row
      e(beq_(0, 1, pc_w, L("char")));  // never taken: a 3-cycle delay
      e(sw_(12, VCTRL, 0));           // unblank
      label("char");
      e(wait_(1, 8));                 // one character cell = 8 pixels
      e(lw_(25, 0, 23));              // character code
      e(add_(25, 25, 25));
      e(add_(25, 25, 25));            // code * 4
      e(add_(25, 25, 21));            // font address
      e(lw_(26, 0, 25));              // glyph row byte
      e(beq_(0, 1, pc_w, L("char")));  // never taken: 2 x 3-cycle delay
      e(beq_(0, 1, pc_w, L("char")));
      e(sw_(26, VSR, 0));             // to the shift register
      e(add_(23, 23, 1));
      e(beq_(23, 24, pc_w, L("rowend")));
      e(j_(L("char")));
      label("rowend");
      e(wait_(1, 4));                 // let the last character leave the shift register
      e(wait_(1, 0));
      e(sw_(11, VCTRL, 0));           // blank
      e(add_(21, 21, 5));
      e(beq_(21, 7, pc_w, L("rowdone")));
      e(j_(L("fontrow")));
      label("rowdone");
      e(add_(20, 20, 4));
      e(beq_(20, 6, pc_w, L("active_done")));
      e(j_(L("textrow")));
      label("active_done");
      blank_lines("vfp", 10, 11, 15);
      blank_lines("vsync", 13, 14, 16);
      blank_lines("vbp", 10, 11, 17);
      label("frame_jump");
      e(j_(L("frame")));
    end
  endtask

  task automatic host_write(int addr, logic [31:0] data);
    host_addr = addr; host_wdata = data; host_we = 1;
    @(posedge clk); #1;
    host_we = 0;
  endtask

  task automatic load_screen(int version);
    for (int i = 0; i < ROWS * COLS; i++) host_write(CHAR_BASE + 4 * i, char_code(version, i));
  endtask

  // ---------------- mechanism counters ----------------
  int n_wait_stall = 0, n_wait_pass = 0, n_vsr = 0, n_vctrl = 0, n_host = 0;
  int n_beq_taken = 0, n_jump = 0, n_undef = 0, n_ovf = 0;

  always @(posedge clk) begin
    cycle++;
    if (host_we) n_host++;
    if (!rst) begin
      if (dut.state == S_WAIT && !dut.wait_ready) n_wait_stall++;
      if (dut.state == S_WAIT &&  dut.wait_ready) n_wait_pass++;
      if (dut.vsr_we)   n_vsr++;
      if (dut.vctrl_we) n_vctrl++;
      if (dut.state == S_BRANCH && dut.u_dp.pc_en) n_beq_taken++;
      if (dut.state == S_JUMP) n_jump++;
      if (dut.state == S_EXC_UNDEF) n_undef++;
      if (dut.state == S_EXC_OVF) n_ovf++;
    end
  end

  // ---------------- monitor ----------------
  int  version = 0;          // screen version shown in the current frame
  int  frame = 0;            // vsync falling edges seen
  int  line_px = 0, hs_px = 0, line_no = 0, lines_in_frame = 0, vs_lines = 0;
  int  act_lines = 0, first_offset = -1, lines_checked = 0, frames_checked = 0;
  bit  seen_first_hsync = 0, in_vs = 0, patch_req = 0, update_req = 0;
  logic prev_hs = 1, prev_vs = 1, prev_dclk = 0;
  bit  vis [$];
  bit  line_had_vs;

  task automatic end_of_line();
    // horizontal timing
    checks++;
    if (line_px < HTOTAL - 1 || line_px > HTOTAL + 1) fail($sformatf("line %0d lasted %0d pixels, expected %0d", line_no, line_px, HTOTAL));
    checks++;
    if (hs_px < HS - 1 || hs_px > HS + 1) fail($sformatf("hsync %0d pixels wide, expected %0d", hs_px, HS));
    // visible content
    if (vis.size() > 0) begin
      int off = -1, tr, fr;
      tr = act_lines / FROWS; fr = act_lines % FROWS;
      foreach (vis[i]) if (off < 0 && vis[i]) off = i;
      checks++;
      if (act_lines >= VACT) fail("more active lines than the screen has");
      else if (off < 0 || vis.size() < off + HACT) fail($sformatf("active line %0d: %0d visible pixels, first lit at %0d", act_lines, vis.size(), off));
      else begin
        int bad = 0;
        for (int c = 0; c < COLS; c++) begin
          logic [7:0] g = glyph(char_code(version, tr * COLS + c), fr);
          for (int b = 0; b < 8; b++) if (vis[off + c * 8 + b] != g[7 - b]) bad++;
        end
        for (int i = off + HACT; i < vis.size(); i++) if (vis[i]) bad++;
        if (first_offset < 0) first_offset = off;
        if (off != first_offset) bad++;
        if (bad) begin
          string got = "", exp = "";
          foreach (vis[i]) got = {got, vis[i] ? "1" : "0"};
          for (int c = 0; c < COLS; c++) exp = {exp, $sformatf("%8b", glyph(char_code(version, tr * COLS + c), fr))};
          fail($sformatf("active line %0d (frame %0d): %0d wrong pixels, offset %0d\n  got %s\n  exp %s", act_lines, frame, bad, off, got, exp));
        end
        lines_checked++;
      end
      act_lines++;
    end
    if (line_had_vs) vs_lines++;
    lines_in_frame++;
    line_no++;
    vis.delete();
    line_px = 0; hs_px = 0; line_had_vs = 0;
  endtask

  task automatic end_of_frame();
    checks++;
    if (act_lines != VACT) fail($sformatf("frame %0d had %0d active lines, expected %0d", frame, act_lines, VACT));
    if (frame >= 1) begin
      checks++;
      if (lines_in_frame != VTOTAL) fail($sformatf("frame %0d had %0d lines, expected %0d", frame, lines_in_frame, VTOTAL));
      checks++;
      if (vs_lines != VS) fail($sformatf("vsync low for %0d lines, expected %0d", vs_lines, VS));
    end
    frames_checked++;
  endtask

  always @(negedge clk) if (!rst) begin
    if (dac_clk && !prev_dclk) begin
      // one pixel
      if (!hsync_n && prev_hs) begin
        if (seen_first_hsync) end_of_line();
        seen_first_hsync = 1;
      end
      if (!vsync_n && prev_vs) begin
        // first line of vsync: the frame's active part and front porch are over
        end_of_frame();
        frame++;
        lines_in_frame = 0; act_lines = 0; vs_lines = 0;
        if (frame == 1) update_req = 1;
        if (frame == 2) patch_req = 1;
      end
      if (seen_first_hsync) begin
        line_px++;
        if (!hsync_n) hs_px++;
        if (!vsync_n) line_had_vs = 1;
        if (dac_blank_n) vis.push_back(dac_r[0]);
        checks++;
        if (!dac_blank_n && dac_r != 0) fail("colour while blanked");
        if (dac_r != dac_g || dac_r != dac_b || (dac_r != 0 && dac_r != 10'h3FF)) fail("colour buses disagree");
      end
      prev_hs = hsync_n; prev_vs = vsync_n;
    end
    prev_dclk = dac_clk;
  end

  // ---------------- stimulus ----------------
  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fj;
    repeat (3) @(posedge clk); #1;
    // constants
    host_write((CB + 0) * 4, 4);
    host_write((CB + 1) * 4, CHAR_BASE);
    host_write((CB + 2) * 4, FONT_BASE);
    host_write((CB + 3) * 4, COLS * 4);
    host_write((CB + 4) * 4, NGLYPH * 4);
    host_write((CB + 5) * 4, CHAR_BASE + ROWS * COLS * 4);
    host_write((CB + 6) * 4, FONT_BASE + FROWS * NGLYPH * 4);
    host_write((CB + 7) * 4, 1);
    host_write((CB + 8) * 4, 3'b010);   // hsync low, blanked
    host_write((CB + 9) * 4, 3'b011);   // syncs high, blanked
    host_write((CB + 10) * 4, 3'b111);  // visible
    host_write((CB + 11) * 4, 3'b000);  // vsync and hsync low
    host_write((CB + 12) * 4, 3'b001);  // vsync low, hsync high
    host_write((CB + 13) * 4, VFP);
    host_write((CB + 14) * 4, VS);
    host_write((CB + 15) * 4, VBP);
    host_write((CB + 16) * 4, 32'h7FFF_FFFF);
    for (int fr = 0; fr < FROWS; fr++)
      for (int g = 0; g < NGLYPH; g++) host_write(FONT_BASE + 4 * (fr * NGLYPH + g), glyph(g, fr));
    load_screen(0);
    gen_program();
    fj = lbl["frame_jump"];
    checks++;
    host_addr = 32'h4 * MAIN;
    #1 if (host_rdata !== lw_(1, CB * 4, 0)) fail("program readback");
    repeat (2) @(posedge clk); #1;
    rst = 0;
    // frame 0 shows version 0; at its vsync the host writes version 1
    wait (update_req);
    @(posedge clk); #1;
    load_screen(1);
    version = 1;
    wait (patch_req);
    @(posedge clk); #1;
    host_write(fj * 4, 32'hFC00_0000);   // undefined opcode replaces the frame loop
    // undefined-instruction exception at the patched word
    wait (n_undef > 0);
    repeat (2) @(posedge clk); #1;
    checks++;
    if (epc !== fj * 4 || cause !== CAUSE_UNDEF) fail($sformatf("undefined: EPC %h Cause %0d, expected %h 0", epc, cause, fj * 4));
    wait (n_ovf > 0);
    repeat (2) @(posedge clk); #1;
    checks++;
    if (epc !== 32'h8000_0184 || cause !== CAUSE_OVF) fail($sformatf("overflow: EPC %h Cause %0d", epc, cause));
    // summary
    checks++;
    if (lines_checked != 2 * VACT) fail($sformatf("%0d active lines checked, expected %0d", lines_checked, 2 * VACT));
    $display("lines=%0d active lines checked=%0d frames=%0d pixel offset=%0d", line_no, lines_checked, frames_checked, first_offset);
    $display("wait stalls=%0d wait passes=%0d shift loads=%0d sync/blank writes=%0d host writes=%0d beq taken=%0d jumps=%0d undefined=%0d overflow=%0d",
             n_wait_stall, n_wait_pass, n_vsr, n_vctrl, n_host, n_beq_taken, n_jump, n_undef, n_ovf);
    checks++;
    if (n_wait_stall == 0 || n_wait_pass == 0 || n_vsr == 0 || n_vctrl == 0 || n_host == 0 ||
        n_beq_taken == 0 || n_jump == 0 || n_undef == 0 || n_ovf == 0) fail("a mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

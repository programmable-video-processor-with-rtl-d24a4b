// tb_video_cpu_full: full-size run of the video processor at its default
// parameters: an 80 x 30 character screen with a 16-row font on 640 x 480
// VGA timing (800-pixel lines: 96 sync, 48 back porch, 640 visible, 16
// front porch; 525-line frames: 480 visible, 10 front porch, 2 sync, 33
// back porch), two complete frames with a screen update between them.
module tb_video_cpu_full;
  video_bench #(.COLS(80), .ROWS(30), .FROWS(16), .HS(96), .HBP(48), .HFP(16),
                .VS(2), .VBP(33), .VFP(10), .MAX_CYCLES(12000000)) bench ();
endmodule

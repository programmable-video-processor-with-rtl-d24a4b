// tb_video_cpu: end-to-end test of the video processor on a small screen
// (4 x 2 characters of 4 pixel rows, 64-pixel lines, 15-line frames) with
// the processor at its default parameters. See video_bench for what is
// checked.
module tb_video_cpu;
  video_bench #(.COLS(4), .ROWS(2), .FROWS(4), .HS(8), .HBP(8), .HFP(16),
                .VS(2), .VBP(3), .VFP(2), .MAX_CYCLES(400000)) bench ();
endmodule

// tb_s6_device_pkg -- checks the device description: column kinds, frames per
// column, frame address packing and frame counts of regions, against numbers
// written out by hand.
module tb_s6_device_pkg;
  import s6_device_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // watchdog
  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check("frame words", FRAME_WORDS, 65);
    check("word width", WORD_W, 16);
    check("col 0 kind", col_type(8'd0), COL_IOB);
    check("col 39 kind", col_type(8'd39), COL_IOB);
    check("col 9 kind", col_type(8'd9), COL_BRAM);
    check("col 27 kind", col_type(8'd27), COL_BRAM);
    check("col 14 kind", col_type(8'd14), COL_DSP);
    check("col 32 kind", col_type(8'd32), COL_DSP);
    check("col 5 kind", col_type(8'd5), COL_CLB);
    check("CLB frames", frames_per_col(COL_CLB), 31);
    check("DSP frames", frames_per_col(COL_DSP), 24);
    check("BRAM frames", frames_per_col(COL_BRAM), 25);
    check("IOB frames", frames_per_col(COL_IOB), 30);
    check("far_major", far_major(8'd3, 8'd17), 16'h0311);
    check("far_minor", far_minor(10'd30), 16'h001E);
    // cols 8..10 = CLB + BRAM + CLB = 87 frames, two rows
    check("region frames a", region_frames('{col1: 8'd10, col0: 8'd8, row1: 8'd1, row0: 8'd0}), 174);
    // cols 13..14 = CLB + DSP = 55 frames, one row
    check("region frames b", region_frames('{col1: 8'd14, col0: 8'd13, row1: 8'd2, row0: 8'd2}), 55);
    // whole device: 2 IOB + 2 BRAM + 2 DSP + 34 CLB = 60+50+48+1054 = 1212 per row
    check("device frames", region_frames('{col1: 8'd39, col0: 8'd0, row1: 8'd3, row0: 8'd0}), 4848);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

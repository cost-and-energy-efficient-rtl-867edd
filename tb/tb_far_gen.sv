// tb_far_gen -- walks several regions (single column, mixed column kinds,
// several rows, whole device) with random gaps in next, and compares every
// frame address and the row_first / last flags with a reference walk built
// from a hand-written column table.
module tb_far_gen;
  import s6_device_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic    rst_n = 1, start = 0, next = 0;
  region_t region = '0;
  logic    valid, row_first, last;
  word_t   far_maj, far_min;
  // asynchronous reset asserted by an edge, before the first clock edge
  initial #1 rst_n = 0;

  int checks = 0, failures = 0, cycles = 0;

  far_gen dut (.*);

  function automatic int nframes(int c);
    if (c == 0 || c == 39) return 30;
    if (c == 9 || c == 27) return 25;
    if (c == 14 || c == 32) return 24;
    return 31;
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic walk(int r0, int r1, int c0, int c1);
    int n = 0, total = 0;
    for (int c = c0; c <= c1; c++) total += nframes(c);
    total *= (r1 - r0 + 1);
    @(negedge clk);
    region = '{col1: 8'(c1), col0: 8'(c0), row1: 8'(r1), row0: 8'(r0)};
    start = 1;
    @(negedge clk);
    start = 0;
    for (int r = r0; r <= r1; r++)
      for (int c = c0; c <= c1; c++)
        for (int m = 0; m < nframes(c); m++) begin
          while ($urandom % 3 == 0) begin
            check("valid while waiting", valid, 1);
            @(negedge clk);
          end
          check("valid", valid, 1);
          check("far_maj", far_maj, {8'(r), 8'(c)});
          check("far_min", far_min, m);
          check("row_first", row_first, (c == c0 && m == 0));
          n++;
          check("last", last, n == total);
          next = 1;
          @(negedge clk);
          next = 0;
        end
    check("valid drops after last", valid, 0);
    check("frames walked", n, total);
  endtask

  initial begin
    forever begin
      @(posedge clk);
      cycles++;
      if (cycles > 200000) begin
        failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    walk(0, 0, 5, 5);       // one CLB column
    walk(1, 2, 8, 10);      // CLB, BRAM, CLB over two rows
    walk(3, 3, 13, 15);     // DSP in the middle
    walk(0, 3, 0, 39);      // whole device
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

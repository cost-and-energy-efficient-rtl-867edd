// tb_reconf_ctrl -- runs the global controller against memories and a port
// controller stand-in written here, and compares the complete generated word
// stream, word by word, with a stream assembled in the testbench from
// hand-encoded packet words: header, per-frame commands (frame address, WCFG or
// RCFG, data packet header with count 130), data and pad frames, tail with the
// checksum. Operations: write (with relocation to two places), write with row
// replication, readback (pad frames dropped, data landing in the output
// memory), write from the output memory, copy, and a write that overflows the
// input memory and must stop with error set. The port side accepts words with
// random stalls and answers readback requests with a known pattern.
module tb_reconf_ctrl;
  import s6_device_pkg::*;
  import hwicap_regs_pkg::*;

  localparam int IN_DEPTH = 2000, OUT_DEPTH = 2000;
  localparam int IN_AW = $clog2(IN_DEPTH), OUT_AW = $clog2(OUT_DEPTH);

  logic clk = 0;
  always #5 clk = ~clk;

  logic              rst_n = 1, start = 0, src_sel = 0, replicate = 0;
  op_e               op = OP_WRITE;
  region_t           src = '0, dst = '0;
  logic              busy, done, error;
  logic [15:0]       frames;
  logic              in_en, out_en, out_we;
  logic [IN_AW-1:0]  in_addr;
  logic [OUT_AW-1:0] out_addr;
  word_t             in_rdata, out_wdata, out_rdata;
  logic              wr_valid, wr_flush, wr_ready, rd_start, rd_valid, rd_done, icap_idle;
  word_t             wr_data, rd_data;
  logic [15:0]       rd_count;

  reconf_ctrl #(.IN_DEPTH(IN_DEPTH), .OUT_DEPTH(OUT_DEPTH)) dut (.*);

  // asynchronous reset asserted by an edge, before the first clock edge
  initial #1 rst_n = 0;

  int checks = 0, failures = 0, cycle = 0;
  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // memories
  word_t in_mem [IN_DEPTH];
  word_t out_mem [OUT_DEPTH];
  always @(posedge clk) begin
    if (in_en) in_rdata <= in_mem[in_addr];
    if (out_en) begin
      out_rdata <= out_mem[out_addr];
      if (out_we) out_mem[out_addr] <= out_wdata;
    end
  end

  // port side stand-in
  word_t stream [$];
  int    flushes = 0, busy_left = 0, rd_left = 0, rd_seq = 0, rd_reqs = 0;
  bit    rd_end = 0, always_ready = 0;
  assign wr_ready  = wr_valid && busy_left == 0 && (always_ready || ($urandom % 4 != 0));
  assign icap_idle = busy_left == 0 && rd_left == 0 && !rd_end;
  always @(posedge clk) begin
    cycle++;
    rd_valid <= 0;
    rd_done  <= 0;
    if (busy_left > 0) busy_left--;
    if (wr_valid && wr_ready) begin
      stream.push_back(wr_data);
      if (wr_flush) begin busy_left = 5; flushes++; end
    end
    if (rd_start && icap_idle) begin
      check("read count", rd_count, 130);
      rd_left = 130;
      rd_reqs++;
    end else if (rd_left > 0 && ($urandom % 2 == 0)) begin
      rd_valid <= 1;
      rd_data  <= 16'(rd_seq * 7 + 3);
      rd_seq++;
      rd_left--;
      if (rd_left == 0) rd_end = 1;
    end else if (rd_end) begin
      rd_end  = 0;
      rd_done <= 1;
    end
  end

  // expected stream
  word_t       exp_q [$];
  logic [31:0] crc;

  function automatic logic [31:0] crc_step(logic [31:0] c, logic [5:0] r, logic [15:0] d);
    logic [21:0] b = {r, d};
    for (int i = 0; i < 22; i++)
      c = (c[0] ^ b[i]) ? ((c >> 1) ^ 32'h82F63B78) : (c >> 1);
    return c;
  endfunction

  function automatic int nframes(int c);
    if (c == 0 || c == 39) return 30;
    if (c == 9 || c == 27) return 25;
    if (c == 14 || c == 32) return 24;
    return 31;
  endfunction

  task automatic put_reg(logic [5:0] r, word_t d);
    exp_q.push_back(d);
    crc = crc_step(crc, r, d);
  endtask

  task automatic put_header();
    exp_q.push_back(16'hFFFF); exp_q.push_back(16'hAA99); exp_q.push_back(16'h5566);
    exp_q.push_back(16'h2000); exp_q.push_back(16'h30A1); exp_q.push_back(16'h0007);
    exp_q.push_back(16'h2000);
    crc = '0;
  endtask

  task automatic put_fcmd(bit rd, int r, int c, int m);
    exp_q.push_back(16'h3022);
    put_reg(6'h01, {8'(r), 8'(c)});
    put_reg(6'h02, 16'(m));
    exp_q.push_back(16'h30A1);
    put_reg(6'h05, rd ? 16'h0004 : 16'h0001);
    exp_q.push_back(16'h2000);
    exp_q.push_back(rd ? 16'h4880 : 16'h5060);
    exp_q.push_back(16'h0000);
    exp_q.push_back(16'h0082);
  endtask

  task automatic put_tail(bit rd);
    if (rd) begin
      exp_q.push_back(16'h2000); exp_q.push_back(16'h2000); exp_q.push_back(16'h2000);
    end else begin
      exp_q.push_back(16'h3002); exp_q.push_back(crc[31:16]); exp_q.push_back(crc[15:0]);
    end
    exp_q.push_back(16'h30A1); exp_q.push_back(16'h000D);
    exp_q.push_back(16'h2000); exp_q.push_back(16'h2000);
  endtask

  // write pass: frames of region taken from mem (0 in, 1 out) up to max_frames
  task automatic put_write(region_t g, bit from_out, bit rep, int max_frames);
    int p = 0, n = 0;
    put_header();
    for (int r = g.row0; r <= g.row1; r++) begin
      if (rep) p = 0;
      for (int c = g.col0; c <= g.col1; c++)
        for (int m = 0; m < nframes(c); m++) begin
          if (n == max_frames) begin put_tail(0); return; end
          put_fcmd(0, r, c, m);
          for (int w = 0; w < 65; w++) put_reg(6'h03, from_out ? out_mem[p + w] : in_mem[p + w]);
          for (int w = 0; w < 65; w++) put_reg(6'h03, 16'h0000);
          p += 65;
          n++;
        end
    end
    put_tail(0);
  endtask

  task automatic put_read(region_t g);
    put_header();
    for (int r = g.row0; r <= g.row1; r++)
      for (int c = g.col0; c <= g.col1; c++)
        for (int m = 0; m < nframes(c); m++) put_fcmd(1, r, c, m);
    put_tail(1);
  endtask

  task automatic run(op_e o, bit sel, bit rep, region_t s, region_t d);
    @(negedge clk);
    op = o; src_sel = sel; replicate = rep; src = s; dst = d;
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
  endtask

  task automatic compare(string what);
    check({what, " stream length"}, stream.size(), exp_q.size());
    for (int i = 0; i < stream.size() && i < exp_q.size(); i++)
      check($sformatf("%s word %0d", what, i), stream[i], exp_q[i]);
    stream.delete();
    exp_q.delete();
  endtask

  function automatic region_t rg(int r0, int r1, int c0, int c1);
    return '{col1: 8'(c1), col0: 8'(c0), row1: 8'(r1), row0: 8'(r0)};
  endfunction

  initial begin
    wait (cycle > 400000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t0;
  initial begin
    for (int i = 0; i < IN_DEPTH; i++) in_mem[i] = 16'($urandom);
    for (int i = 0; i < OUT_DEPTH; i++) out_mem[i] = 16'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1;

    // write one DSP column (24 frames), then the same data relocated
    put_write(rg(2, 2, 14, 14), 0, 0, 1000);
    run(OP_WRITE, 0, 0, '0, rg(2, 2, 14, 14));
    compare("write");
    check("write frames", frames, 24);
    check("write error", error, 0);
    put_write(rg(0, 0, 32, 32), 0, 0, 1000);
    run(OP_WRITE, 0, 0, '0, rg(0, 0, 32, 32));
    compare("relocated write");

    // replicate one row of a DSP column over three rows
    put_write(rg(1, 3, 14, 14), 0, 1, 1000);
    run(OP_WRITE, 0, 1, '0, rg(1, 3, 14, 14));
    compare("replicate");
    check("replicate frames", frames, 72);

    // readback: pad frames dropped, data in the output memory
    rd_seq = 0;
    put_read(rg(3, 3, 32, 32));
    run(OP_READ, 0, 0, rg(3, 3, 32, 32), '0);
    compare("readback");
    check("readback requests", rd_reqs, 24);
    for (int f = 0; f < 24; f++)
      for (int w = 0; w < 65; w++)
        check($sformatf("readback f%0d w%0d", f, w), out_mem[f * 65 + w],
              16'((f * 130 + 65 + w) * 7 + 3));

    // write the output memory back somewhere else
    put_write(rg(1, 1, 14, 14), 1, 0, 1000);
    run(OP_WRITE, 1, 0, '0, rg(1, 1, 14, 14));
    compare("write from output memory");

    // copy: readback of src, then write of it into dst
    rd_seq = 0;
    put_read(rg(0, 0, 14, 14));
    for (int f = 0; f < 24; f++)
      for (int w = 0; w < 65; w++) out_mem[f * 65 + w] = 16'((f * 130 + 65 + w) * 7 + 3);
    put_write(rg(2, 2, 32, 32), 1, 0, 1000);
    for (int i = 0; i < OUT_DEPTH; i++) out_mem[i] = 16'($urandom);
    run(OP_COPY, 0, 0, rg(0, 0, 14, 14), rg(2, 2, 32, 32));
    compare("copy");
    check("copy frames", frames, 48);

    // rate: with a port side that never stalls, a write moves one word per
    // clock, with at most a few lost clocks per frame (memory latency)
    always_ready = 1;
    put_write(rg(3, 3, 14, 14), 0, 0, 1000);
    t0 = cycle;
    run(OP_WRITE, 0, 0, '0, rg(3, 3, 14, 14));
    compare("full-rate write");
    check("full-rate write cycles within bound", (cycle - t0) <= 14 + 24 * 139 + 24 * 4 + 20, 1);
    $display("write of 24 frames (%0d words) took %0d cycles", 14 + 24 * 139, cycle - t0);
    always_ready = 0;

    // overflow: 55 frames do not fit in 2000 words (30 frames)
    put_write(rg(0, 0, 13, 14), 0, 0, 30);
    t0 = cycle;
    run(OP_WRITE, 0, 0, '0, rg(0, 0, 13, 14));
    compare("overflow");
    check("overflow error", error, 1);
    check("overflow frames", frames, 30);
    check("busy after done", busy, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_s6_reconf_engine -- end-to-end test of the reconfiguration engine at its
// default sizes, with the HWICAP core and the configuration logic replaced by
// behavioural models. A processor task sequence on the bus side:
//   1. loads 24 frames into the input memory and writes them into a DSP
//      column; the configuration memory model must hold them and the tail
//      checksum must match;
//   2. writes the same data relocated to another DSP column;
//   3. reads the first column back and compares the output memory;
//   4. copies that column to a third place inside the configuration memory;
//   5. replicates one row of frames over three rows;
//   6. writes 25 frames into a BRAM column, reads them back and writes the
//      output memory into another BRAM column;
//   7. asks for a region that does not fit in the input memory (error).
// It also checks the number of words sent through the port for a write, that
// the port (one word per five engine clocks) is kept busy at least 60% of the
// time during that write, and
// that each mechanism (write, relocation, readback, copy, replication, output
// memory source, overflow, full write FIFO, checksum) happened.
module tb_s6_reconf_engine;
  import s6_device_pkg::*;

  logic clk_bus = 0, clk_cfg = 0;
  always #5 clk_bus = ~clk_bus;
  always #6.5 clk_cfg = ~clk_cfg;

  logic        rst_bus_n = 1, rst_cfg_n = 1;
  logic        bus_cs = 0, bus_we = 0, bus_ack;
  logic [2:0]  bus_addr = '0;
  logic [31:0] bus_wdata = '0, bus_rdata;
  logic        ip_cs, ip_rnw, ip_ack;
  logic [8:0]  ip_addr;
  logic [31:0] ip_wdata, ip_rdata;

  s6_reconf_engine dut (.*);
  // port at a fifth of the engine clock, e.g. 20 MHz against 100 MHz
  hwicap_model #(.ICAP_DIV(5)) u_hwicap (.clk(clk_cfg), .*);

  // asynchronous reset asserted by an edge, before the first clock edge
  initial #1 begin rst_bus_n = 0; rst_cfg_n = 0; end

  int checks = 0, failures = 0, cycle = 0;
  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  always @(posedge clk_bus) cycle++;
  initial begin
    wait (cycle > 2_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- processor ----------------
  task automatic bwrite(int a, logic [31:0] d);
    @(negedge clk_bus);
    bus_cs = 1; bus_we = 1; bus_addr = 3'(a); bus_wdata = d;
    @(posedge clk_bus);
    while (!bus_ack) @(posedge clk_bus);
    @(negedge clk_bus);
    bus_cs = 0;
  endtask

  task automatic bread(int a, output logic [31:0] d);
    @(negedge clk_bus);
    bus_cs = 1; bus_we = 0; bus_addr = 3'(a);
    @(posedge clk_bus);
    while (!bus_ack) @(posedge clk_bus);
    #1 d = bus_rdata;
    @(negedge clk_bus);
    bus_cs = 0;
  endtask

  function automatic logic [31:0] reg_of(int r0, int r1, int c0, int c1);
    return {8'(c1), 8'(c0), 8'(r1), 8'(r0)};
  endfunction

  // op: 0 write, 1 readback, 2 copy
  task automatic run(int op, bit sel, bit rep, logic [31:0] s, logic [31:0] d, output logic [31:0] st);
    bwrite(2, s);
    bwrite(3, d);
    bwrite(0, {27'd0, rep, sel, 2'(op), 1'b1});
    do bread(1, st); while (st[1] == 0);
  endtask

  // ---------------- reference data ----------------
  word_t frames_in [80][65];

  task automatic load_input(int n);
    bwrite(4, 0);
    for (int f = 0; f < n; f++)
      for (int w = 0; w < 65; w++) begin
        frames_in[f][w] = 16'($urandom);
        bwrite(5, {16'h0, frames_in[f][w]});
      end
  endtask

  // overwrite the input memory without touching the reference copy
  task automatic scramble_input(int n);
    bwrite(4, 0);
    for (int i = 0; i < n * 65; i++) bwrite(5, $urandom);
  endtask

  task automatic expect_column(string what, int row, int col, int n, int f0);
    for (int f = 0; f < n; f++)
      for (int w = 0; w < 65; w++)
        check($sformatf("%s f%0d w%0d", what, f, w),
              u_hwicap.u_cfg.peek({8'(row), 8'(col)}, 16'(f), w), frames_in[f0 + f][w]);
  endtask

  int n_write = 0, n_reloc = 0, n_read = 0, n_copy = 0, n_rep = 0, n_outsrc = 0, n_ovf = 0;

  logic [31:0] st, d;
  int words0, crc0;
  realtime t_start, t_end;
  initial begin
    repeat (4) @(negedge clk_bus);
    rst_bus_n = 1; rst_cfg_n = 1;
    repeat (4) @(negedge clk_bus);

    // 1. write 24 frames into the DSP column 14 of row 1
    load_input(24);
    words0 = u_hwicap.u_cfg.words_in;
    crc0 = u_hwicap.u_cfg.crc_ok;
    t_start = $realtime;
    run(0, 0, 0, '0, reg_of(1, 1, 14, 14), st);
    t_end = $realtime;
    check("write status", st, {16'd24, 16'h0002});
    $display("write of 24 frames: %0d port words in %0.0f engine cycles; the port model takes one word per %0d cycles, so it was busy %0.0f%% of the time",
             u_hwicap.u_cfg.words_in - words0, (t_end - t_start) / 13.0, u_hwicap.ICAP_DIV,
             100.0 * (u_hwicap.u_cfg.words_in - words0) * u_hwicap.ICAP_DIV / ((t_end - t_start) / 13.0));
    check("write port words", u_hwicap.u_cfg.words_in - words0, 7 + 24 * (9 + 130) + 7);
    // the port, not the engine, must set the pace: at least 60% port use
    // (the rest is the HWICAP handshake of vacancy read, start and poll)
    check("write keeps the port busy", 100.0 * (u_hwicap.u_cfg.words_in - words0) * u_hwicap.ICAP_DIV
          >= 60.0 * ((t_end - t_start) / 13.0), 1);
    check("write checksum", u_hwicap.u_cfg.crc_ok - crc0, 1);
    expect_column("write", 1, 14, 24, 0);
    n_write++;

    // 2. the same module relocated to DSP column 32 of row 3
    run(0, 0, 0, '0, reg_of(3, 3, 32, 32), st);
    check("relocate status", st[2:0], 3'b010);
    expect_column("relocate", 3, 32, 24, 0);
    n_reloc++;

    // 3. readback of row 1 column 14
    run(1, 0, 0, reg_of(1, 1, 14, 14), '0, st);
    check("readback status", st, {16'd24, 16'h0002});
    bwrite(6, 0);
    for (int f = 0; f < 24; f++)
      for (int w = 0; w < 65; w++) begin
        bread(7, d);
        check($sformatf("readback f%0d w%0d", f, w), d, {16'h0, frames_in[f][w]});
      end
    n_read++;

    // 4. copy row 1 column 14 to row 2 column 32
    run(2, 0, 0, reg_of(1, 1, 14, 14), reg_of(2, 2, 32, 32), st);
    check("copy status", st, {16'd48, 16'h0002});
    expect_column("copy", 2, 32, 24, 0);
    n_copy++;

    // 5. replicate one row of the DSP column 14 into rows 0..2
    load_input(24);
    run(0, 0, 1, '0, reg_of(0, 2, 14, 14), st);
    check("replicate status", st, {16'd72, 16'h0002});
    for (int r = 0; r < 3; r++) expect_column($sformatf("replicate row %0d", r), r, 14, 24, 0);
    n_rep++;

    // 6. BRAM column 9 of row 0 written, read back, and the output memory
    //    written into BRAM column 27 of row 2
    load_input(25);
    run(0, 0, 0, '0, reg_of(0, 0, 9, 9), st);
    run(1, 0, 0, reg_of(0, 0, 9, 9), '0, st);
    check("bram readback frames", st[31:16], 25);
    scramble_input(25);
    run(0, 1, 0, '0, reg_of(2, 2, 27, 27), st);
    check("output memory source status", st, {16'd25, 16'h0002});
    expect_column("bram", 0, 9, 25, 0);
    expect_column("from output memory", 2, 27, 25, 0);
    n_outsrc++;

    // 7. region too large for the input memory: 31+24+31 = 86 frames > 78
    run(0, 0, 0, '0, reg_of(0, 0, 13, 15), st);
    check("overflow error", st[2], 1);
    check("overflow frames", st[31:16], 78);
    n_ovf++;

    // mechanisms
    check("write happened", n_write > 0, 1);
    check("relocation happened", n_reloc > 0, 1);
    check("readback happened", n_read > 0, 1);
    check("copy happened", n_copy > 0, 1);
    check("replication happened", n_rep > 0, 1);
    check("output memory source happened", n_outsrc > 0, 1);
    check("overflow happened", n_ovf > 0, 1);
    check("write FIFO filled", u_hwicap.wf_full_hits > 0, 1);
    check("checksum errors", u_hwicap.u_cfg.crc_err, 0);
    check("checksums matched", u_hwicap.u_cfg.crc_ok >= 6, 1);
    check("unknown packets", u_hwicap.u_cfg.bad_packets, 0);
    $display("mechanisms: write %0d relocate %0d readback %0d copy %0d replicate %0d outsrc %0d overflow %0d fifo-full %0d crc-ok %0d",
             n_write, n_reloc, n_read, n_copy, n_rep, n_outsrc, n_ovf,
             u_hwicap.wf_full_hits, u_hwicap.u_cfg.crc_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

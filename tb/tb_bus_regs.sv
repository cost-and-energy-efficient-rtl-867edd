// tb_bus_regs -- exercises the processor register block through its bus port:
// every register's read value, the start pulse and operation fields, writes to
// CTRL/SRC/DST being ignored while busy, done setting the sticky flag and
// clearing busy, the status word, and streaming through IN_DATA and OUT_DATA
// with pointer auto-increment against memories modelled here.
module tb_bus_regs;
  import s6_device_pkg::*;
  import hwicap_regs_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic        rst_n = 1, bus_cs = 0, bus_we = 0, bus_ack;
  logic [2:0]  bus_addr = '0;
  logic [31:0] bus_wdata = '0, bus_rdata;
  logic        start, src_sel, replicate, busy;
  op_e         op;
  region_t     src, dst;
  logic        done_evt = 0, error = 0;
  logic [15:0] frames = '0;
  logic        in_en, in_we, out_en;
  logic [12:0] in_addr, out_addr;
  word_t       in_wdata, in_rdata, out_rdata;

  bus_regs dut (.*);

  // asynchronous reset asserted by an edge, before the first clock edge
  initial #1 rst_n = 0;

  int checks = 0, failures = 0, cycle = 0, starts = 0;
  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  word_t in_mem [8192];
  word_t out_mem [8192];
  always @(posedge clk) begin
    cycle++;
    if (start) starts++;
    if (in_en) begin
      in_rdata <= in_mem[in_addr];
      if (in_we) in_mem[in_addr] <= in_wdata;
    end
    if (out_en) out_rdata <= out_mem[out_addr];
  end

  task automatic bwrite(int a, logic [31:0] d);
    @(negedge clk);
    bus_cs = 1; bus_we = 1; bus_addr = 3'(a); bus_wdata = d;
    @(posedge clk);
    while (!bus_ack) @(posedge clk);
    @(negedge clk);
    bus_cs = 0;
  endtask

  task automatic bread(int a, output logic [31:0] d);
    @(negedge clk);
    bus_cs = 1; bus_we = 0; bus_addr = 3'(a);
    @(posedge clk);
    while (!bus_ack) @(posedge clk);
    #1 d = bus_rdata;
    @(negedge clk);
    bus_cs = 0;
  endtask

  initial begin
    wait (cycle > 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] d;
  initial begin
    for (int i = 0; i < 8192; i++) out_mem[i] = 16'(i * 3 + 1);
    repeat (3) @(negedge clk);
    rst_n = 1;
    bwrite(2, 32'h0A08_0100);
    bwrite(3, 32'h2020_0303);
    bread(2, d); check("SRC", d, 32'h0A08_0100);
    bread(3, d); check("DST", d, 32'h2020_0303);
    check("src row1", src.row1, 1);
    check("src col1", src.col1, 10);
    check("dst col0", dst.col0, 32);
    // start a copy with replicate
    bwrite(0, {27'd0, 1'b1, 1'b0, 2'd2, 1'b1});
    check("start pulses", starts, 1);
    check("op", op, OP_COPY);
    check("replicate", replicate, 1);
    check("busy", busy, 1);
    bread(1, d); check("status busy", d[2:0], 3'b001);
    // writes ignored while busy
    bwrite(2, 32'h1111_1111);
    bwrite(0, 32'h1);
    check("SRC frozen", src, 32'h0A08_0100);
    check("no second start", starts, 1);
    // engine done
    frames = 16'd87; error = 1;
    @(negedge clk); done_evt = 1; @(negedge clk); done_evt = 0;
    bread(1, d); check("status done", d, {16'd87, 13'd0, 3'b110});
    bread(0, d); check("CTRL readback", d, {27'd0, 1'b1, 1'b0, 2'd2, 1'b0});
    // new start clears done
    error = 0;
    bwrite(0, {27'd0, 1'b0, 1'b1, 2'd0, 1'b1});
    bread(1, d); check("done cleared", d[2:0], 3'b001);
    check("op write", op, OP_WRITE);
    check("src_sel", src_sel, 1);
    @(negedge clk); done_evt = 1; @(negedge clk); done_evt = 0;
    // stream into the input memory
    bwrite(4, 100);
    for (int i = 0; i < 20; i++) bwrite(5, 32'hFFFF_0000 | 32'(i * 11));
    bread(4, d); check("IN_PTR advanced", d, 120);
    for (int i = 0; i < 20; i++) check($sformatf("in_mem %0d", i), in_mem[100 + i], 16'(i * 11));
    bwrite(4, 105);
    bread(5, d); check("IN_DATA read", d, 55);
    bread(5, d); check("IN_DATA read next", d, 66);
    // stream out of the output memory
    bwrite(6, 4000);
    for (int i = 0; i < 10; i++) begin
      bread(7, d);
      check($sformatf("OUT_DATA %0d", i), d, 32'((4000 + i) * 3 + 1) & 32'hFFFF);
    end
    bread(6, d); check("OUT_PTR advanced", d, 4010);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

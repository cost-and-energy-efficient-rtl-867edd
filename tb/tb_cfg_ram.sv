// tb_cfg_ram -- random traffic on both ports of the dual-clock memory, with
// unrelated clock periods, checked against a reference array. Covers the
// one-cycle read latency, read-old-data on a port B write, and that rdata holds
// while en is low.
module tb_cfg_ram;
  localparam int DEPTH = 200;
  localparam int AW = $clog2(DEPTH);

  logic clk_a = 0, clk_b = 0;
  always #5 clk_b = ~clk_b;
  always #7 clk_a = ~clk_a;

  logic          en_b = 0, we_b = 0, en_a = 0;
  logic [AW-1:0] addr_b = '0, addr_a = '0;
  logic [15:0]   wdata_b = '0, rdata_b, rdata_a;
  logic [15:0]   ref_mem [DEPTH];
  int checks = 0, failures = 0;

  cfg_ram #(.DEPTH(DEPTH)) dut (.*);

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp, held;
    // fill through port B
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk_b);
      en_b = 1; we_b = 1; addr_b = AW'(i); wdata_b = 16'($urandom);
      ref_mem[i] = wdata_b;
    end
    @(negedge clk_b); en_b = 0; we_b = 0;
    // read everything through port A
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk_a);
      en_a = 1; addr_a = AW'(i);
      @(negedge clk_a);
      en_a = 0;
      check($sformatf("A read %0d", i), rdata_a, ref_mem[i]);
    end
    // rdata_a holds while en_a is low
    held = rdata_a;
    repeat (3) @(negedge clk_a);
    check("A hold", rdata_a, held);
    // random mixed traffic on port B: read-before-write
    for (int n = 0; n < 400; n++) begin
      int a = $urandom % DEPTH;
      bit w = $urandom % 2;
      @(negedge clk_b);
      en_b = 1; we_b = w; addr_b = AW'(a); wdata_b = 16'($urandom);
      exp = ref_mem[a];
      if (w) ref_mem[a] = wdata_b;
      @(negedge clk_b);
      en_b = 0; we_b = 0;
      check($sformatf("B read %0d", n), rdata_b, exp);
    end
    // port A sees the port B writes
    for (int i = 0; i < DEPTH; i += 7) begin
      @(negedge clk_a);
      en_a = 1; addr_a = AW'(i);
      @(negedge clk_a);
      en_a = 0;
      check($sformatf("A reread %0d", i), rdata_a, ref_mem[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

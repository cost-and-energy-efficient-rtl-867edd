// tb_cfg_crc -- folds random register writes into the checksum and compares
// with a reference computed one bit at a time in the testbench, including
// clear, clear winning over an update, and idle cycles.
module tb_cfg_crc;
  logic clk = 0;
  always #5 clk = ~clk;
  logic        rst_n = 1, clear = 0, upd = 0;
  logic [5:0]  reg_addr = '0;
  logic [15:0] data = '0;
  logic [31:0] crc, ref_crc;
  // asynchronous reset asserted by an edge, before the first clock edge
  initial #1 rst_n = 0;

  int checks = 0, failures = 0, cycles = 0;

  cfg_crc dut (.*);

  // reflected CRC-32C, 22 bits {reg, data} LSB first
  function automatic logic [31:0] ref_step(logic [31:0] c, logic [5:0] r, logic [15:0] d);
    logic [21:0] b = {r, d};
    for (int i = 0; i < 22; i++)
      c = (c[0] ^ b[i]) ? ((c >> 1) ^ 32'h82F63B78) : (c >> 1);
    return c;
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    forever begin
      @(posedge clk);
      cycles++;
      if (cycles > 10000) begin
        failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    ref_crc = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("reset", crc, 0);
    // one known word: FAR_MAJ = 0x0001
    upd = 1; reg_addr = 6'h01; data = 16'h0001;
    ref_crc = ref_step(ref_crc, reg_addr, data);
    @(negedge clk);
    upd = 0;
    check("single word", crc, ref_crc);
    check("single word nonzero", {31'd0, crc != 0}, 1);
    for (int n = 0; n < 500; n++) begin
      upd = ($urandom % 4 != 0);
      clear = ($urandom % 97 == 0);
      reg_addr = 6'($urandom);
      data = 16'($urandom);
      if (clear) ref_crc = '0;
      else if (upd) ref_crc = ref_step(ref_crc, reg_addr, data);
      @(negedge clk);
      check($sformatf("step %0d", n), crc, ref_crc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

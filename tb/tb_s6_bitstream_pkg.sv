// tb_s6_bitstream_pkg -- checks the generated header, per-frame command and
// tail sequences word by word against hand-encoded packet words.
module tb_s6_bitstream_pkg;
  import s6_device_pkg::*;
  import s6_bitstream_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  logic [15:0] hdr  [7]  = '{16'hFFFF, 16'hAA99, 16'h5566, 16'h2000, 16'h30A1, 16'h0007, 16'h2000};
  logic [15:0] fwr  [9]  = '{16'h3022, 16'h0205, 16'h0011, 16'h30A1, 16'h0001, 16'h2000,
                             16'h5060, 16'h0000, 16'h0082};
  logic [15:0] frd  [9]  = '{16'h3022, 16'h0205, 16'h0011, 16'h30A1, 16'h0004, 16'h2000,
                             16'h4880, 16'h0000, 16'h0082};
  logic [15:0] twr  [7]  = '{16'h3002, 16'hDEAD, 16'hBEEF, 16'h30A1, 16'h000D, 16'h2000, 16'h2000};
  logic [15:0] trd  [7]  = '{16'h2000, 16'h2000, 16'h2000, 16'h30A1, 16'h000D, 16'h2000, 16'h2000};

  // watchdog
  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check("hdr len", HDR_LEN, 7);
    check("fcmd len", FCMD_LEN, 9);
    check("tail len", TAIL_LEN, 7);
    for (int i = 0; i < 7; i++) check($sformatf("hdr %0d", i), header_word(i).data, hdr[i]);
    check("rcrc tagged CMD", header_word(5).reg_addr, 6'h05);
    check("rcrc outside crc", header_word(5).crc, 0);
    for (int i = 0; i < 9; i++) begin
      check($sformatf("fcmd wr %0d", i), frame_cmd_word(i, 1'b0, 16'h0205, 16'h0011).data, fwr[i]);
      check($sformatf("fcmd rd %0d", i), frame_cmd_word(i, 1'b1, 16'h0205, 16'h0011).data, frd[i]);
    end
    check("far in crc", frame_cmd_word(1, 1'b0, 16'h0205, 16'h0011).crc, 1);
    check("far_min reg", frame_cmd_word(2, 1'b0, 16'h0205, 16'h0011).reg_addr, 6'h02);
    check("pkt hdr not reg", frame_cmd_word(0, 1'b0, 16'h0205, 16'h0011).reg_addr, 6'h3F);
    for (int i = 0; i < 7; i++) begin
      check($sformatf("tail wr %0d", i), tail_word(i, 1'b0, 32'hDEADBEEF).data, twr[i]);
      check($sformatf("tail rd %0d", i), tail_word(i, 1'b1, 32'hDEADBEEF).data, trd[i]);
    end
    check("crc word reg", tail_word(1, 1'b0, 32'hDEADBEEF).reg_addr, 6'h00);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// cfg_crc -- running checksum of the configuration register writes.
//
// The tail of every write stream carries a CRC so that the configuration
// logic can verify what it received. This block keeps that CRC: clear resets
// it (the header sends a reset-CRC command, and the engine clears its copy at
// the same point), and every cycle with upd high folds one 16-bit register
// data word, together with the 6-bit number of the register it is written to,
// into the checksum. The 22 bits {reg, data} enter LSB first through a
// reflected CRC-32C (Castagnoli) shift register; the polynomial and the
// register-address-plus-data framing are this design's choice, since only
// the presence of the CRC check is given.
//
// Timing: crc shows the checksum of everything folded in up to the previous
// cycle. clear wins over upd.
module cfg_crc #(
  parameter logic [31:0] POLY = 32'h82F6_3B78   // reflected CRC-32C
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        upd,
  input  logic [5:0]  reg_addr,
  input  logic [15:0] data,
  output logic [31:0] crc
);

  function automatic logic [31:0] step(input logic [31:0] c, input logic [21:0] d);
    logic [31:0] v;
    v = c;
    for (int i = 0; i < 22; i++) begin
      if (v[0] ^ d[i]) v = (v >> 1) ^ POLY;
      else             v = v >> 1;
    end
    return v;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     crc <= '0;
    else if (clear) crc <= '0;
    else if (upd)   crc <= step(crc, {reg_addr, data});
  end

endmodule

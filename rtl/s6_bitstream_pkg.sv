// s6_bitstream_pkg -- structure of the configuration bitstream.
//
// The engine does not parse partial bitstreams. It is fed pure frame data and
// composes the command part of the stream itself, at run time, from the
// sequences in this package: a header (synchronisation and set-up), a short
// command block in front of every frame (frame address, write or readback
// command, data packet header) and a tail (CRC check and desynchronisation).
// Replacing this package adapts the engine to another bitstream format.
//
// Following the document: header / body / tail split; header with
// synchronisation words; per-frame commands with the frame address and a pad
// frame after each written frame and ahead of each read frame; tail with a CRC
// check and desynchronisation. Own choices (the exact words are not printed
// in the document): 16-bit packet headers laid out as
// type[15:13] opcode[12:11] register[10:5] count[4:0]; type 2 headers followed
// by a 32-bit word count sent as two 16-bit words; the register numbers and
// command codes below; the CRC register receiving two words (high, low).
package s6_bitstream_pkg;
  import s6_device_pkg::*;

  // Configuration registers
  typedef logic [5:0] reg_addr_t;
  localparam reg_addr_t REG_CRC     = 6'h00;
  localparam reg_addr_t REG_FAR_MAJ = 6'h01;
  localparam reg_addr_t REG_FAR_MIN = 6'h02;
  localparam reg_addr_t REG_FDRI    = 6'h03;
  localparam reg_addr_t REG_FDRO    = 6'h04;
  localparam reg_addr_t REG_CMD     = 6'h05;
  localparam reg_addr_t REG_NONE    = 6'h3F;  // tag of words that are no register data

  // Packet opcodes
  typedef enum logic [1:0] {
    OPC_NOP   = 2'b00,
    OPC_READ  = 2'b01,
    OPC_WRITE = 2'b10
  } opcode_e;

  // Commands written to the CMD register
  localparam word_t CMD_WCFG   = 16'h0001;
  localparam word_t CMD_RCFG   = 16'h0004;
  localparam word_t CMD_RCRC   = 16'h0007;
  localparam word_t CMD_DESYNC = 16'h000D;

  // Special words
  localparam word_t W_DUMMY = 16'hFFFF;
  localparam word_t W_SYNC0 = 16'hAA99;
  localparam word_t W_SYNC1 = 16'h5566;
  localparam word_t W_NOP   = 16'h2000;

  // Words of a pad + data frame pair moved per frame
  localparam int unsigned FRAME_XFER = 2 * FRAME_WORDS;

  // Lengths of the generated sequences
  localparam int unsigned HDR_LEN  = 7;
  localparam int unsigned FCMD_LEN = 9;
  localparam int unsigned TAIL_LEN = 7;

  // One generated word and what it is: its value, the register it is data
  // for (REG_NONE for packet headers, sync and NOP words) and whether it
  // enters the CRC.
  typedef struct packed {
    word_t     data;
    reg_addr_t reg_addr;
    logic      crc;
  } cfg_word_t;

  function automatic word_t type1(input opcode_e op, input reg_addr_t ra, input logic [4:0] cnt);
    return {3'b001, op, ra, cnt};
  endfunction

  function automatic word_t type2(input opcode_e op, input reg_addr_t ra);
    return {3'b010, op, ra, 5'd0};
  endfunction

  function automatic cfg_word_t ctl(input word_t w);
    return '{data: w, reg_addr: REG_NONE, crc: 1'b0};
  endfunction

  function automatic cfg_word_t dat(input reg_addr_t ra, input word_t w, input logic in_crc);
    return '{data: w, reg_addr: ra, crc: in_crc};
  endfunction

  // Header: dummy, sync pair, NOP, reset CRC, NOP, NOP
  function automatic cfg_word_t header_word(input int unsigned idx);
    case (idx)
      0:       return ctl(W_DUMMY);
      1:       return ctl(W_SYNC0);
      2:       return ctl(W_SYNC1);
      3:       return ctl(W_NOP);
      4:       return ctl(type1(OPC_WRITE, REG_CMD, 1));
      5:       return dat(REG_CMD, CMD_RCRC, 1'b0);
      default: return ctl(W_NOP);
    endcase
  endfunction

  // Commands in front of every frame. For a write: FAR, WCFG, NOP and a type 2
  // FDRI header announcing frame + pad frame. For a readback: FAR, RCFG, NOP and
  // a type 2 FDRO header announcing pad frame + frame.
  function automatic cfg_word_t frame_cmd_word(input int unsigned idx, input logic rd,
                                               input word_t fmaj, input word_t fmin);
    case (idx)
      0:       return ctl(type1(OPC_WRITE, REG_FAR_MAJ, 2));
      1:       return dat(REG_FAR_MAJ, fmaj, 1'b1);
      2:       return dat(REG_FAR_MIN, fmin, 1'b1);
      3:       return ctl(type1(OPC_WRITE, REG_CMD, 1));
      4:       return dat(REG_CMD, rd ? CMD_RCFG : CMD_WCFG, 1'b1);
      5:       return ctl(W_NOP);
      6:       return ctl(rd ? type2(OPC_READ, REG_FDRO) : type2(OPC_WRITE, REG_FDRI));
      7:       return ctl(16'h0000);                       // count, high word
      default: return ctl(word_t'(FRAME_XFER));            // count, low word
    endcase
  endfunction

  // Tail. Write: CRC check, DESYNC, NOPs. Readback: NOPs, DESYNC, NOPs.
  function automatic cfg_word_t tail_word(input int unsigned idx, input logic rd,
                                          input logic [31:0] crc);
    case (idx)
      0:       return rd ? ctl(W_NOP) : ctl(type1(OPC_WRITE, REG_CRC, 2));
      1:       return rd ? ctl(W_NOP) : dat(REG_CRC, crc[31:16], 1'b0);
      2:       return rd ? ctl(W_NOP) : dat(REG_CRC, crc[15:0], 1'b0);
      3:       return ctl(type1(OPC_WRITE, REG_CMD, 1));
      4:       return dat(REG_CMD, CMD_DESYNC, 1'b1);
      default: return ctl(W_NOP);
    endcase
  endfunction

endpackage

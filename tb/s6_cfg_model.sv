// s6_cfg_model -- behavioural model of the configuration logic behind the
// Spartan-6 internal configuration port, for simulation only.
//
// It accepts 16-bit words as the port would: waits for the sync pair, decodes
// type 1 and type 2 packets, keeps the frame address, executes WCFG / RCFG /
// RCRC / DESYNC commands, and stores written frames in a sparse configuration
// memory. Written frames pass through a one-frame buffer, so the pad frame
// that follows the data is what pushes the data frame into memory and is then
// discarded. A readback (FDRO) returns one pad frame of zeros and then frames
// from the current address onward. The checksum is kept over every register
// data word except CRC-register words and the reset-CRC command, and a write
// to the CRC register is compared with it. Counters for the testbenches are
// public variables.
module s6_cfg_model (
  input  logic        clk,
  input  logic        we,        // din is a word written into the port
  input  logic [15:0] din,
  input  logic        re,        // one readback word is taken from dout
  output logic [15:0] dout,
  output logic        rd_avail   // a readback is in progress
);

  logic [15:0] cfgmem [int];      // key: {row, major, minor} * 65 + word

  // parser state
  bit          synced = 0;
  logic [15:0] prev = '0;
  int          wr_left = 0;       // data words of the current write packet
  int          wr_idx = 0;
  logic [5:0]  wr_reg = '0;
  int          t2_cnt_words = 0;  // count words of a type 2 header still due
  logic [1:0]  t2_op = '0;
  logic [5:0]  t2_reg = '0;
  logic [31:0] t2_count = '0;
  logic [15:0] far_maj = '0, far_min = '0;
  logic [15:0] fbuf [65];
  int          fbuf_n = 0;
  bit          fbuf_full = 0;
  logic [31:0] crc = '0;
  logic [15:0] crc_hi = '0;
  int          rd_left = 0, rd_pos = 0;

  // statistics
  int words_in = 0, frames_written = 0, crc_ok = 0, crc_err = 0;
  int readbacks = 0, words_out = 0, desyncs = 0, bad_packets = 0;

  function automatic int key(logic [15:0] maj, logic [15:0] mn, int w);
    return ((int'(maj) << 10) + int'(mn[9:0])) * 65 + w;
  endfunction

  function automatic logic [15:0] peek(logic [15:0] maj, logic [15:0] mn, int w);
    int k = key(maj, mn, w);
    return cfgmem.exists(k) ? cfgmem[k] : 16'h0000;
  endfunction

  function automatic logic [31:0] crc_fold(logic [31:0] c, logic [5:0] r, logic [15:0] d);
    logic [21:0] bits = {r, d};
    for (int i = 0; i < 22; i++) begin
      bit fb = c[0] ^ bits[i];
      c = {1'b0, c[31:1]};
      if (fb) c = c ^ 32'h82F63B78;
    end
    return c;
  endfunction

  logic [15:0] pend [65];

  task automatic reg_write(logic [5:0] r, int idx, logic [15:0] d);
    // the second word of a two-word FAR_MAJ write is FAR_MIN
    if (r == 6'h01 && idx == 1) r = 6'h02;
    if (!(r == 6'h05 && d == 16'h0007) && r != 6'h00) crc = crc_fold(crc, r, d);
    case (r)
      6'h00: if (idx == 0) crc_hi = d;
             else if ({crc_hi, d} == crc) crc_ok++;
             else crc_err++;
      6'h01: far_maj = d;
      6'h02: far_min = d;
      6'h03: begin
        fbuf[fbuf_n] = d;
        fbuf_n++;
        if (fbuf_n == 65) begin
          fbuf_n = 0;
          if (fbuf_full) begin
            // the buffered frame goes to memory; the new one waits
            for (int i = 0; i < 65; i++) cfgmem[key(far_maj, far_min, i)] = pend[i];
            frames_written++;
            far_min = far_min + 1;
          end
          for (int i = 0; i < 65; i++) pend[i] = fbuf[i];
          fbuf_full = 1;
        end
      end
      6'h05: begin
        if (d == 16'h0007) crc = '0;
        if (d == 16'h000D) begin synced = 0; desyncs++; end
        if (d == 16'h0001 || d == 16'h0004) begin fbuf_full = 0; fbuf_n = 0; end
      end
      default: ;
    endcase
  endtask

  always @(posedge clk) begin
    if (we) begin
      words_in++;
      if (!synced) begin
        if (prev == 16'hAA99 && din == 16'h5566) synced = 1;
      end else if (t2_cnt_words > 0) begin
        t2_count = {t2_count[15:0], din};
        t2_cnt_words--;
        if (t2_cnt_words == 0) begin
          if (t2_op == 2'b10) begin wr_left = int'(t2_count); wr_idx = 0; wr_reg = t2_reg; end
          else if (t2_op == 2'b01 && t2_reg == 6'h04) begin
            rd_left <= int'(t2_count); rd_pos <= 0; readbacks++;
          end
        end
      end else if (wr_left > 0) begin
        reg_write(wr_reg, wr_idx, din);
        wr_idx++;
        wr_left--;
      end else if (din == 16'hFFFF) begin
        // dummy word
      end else if (din[15:13] == 3'b001) begin
        if (din[12:11] == 2'b10) begin wr_left = int'(din[4:0]); wr_idx = 0; wr_reg = din[10:5]; end
      end else if (din[15:13] == 3'b010) begin
        t2_op = din[12:11]; t2_reg = din[10:5]; t2_cnt_words = 2; t2_count = '0;
      end else begin
        bad_packets++;
      end
      prev = din;
    end
    if (re && rd_left > 0) begin
      rd_pos  <= rd_pos + 1;
      rd_left <= rd_left - 1;
      words_out++;
    end
  end

  // readback word at the head: pad frame first, then frames from FAR on
  always_comb begin
    if (rd_pos < 65) dout = 16'h0000;
    else dout = peek(far_maj, far_min + 16'((rd_pos - 65) / 65), (rd_pos - 65) % 65);
  end
  assign rd_avail = (rd_left > 0);

endmodule

// reconf_ctrl -- global control of the reconfiguration engine.
//
// Builds the complete configuration stream at run time instead of parsing a
// stored partial bitstream: the memories hold only frame data, and the header,
// the commands in front of each frame and the tail come from
// s6_bitstream_pkg, with the frame addresses supplied by the address
// generator (far_gen) and the checksum by cfg_crc.
//
// Operations (op, sampled at start):
//   OP_WRITE  writes the frames held in the input memory (or, with src_sel, in
//             the output memory) into region dst. Because addresses are
//             generated, writing to any dst relocates the module. With
//             replicate set, the data pointer restarts at every new clock-region
//             row, so one row of frames is copied into every row of dst.
//   OP_READ   reads back region src into the output memory. For each frame
//             the port returns a pad frame first, which is dropped.
//   OP_COPY   OP_READ of src followed by OP_WRITE of the output memory into dst
//             (copy and paste inside the configuration memory).
// Stream per pass: header (sync, reset CRC), then per frame the frame address,
// WCFG or RCFG and the data packet header, then for a write 65 data words and a
// 65-word pad frame, for a readback a request for 130 returned words; finally
// the tail (CRC check on writes, desynchronisation).
//
// Timing: start is a one-cycle pulse taken when idle; done pulses once when
// the last pass has been accepted by the port controller. Frame data is read
// ahead of the port controller into a two-word prefetch buffer, which hides
// the one-cycle memory latency: data words can be offered on every clock, so
// the FIFO of the HWICAP core is refilled as fast as it accepts words. error is set
// (and the pass is closed with its tail) when a frame would not fit in the
// memory being read or written; it clears at the next start. frames counts the
// frames moved by the last operation.
module reconf_ctrl
  import s6_device_pkg::*;
  import s6_bitstream_pkg::*;
  import hwicap_regs_pkg::*;
#(
  parameter int unsigned IN_DEPTH  = 5120,
  parameter int unsigned OUT_DEPTH = 5120,
  parameter int unsigned IN_AW     = $clog2(IN_DEPTH),
  parameter int unsigned OUT_AW    = $clog2(OUT_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // command
  input  logic              start,
  input  op_e               op,
  input  logic              src_sel,     // OP_WRITE source: 0 input memory, 1 output memory
  input  logic              replicate,
  input  region_t           src,
  input  region_t           dst,
  output logic              busy,
  output logic              done,
  output logic              error,
  output logic [15:0]       frames,
  // input memory, read port
  output logic              in_en,
  output logic [IN_AW-1:0]  in_addr,
  input  word_t             in_rdata,
  // output memory, read/write port
  output logic              out_en,
  output logic              out_we,
  output logic [OUT_AW-1:0] out_addr,
  output word_t             out_wdata,
  input  word_t             out_rdata,
  // port controller
  output logic              wr_valid,
  output word_t             wr_data,
  output logic              wr_flush,
  input  logic              wr_ready,
  output logic              rd_start,
  output logic [15:0]       rd_count,
  input  logic              rd_valid,
  input  word_t             rd_data,
  input  logic              rd_done,
  input  logic              icap_idle
);

  typedef enum logic [3:0] {
    S_IDLE, S_PASS, S_HDR, S_FCHK, S_FCMD, S_DATA, S_PAD,
    S_RREQ, S_RDATA, S_TAIL, S_WAIT
  } state_e;

  state_e      state;
  op_e         op_q;
  logic        rep_q;
  region_t     src_q, dst_q;
  logic        pass2;         // second pass of a copy
  logic        rd_pass;       // current pass is a readback
  logic        from_out;      // current write pass reads the output memory
  logic [15:0] idx;           // position inside header, commands, frame or tail
  logic [15:0] ptr;           // memory word pointer
  logic [15:0] ptr_eff;       // pointer at a frame start, after a replicate restart
  logic        overflow;

  // frame data prefetch: up to two words read ahead of the port controller
  logic [15:0] iss;           // words of the current frame read from memory
  logic        inflight;      // a memory read was issued in the previous cycle
  word_t       pf0, pf1;      // buffer, pf0 is the head
  logic [1:0]  pf_cnt;
  logic        pf_pop, issue;
  word_t       mem_q;

  // address generator and checksum
  logic        fg_start, fg_next, fg_valid, fg_row_first, fg_last;
  word_t       fg_maj, fg_min;
  logic        crc_clear, crc_upd;
  logic [31:0] crc;
  cfg_word_t   w;

  far_gen u_far (
    .clk, .rst_n,
    .start(fg_start), .region(rd_pass ? src_q : dst_q), .next(fg_next),
    .valid(fg_valid), .far_maj(fg_maj), .far_min(fg_min),
    .row_first(fg_row_first), .last(fg_last)
  );

  cfg_crc u_crc (
    .clk, .rst_n, .clear(crc_clear), .upd(crc_upd),
    .reg_addr(w.reg_addr), .data(w.data), .crc
  );

  assign busy     = (state != S_IDLE);
  assign ptr_eff  = (!rd_pass && rep_q && fg_row_first) ? 16'd0 : ptr;
  assign overflow = rd_pass ? (32'(ptr_eff) + FRAME_WORDS > OUT_DEPTH)
                            : (32'(ptr_eff) + FRAME_WORDS > (from_out ? OUT_DEPTH : IN_DEPTH));

  // Word offered to the port controller
  always_comb begin
    w        = ctl(W_NOP);
    wr_valid = 1'b0;
    wr_flush = 1'b0;
    unique case (state)
      S_HDR:  begin w = header_word(32'(idx)); wr_valid = 1'b1; end
      S_FCMD: begin
        w        = frame_cmd_word(32'(idx), rd_pass, fg_maj, fg_min);
        wr_valid = 1'b1;
        wr_flush = rd_pass && (idx == 16'(FCMD_LEN - 1));
      end
      S_DATA: begin w = dat(REG_FDRI, pf0, 1'b1); wr_valid = (pf_cnt != 2'd0); end
      S_PAD:  begin w = dat(REG_FDRI, '0, 1'b1); wr_valid = 1'b1; end
      S_TAIL: begin
        w        = tail_word(32'(idx), rd_pass, crc);
        wr_valid = 1'b1;
        wr_flush = (idx == 16'(TAIL_LEN - 1));
      end
      default: ;
    endcase
  end

  assign wr_data   = w.data;
  assign crc_upd   = wr_valid && wr_ready && w.crc;
  assign crc_clear = (state == S_PASS);
  assign fg_start  = (state == S_PASS);

  wire   accepted  = wr_valid && wr_ready;
  wire   frame_end = (state == S_PAD && accepted && idx == 16'(FRAME_WORDS - 1)) ||
                     (state == S_RDATA && rd_done);
  assign fg_next   = frame_end;

  // Prefetch: issue a read while the buffer will still have room after this
  // cycle's pop, counting the read already on its way.
  assign mem_q  = from_out ? out_rdata : in_rdata;
  assign pf_pop = (state == S_DATA) && accepted;
  assign issue  = (state == S_DATA) && iss < 16'(FRAME_WORDS) &&
                  ({1'b0, pf_cnt} + {2'b0, inflight} - {2'b0, pf_pop} < 3'd2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inflight <= 1'b0;
      pf_cnt   <= '0;
      pf0      <= '0;
      pf1      <= '0;
    end else begin
      inflight <= issue;
      unique case ({inflight, pf_pop})
        2'b10: begin
          if (pf_cnt == 2'd0) pf0 <= mem_q;
          else                pf1 <= mem_q;
          pf_cnt <= pf_cnt + 2'd1;
        end
        2'b01: begin
          pf0    <= pf1;
          pf_cnt <= pf_cnt - 2'd1;
        end
        2'b11: begin
          if (pf_cnt == 2'd1) pf0 <= mem_q;
          else begin
            pf0 <= pf1;
            pf1 <= mem_q;
          end
        end
        default: ;
      endcase
    end
  end

  // Memory ports
  assign in_en     = issue && !from_out;
  assign in_addr   = IN_AW'(ptr);
  assign out_en    = (issue && from_out) ||
                     ((state == S_RDATA) && rd_valid && idx >= 16'(FRAME_WORDS));
  assign out_we    = (state == S_RDATA);
  assign out_addr  = OUT_AW'(ptr);
  assign out_wdata = rd_data;

  assign rd_start  = (state == S_RREQ);
  assign rd_count  = 16'(FRAME_XFER);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      op_q      <= OP_WRITE;
      rep_q     <= 1'b0;
      src_q     <= '0;
      dst_q     <= '0;
      pass2     <= 1'b0;
      rd_pass   <= 1'b0;
      from_out  <= 1'b0;
      idx       <= '0;
      ptr       <= '0;
      iss       <= '0;
      done      <= 1'b0;
      error     <= 1'b0;
      frames    <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE:
          if (start) begin
            op_q      <= op;
            rep_q     <= replicate;
            src_q     <= src;
            dst_q     <= dst;
            pass2     <= 1'b0;
            rd_pass   <= (op != OP_WRITE);
            from_out  <= (op == OP_WRITE) && src_sel;
            error     <= 1'b0;
            frames    <= '0;
            state     <= S_PASS;
          end
        S_PASS: begin
          idx   <= '0;
          ptr   <= '0;
          state <= S_HDR;
        end
        S_HDR:
          if (accepted) begin
            idx <= idx + 16'd1;
            if (idx == 16'(HDR_LEN - 1)) begin
              idx   <= '0;
              state <= S_FCHK;
            end
          end
        S_FCHK: begin
          ptr <= ptr_eff;
          if (overflow) begin
            error <= 1'b1;
            state <= S_TAIL;
          end else begin
            state <= S_FCMD;
          end
        end
        S_FCMD:
          if (accepted) begin
            idx <= idx + 16'd1;
            if (idx == 16'(FCMD_LEN - 1)) begin
              idx   <= '0;
              iss   <= '0;
              state <= rd_pass ? S_RREQ : S_DATA;
            end
          end
        S_DATA: begin
          if (issue) begin
            ptr <= ptr + 16'd1;
            iss <= iss + 16'd1;
          end
          if (accepted) begin
            idx <= idx + 16'd1;
            if (idx == 16'(FRAME_WORDS - 1)) begin
              idx   <= '0;
              state <= S_PAD;
            end
          end
        end
        S_PAD:
          if (accepted) begin
            idx <= idx + 16'd1;
            if (frame_end) begin
              idx    <= '0;
              frames <= frames + 16'd1;
              state  <= fg_last ? S_TAIL : S_FCHK;
            end
          end
        S_RREQ:
          if (icap_idle) state <= S_RDATA;
        S_RDATA: begin
          if (rd_valid) begin
            idx <= idx + 16'd1;
            if (idx >= 16'(FRAME_WORDS)) ptr <= ptr + 16'd1;
          end
          if (rd_done) begin
            idx    <= '0;
            frames <= frames + 16'd1;
            state  <= fg_last ? S_TAIL : S_FCHK;
          end
        end
        S_TAIL:
          if (accepted) begin
            idx <= idx + 16'd1;
            if (idx == 16'(TAIL_LEN - 1)) begin
              idx   <= '0;
              state <= S_WAIT;
            end
          end
        S_WAIT:
          if (icap_idle) begin
            if (op_q == OP_COPY && !pass2 && !error) begin
              pass2    <= 1'b1;
              rd_pass  <= 1'b0;
              from_out <= 1'b1;
              state    <= S_PASS;
            end else begin
              done  <= 1'b1;
              state <= S_IDLE;
            end
          end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_far_valid: assert property (@(posedge clk) disable iff (!rst_n)
    state inside {S_FCMD, S_DATA, S_PAD, S_RDATA} |-> fg_valid);

endmodule

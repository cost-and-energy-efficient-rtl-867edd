// icap_ctrl -- state machine that operates the vendor HWICAP core.
//
// The global controller hands this block a stream of 16-bit configuration
// words and, for readback, requests for a number of words coming back out of
// the configuration port. The block turns these into register accesses on the
// HWICAP slave port (IPIF style):
//   write: read the write-FIFO vacancy, push up to that many words into the
//          write FIFO, start the transfer through the control register, poll
//          the status register until the core reports done, repeat. A word
//          flagged wr_flush closes a burst early, so commands that must reach
//          the port before a readback are not held back.
//   read:  write the word count to the size register, start a read through
//          the control register, then repeatedly read the read-FIFO occupancy
//          and drain that many words, until the requested count has arrived;
//          finally poll the status register for done.
// Controlling the core only through its register interface is what keeps the
// engine independent of the core version, as the design intends; the
// particular sequence above is this design's choice.
//
// Interfaces: wr_valid/wr_ready is a valid-ready stream (valid must hold with
// stable data until ready). rd_start with rd_count is a one-cycle request taken
// only while idle; rd_valid marks each returned word, rd_done ends the request.
// IPIF: ip_cs holds with stable address and data until ip_ack; the access
// completes in the ack cycle and ip_rdata is sampled then. With a zero-wait
// slave, words enter the write FIFO at one per clock.
module icap_ctrl
  import s6_device_pkg::*;
  import hwicap_regs_pkg::*;
#(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  // configuration word stream towards the port
  input  logic             wr_valid,
  input  word_t            wr_data,
  input  logic             wr_flush,
  output logic             wr_ready,
  // readback requests and data
  input  logic             rd_start,
  input  logic [CNT_W-1:0] rd_count,
  output logic             rd_valid,
  output word_t            rd_data,
  output logic             rd_done,
  output logic             idle,
  // HWICAP slave port
  output logic             ip_cs,
  output logic             ip_rnw,
  output ip_addr_t         ip_addr,
  output logic [31:0]      ip_wdata,
  input  logic [31:0]      ip_rdata,
  input  logic             ip_ack
);

  typedef enum logic [3:0] {
    S_IDLE, S_WFV, S_FILL, S_GO_W, S_POLL_W, S_SZ, S_GO_R, S_RFO, S_RD, S_POLL_R
  } state_e;

  state_e           state;
  logic [31:0]      vac;    // words still free in the write FIFO
  logic [31:0]      occ;    // words waiting in the read FIFO
  logic [CNT_W-1:0] rem;    // words of the read request still to come

  assign idle = (state == S_IDLE);

  // IPIF request of the current state
  always_comb begin
    ip_cs    = 1'b1;
    ip_rnw   = 1'b1;
    ip_addr  = HW_SR;
    ip_wdata = '0;
    unique case (state)
      S_IDLE:   ip_cs = 1'b0;
      S_WFV:    ip_addr = HW_WFV;
      S_FILL: begin
        ip_cs    = wr_valid;
        ip_rnw   = 1'b0;
        ip_addr  = HW_WF;
        ip_wdata = {16'h0000, wr_data};
      end
      S_GO_W: begin
        ip_rnw   = 1'b0;
        ip_addr  = HW_CR;
        ip_wdata = CR_WRITE;
      end
      S_POLL_W, S_POLL_R: ip_addr = HW_SR;
      S_SZ: begin
        ip_rnw   = 1'b0;
        ip_addr  = HW_SZ;
        ip_wdata = 32'(rem);
      end
      S_GO_R: begin
        ip_rnw   = 1'b0;
        ip_addr  = HW_CR;
        ip_wdata = CR_READ;
      end
      S_RFO:    ip_addr = HW_RFO;
      S_RD:     ip_addr = HW_RF;
      default:  ip_cs = 1'b0;
    endcase
  end

  assign wr_ready = (state == S_FILL) && ip_ack;
  assign rd_valid = (state == S_RD) && ip_ack;
  assign rd_data  = ip_rdata[15:0];
  assign rd_done  = (state == S_POLL_R) && ip_ack && ip_rdata[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      vac   <= '0;
      occ   <= '0;
      rem   <= '0;
    end else begin
      unique case (state)
        S_IDLE:
          if (rd_start && rd_count != '0) begin
            rem   <= rd_count;
            state <= S_SZ;
          end else if (wr_valid) begin
            state <= S_WFV;
          end
        S_WFV:
          if (ip_ack) begin
            vac <= ip_rdata;
            if (ip_rdata != '0) state <= S_FILL;
          end
        S_FILL:
          if (ip_ack) begin
            vac <= vac - 32'd1;
            if (wr_flush || vac == 32'd1) state <= S_GO_W;
          end
        S_GO_W:   if (ip_ack) state <= S_POLL_W;
        S_POLL_W: if (ip_ack && ip_rdata[0]) state <= S_IDLE;
        S_SZ:     if (ip_ack) state <= S_GO_R;
        S_GO_R:   if (ip_ack) state <= S_RFO;
        S_RFO:
          if (ip_ack) begin
            occ <= ip_rdata;
            if (ip_rdata != '0) state <= S_RD;
          end
        S_RD:
          if (ip_ack) begin
            rem <= rem - CNT_W'(1);
            occ <= occ - 32'd1;
            if (rem == CNT_W'(1))      state <= S_POLL_R;
            else if (occ == 32'd1)     state <= S_RFO;
          end
        S_POLL_R: if (ip_ack && ip_rdata[0]) state <= S_IDLE;
        default:  state <= S_IDLE;
      endcase
    end
  end

  // Handshake rules
  a_cs_hold: assert property (@(posedge clk) disable iff (!rst_n)
    ip_cs && !ip_ack && state != S_FILL |=> ip_cs && $stable(ip_addr) && $stable(ip_wdata));
  a_wr_hold: assert property (@(posedge clk) disable iff (!rst_n)
    wr_valid && !wr_ready |=> wr_valid && $stable(wr_data));

endmodule

// bus_regs -- processor-visible registers of the reconfiguration engine.
//
// The processor drives the engine only through these registers: it loads
// frame data into the input memory, sets the coordinates of the source and
// destination regions, starts an operation, watches the status and collects
// readback data from the output memory. Register map (32-bit words, word
// address on bus_addr):
//   0 CTRL     W: bit 0 start, bits 2:1 op (0 write, 1 readback, 2 copy),
//                 bit 3 write source (0 input memory, 1 output memory),
//                 bit 4 replicate one row of frames over every row
//              R: the fields last written (start reads 0)
//   1 STATUS   R: bit 0 busy, bit 1 done (sticky, cleared by start),
//                 bit 2 error, bits 31:16 frames moved by the last operation
//   2 SRC      RW: region {col1, col0, row1, row0}, one byte each
//   3 DST      RW: region, same layout
//   4 IN_PTR   RW: word pointer into the input memory
//   5 IN_DATA  W: store bits 15:0 at IN_PTR; R: word at IN_PTR; both advance IN_PTR
//   6 OUT_PTR  RW: word pointer into the output memory
//   7 OUT_DATA R: word at OUT_PTR, then advances OUT_PTR
// CTRL, SRC and DST ignore writes while busy, so the engine, which runs on
// another clock, may read them directly during an operation.
//
// Bus protocol (a simplified IPIF slave; the layout of the map is this
// design's choice): bus_cs stays high with stable address and data until
// bus_ack; the access takes effect in the first cycle of the request and
// bus_ack with read data follows one cycle later.
module bus_regs
  import s6_device_pkg::*;
  import hwicap_regs_pkg::*;
#(
  parameter int unsigned IN_AW  = 13,
  parameter int unsigned OUT_AW = 13
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor bus
  input  logic              bus_cs,
  input  logic              bus_we,
  input  logic [2:0]        bus_addr,
  input  logic [31:0]       bus_wdata,
  output logic [31:0]       bus_rdata,
  output logic              bus_ack,
  // to and from the engine
  output logic              start,
  output op_e               op,
  output logic              src_sel,
  output logic              replicate,
  output region_t           src,
  output region_t           dst,
  input  logic              done_evt,   // engine finished (already in this clock domain)
  input  logic              error,
  input  logic [15:0]       frames,
  output logic              busy,
  // input memory, read/write port
  output logic              in_en,
  output logic              in_we,
  output logic [IN_AW-1:0]  in_addr,
  output word_t             in_wdata,
  input  word_t             in_rdata,
  // output memory, read port
  output logic              out_en,
  output logic [OUT_AW-1:0] out_addr,
  input  word_t             out_rdata
);

  localparam logic [2:0] A_CTRL = 3'd0, A_STATUS = 3'd1, A_SRC = 3'd2, A_DST = 3'd3,
                         A_IN_PTR = 3'd4, A_IN_DATA = 3'd5, A_OUT_PTR = 3'd6,
                         A_OUT_DATA = 3'd7;

  typedef enum logic [1:0] {RD_REG, RD_IN, RD_OUT} rsel_e;

  logic              take;
  logic              done_q;
  logic [IN_AW-1:0]  in_ptr;
  logic [OUT_AW-1:0] out_ptr;
  logic [31:0]       rdata_q;
  rsel_e             rsel;

  assign take = bus_cs && !bus_ack;

  assign in_en    = take && bus_addr == A_IN_DATA;
  assign in_we    = bus_we;
  assign in_addr  = in_ptr;
  assign in_wdata = bus_wdata[15:0];
  assign out_en   = take && !bus_we && bus_addr == A_OUT_DATA;
  assign out_addr = out_ptr;

  always_comb begin
    unique case (rsel)
      RD_IN:   bus_rdata = {16'h0000, in_rdata};
      RD_OUT:  bus_rdata = {16'h0000, out_rdata};
      default: bus_rdata = rdata_q;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_ack   <= 1'b0;
      start     <= 1'b0;
      op        <= OP_WRITE;
      src_sel   <= 1'b0;
      replicate <= 1'b0;
      src       <= '0;
      dst       <= '0;
      busy      <= 1'b0;
      done_q    <= 1'b0;
      in_ptr    <= '0;
      out_ptr   <= '0;
      rdata_q   <= '0;
      rsel      <= RD_REG;
    end else begin
      bus_ack <= take;
      start   <= 1'b0;
      if (done_evt) begin
        busy   <= 1'b0;
        done_q <= 1'b1;
      end
      if (take) begin
        rsel    <= RD_REG;
        rdata_q <= '0;
        if (bus_we) begin
          unique case (bus_addr)
            A_CTRL:
              if (!busy) begin
                op        <= op_e'(bus_wdata[2:1]);
                src_sel   <= bus_wdata[3];
                replicate <= bus_wdata[4];
                if (bus_wdata[0]) begin
                  start  <= 1'b1;
                  busy   <= 1'b1;
                  done_q <= 1'b0;
                end
              end
            A_SRC:      if (!busy) src <= region_t'(bus_wdata);
            A_DST:      if (!busy) dst <= region_t'(bus_wdata);
            A_IN_PTR:   in_ptr  <= IN_AW'(bus_wdata);
            A_IN_DATA:  in_ptr  <= in_ptr + IN_AW'(1);
            A_OUT_PTR:  out_ptr <= OUT_AW'(bus_wdata);
            default: ;
          endcase
        end else begin
          unique case (bus_addr)
            A_CTRL:     rdata_q <= {27'd0, replicate, src_sel, op, 1'b0};
            A_STATUS:   rdata_q <= {frames, 13'd0, error, done_q, busy};
            A_SRC:      rdata_q <= src;
            A_DST:      rdata_q <= dst;
            A_IN_PTR:   rdata_q <= 32'(in_ptr);
            A_IN_DATA:  begin rsel <= RD_IN;  in_ptr  <= in_ptr + IN_AW'(1);  end
            A_OUT_PTR:  rdata_q <= 32'(out_ptr);
            A_OUT_DATA: begin rsel <= RD_OUT; out_ptr <= out_ptr + OUT_AW'(1); end
            default: ;
          endcase
        end
      end
    end
  end

  a_ack_after_req: assert property (@(posedge clk) disable iff (!rst_n) bus_ack |-> $past(bus_cs));

endmodule

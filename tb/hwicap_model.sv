// hwicap_model -- behavioural model of the vendor HWICAP core, for simulation
// only. It has the core's slave register port (write FIFO, read FIFO, size,
// control, status, vacancy, occupancy) and moves words between its FIFOs and
// the configuration port model at one word every ICAP_DIV clocks, standing in
// for the slower port clock. ack may be delayed by random wait states
// (WAIT_STATES = 1) to exercise the master's handshake.
module hwicap_model #(
  parameter int WF_DEPTH    = 64,
  parameter int RF_DEPTH    = 64,
  parameter int ICAP_DIV    = 3,
  parameter bit WAIT_STATES = 1
) (
  input  logic        clk,
  input  logic        ip_cs,
  input  logic        ip_rnw,
  input  logic [8:0]  ip_addr,
  input  logic [31:0] ip_wdata,
  output logic [31:0] ip_rdata,
  output logic        ip_ack
);

  logic [15:0] wf [$];
  logic [15:0] rf [$];
  bit          wbusy = 0, rbusy = 0;
  int          sz = 0, rd_left = 0, div = 0;
  bit          ack_en = 1;
  logic        icap_we = 0, icap_re;
  logic [15:0] icap_din = '0, icap_dout;
  logic        rd_avail;

  // statistics
  int wf_full_hits = 0, write_starts = 0, read_starts = 0, max_rf = 0;

  s6_cfg_model u_cfg (.clk, .we(icap_we), .din(icap_din), .re(icap_re), .dout(icap_dout),
                      .rd_avail);

  assign ip_ack = ip_cs && ack_en;

  always_comb begin
    case (ip_addr)
      9'h104:  ip_rdata = rf.size() > 0 ? {16'h0, rf[0]} : 32'h0;
      9'h108:  ip_rdata = 32'(sz);
      9'h110:  ip_rdata = {31'h0, !(wbusy || rbusy)};
      9'h114:  ip_rdata = 32'(WF_DEPTH - wf.size());
      9'h118:  ip_rdata = 32'(rf.size());
      default: ip_rdata = 32'h0;
    endcase
  end

  assign icap_re = rbusy && div == 0 && rd_left > 0 && rf.size() < RF_DEPTH;

  always @(posedge clk) begin
    icap_we <= 1'b0;
    ack_en  <= WAIT_STATES ? ($urandom % 4 != 0) : 1'b1;
    div     <= (div == ICAP_DIV - 1) ? 0 : div + 1;
    // transfers towards and from the port
    if (wbusy && div == 0) begin
      if (wf.size() > 0) begin
        icap_we  <= 1'b1;
        icap_din <= wf.pop_front();
      end else wbusy = 0;
    end
    if (icap_re) begin
      rf.push_back(icap_dout);
      rd_left--;
      if (rf.size() > max_rf) max_rf = rf.size();
    end
    if (rbusy && rd_left == 0 && rf.size() == 0) rbusy = 0;
    // slave accesses
    if (ip_cs && ip_ack) begin
      if (!ip_rnw) begin
        case (ip_addr)
          9'h100: begin
            if (wf.size() < WF_DEPTH) wf.push_back(ip_wdata[15:0]);
            if (wf.size() == WF_DEPTH) wf_full_hits++;
          end
          9'h108: sz = int'(ip_wdata);
          9'h10C: begin
            if (ip_wdata[0]) begin wbusy = 1; write_starts++; end
            if (ip_wdata[1]) begin rbusy = 1; rd_left = sz; read_starts++; end
          end
          default: ;
        endcase
      end else if (ip_addr == 9'h104 && rf.size() > 0) begin
        void'(rf.pop_front());
      end
    end
  end

endmodule

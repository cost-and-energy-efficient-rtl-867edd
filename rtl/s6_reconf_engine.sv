// s6_reconf_engine -- hardware reconfiguration engine for Spartan-6 (top).
//
// A peripheral that lets the processor write, read back, relocate, replicate
// and copy rectangular regions of the configuration memory through the
// internal configuration port, while the processor supplies only pure frame
// data and four region coordinates. Inside:
//   bus_regs     processor registers (bus clock)
//   cfg_ram x2   input memory (frames to write) and output memory (readback),
//                dual-clock, decoupling the bus clock from the engine clock
//   reconf_ctrl  global state machine composing the stream from the family
//                packages, with far_gen (frame addresses) and cfg_crc inside
//   icap_ctrl    state machine driving the vendor HWICAP core
// The HWICAP core itself (vendor IP that wraps the ICAP primitive) is outside:
// its slave register port is brought out as the ip_* ports, on clk_cfg.
//
// Clocks: clk_bus for the processor side, clk_cfg for the engine. Start and
// done cross between them as toggle events (cdc_toggle); the operation
// settings are held stable by bus_regs while busy, and error and frames are
// settled two or more clk_cfg cycles before done reaches the bus side, so
// these are read across directly. Both resets are asynchronous, active low,
// and should be released together.
//
// Some output bits never change, by design: ip_wdata[31:16] is always zero
// because the HWICAP slave port is 32 bits wide while Spartan-6 configuration
// words are 16 bits (the core drops the unused half), and ip_addr[8] and
// ip_addr[1:0] are fixed by the core's register map.
module s6_reconf_engine
  import s6_device_pkg::*;
  import hwicap_regs_pkg::*;
#(
  parameter int unsigned IN_DEPTH  = 5120,
  parameter int unsigned OUT_DEPTH = 5120
) (
  // processor side
  input  logic        clk_bus,
  input  logic        rst_bus_n,
  input  logic        bus_cs,
  input  logic        bus_we,
  input  logic [2:0]  bus_addr,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  output logic        bus_ack,
  // engine side and HWICAP slave port
  input  logic        clk_cfg,
  input  logic        rst_cfg_n,
  output logic        ip_cs,
  output logic        ip_rnw,
  output logic [8:0]  ip_addr,
  output logic [31:0] ip_wdata,
  input  logic [31:0] ip_rdata,
  input  logic        ip_ack
);

  localparam int unsigned IN_AW  = $clog2(IN_DEPTH);
  localparam int unsigned OUT_AW = $clog2(OUT_DEPTH);

  // bus side
  logic              b_start, b_done;
  op_e               op;
  logic              src_sel, replicate;
  region_t           src, dst;
  logic              in_en_b, in_we_b;
  logic [IN_AW-1:0]  in_addr_b;
  word_t             in_wdata_b, in_rdata_b;
  logic              out_en_a;
  logic [OUT_AW-1:0] out_addr_a;
  word_t             out_rdata_a;

  // engine side
  logic              c_start, c_done, c_error;
  logic [15:0]       c_frames;
  logic              in_en_a;
  logic [IN_AW-1:0]  in_addr_a;
  word_t             in_rdata_a;
  logic              out_en_b, out_we_b;
  logic [OUT_AW-1:0] out_addr_b;
  word_t             out_wdata_b, out_rdata_b;
  logic              wr_valid, wr_flush, wr_ready;
  word_t             wr_data;
  logic              rd_start, rd_valid, rd_done, icap_idle;
  logic [15:0]       rd_count;
  word_t             rd_data;

  bus_regs #(.IN_AW(IN_AW), .OUT_AW(OUT_AW)) u_regs (
    .clk(clk_bus), .rst_n(rst_bus_n),
    .bus_cs, .bus_we, .bus_addr, .bus_wdata, .bus_rdata, .bus_ack,
    .start(b_start), .op, .src_sel, .replicate, .src, .dst,
    .done_evt(b_done), .error(c_error), .frames(c_frames), .busy(),
    .in_en(in_en_b), .in_we(in_we_b), .in_addr(in_addr_b), .in_wdata(in_wdata_b),
    .in_rdata(in_rdata_b),
    .out_en(out_en_a), .out_addr(out_addr_a), .out_rdata(out_rdata_a)
  );

  cdc_toggle u_start_sync (
    .src_clk(clk_bus), .src_rst_n(rst_bus_n), .src_pulse(b_start),
    .dst_clk(clk_cfg), .dst_rst_n(rst_cfg_n), .dst_pulse(c_start)
  );

  cdc_toggle u_done_sync (
    .src_clk(clk_cfg), .src_rst_n(rst_cfg_n), .src_pulse(c_done),
    .dst_clk(clk_bus), .dst_rst_n(rst_bus_n), .dst_pulse(b_done)
  );

  // input memory: processor writes (port B), engine reads (port A)
  cfg_ram #(.DEPTH(IN_DEPTH)) u_in_mem (
    .clk_b(clk_bus), .en_b(in_en_b), .we_b(in_we_b), .addr_b(in_addr_b),
    .wdata_b(in_wdata_b), .rdata_b(in_rdata_b),
    .clk_a(clk_cfg), .en_a(in_en_a), .addr_a(in_addr_a), .rdata_a(in_rdata_a)
  );

  // output memory: engine writes and reads (port B), processor reads (port A)
  cfg_ram #(.DEPTH(OUT_DEPTH)) u_out_mem (
    .clk_b(clk_cfg), .en_b(out_en_b), .we_b(out_we_b), .addr_b(out_addr_b),
    .wdata_b(out_wdata_b), .rdata_b(out_rdata_b),
    .clk_a(clk_bus), .en_a(out_en_a), .addr_a(out_addr_a), .rdata_a(out_rdata_a)
  );

  reconf_ctrl #(.IN_DEPTH(IN_DEPTH), .OUT_DEPTH(OUT_DEPTH)) u_ctrl (
    .clk(clk_cfg), .rst_n(rst_cfg_n),
    .start(c_start), .op, .src_sel, .replicate, .src, .dst,
    .busy(), .done(c_done), .error(c_error), .frames(c_frames),
    .in_en(in_en_a), .in_addr(in_addr_a), .in_rdata(in_rdata_a),
    .out_en(out_en_b), .out_we(out_we_b), .out_addr(out_addr_b),
    .out_wdata(out_wdata_b), .out_rdata(out_rdata_b),
    .wr_valid, .wr_data, .wr_flush, .wr_ready,
    .rd_start, .rd_count, .rd_valid, .rd_data, .rd_done, .icap_idle
  );

  icap_ctrl u_icap (
    .clk(clk_cfg), .rst_n(rst_cfg_n),
    .wr_valid, .wr_data, .wr_flush, .wr_ready,
    .rd_start, .rd_count, .rd_valid, .rd_data, .rd_done, .idle(icap_idle),
    .ip_cs, .ip_rnw, .ip_addr, .ip_wdata, .ip_rdata, .ip_ack
  );

endmodule

// cdc_toggle -- carries single-cycle events from one clock domain to another.
//
// Every pulse on src_pulse flips a toggle flop in the source domain; the toggle
// crosses through a two-flop synchroniser and each change seen in the
// destination domain becomes a one-cycle dst_pulse, two to three destination
// cycles later. Events must be spaced further apart than that round trip; the
// engine uses it for start and done, which are never that close.
module cdc_toggle (
  input  logic src_clk,
  input  logic src_rst_n,
  input  logic src_pulse,
  input  logic dst_clk,
  input  logic dst_rst_n,
  output logic dst_pulse
);

  logic tgl;
  logic [2:0] sync;

  always_ff @(posedge src_clk or negedge src_rst_n) begin
    if (!src_rst_n)     tgl <= 1'b0;
    else if (src_pulse) tgl <= ~tgl;
  end

  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) sync <= '0;
    else            sync <= {sync[1:0], tgl};
  end

  assign dst_pulse = sync[2] ^ sync[1];

endmodule

// Pulse transfer between two clock domains.
// A one-cycle pulse in the source domain toggles a flag; the destination
// synchronizes the flag through two flops and emits a one-cycle pulse on each
// change.  Source pulses must be at least three destination cycles apart.
// Used to carry the host trigger pulses (start, reset) into the clock domain
// of each controller.
module cdc_pulse (
  input  logic src_clk,
  input  logic src_rst_n,
  input  logic src_pulse,
  input  logic dst_clk,
  input  logic dst_rst_n,
  output logic dst_pulse
);
  logic tog, tog_s, tog_d;
  always_ff @(posedge src_clk or negedge src_rst_n)
    if (!src_rst_n) tog <= 1'b0;
    else if (src_pulse) tog <= ~tog;

  cdc_bit u_sync (.clk(dst_clk), .rst_n(dst_rst_n), .d(tog), .q(tog_s));

  always_ff @(posedge dst_clk or negedge dst_rst_n)
    if (!dst_rst_n) tog_d <= 1'b0;
    else tog_d <= tog_s;

  assign dst_pulse = tog_s ^ tog_d;
endmodule

// Multi-bit word transfer between two clock domains by request/acknowledge.
// The source captures `src_data` into a holding register whenever no
// transfer is in flight and toggles a request flag; the destination
// synchronizes the flag, copies the (by then stable) holding register and
// returns the toggle as acknowledge.  The destination always holds the most
// recent complete word; intermediate source values may be skipped.
// dst_update is high for one cycle together with each new dst_data.
module cdc_word #(
  parameter int unsigned W = 16
) (
  input  logic         src_clk,
  input  logic         src_rst_n,
  input  logic [W-1:0] src_data,
  input  logic         dst_clk,
  input  logic         dst_rst_n,
  output logic [W-1:0] dst_data,
  output logic         dst_update
);
  logic [W-1:0] hold;
  logic req, ack_s, req_s, req_d;

  always_ff @(posedge src_clk or negedge src_rst_n)
    if (!src_rst_n) begin
      hold <= '0;
      req  <= 1'b0;
    end else if (req == ack_s) begin
      hold <= src_data;
      req  <= ~req;
    end

  cdc_bit u_req (.clk(dst_clk), .rst_n(dst_rst_n), .d(req),   .q(req_s));
  cdc_bit u_ack (.clk(src_clk), .rst_n(src_rst_n), .d(req_d), .q(ack_s));

  always_ff @(posedge dst_clk or negedge dst_rst_n)
    if (!dst_rst_n) begin
      req_d      <= 1'b0;
      dst_data   <= '0;
      dst_update <= 1'b0;
    end else begin
      req_d      <= req_s;
      dst_update <= req_s ^ req_d;
      if (req_s != req_d) dst_data <= hold;
    end
endmodule

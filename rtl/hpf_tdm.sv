// Time-shared first-order high-pass filter (removes the board's DC offset).
//
// Direct form II with unit high-frequency numerator gain:
//   w[n] = x[n] + alpha * w[n-1],   y[n] = w[n] - w[n-1]
// i.e. H(z) = (1 - z^-1) / (1 - alpha z^-1), alpha = (f_s - pi f_p)/(f_s + pi f_p)
// in signed 1.15 format (only 0 <= alpha < 1 is meaningful: poles from about
// 3 Hz to f_s/pi).  w needs IN_W + 15 = 31 bits (low-frequency gain up to
// 2^15); the 47-bit product alpha*w is truncated to 31 bits by dropping its
// duplicate sign bit and its 15 fraction bits (floor).  The high-frequency
// gain is 2/(1+alpha) <= 2, so y has IN_W + 1 = 17 bits; it is saturated to
// that range to guard against truncation excursions.
// One filter serves N_CH channels: every in_valid carries a channel number
// and the per-channel state w[n-1] is kept in a small memory.  Result one
// clock later on out_valid/out_ch/out_data.  The recursion, widths and
// truncation follow the description; the saturation is this design's choice.
module hpf_tdm #(
  parameter int unsigned N_CH   = 16,
  parameter int unsigned IN_W   = 16,
  parameter int unsigned COEF_W = 16,
  parameter int unsigned GUARD  = 15
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic signed [COEF_W-1:0]     alpha,
  input  logic                         in_valid,
  input  logic [$clog2(N_CH)-1:0]      in_ch,
  input  logic signed [IN_W-1:0]       in_data,
  output logic                         out_valid,
  output logic [$clog2(N_CH)-1:0]      out_ch,
  output logic signed [IN_W:0]         out_data
);
  localparam int unsigned W_W = IN_W + GUARD;
  localparam int unsigned P_W = W_W + COEF_W;

  logic signed [W_W-1:0] w_mem [N_CH];
  logic signed [W_W-1:0] w_prev, w_new;
  logic signed [P_W-1:0] prod;
  logic signed [W_W:0]   diff;

  localparam logic signed [W_W:0] Y_MAX = (W_W+1)'((1 << IN_W) - 1);
  localparam logic signed [W_W:0] Y_MIN = -(W_W+1)'(1 << IN_W);

  always_comb begin
    w_prev = w_mem[in_ch];
    prod   = w_prev * alpha;
    w_new  = W_W'(in_data) + prod[P_W-2 -: W_W];
    diff   = (W_W+1)'(w_new) - (W_W+1)'(w_prev);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_CH; i++) w_mem[i] <= '0;
      out_valid <= 1'b0;
      out_ch    <= '0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        w_mem[in_ch] <= w_new;
        out_ch       <= in_ch;
        if (diff > Y_MAX)      out_data <= Y_MAX[IN_W:0];
        else if (diff < Y_MIN) out_data <= Y_MIN[IN_W:0];
        else                   out_data <= diff[IN_W:0];
      end
    end
  end
endmodule

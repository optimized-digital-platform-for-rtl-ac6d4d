// Time-shared first-order low-pass filter (sets the lock-in bandwidth).
//
// Direct form II with unit numerator gain:
//   w[n] = x[n] + alpha * w[n-1],   y[n] = (w[n] + w[n-1]) / 2
// i.e. H(z) = (1 + z^-1) / (1 - alpha z^-1), alpha in signed 1.15 (0 <= alpha
// < 1: poles from about 3 Hz to f_s/pi).  The DC gain 2/(1-alpha) reaches 2^16,
// so w needs IN_W + 15 = 32 bits and w[n] + w[n-1] 33 bits; the sum is shifted
// right by one (its minimum gain of 2) to give a 32-bit result.  The 48-bit
// product is truncated like in the high-pass filter (duplicate sign bit and
// 15 fraction bits dropped).
// One filter serves N_CH channels with per-channel state; result one clock
// after in_valid.  Everything here follows the description.
module lpf_tdm #(
  parameter int unsigned N_CH   = 16,
  parameter int unsigned IN_W   = 17,
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
  output logic signed [IN_W+GUARD-1:0] out_data
);
  localparam int unsigned W_W = IN_W + GUARD;
  localparam int unsigned P_W = W_W + COEF_W;

  logic signed [W_W-1:0] w_mem [N_CH];
  logic signed [W_W-1:0] w_prev, w_new;
  logic signed [P_W-1:0] prod;
  logic signed [W_W:0]   sum;

  always_comb begin
    w_prev = w_mem[in_ch];
    prod   = w_prev * alpha;
    w_new  = W_W'(in_data) + prod[P_W-2 -: W_W];
    sum    = (W_W+1)'(w_new) + (W_W+1)'(w_prev);
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
        out_data     <= sum[W_W:1];
      end
    end
  end
endmodule

// Time-shared decimating comb (Hogenauer) notch filter.
//
// Per channel: an integrator at the input rate, I[n] = I[n-1] + x[n]; every
// D-th sample the integrator value enters a comb that subtracts the value
// stored M decimated samples earlier, y[k] = I[kD] - I[(k-M)D].  That equals
// the sum of the last D*M inputs: a D*M-point moving average with notches at
// multiples of f_s/(D*M) (625 kS/s / 512 = 1.22 kHz with D = 8, M = 64),
// which removes the residual mixer harmonics, at a D times lower output rate
// and with M instead of D*M stored words.  The integrator and comb use
// IN_W + log2(D*M) bits with wrap-around arithmetic, which is exact for this
// structure; the result is shifted right by log2(D*M) (D and M powers of two)
// so that the filter has unit DC gain and a 32-bit output.
// One filter serves N_CH channels; the comb words live in one memory of
// N_CH*M entries.  After reset the memory is cleared, one word per clock
// (N_CH*M clocks, `ready` low); inputs are ignored meanwhile.  A result
// appears one clock after every D-th input of a channel.  D, M and the
// structure follow the description; the clearing sweep and the shift by
// log2(D*M) are this design's reading of it.
module cic_tdm #(
  parameter int unsigned N_CH = 16,
  parameter int unsigned IN_W = 32,
  parameter int unsigned D    = 8,
  parameter int unsigned M    = 64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  output logic                     ready,
  input  logic                     in_valid,
  input  logic [$clog2(N_CH)-1:0]  in_ch,
  input  logic signed [IN_W-1:0]   in_data,
  output logic                     out_valid,
  output logic [$clog2(N_CH)-1:0]  out_ch,
  output logic signed [IN_W-1:0]   out_data
);
  localparam int unsigned SH    = $clog2(D * M);
  localparam int unsigned ACC_W = IN_W + SH;
  localparam int unsigned CH_W  = $clog2(N_CH);
  localparam int unsigned MA_W  = $clog2(M);
  localparam int unsigned DA_W  = (D > 1) ? $clog2(D) : 1;
  localparam int unsigned MEM_N = N_CH * M;

  logic signed [ACC_W-1:0] integ [N_CH];
  logic [DA_W-1:0]         dcnt  [N_CH];
  logic [MA_W-1:0]         wptr  [N_CH];
  logic signed [ACC_W-1:0] comb_mem [MEM_N];

  logic [$clog2(MEM_N)-1:0] clr_addr;
  logic clearing;

  logic signed [ACC_W-1:0] i_new, old, diff;
  logic [$clog2(MEM_N)-1:0] addr;
  logic dec_now;

  always_comb begin
    i_new   = integ[in_ch] + ACC_W'(in_data);
    addr    = {in_ch, wptr[in_ch]};
    old     = comb_mem[addr];
    diff    = i_new - old;
    dec_now = (dcnt[in_ch] == DA_W'(D - 1)) || (D == 1);
  end

  assign ready = !clearing;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_CH; i++) begin
        integ[i] <= '0;
        dcnt[i]  <= '0;
        wptr[i]  <= '0;
      end
      clearing  <= 1'b1;
      clr_addr  <= '0;
      out_valid <= 1'b0;
      out_ch    <= '0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (clearing) begin
        clr_addr <= clr_addr + 1'b1;
        if (clr_addr == ($clog2(MEM_N))'(MEM_N - 1)) clearing <= 1'b0;
      end else if (in_valid) begin
        integ[in_ch] <= i_new;
        dcnt[in_ch]  <= dec_now ? '0 : dcnt[in_ch] + 1'b1;
        if (dec_now) begin
          wptr[in_ch] <= wptr[in_ch] + 1'b1;
          out_valid   <= 1'b1;
          out_ch      <= in_ch;
          out_data    <= diff[ACC_W-1 -: IN_W];
        end
      end
    end
  end

  // comb memory: one write port (clear sweep or decimated sample)
  always_ff @(posedge clk) begin
    if (clearing)                comb_mem[clr_addr] <= '0;
    else if (in_valid && dec_now) comb_mem[addr]    <= i_new;
  end
endmodule

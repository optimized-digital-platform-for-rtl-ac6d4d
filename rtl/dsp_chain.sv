// Time-multiplexed lock-in processing of all acquisition channels.
//
// For every ADC sample period (625 kS/s) the N_CH samples are processed one
// channel per clock (40 MHz): 16 channels take 16 clocks plus a few of
// pipeline, far below the 64 clocks of a sample period, so one set of
// arithmetic serves every channel and only the filter states are per channel.
// Per channel:
//   HPF (offset removal) -> four square-wave mixers ->
//   four LPFs (lock-in bandwidth) -> four CIC notch filters (optional).
// Path 0/1 mix with the in-phase/quadrature references at f_mid (real and
// imaginary part of the sensor admittance), path 2/3 with the references at
// f_mid - f_dith (the dither tone, i.e. the slope of the device response).
// The reference bits are sampled at the ADC sampling instant (conv_start) and
// pass through ref_delay, clocked by data_ready, so that each sample meets the
// reference value of its own sampling instant.  With cic_en low the CIC stage
// is bypassed and every LPF result is delivered (625 kS/s per channel);
// with cic_en high one result in D is delivered.  All four paths of a channel
// are delivered in the same clock on res_valid/res_ch/res_data.
// The chain, its order and the widths follow the description; the schedule
// and the bypass switch (the "sinc" option of the host software) are this
// design's.
module dsp_chain
  import helios_pkg::*;
#(
  parameter int unsigned N_CH      = 16,
  parameter int unsigned CIC_D     = 8,
  parameter int unsigned CIC_M     = 64,
  parameter int unsigned REF_DEPTH = 1
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic signed [COEF_W-1:0]          alpha_hpf,
  input  logic signed [COEF_W-1:0]          alpha_lpf,
  input  logic                              cic_en,
  input  logic                              conv_start,
  input  logic                              data_ready,
  input  logic [N_CH-1:0][ADC_W-1:0]        samples,
  input  logic [N_PATH-1:0]                 refs,      // {dith_q, dith_i, mid_q, mid_i}
  output logic                              ready,
  output logic                              res_valid,
  output logic [$clog2(N_CH)-1:0]           res_ch,
  output logic [N_PATH-1:0][RES_W-1:0]      res_data,
  output logic [N_PATH-1:0]                 refs_used
);
  localparam int unsigned CH_W = $clog2(N_CH);

  // ---- sequencer ------------------------------------------------------
  logic [N_CH-1:0][ADC_W-1:0] buf_s;
  logic [CH_W-1:0] seq_ch;
  logic            seq_busy;
  logic [N_PATH-1:0] ref_cap, ref_now;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_s    <= '0;
      seq_ch   <= '0;
      seq_busy <= 1'b0;
      ref_cap  <= '0;
    end else begin
      if (conv_start) ref_cap <= refs;
      if (data_ready) begin
        buf_s    <= samples;
        seq_ch   <= '0;
        seq_busy <= 1'b1;
      end else if (seq_busy) begin
        seq_ch <= seq_ch + 1'b1;
        if (seq_ch == CH_W'(N_CH - 1)) seq_busy <= 1'b0;
      end
    end
  end

  ref_delay #(.W(N_PATH), .DEPTH(REF_DEPTH)) u_ref (
    .clk, .rst_n, .shift(data_ready), .d(ref_cap), .q(ref_now));
  assign refs_used = ref_now;

  // ---- HPF ------------------------------------------------------------
  logic                      h_valid;
  logic [CH_W-1:0]           h_ch;
  logic signed [HPF_OUT_W-1:0] h_data;

  hpf_tdm #(.N_CH(N_CH), .IN_W(ADC_W), .COEF_W(COEF_W)) u_hpf (
    .clk, .rst_n, .alpha(alpha_hpf),
    .in_valid(seq_busy), .in_ch(seq_ch), .in_data(buf_s[seq_ch]),
    .out_valid(h_valid), .out_ch(h_ch), .out_data(h_data));

  // ---- mixers, LPFs, CICs --------------------------------------------
  logic [N_PATH-1:0]                 l_valid, c_valid, c_ready;
  logic [N_PATH-1:0][CH_W-1:0]       l_ch, c_ch;
  logic [N_PATH-1:0][RES_W-1:0]      l_data, c_data;

  for (genvar p = 0; p < N_PATH; p++) begin : g_path
    logic signed [HPF_OUT_W-1:0] m_data;
    logic signed [RES_W-1:0]     lo, co;

    sq_mixer #(.W(HPF_OUT_W)) u_mix (.in_data(h_data), .ref_bit(ref_now[p]), .out_data(m_data));

    lpf_tdm #(.N_CH(N_CH), .IN_W(HPF_OUT_W), .COEF_W(COEF_W), .GUARD(RES_W - HPF_OUT_W)) u_lpf (
      .clk, .rst_n, .alpha(alpha_lpf),
      .in_valid(h_valid), .in_ch(h_ch), .in_data(m_data),
      .out_valid(l_valid[p]), .out_ch(l_ch[p]), .out_data(lo));
    assign l_data[p] = lo;

    cic_tdm #(.N_CH(N_CH), .IN_W(RES_W), .D(CIC_D), .M(CIC_M)) u_cic (
      .clk, .rst_n, .ready(c_ready[p]),
      .in_valid(l_valid[p] && cic_en), .in_ch(l_ch[p]), .in_data(lo),
      .out_valid(c_valid[p]), .out_ch(c_ch[p]), .out_data(co));
    assign c_data[p] = co;
  end

  assign ready = &c_ready;

  always_comb begin
    if (cic_en) begin
      res_valid = c_valid[0];
      res_ch    = c_ch[0];
      res_data  = c_data;
    end else begin
      res_valid = l_valid[0];
      res_ch    = l_ch[0];
      res_data  = l_data;
    end
  end
endmodule

// Stimulation chain controller (clock: 160 MHz DDS clock).
//
// Generates every wave the lock-in needs, all from one start so that their
// phases are related:
//   * stimulus DDS -> 14-bit word for the parallel high-speed DAC (phase 0);
//   * on-chip demodulation DDS at pinc_stim - pinc_mid (so the ASIC output sits
//     at the intermediate frequency f_mid), programmable phase offset; the MSBs
//     of its sine and cosine are the quadrature square waves for the ASIC mixer;
//   * intermediate-frequency DDS at pinc_mid with programmable phase offset; the
//     MSBs of its cosine and sine are the in-phase and quadrature references of
//     the digital mixers;
//   * dither-demodulation DDS, advanced once every 32 clocks (the 5 MHz rate of
//     the dither synthesizers, an exact submultiple of 160 MHz), at
//     pinc_ddem = 32*pinc_mid +/- pinc_dith as computed by the host.
// A start trigger copies the phase increments and offsets into the DDSs,
// releases them together and wakes the DAC (sleep low).  A reset trigger stops
// and resets the DDSs and puts the DAC to sleep.  enable_stimulus forces the
// DAC to mid-scale (zero output) and enable_demod forces the ASIC square waves
// to zero while the DDSs keep running.  dith_step is the 1-in-32 enable shared
// with the heater dither synthesizers.
// Timing: as on the described board, the DAC word and sleep are updated on the
// falling clock edge so that the DAC, clocked by the rising edge, samples a
// stable word.  The DAC takes straight binary: the signed sine is converted by
// inverting its MSB.  Computing pinc_stim - pinc_mid in hardware, the output
// encoding and the reference bit polarity are this design's choices.
module stim_ctrl #(
  parameter int unsigned PHASE_W  = 16,
  parameter int unsigned OUT_W    = 14,
  parameter int unsigned DITH_DIV = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               reset,
  input  logic [PHASE_W-1:0] pinc_stim,
  input  logic [PHASE_W-1:0] pinc_mid,
  input  logic [PHASE_W-1:0] poff_dem,
  input  logic [PHASE_W-1:0] poff_mid,
  input  logic [PHASE_W-1:0] pinc_ddem,
  input  logic [PHASE_W-1:0] poff_ddem,
  input  logic               enable_stimulus,
  input  logic               enable_demod,
  // parallel DAC
  output logic [OUT_W-1:0]   dac_db,
  output logic               dac_sleep,
  // ASIC mixer square waves
  output logic               demod_out,
  output logic               demod_quad_out,
  // digital demodulation references (1 = invert)
  output logic               ref_mid_i,
  output logic               ref_mid_q,
  output logic               ref_dith_i,
  output logic               ref_dith_q,
  output logic               dith_step,
  output logic               running
);

  typedef enum logic [0:0] {S_IDLE, S_RUN} state_t;
  state_t state;

  logic [PHASE_W-1:0] inc_stim, inc_dem, inc_mid, inc_ddem, off_dem, off_mid, off_ddem;
  logic [$clog2(DITH_DIV)-1:0] div_cnt;
  logic dds_rst_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      inc_stim <= '0; inc_dem <= '0; inc_mid <= '0; inc_ddem <= '0;
      off_dem  <= '0; off_mid <= '0; off_ddem <= '0;
      div_cnt  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start && !reset) begin
          inc_stim <= pinc_stim;
          inc_mid  <= pinc_mid;
          inc_dem  <= pinc_stim - pinc_mid;
          inc_ddem <= pinc_ddem;
          off_dem  <= poff_dem;
          off_mid  <= poff_mid;
          off_ddem <= poff_ddem;
          div_cnt  <= '0;
          state    <= S_RUN;
        end
        S_RUN: begin
          div_cnt <= (32'(div_cnt) == DITH_DIV - 1) ? '0 : div_cnt + 1'b1;
          if (reset) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign running   = (state == S_RUN);
  assign dds_rst_n = running;
  assign dith_step = running && (div_cnt == 0);

  logic signed [OUT_W-1:0] stim_s, stim_c, dem_s, dem_c, mid_s, mid_c, dd_s, dd_c;
  logic v_stim, v_dem, v_mid, v_dd;
  logic [PHASE_W-1:0] a_stim, a_dem, a_mid, a_dd;

  dds #(.PHASE_W(PHASE_W), .OUT_W(OUT_W)) u_dds_stim (
    .aclk(clk), .aresetn(dds_rst_n), .aclken(1'b1), .step(1'b1),
    .pinc(inc_stim), .poff('0), .sine(stim_s), .cosine(stim_c), .tvalid(v_stim), .phase_acc(a_stim));
  dds #(.PHASE_W(PHASE_W), .OUT_W(OUT_W)) u_dds_demod (
    .aclk(clk), .aresetn(dds_rst_n), .aclken(1'b1), .step(1'b1),
    .pinc(inc_dem), .poff(off_dem), .sine(dem_s), .cosine(dem_c), .tvalid(v_dem), .phase_acc(a_dem));
  dds #(.PHASE_W(PHASE_W), .OUT_W(OUT_W)) u_dds_mid (
    .aclk(clk), .aresetn(dds_rst_n), .aclken(1'b1), .step(1'b1),
    .pinc(inc_mid), .poff(off_mid), .sine(mid_s), .cosine(mid_c), .tvalid(v_mid), .phase_acc(a_mid));
  dds #(.PHASE_W(PHASE_W), .OUT_W(OUT_W)) u_dds_ddem (
    .aclk(clk), .aresetn(dds_rst_n), .aclken(1'b1), .step(dith_step),
    .pinc(inc_ddem), .poff(off_ddem), .sine(dd_s), .cosine(dd_c), .tvalid(v_dd), .phase_acc(a_dd));

  // falling-edge output stage towards the DAC
  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dac_db    <= {1'b1, {(OUT_W-1){1'b0}}};
      dac_sleep <= 1'b1;
    end else begin
      dac_sleep <= !running;
      dac_db    <= (enable_stimulus && v_stim) ? {~stim_s[OUT_W-1], stim_s[OUT_W-2:0]}
                                               : {1'b1, {(OUT_W-1){1'b0}}};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      demod_out <= 1'b0; demod_quad_out <= 1'b0;
      ref_mid_i <= 1'b0; ref_mid_q <= 1'b0; ref_dith_i <= 1'b0; ref_dith_q <= 1'b0;
    end else begin
      demod_out      <= enable_demod && v_dem && dem_s[OUT_W-1];
      demod_quad_out <= enable_demod && v_dem && dem_c[OUT_W-1];
      ref_mid_i      <= v_mid && mid_c[OUT_W-1];
      ref_mid_q      <= v_mid && mid_s[OUT_W-1];
      ref_dith_i     <= v_dd && dd_c[OUT_W-1];
      ref_dith_q     <= v_dd && dd_s[OUT_W-1];
    end
  end

endmodule

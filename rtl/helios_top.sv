// FPGA design of a multichannel readout-and-actuation board for integrated
// photonic circuits with contactless (CLIPP) light sensors.
//
// Chains (see the README for the signal flow):
//   * host parameter memory and trigger fan-out (40 MHz domain);
//   * stimulation: stimulus, on-chip-demodulation, intermediate-frequency and
//     dither-demodulation synthesizers (160 MHz), second fast sine chain;
//   * acquisition: 16 serial ADCs at 625 kS/s, PGA gain shift register;
//   * processing: time-shared HPF, square-wave mixers, LPFs, CIC notch
//     filters for 16 channels x 4 paths, per-stream result FIFOs;
//   * actuation: 4 heater-DAC chips x 4 channels, DC + dither words, serial
//     programming at 27 MHz, heater summing-switch shift registers;
//   * ASIC control: multiplexer selects, mixer square waves, bias DAC.
// Clocks: clk_160 (synthesizers, stimulus DACs), clk_40 (ADCs, processing,
// host side, slow serial devices), clk_27 (heater DACs).  rst_n is an
// asynchronous reset, released synchronously in each domain.  Host triggers
// are one-clock pulses in the clk_40 domain, numbered in helios_pkg; they
// reach the other domains through pulse synchronizers.  Parameters are
// quasi-static: the host sets them before starting a chain (the stimulation
// controllers copy them at start).  The overall partition follows the
// described board; the clocking of the host side at 40 MHz, the register map
// and the crossings are this design's choices.
module helios_top
  import helios_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 256,
  parameter int unsigned CIC_D      = 8,
  parameter int unsigned CIC_M      = 64
) (
  input  logic                       clk_160,
  input  logic                       clk_40,
  input  logic                       clk_27,
  input  logic                       rst_n,
  // host side (clk_40)
  input  logic [REG_W-1:0]           host_wire_data,
  input  logic [REG_W-1:0]           host_wire_addr,
  input  logic                       host_trig_write,
  input  logic [N_TRIG-1:0]          host_trig,
  input  logic [5:0]                 pipe_sel,
  input  logic                       pipe_rd,
  input  logic                       pipe_clr,
  output logic [RES_W-1:0]           pipe_data,
  output logic                       pipe_empty,
  output logic [$clog2(FIFO_DEPTH):0] pipe_count,
  output logic                       pipe_overflow,
  output logic [7:0]                 status,
  // ADCs
  output logic                       adc_sck,
  output logic                       adc_cnv,
  input  logic [N_ADC-1:0]           adc_sdo,
  // stimulus DAC (chain 1) and fast dither DAC (chain 2)
  output logic                       stim_dac_clk,
  output logic [STIM_W-1:0]          stim_dac_db,
  output logic                       stim_dac_sleep,
  output logic                       fast_dac_clk,
  output logic [STIM_W-1:0]          fast_dac_db,
  output logic                       fast_dac_sleep,
  // ASIC
  output logic                       asic_demod_i,
  output logic                       asic_demod_q,
  output logic [11:0]                asic_mux_sel,
  output logic                       bias_sclk,
  output logic                       bias_sync_n,
  output logic                       bias_sdin,
  output logic                       bias_rst_n,
  // stimulus amplitude digital potentiometer
  output logic                       pot_sclk,
  output logic                       pot_cs_n,
  output logic                       pot_sdi,
  output logic                       pot_rst_n,
  // PGA gain shift register
  output logic                       pga_srclk,
  output logic                       pga_ser,
  output logic                       pga_load,
  output logic                       pga_srclr_n,
  // heater summing-switch shift registers (two chained)
  output logic                       sw_srclk,
  output logic                       sw_ser,
  output logic                       sw_load,
  output logic                       sw_srclr_n,
  // heater DACs
  output logic [N_ACT_CHIP-1:0]      act_sclk,
  output logic [N_ACT_CHIP-1:0]      act_sync_n,
  output logic [N_ACT_CHIP-1:0]      act_sdin
);

  // ---- resets ---------------------------------------------------------
  logic rst160_n, rst40_n, rst27_n;
  cdc_bit u_rs160 (.clk(clk_160), .rst_n, .d(1'b1), .q(rst160_n));
  cdc_bit u_rs40  (.clk(clk_40),  .rst_n, .d(1'b1), .q(rst40_n));
  cdc_bit u_rs27  (.clk(clk_27),  .rst_n, .d(1'b1), .q(rst27_n));

  // ---- host parameter memory -----------------------------------------
  logic [N_REGS-1:0][REG_W-1:0] regs;
  host_regfile u_regs (.clk(clk_40), .rst_n(rst40_n), .wire_data(host_wire_data),
    .wire_addr(host_wire_addr), .trig_write(host_trig_write), .regs);

  // triggers into the 160 MHz and 27 MHz domains
  logic stim_start, stim_reset, fast_start, fast_reset, act_start, act_reset;
  cdc_pulse u_t0 (.src_clk(clk_40), .src_rst_n(rst40_n), .src_pulse(host_trig[T_STIM_START]),
                  .dst_clk(clk_160), .dst_rst_n(rst160_n), .dst_pulse(stim_start));
  cdc_pulse u_t1 (.src_clk(clk_40), .src_rst_n(rst40_n), .src_pulse(host_trig[T_STIM_RESET]),
                  .dst_clk(clk_160), .dst_rst_n(rst160_n), .dst_pulse(stim_reset));
  cdc_pulse u_t2 (.src_clk(clk_40), .src_rst_n(rst40_n), .src_pulse(host_trig[T_FAST_START]),
                  .dst_clk(clk_160), .dst_rst_n(rst160_n), .dst_pulse(fast_start));
  cdc_pulse u_t3 (.src_clk(clk_40), .src_rst_n(rst40_n), .src_pulse(host_trig[T_FAST_RESET]),
                  .dst_clk(clk_160), .dst_rst_n(rst160_n), .dst_pulse(fast_reset));
  cdc_pulse u_t4 (.src_clk(clk_40), .src_rst_n(rst40_n), .src_pulse(host_trig[T_ACT_START]),
                  .dst_clk(clk_27), .dst_rst_n(rst27_n), .dst_pulse(act_start));
  cdc_pulse u_t5 (.src_clk(clk_40), .src_rst_n(rst40_n), .src_pulse(host_trig[T_ACT_RESET]),
                  .dst_clk(clk_27), .dst_rst_n(rst27_n), .dst_pulse(act_reset));

  logic en_stim_160, en_demod_160;
  cdc_bit u_c0 (.clk(clk_160), .rst_n(rst160_n), .d(regs[R_CTRL][C_EN_STIM]),  .q(en_stim_160));
  cdc_bit u_c1 (.clk(clk_160), .rst_n(rst160_n), .d(regs[R_CTRL][C_EN_DEMOD]), .q(en_demod_160));

  // ---- stimulation chains (160 MHz) ---------------------------------
  logic ref_mid_i, ref_mid_q, ref_dith_i, ref_dith_q, dith_step, stim_running, fast_running;

  stim_ctrl u_stim (
    .clk(clk_160), .rst_n(rst160_n), .start(stim_start), .reset(stim_reset),
    .pinc_stim(regs[R_PINC_STIM]), .pinc_mid(regs[R_PINC_MID]),
    .poff_dem(regs[R_POFF_DEM]), .poff_mid(regs[R_POFF_MID]),
    .pinc_ddem(regs[R_PINC_DDEM]), .poff_ddem(regs[R_POFF_DDEM]),
    .enable_stimulus(en_stim_160), .enable_demod(en_demod_160),
    .dac_db(stim_dac_db), .dac_sleep(stim_dac_sleep),
    .demod_out(asic_demod_i), .demod_quad_out(asic_demod_q),
    .ref_mid_i, .ref_mid_q, .ref_dith_i, .ref_dith_q, .dith_step, .running(stim_running));
  assign stim_dac_clk = clk_160;

  fast_dith_ctrl u_fast (
    .clk(clk_160), .rst_n(rst160_n), .start(fast_start), .reset(fast_reset),
    .pinc(regs[R_PINC_FAST]), .dac_db(fast_dac_db), .dac_sleep(fast_dac_sleep),
    .running(fast_running));
  assign fast_dac_clk = clk_160;

  // ---- acquisition (40 MHz) --------------------------------------------
  logic adc_hrst_q, adc_hrst_n;
  always_ff @(posedge clk_40 or negedge rst40_n)
    if (!rst40_n) adc_hrst_q <= 1'b1;
    else          adc_hrst_q <= !host_trig[T_ADC_RESET];
  assign adc_hrst_n = rst40_n && adc_hrst_q;

  logic [N_ADC-1:0][ADC_W-1:0] samples;
  logic data_ready, conv_start, adc_running;
  adc_ctrl #(.N_ADC(N_ADC), .ADC_W(ADC_W)) u_adc (
    .clk(clk_40), .hard_rst_n(adc_hrst_n), .start(host_trig[T_ADC_START]), .stop(host_trig[T_ADC_STOP]),
    .sck(adc_sck), .cnv(adc_cnv), .sdo(adc_sdo), .samples, .data_ready, .conv_start,
    .running(adc_running));

  logic [N_PATH-1:0] refs_40;
  cdc_bit u_r0 (.clk(clk_40), .rst_n(rst40_n), .d(ref_mid_i),  .q(refs_40[0]));
  cdc_bit u_r1 (.clk(clk_40), .rst_n(rst40_n), .d(ref_mid_q),  .q(refs_40[1]));
  cdc_bit u_r2 (.clk(clk_40), .rst_n(rst40_n), .d(ref_dith_i), .q(refs_40[2]));
  cdc_bit u_r3 (.clk(clk_40), .rst_n(rst40_n), .d(ref_dith_q), .q(refs_40[3]));

  sr595_ctrl #(.N_BITS(8)) u_pga (
    .clk(clk_40), .rst_n(rst40_n), .start(host_trig[T_PGA_START]), .reset(host_trig[T_PGA_RESET]),
    .data_in(regs[R_PGA_GAIN][7:0]), .srclk(pga_srclk), .ser(pga_ser), .load_data(pga_load),
    .srclr_n(pga_srclr_n), .busy());

  // ---- processing (40 MHz) ---------------------------------------------
  logic res_valid, dsp_ready;
  logic [3:0] res_ch;
  logic [N_PATH-1:0][RES_W-1:0] res_data;
  logic [N_PATH-1:0] refs_used;

  dsp_chain #(.N_CH(N_ADC), .CIC_D(CIC_D), .CIC_M(CIC_M)) u_dsp (
    .clk(clk_40), .rst_n(rst40_n),
    .alpha_hpf(regs[R_ALPHA_HPF]), .alpha_lpf(regs[R_ALPHA_LPF]), .cic_en(regs[R_CTRL][C_CIC_EN]),
    .conv_start, .data_ready, .samples, .refs(refs_40), .ready(dsp_ready),
    .res_valid, .res_ch, .res_data, .refs_used);

  logic kept;
  result_buffer #(.N_CH(N_ADC), .FIFO_DEPTH(FIFO_DEPTH)) u_buf (
    .clk(clk_40), .rst_n(rst40_n), .clr(pipe_clr), .decim(regs[R_USB_DECIM]),
    .res_valid, .res_ch, .res_data, .rd_sel(pipe_sel), .rd_en(pipe_rd),
    .rd_data(pipe_data), .rd_empty(pipe_empty), .rd_count(pipe_count),
    .overflow(pipe_overflow), .kept);

  // ---- ASIC control and stimulus amplitude (40 MHz) ----------------------
  always_ff @(posedge clk_40 or negedge rst40_n)
    if (!rst40_n) asic_mux_sel <= '0;
    else          asic_mux_sel <= regs[R_ASIC_MUX][11:0];

  spi_tx #(.WORD_W(24), .LAUNCH_NEGEDGE(1'b0)) u_bias (
    .clk(clk_40), .rst_n(rst40_n), .start(host_trig[T_BIAS_START]), .reset(host_trig[T_BIAS_RESET]),
    .word({regs[R_BIAS_HI][7:0], regs[R_BIAS_LO]}), .sclk(bias_sclk), .sync_n(bias_sync_n),
    .sdin(bias_sdin), .dev_rst_n(bias_rst_n), .busy(), .done());

  spi_tx #(.WORD_W(24), .LAUNCH_NEGEDGE(1'b1)) u_pot (
    .clk(clk_40), .rst_n(rst40_n), .start(host_trig[T_POT_START]), .reset(host_trig[T_POT_RESET]),
    .word({regs[R_POT_HI][7:0], regs[R_POT_LO]}), .sclk(pot_sclk), .sync_n(pot_cs_n),
    .sdin(pot_sdi), .dev_rst_n(pot_rst_n), .busy(), .done());

  // ---- actuation ------------------------------------------------------
  sr595_ctrl #(.N_BITS(16)) u_sw (
    .clk(clk_40), .rst_n(rst40_n), .start(host_trig[T_SW_START]), .reset(host_trig[T_SW_RESET]),
    .data_in(regs[R_SWITCHES]), .srclk(sw_srclk), .ser(sw_ser), .load_data(sw_load),
    .srclr_n(sw_srclr_n), .busy());

  logic [N_ACT_CHIP-1:0] act_running, act_frame;
  for (genvar c = 0; c < N_ACT_CHIP; c++) begin : g_act
    logic [3:0][HEATER_W-1:0] dc, amp;
    logic [3:0][PHASE_W-1:0]  pinc;
    logic [3:0]               den;
    for (genvar k = 0; k < 4; k++) begin : g_k
      assign dc[k]   = regs[R_HEATER_DC + 4*c + k];
      assign pinc[k] = regs[R_DITH_BASE + 4*c + k];
      assign amp[k]  = regs[R_DITH_AMPB + 4*c + k];
      assign den[k]  = regs[R_DITH_EN][4*c + k];
    end
    act_chip_ctrl #(.N_DAC(4)) u_chip (
      .clk_dds(clk_160), .rst_dds_n(rst160_n), .dds_run(stim_running), .dith_step,
      .dc, .pinc, .amp, .dith_en(den),
      .clk(clk_27), .rst_n(rst27_n), .start(act_start), .reset(act_reset),
      .sclk(act_sclk[c]), .sync_n(act_sync_n[c]), .sdin(act_sdin[c]),
      .running(act_running[c]), .frame_done(act_frame[c]));
  end

  assign status = {refs_used[0], kept, dsp_ready, |act_running, fast_running, adc_running,
                   stim_running, pipe_overflow};
endmodule

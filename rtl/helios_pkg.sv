// Shared constants of the photonic-control FPGA design.
//
// Holds the widths fixed by the design (16-bit ADC samples, 16-bit DDS phase,
// 14-bit stimulus DAC words, 1.15 filter coefficients), the channel counts and
// the address map of the host parameter memory.  The widths and counts follow
// the described board; the register addresses and the trigger numbering are
// this implementation's own choice.
package helios_pkg;

  // Channel counts
  localparam int unsigned N_ADC      = 16;   // acquisition chains / ADCs
  localparam int unsigned N_HEATER   = 16;   // actuation chains
  localparam int unsigned N_ACT_CHIP = 4;    // AD5764R packages, 4 DACs each
  localparam int unsigned N_PATH     = 4;    // I/Q at f_mid, I/Q at f_mid - f_dith

  // Word widths
  localparam int unsigned ADC_W    = 16;
  localparam int unsigned PHASE_W  = 16;
  localparam int unsigned STIM_W   = 14;
  localparam int unsigned COEF_W   = 16;     // alpha in 1.15
  localparam int unsigned HPF_OUT_W = 17;
  localparam int unsigned RES_W    = 32;     // LPF / CIC result words
  localparam int unsigned HEATER_W = 16;

  // Host parameter memory: 16-bit words
  localparam int unsigned REG_W     = 16;
  localparam int unsigned REG_AW    = 7;
  localparam int unsigned N_REGS    = 1 << REG_AW;

  // Register addresses
  localparam logic [REG_AW-1:0] R_PINC_STIM  = 7'd0;
  localparam logic [REG_AW-1:0] R_PINC_MID   = 7'd1;
  localparam logic [REG_AW-1:0] R_POFF_DEM   = 7'd2;   // on-chip demodulation phase
  localparam logic [REG_AW-1:0] R_POFF_MID   = 7'd3;   // digital demodulation phase
  localparam logic [REG_AW-1:0] R_PINC_DDEM  = 7'd4;   // 32*pinc_mid +/- pinc_dith
  localparam logic [REG_AW-1:0] R_POFF_DDEM  = 7'd5;
  localparam logic [REG_AW-1:0] R_PINC_FAST  = 7'd6;
  localparam logic [REG_AW-1:0] R_CTRL       = 7'd7;   // [0] enable_stimulus [1] enable_demod [2] cic_en
  localparam logic [REG_AW-1:0] R_ALPHA_HPF  = 7'd8;
  localparam logic [REG_AW-1:0] R_ALPHA_LPF  = 7'd9;
  localparam logic [REG_AW-1:0] R_PGA_GAIN   = 7'd10;  // [7:4] real chains, [3:0] imaginary chains
  localparam logic [REG_AW-1:0] R_SWITCHES   = 7'd11;  // one bit per heater summing switch
  localparam logic [REG_AW-1:0] R_ASIC_MUX   = 7'd12;  // 4 x 3-bit multiplexer selects
  localparam logic [REG_AW-1:0] R_POT_HI     = 7'd13;  // digital potentiometer word [23:16]
  localparam logic [REG_AW-1:0] R_POT_LO     = 7'd14;  // digital potentiometer word [15:0]
  localparam logic [REG_AW-1:0] R_BIAS_HI    = 7'd15;  // bias DAC word [23:16]
  localparam logic [REG_AW-1:0] R_BIAS_LO    = 7'd16;  // bias DAC word [15:0]
  localparam logic [REG_AW-1:0] R_USB_DECIM  = 7'd17;  // keep one result in N (0 and 1: keep all)
  localparam logic [REG_AW-1:0] R_HEATER_DC  = 7'd32;  // 16 words: heater DC values
  localparam logic [REG_AW-1:0] R_DITH_BASE  = 7'd48;  // 16 words: dither DDS phase increments
  localparam logic [REG_AW-1:0] R_DITH_AMPB  = 7'd64;  // 16 words: dither amplitudes, 0.16 fraction of full scale sine
  localparam logic [REG_AW-1:0] R_DITH_EN    = 7'd19;  // one enable bit per heater

  // Trigger numbering (one-cycle pulses from the host)
  localparam int unsigned T_STIM_START = 0;
  localparam int unsigned T_STIM_RESET = 1;
  localparam int unsigned T_ADC_START  = 2;
  localparam int unsigned T_ADC_STOP   = 3;
  localparam int unsigned T_ADC_RESET  = 4;
  localparam int unsigned T_PGA_START  = 5;
  localparam int unsigned T_PGA_RESET  = 6;
  localparam int unsigned T_SW_START   = 7;
  localparam int unsigned T_SW_RESET   = 8;
  localparam int unsigned T_POT_START  = 9;
  localparam int unsigned T_POT_RESET  = 10;
  localparam int unsigned T_BIAS_START = 11;
  localparam int unsigned T_BIAS_RESET = 12;
  localparam int unsigned T_ACT_START  = 13;
  localparam int unsigned T_ACT_RESET  = 14;
  localparam int unsigned T_FAST_START = 15;
  localparam int unsigned T_FAST_RESET = 16;
  localparam int unsigned N_TRIG       = 17;

  // Control register bits
  localparam int unsigned C_EN_STIM  = 0;
  localparam int unsigned C_EN_DEMOD = 1;
  localparam int unsigned C_CIC_EN   = 2;

  // One time-shared processing sample
  typedef struct packed {
    logic        valid;
    logic [3:0]  ch;
  } tdm_tag_t;

endpackage

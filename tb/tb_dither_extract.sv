// Simultaneous extraction of the sensor signal and of a dither tone, through
// the whole platform at its default sizes (no parameter overrides).
//
// After the on-chip demodulation, a heater dither tone at f_dith shows up in
// the acquired signal as two sidebands at f_mid - f_dith and f_mid + f_dith,
// next to the sensor signal at f_mid.  The processing chain demodulates
// paths 0/1 with square waves at f_mid and paths 2/3 with square waves at
// f_mid - f_dith.  Here sixteen behavioural ADCs convert
//   1000 + A_mid cos(2 pi f_mid t)
//        + A_d[c] (cos(2 pi (f_mid - f_dith) t + p_c) + cos(2 pi (f_mid + f_dith) t + p_c))
// with f_mid = 48.83 kHz, f_dith = 4.88 kHz, the same A_mid on every channel
// and a dither amplitude A_d growing with the channel number (zero on the
// last channel).  All frequencies are multiples of 625 kS/s / 512, so the
// CIC notch filter removes every cross product and the LPF DC gain (32)
// times 2/pi sets both magnitudes:
//   |I,Q| on paths 0/1 = 32 * 2/pi * A_mid
//   |I,Q| on paths 2/3 = 32 * 2/pi * A_d[c]
// One more term is inherent to square-wave demodulation of sampled data: the
// 13th harmonic of the f_mid - f_dith square wave (571 kHz) aliases at
// 625 kS/s onto f_mid + f_dith, so the upper sideband adds up to 1/13 of the
// dither reading, with a sign that depends on the tone's phase.  The dither
// check therefore allows A_d * (1 -/+ 1/13) on top of the 7 % tolerance.
// The host side writes the parameters, starts the stimulation and the ADCs
// and reads every result stream through the pipe; the averages over 160
// sample periods are compared with these values (plus a small absolute floor
// for the channel without dither).
module tb_dither_extract;
  import helios_pkg::*;

  logic clk_160 = 0, clk_40 = 0, clk_27 = 0, rst_n = 1;
  logic [15:0] host_wire_data = 0, host_wire_addr = 0;
  logic host_trig_write = 0;
  logic [N_TRIG-1:0] host_trig = '0;
  logic [5:0] pipe_sel = 0;
  logic pipe_rd = 0, pipe_clr = 0;
  logic [31:0] pipe_data;
  logic pipe_empty, pipe_overflow;
  logic [8:0] pipe_count;
  logic [7:0] status;
  logic adc_sck, adc_cnv;
  logic [15:0] adc_sdo;
  logic stim_dac_clk, stim_dac_sleep, fast_dac_clk, fast_dac_sleep;
  logic [13:0] stim_dac_db, fast_dac_db;
  logic asic_demod_i, asic_demod_q;
  logic [11:0] asic_mux_sel;
  logic bias_sclk, bias_sync_n, bias_sdin, bias_rst_n;
  logic pot_sclk, pot_cs_n, pot_sdi, pot_rst_n;
  logic pga_srclk, pga_ser, pga_load, pga_srclr_n;
  logic sw_srclk, sw_ser, sw_load, sw_srclr_n;
  logic [3:0] act_sclk, act_sync_n, act_sdin;
  int checks = 0, failures = 0;

  helios_top dut (.*);

  always #3.125 clk_160 = ~clk_160;
  always #12.5  clk_40  = ~clk_40;
  always #18.5  clk_27  = ~clk_27;
  initial #1 rst_n = 0;

  initial begin
    #4ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; if (failures < 30) $display("FAIL %s @%0t", msg, $time); end
  endtask

  task automatic wr(input logic [6:0] a, input logic [15:0] d);
    @(posedge clk_40); #1;
    host_wire_addr = 16'(a); host_wire_data = d; host_trig_write = 1;
    @(posedge clk_40); #1 host_trig_write = 0;
  endtask
  task automatic trig(input int t);
    @(posedge clk_40); #1 host_trig[t] = 1;
    @(posedge clk_40); #1 host_trig[t] = 0;
  endtask

  // ---- sensor signal with dither sidebands, ADCs --------------------------
  localparam int  PINC_MID  = 20;                       // 160 MHz units: 48.83 kHz
  localparam int  PINC_DITH = 64;                       // 5 MHz units: 4.88 kHz
  localparam real PI     = 3.14159265358979;
  localparam real F_MID  = real'(PINC_MID) / 65536.0 * 160.0e6;
  localparam real F_DITH = real'(PINC_DITH) / 65536.0 * 5.0e6;
  localparam real A_MID  = 4000.0;
  logic [15:0][15:0] adc_val;
  int short_convs [16];
  real a_d [16];
  initial for (int c = 0; c < 16; c++) a_d[c] = (c == 15) ? 0.0 : 150.0 * real'(c + 1);
  always @(negedge clk_40) begin
    real t, p;
    t = $realtime * 1.0e-9;
    for (int c = 0; c < 16; c++) begin
      p = 0.4 * real'(c);
      adc_val[c] = 16'($rtoi(1000.0 + A_MID * $cos(2.0 * PI * F_MID * t)
                              + a_d[c] * $cos(2.0 * PI * (F_MID - F_DITH) * t + p)
                              + a_d[c] * $cos(2.0 * PI * (F_MID + F_DITH) * t + p)));
    end
  end
  for (genvar c = 0; c < 16; c++) begin : g_adc
    ad7903_model u_adc (.cnv(adc_cnv), .sck(adc_sck), .value(adc_val[c]), .sdo(adc_sdo[c]),
      .short_convs(short_convs[c]));
  end

  // ---- result reader (host pipe): round robin over the 64 streams ---------
  bit reading = 0, accumulate = 0;
  real acc_val [64];
  int acc_n [64];
  initial for (int s = 0; s < 64; s++) begin acc_val[s] = 0; acc_n[s] = 0; end
  always @(posedge clk_40) begin
    if (reading) begin
      if (pipe_rd && accumulate) begin
        acc_val[pipe_sel] += real'(signed'(pipe_data));
        acc_n[pipe_sel]++;
      end
      #1;
      pipe_rd  = 0;
      pipe_sel = pipe_sel + 1;
      #1;
      pipe_rd  = !pipe_empty;
    end else begin
      #1 pipe_rd = 0;
    end
  end
  function automatic real avg(input int s);
    return acc_val[s] / real'(acc_n[s] > 0 ? acc_n[s] : 1);
  endfunction

  // ---- sequence -------------------------------------------------------------
  initial begin
    real m_mid, m_dith, e_mid, e_dith;
    repeat (4) @(posedge clk_40);
    #2 rst_n = 1;
    repeat (10) @(posedge clk_40);

    wr(R_PINC_STIM, 16'(PINC_MID + 1024));
    wr(R_PINC_MID,  16'(PINC_MID));
    wr(R_POFF_MID,  16'h0000);
    wr(R_PINC_DDEM, 16'(32 * PINC_MID - PINC_DITH)); // f_mid - f_dith in 5 MHz units
    wr(R_CTRL,      16'b111);                        // stimulus, demodulation, CIC on
    wr(R_ALPHA_HPF, 16'h7F00);
    wr(R_ALPHA_LPF, 16'h7C00);                       // LPF DC gain 32
    wr(R_USB_DECIM, 16'd1);
    trig(T_STIM_START);
    repeat (10) @(posedge clk_40);
    trig(T_ADC_START);
    reading = 1;

    // settle the LPF and the 512-sample CIC, then average 160 sample periods
    repeat (700 * 64) @(posedge clk_40);
    accumulate = 1;
    repeat (160 * 64) @(posedge clk_40);
    accumulate = 0;

    e_mid = 32.0 * 2.0 / PI * A_MID;
    for (int c = 0; c < 16; c++) begin
      check(acc_n[4*c] >= 19 && acc_n[4*c+3] >= 19, $sformatf("channel %0d results read", c));
      m_mid  = $sqrt(avg(4*c) * avg(4*c) + avg(4*c+1) * avg(4*c+1));
      m_dith = $sqrt(avg(4*c+2) * avg(4*c+2) + avg(4*c+3) * avg(4*c+3));
      e_dith = 32.0 * 2.0 / PI * a_d[c];
      $display("channel %2d: f_mid path |I,Q| %9.1f (expected %9.1f)  dither path |I,Q| %8.1f (expected %8.1f)",
               c, m_mid, e_mid, m_dith, e_dith);
      check(m_mid > 0.93 * e_mid && m_mid < 1.07 * e_mid,
            $sformatf("channel %0d signal magnitude %f expected %f", c, m_mid, e_mid));
      check(m_dith > 0.93 * (12.0 / 13.0) * e_dith - 300.0 && m_dith < 1.07 * (14.0 / 13.0) * e_dith + 300.0,
            $sformatf("channel %0d dither magnitude %f expected %f", c, m_dith, e_dith));
    end
    // the dither reading must follow the dither amplitude, not the signal
    check($sqrt(avg(58) * avg(58) + avg(59) * avg(59)) > 10.0 * $sqrt(avg(62) * avg(62) + avg(63) * avg(63)) ||
          $sqrt(avg(62) * avg(62) + avg(63) * avg(63)) < 300.0,
          "channel without dither reads near zero on the dither paths");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

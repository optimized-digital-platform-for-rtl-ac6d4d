// End-to-end testbench of the whole platform, at the default sizes (no
// parameter overrides): 16 ADC channels, 16 heaters on 4 DAC chips, CIC
// D = 8, M = 64, 64 result FIFOs of 256 words.
//
// The host side is modelled by tasks that write parameters (data wire,
// address wire, write trigger) and fire triggers.  Sixteen behavioural ADCs
// convert a sensor signal made of an offset plus a sinusoid at the
// intermediate frequency f_mid (48.8 kHz), with an amplitude proportional to
// the channel number (zero on the last channel).  The testbench reads the
// result FIFOs like the host would and checks the lock-in: the magnitude of
// the (I, Q) pair of each channel must be 2/pi * amplitude * LPF gain (32),
// the dither paths must stay small, and a channel without signal must read
// near zero.  Models of the shift registers, the serial DACs, the digital
// potentiometer and the heater DACs check what the board peripherals
// receive.
//
// Mechanisms exercised and counted (each must occur at least once):
// parameter write, stimulation start and reset, fast-chain start and reset,
// ADC start, stop and hard reset, CIC mode, CIC bypass (mode switch),
// host-side decimation, FIFO overflow and clear, PGA and switch register
// loads, potentiometer and bias DAC writes, heater DAC programming with and
// without dither, on-chip demodulation square waves, ASIC multiplexer select.
module tb_helios_top;
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
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; if (failures < 30) $display("FAIL %s @%0t", msg, $time); end
  endtask

  // ---- mechanism counters ------------------------------------------------
  typedef enum int {M_WRITE, M_STIM_START, M_STIM_RESET, M_FAST_START, M_FAST_RESET, M_ADC_START,
                    M_ADC_STOP, M_ADC_HRESET, M_CIC, M_BYPASS, M_DECIM, M_OVERFLOW, M_CLEAR,
                    M_PGA, M_SW, M_POT, M_BIAS, M_ACT, M_DITHER, M_DEMOD, M_MUX, M_COUNT} mech_t;
  int mech [M_COUNT];
  initial for (int i = 0; i < M_COUNT; i++) mech[i] = 0;

  // ---- host tasks (40 MHz side) -----------------------------------------
  task automatic wr(input logic [6:0] a, input logic [15:0] d);
    @(posedge clk_40); #1;
    host_wire_addr = 16'(a); host_wire_data = d; host_trig_write = 1;
    @(posedge clk_40); #1 host_trig_write = 0;
    mech[M_WRITE]++;
  endtask
  task automatic trig(input int t);
    @(posedge clk_40); #1 host_trig[t] = 1;
    @(posedge clk_40); #1 host_trig[t] = 0;
  endtask

  // ---- sensor signal and ADCs ------------------------------------------
  localparam int PINC_MID = 20;                       // 48.83 kHz
  localparam real F_MID = real'(PINC_MID) / 65536.0 * 160.0e6;
  logic [15:0][15:0] adc_val;
  int short_convs [16];
  real amp_of [16];
  initial for (int c = 0; c < 16; c++) amp_of[c] = (c == 15) ? 0.0 : 600.0 * real'(c + 1);
  always @(negedge clk_40) begin
    real t;
    t = $realtime * 1.0e-9;
    for (int c = 0; c < 16; c++)
      adc_val[c] = 16'($rtoi(1000.0 + amp_of[c] * $cos(2.0 * 3.14159265358979 * F_MID * t)));
  end
  for (genvar c = 0; c < 16; c++) begin : g_adc
    ad7903_model u_adc (.cnv(adc_cnv), .sck(adc_sck), .value(adc_val[c]), .sdo(adc_sdo[c]),
      .short_convs(short_convs[c]));
  end

  // ---- peripheral models ------------------------------------------------
  logic [7:0]  pga_sh = 0, pga_q = 0;
  logic [15:0] sw_sh = 0, sw_q = 0;
  always @(posedge pga_srclk or negedge pga_srclr_n)
    if (!pga_srclr_n) pga_sh <= 0; else pga_sh <= {pga_sh[6:0], pga_ser};
  always @(posedge pga_load) begin pga_q <= pga_sh; mech[M_PGA]++; end
  always @(posedge sw_srclk or negedge sw_srclr_n)
    if (!sw_srclr_n) sw_sh <= 0; else sw_sh <= {sw_sh[14:0], sw_ser};
  always @(posedge sw_load) begin sw_q <= sw_sh; mech[M_SW]++; end

  logic [23:0] bias_rx = 0, pot_rx = 0, bias_word = 0, pot_word = 0;
  int bias_n = 0, pot_n = 0;
  always @(negedge bias_sclk) if (!bias_sync_n) begin bias_rx = {bias_rx[22:0], bias_sdin}; bias_n++; end
  always @(posedge bias_sync_n) begin if (bias_n == 24) begin bias_word = bias_rx; mech[M_BIAS]++; end bias_n = 0; end
  always @(posedge pot_sclk) if (!pot_cs_n) begin pot_rx = {pot_rx[22:0], pot_sdi}; pot_n++; end
  always @(posedge pot_cs_n) begin if (pot_n == 24) begin pot_word = pot_rx; mech[M_POT]++; end pot_n = 0; end

  // heater DACs: four chips of four channels
  logic [15:0] heater [16];
  int hmin [16], hmax [16], hframes = 0;
  initial for (int h = 0; h < 16; h++) begin heater[h] = 0; hmin[h] = 70000; hmax[h] = -1; end
  for (genvar k = 0; k < 4; k++) begin : g_hdac
    logic [23:0] rx = 0;
    int n = 0;
    always @(negedge act_sclk[k]) if (!act_sync_n[k]) begin rx = {rx[22:0], act_sdin[k]}; n++; end
    always @(posedge act_sync_n[k]) begin
      if (n == 24 && rx[23:19] == 5'b00010) begin
        int h;
        h = 4 * k + int'(rx[17:16]);
        heater[h] = rx[15:0];
        if (int'(rx[15:0]) < hmin[h]) hmin[h] = rx[15:0];
        if (int'(rx[15:0]) > hmax[h]) hmax[h] = rx[15:0];
        hframes++;
        mech[M_ACT]++;
      end
      n = 0;
    end
  end

  // square waves and DAC words: edge counters on the 160 MHz clock
  int dem_edges = 0, stim_edges = 0, fast_edges = 0;
  logic dem_q = 0, stim_q = 0, fast_q = 0;
  always @(posedge clk_160) begin
    if (asic_demod_i && !dem_q) dem_edges++;
    if (stim_dac_db[13] && !stim_q) stim_edges++;
    if (fast_dac_db[13] && !fast_q) fast_edges++;
    dem_q = asic_demod_i; stim_q = stim_dac_db[13]; fast_q = fast_dac_db[13];
  end

  // ---- result reader (host pipe) ----------------------------------------
  bit reading = 0;
  int nread [64];
  longint last_val [64];
  real acc_val [64];
  int acc_n [64];
  bit accumulate = 0;
  initial for (int s = 0; s < 64; s++) begin nread[s] = 0; last_val[s] = 0; acc_val[s] = 0; acc_n[s] = 0; end
  always @(posedge clk_40) begin
    if (reading) begin
      if (pipe_rd) begin
        nread[pipe_sel]++;
        last_val[pipe_sel] = longint'(signed'(pipe_data));
        if (accumulate) begin acc_val[pipe_sel] += real'(signed'(pipe_data)); acc_n[pipe_sel]++; end
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
  int kept_n = 0, valid_n = 0;
  logic [7:0] st_q = 0;
  always @(posedge clk_40) begin
    if (dut.res_valid) valid_n++;
    if (status[6]) kept_n++;
    if (dut.res_valid && dut.regs[R_CTRL][C_CIC_EN]) mech[M_CIC]++;
    if (dut.res_valid && !dut.regs[R_CTRL][C_CIC_EN]) mech[M_BYPASS]++;
    if (dut.res_valid && !status[6]) mech[M_DECIM]++;
    if (status[1] && !st_q[1]) mech[M_STIM_START]++;
    if (!status[1] && st_q[1]) mech[M_STIM_RESET]++;
    if (status[3] && !st_q[3]) mech[M_FAST_START]++;
    if (!status[3] && st_q[3]) mech[M_FAST_RESET]++;
    if (status[2] && !st_q[2]) mech[M_ADC_START]++;
    if (status[0] && !st_q[0]) mech[M_OVERFLOW]++;
    if (!status[0] && st_q[0]) mech[M_CLEAR]++;
    st_q = status;
  end

  task automatic clear_stats();
    for (int s = 0; s < 64; s++) begin nread[s] = 0; acc_val[s] = 0; acc_n[s] = 0; end
  endtask

  // ---- sequence ----------------------------------------------------------
  real mag [16], expect_mag;
  int e0, s0, f0, n0, v0, k0;
  initial begin
    repeat (4) @(posedge clk_40);
    #2 rst_n = 1;
    repeat (10) @(posedge clk_40);

    // parameters
    wr(R_PINC_STIM, 16'(PINC_MID + 1024));
    wr(R_PINC_MID,  16'(PINC_MID));
    wr(R_POFF_DEM,  16'h0800);
    wr(R_POFF_MID,  16'h0000);
    wr(R_PINC_DDEM, 16'(32 * PINC_MID - 64));        // f_mid - f_dith, f_dith = 4.88 kHz
    wr(R_PINC_FAST, 16'd4096);                        // 10 MHz
    wr(R_CTRL,      16'b111);
    wr(R_ALPHA_HPF, 16'h7F00);
    wr(R_ALPHA_LPF, 16'h7C00);                        // LPF DC gain 32
    wr(R_PGA_GAIN,  16'h00A5);
    wr(R_SWITCHES,  16'hC3A5);
    wr(R_ASIC_MUX,  16'h0ABC);
    wr(R_POT_HI,    16'h00B0); wr(R_POT_LO, 16'h0155);
    wr(R_BIAS_HI,   16'h0031); wr(R_BIAS_LO, 16'h8000);
    wr(R_USB_DECIM, 16'd1);
    for (int h = 0; h < 16; h++) begin
      wr(7'(R_HEATER_DC + h), 16'(1000 + 3000 * h));
      wr(7'(R_DITH_BASE + h), 16'd256);
      wr(7'(R_DITH_AMPB + h), 16'd2000);
    end
    wr(R_DITH_EN, 16'h0020);                          // dither on heater 5 only

    // slow peripherals
    trig(T_PGA_START); trig(T_SW_START); trig(T_POT_START); trig(T_BIAS_START);
    repeat (40) @(posedge clk_40);
    check(pga_q == 8'hA5, $sformatf("PGA gain register %h", pga_q));
    check(sw_q == 16'hC3A5, $sformatf("switch registers %h", sw_q));
    check(pot_word == 24'hB00155, $sformatf("potentiometer word %h", pot_word));
    check(bias_word == 24'h318000, $sformatf("bias DAC word %h", bias_word));
    check(asic_mux_sel == 12'hABC, "ASIC multiplexer selects");
    if (asic_mux_sel == 12'hABC) mech[M_MUX]++;
    trig(T_PGA_RESET);
    repeat (5) @(posedge clk_40);
    trig(T_PGA_START);
    repeat (20) @(posedge clk_40);
    check(pga_q == 8'hA5, "PGA register reloaded after clear");

    // stimulation, fast chain, heaters, acquisition
    trig(T_STIM_START);
    trig(T_FAST_START);
    trig(T_ACT_START);
    repeat (10) @(posedge clk_40);
    check(status[1] && status[3] && status[4], "stimulation, fast chain and heaters running");
    check(!stim_dac_sleep && !fast_dac_sleep, "stimulus DACs awake");
    trig(T_ADC_START);
    reading = 1;

    // square-wave and sine frequencies over 65536 fast clocks
    e0 = dem_edges; s0 = stim_edges; f0 = fast_edges;
    repeat (65536) @(posedge clk_160);
    check(dem_edges - e0 >= 1023 && dem_edges - e0 <= 1025,
          $sformatf("on-chip demodulation at f_stim - f_mid: %0d periods", dem_edges - e0));
    check(stim_edges - s0 >= PINC_MID + 1023 && stim_edges - s0 <= PINC_MID + 1025,
          $sformatf("stimulus frequency: %0d periods", stim_edges - s0));
    check(fast_edges - f0 >= 4095 && fast_edges - f0 <= 4097, $sformatf("fast sine %0d periods", fast_edges - f0));
    if (dem_edges > e0) mech[M_DEMOD]++;

    // heater DACs (dither on heater 5 only)
    for (int h = 0; h < 16; h++)
      if (h != 5) check(heater[h] == 16'(1000 + 3000 * h), $sformatf("heater %0d word %0d", h, heater[h]));
    check(hmin[5] >= 16000 - 2002 && hmax[5] <= 16000 + 2002 && hmax[5] - hmin[5] > 2000,
          $sformatf("heater 5 dither range %0d..%0d", hmin[5], hmax[5]));
    if (hmax[5] - hmin[5] > 2000) mech[M_DITHER]++;

    // lock-in with the CIC: let 700 frames pass, then average 100 frames
    repeat (600 * 64) @(posedge clk_40);
    clear_stats(); accumulate = 1;
    repeat (160 * 64) @(posedge clk_40);
    accumulate = 0;
    check(nread[0] >= 19 && nread[0] <= 21, $sformatf("CIC rate: %0d results in 160 frames", nread[0]));
    for (int c = 0; c < 16; c++) begin
      real i_v, q_v, d_i, d_q;
      i_v = acc_val[4*c] / real'(acc_n[4*c] > 0 ? acc_n[4*c] : 1);
      q_v = acc_val[4*c+1] / real'(acc_n[4*c+1] > 0 ? acc_n[4*c+1] : 1);
      d_i = acc_val[4*c+2] / real'(acc_n[4*c+2] > 0 ? acc_n[4*c+2] : 1);
      d_q = acc_val[4*c+3] / real'(acc_n[4*c+3] > 0 ? acc_n[4*c+3] : 1);
      mag[c] = $sqrt(i_v * i_v + q_v * q_v);
      $display("channel %2d: I %9.1f Q %9.1f |I,Q| %9.1f dither paths %7.1f %7.1f", c, i_v, q_v, mag[c], d_i, d_q);
      expect_mag = 32.0 * 2.0 / 3.14159265358979 * amp_of[c];
      if (c == 15)
        check(mag[c] < 200.0, $sformatf("channel without signal reads %f", mag[c]));
      else begin
        check(mag[c] > 0.93 * expect_mag && mag[c] < 1.07 * expect_mag,
              $sformatf("channel %0d magnitude %f expected %f", c, mag[c], expect_mag));
        check($sqrt(d_i * d_i + d_q * d_q) < 0.05 * expect_mag,
              $sformatf("channel %0d dither paths small", c));
      end
    end

    // mode switch: bypass the CIC, keep one result in 4 for the host
    wr(R_USB_DECIM, 16'd4);
    wr(R_CTRL, 16'b011);
    repeat (64) @(posedge clk_40);
    clear_stats(); v0 = valid_n; k0 = kept_n;
    repeat (200 * 64) @(posedge clk_40);
    check(nread[7] >= 49 && nread[7] <= 51, $sformatf("bypass + 1-in-4: %0d results in 200 frames", nread[7]));
    check(valid_n - v0 >= 199 * 16 && (kept_n - k0) * 4 <= (valid_n - v0) + 64, "decimator keeps one in four");

    // overflow: the host stops reading
    wr(R_USB_DECIM, 16'd1);
    reading = 0;
    repeat (300 * 64) @(posedge clk_40);
    check(pipe_overflow && status[0], "FIFO overflow flagged");
    @(posedge clk_40); #1 pipe_clr = 1; @(posedge clk_40); #1 pipe_clr = 0;
    #1 check(!pipe_overflow, "overflow cleared");
    reading = 1;

    // back to the CIC
    wr(R_CTRL, 16'b111);
    repeat (100 * 64) @(posedge clk_40);

    // ADC stop, restart, hard reset
    trig(T_ADC_STOP);
    repeat (70) @(posedge clk_40);
    check(!status[2], "ADC stopped");
    if (!status[2]) mech[M_ADC_STOP]++;
    trig(T_ADC_START);
    repeat (200) @(posedge clk_40);
    check(status[2], "ADC restarted");
    @(posedge clk_40); #1 host_trig[T_ADC_RESET] = 1;
    @(posedge clk_40); #1 host_trig[T_ADC_RESET] = 0;
    repeat (2) @(posedge clk_40);
    check(!status[2] && !adc_cnv, "ADC hard reset");
    if (!status[2]) mech[M_ADC_HRESET]++;

    // stop the chains
    trig(T_STIM_RESET);
    trig(T_FAST_RESET);
    trig(T_ACT_RESET);
    repeat (20) @(posedge clk_40);
    check(!status[1] && !status[3] && !status[4], "chains stopped");
    check(stim_dac_sleep && fast_dac_sleep && stim_dac_db == 14'h2000, "DACs asleep at mid-scale");
    n0 = hframes;
    repeat (200) @(posedge clk_40);
    check(hframes == n0, "heater bus idle after reset");

    for (int i = 0; i < M_COUNT; i++) begin
      mech_t m;
      m = mech_t'(i);
      $display("mechanism %-14s happened %0d times", m.name(), mech[i]);
      check(mech[i] > 0, $sformatf("mechanism %s never happened", m.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench of the first stimulation chain controller.
// A cycle model in the testbench keeps its own phase accumulators (stimulus,
// on-chip demodulation at f_stim - f_mid, intermediate frequency, dither
// demodulation stepped once every 32 clocks) and from them predicts every
// square-wave output bit each clock and the DAC word (straight binary, at most
// 2 LSB from a floating-point sine) each falling edge.  It also measures the
// periods of the square waves (65536/pinc clocks), the 1-in-32 rate of the
// dither step, the effect of the enables, that increments are captured at
// start, and the reset trigger (DAC asleep at mid-scale, outputs low).
module tb_stim_ctrl;
  localparam int PW = 16, OW = 14;
  logic clk = 0, rst_n = 1, start = 0, reset = 0;
  logic [PW-1:0] pinc_stim = 16'd1536, pinc_mid = 16'd512, poff_dem = 16'h1000,
                 poff_mid = 16'h2000, pinc_ddem = 16'd2048, poff_ddem = 16'h0400;
  logic en_stim = 1, en_dem = 1;
  logic [OW-1:0] dac_db;
  logic dac_sleep, demod_out, demod_quad_out, ref_mid_i, ref_mid_q, ref_dith_i, ref_dith_q;
  logic dith_step, running;
  int checks = 0, failures = 0;

  stim_ctrl dut (.clk, .rst_n, .start, .reset, .pinc_stim, .pinc_mid, .poff_dem, .poff_mid,
    .pinc_ddem, .poff_ddem, .enable_stimulus(en_stim), .enable_demod(en_dem), .dac_db, .dac_sleep,
    .demod_out, .demod_quad_out, .ref_mid_i, .ref_mid_q, .ref_dith_i, .ref_dith_q, .dith_step, .running);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;     // a falling edge, so that the asynchronous resets act

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s @%0t", msg, $time); end
  endtask

  function automatic int sine_of(input logic [15:0] ph);
    real a;
    a = 2.0 * 3.14159265358979 * (real'(ph & 16'hfff0) + 8.0) / 65536.0;
    return $rtoi($sin(a) * 8191.0 + ($sin(a) >= 0.0 ? 0.5 : -0.5));
  endfunction

  // ---- cycle model -------------------------------------------------------
  bit m_run;
  int m_div;
  logic [15:0] i_stim, i_dem, i_mid, i_dd, o_dem, o_mid, o_dd;
  logic [15:0] a_stim, a_dem, a_mid, a_dd, p_stim, p_dem, p_mid, p_dd;
  bit m_v;
  bit e_demod, e_demq, e_mi, e_mq, e_di, e_dq;
  bit m_step;
  assign m_step = m_run && (m_div == 0);

  always @(posedge clk) begin
    if (!rst_n) begin
      m_run <= 0; m_div <= 0;
      a_stim <= 0; a_dem <= 0; a_mid <= 0; a_dd <= 0;
      p_stim <= 0; p_dem <= 0; p_mid <= 0; p_dd <= 0; m_v <= 0;
      e_demod <= 0; e_demq <= 0; e_mi <= 0; e_mq <= 0; e_di <= 0; e_dq <= 0;
    end else begin
      if (!m_run && start && !reset) begin
        m_run <= 1; m_div <= 0;
        i_stim <= pinc_stim; i_mid <= pinc_mid; i_dem <= pinc_stim - pinc_mid; i_dd <= pinc_ddem;
        o_dem <= poff_dem; o_mid <= poff_mid; o_dd <= poff_ddem;
      end else if (m_run) begin
        m_div <= (m_div + 1) % 32;
        if (reset) m_run <= 0;
      end
      if (!m_run) begin
        a_stim <= 0; a_dem <= 0; a_mid <= 0; a_dd <= 0;
        p_stim <= 0; p_dem <= 0; p_mid <= 0; p_dd <= 0; m_v <= 0;
      end else begin
        a_stim <= a_stim + i_stim; a_dem <= a_dem + i_dem; a_mid <= a_mid + i_mid;
        if (m_step) a_dd <= a_dd + i_dd;
        p_stim <= a_stim; p_dem <= a_dem + o_dem; p_mid <= a_mid + o_mid; p_dd <= a_dd + o_dd;
        m_v <= 1;
      end
      e_demod <= en_dem && m_v && p_dem[15];
      e_demq  <= en_dem && m_v && 16'(p_dem + 16'h4000) >> 15;
      e_mi    <= m_v && 16'(p_mid + 16'h4000) >> 15;
      e_mq    <= m_v && p_mid[15];
      e_di    <= m_v && 16'(p_dd + 16'h4000) >> 15;
      e_dq    <= m_v && p_dd[15];
    end
  end

  // per-clock comparison of the square waves
  bit cmp_on = 0;
  always @(posedge clk) if (cmp_on) begin
    #1;
    check(running == m_run, "running");
    check(dith_step == m_step, "dither step");
    check(demod_out == e_demod && demod_quad_out == e_demq, "ASIC square waves");
    check(ref_mid_i == e_mi && ref_mid_q == e_mq, "f_mid references");
    check(ref_dith_i == e_di && ref_dith_q == e_dq, "dither references");
  end
  // DAC word on the falling edge
  always @(negedge clk) if (cmp_on) begin
    int e, g;
    #1;
    if (m_v && en_stim) begin
      e = sine_of(p_stim);
      g = int'(dac_db) - 8192;
      check(g - e <= 2 && e - g <= 2, $sformatf("DAC word got %0d exp %0d", g, e));
    end else
      check(dac_db == 14'h2000, $sformatf("DAC mid-scale when idle or disabled got %h run %0d v %0d en %0d", dac_db, m_run, m_v, en_stim));
    check(dac_sleep == !m_run, "DAC sleep");
  end

  // period measurement
  int last_dem = -1, last_mid = -1, last_dd = -1, per_dem = 0, per_mid = 0, per_dd = 0, cyc = 0;
  int n_steps = 0;
  logic q_dem = 0, q_mid = 0, q_dd = 0;
  always @(posedge clk) begin
    cyc++;
    if (dith_step) n_steps++;
    if (demod_out && !q_dem) begin if (last_dem >= 0) per_dem = cyc - last_dem; last_dem = cyc; end
    if (ref_mid_i && !q_mid) begin if (last_mid >= 0) per_mid = cyc - last_mid; last_mid = cyc; end
    if (ref_dith_i && !q_dd) begin if (last_dd >= 0) per_dd = cyc - last_dd; last_dd = cyc; end
    q_dem = demod_out; q_mid = ref_mid_i; q_dd = ref_dith_i;
  end

  task automatic pulse(ref logic s);
    @(posedge clk); #2 s = 1; @(posedge clk); #2 s = 0;
  endtask

  initial begin
    repeat (4) @(posedge clk);
    #2 rst_n = 1;
    cmp_on = 1;
    repeat (10) @(posedge clk);
    check(!running && dac_sleep && dac_db == 14'h2000, "idle after reset");
    pulse(start);
    // increments are captured: a later change has no effect
    repeat (3) @(posedge clk);
    pinc_stim = 16'd3000; pinc_mid = 16'd100;
    n_steps = 0;
    repeat (3200) @(posedge clk);
    check(n_steps == 100, $sformatf("dither step 1 in 32 clocks (%0d)", n_steps));
    check(per_dem == 64, $sformatf("on-chip demod period 64 (%0d)", per_dem));
    check(per_mid == 128, $sformatf("f_mid period 128 (%0d)", per_mid));
    check(per_dd == 1024, $sformatf("dither ref period 1024 (%0d)", per_dd));
    // enables
    #2 en_dem = 0; en_stim = 0;
    repeat (300) @(posedge clk);
    check(demod_out == 0 && demod_quad_out == 0, "demod disabled");
    #2 en_dem = 1; en_stim = 1;
    repeat (300) @(posedge clk);
    // reset trigger, then restart with new increments
    pulse(reset);
    repeat (5) @(posedge clk);
    check(!running && dac_sleep && !ref_mid_i && !demod_out, "stopped by reset");
    pinc_stim = 16'd2048; pinc_mid = 16'd1024;
    pulse(start);
    per_dem = 0; last_dem = -1;
    repeat (1000) @(posedge clk);
    check(per_dem == 64, $sformatf("restart period (%0d)", per_dem));
    cmp_on = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

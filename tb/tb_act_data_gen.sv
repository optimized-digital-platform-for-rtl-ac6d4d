// Self-checking testbench of the heater data generator.
// The DDS is stepped once every 32 clocks (as the dither step of the
// stimulation controller does).  A testbench phase accumulator and a
// floating-point sine predict each word, dc + amp * sin, clamped to
// 0..65535, within the rounding of the 14-bit sine (two LSB of the sine
// scaled by amp, plus one).  Checked: words without dither (exactly dc), with
// dither, clamping at both ends, the dither period (pinc = 2048 and one step
// per 32 clocks: 1024 clocks), and the zero word after the DDS is stopped.
module tb_act_data_gen;
  logic clk = 0, rst_n = 1, run = 0, dith_en = 0;
  logic step;
  logic [15:0] dc = 16'd30000, pinc = 16'd2048, amp = 16'd4000, word;
  int checks = 0, failures = 0;

  act_data_gen dut (.clk, .rst_n, .run, .step, .dc, .pinc, .amp, .dith_en, .word);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;
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

  int div = 0;
  always @(posedge clk) begin
    div <= (div + 1) % 32;
  end
  assign step = run && (div == 0);

  // two-stage model: phase -> sine register -> word register
  logic [15:0] m_acc = 0, m_ph = 0;
  bit m_on = 0;
  always @(posedge clk) begin
    if (!run) begin m_acc <= 0; m_ph <= 0; m_on <= 0; end
    else begin
      if (step) m_acc <= m_acc + pinc;
      m_ph <= m_acc;
      m_on <= dith_en;
    end
  end

  bit cmp = 0;
  int n_hi = 0, n_lo = 0, last_peak = -1, period = 0, cyc = 0;
  logic [15:0] prev_w = 0;
  always @(posedge clk) if (cmp) begin
    real s, e, tol;
    int  ei;
    cyc++;
    s   = m_on ? $sin(2.0 * 3.14159265358979 * (real'(m_ph & 16'hfff0) + 8.0) / 65536.0) : 0.0;
    e   = real'(dc) + s * real'(amp) * 8191.0 / 8192.0;
    tol = 2.0 * real'(amp) / 8192.0 + 1.0;
    if (e > 65535.0) e = 65535.0;
    if (e < 0.0) e = 0.0;
    #1;
    ei = int'(word);
    check(real'(ei) <= e + tol && real'(ei) >= e - tol - 1.0,
          $sformatf("word %0d expected %f", ei, e));
    if (word == 16'hffff) n_hi++;
    if (word == 16'h0000) n_lo++;
    if (m_on && word > dc && prev_w <= dc) begin
      if (last_peak >= 0) period = cyc - last_peak;
      last_peak = cyc;
    end
    prev_w = word;
  end

  initial begin
    repeat (3) @(posedge clk);
    #2 rst_n = 1;
    @(posedge clk); #2 run = 1;
    repeat (3) @(posedge clk);
    cmp = 1;
    repeat (200) @(posedge clk);
    check(word == dc, "no dither: the word is the DC value");
    #2 dith_en = 1;
    repeat (5000) @(posedge clk);
    #2 dith_en = 0; amp = 16'd1024;
    repeat (4) @(posedge clk);
    #2 dith_en = 1;
    repeat (3000) @(posedge clk);
    check(period == 1024, $sformatf("dither period %0d clocks", period));
    #2 dc = 16'd64000; amp = 16'd8000;
    repeat (3000) @(posedge clk);
    check(n_hi > 0, "clamped at full scale");
    #2 dc = 16'd1000;
    repeat (3000) @(posedge clk);
    check(n_lo > 0, "clamped at zero");
    cmp = 0;
    #2 run = 0; dith_en = 0;
    repeat (4) @(posedge clk);
    #1 check(word == dc, "stopped DDS: DC only");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

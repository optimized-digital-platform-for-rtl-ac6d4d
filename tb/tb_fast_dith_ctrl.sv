// Self-checking testbench of the second (fast dither) stimulation chain.
// Checks the DAC word each falling edge against a floating-point sine of a
// phase accumulator kept in the testbench (straight binary, at most 2 LSB
// off), the output period for pinc = 4096 (16 clocks, i.e. 10 MHz at
// 160 MHz), that the increment is captured at start, and that the reset
// trigger puts the DAC to sleep at mid-scale.
module tb_fast_dith_ctrl;
  logic clk = 0, rst_n = 1, start = 0, reset = 0;
  logic [15:0] pinc = 16'd4096;
  logic [13:0] dac_db;
  logic dac_sleep, running;
  int checks = 0, failures = 0;

  fast_dith_ctrl dut (.clk, .rst_n, .start, .reset, .pinc, .dac_db, .dac_sleep, .running);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;     // a falling edge, so that the asynchronous resets act

  initial begin
    repeat (50000) @(posedge clk);
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

  bit m_run, m_v;
  logic [15:0] m_inc, m_acc, m_ph;
  always @(posedge clk) begin
    if (!rst_n) begin m_run <= 0; m_acc <= 0; m_ph <= 0; m_v <= 0; m_inc <= 0; end
    else begin
      if (reset) m_run <= 0;
      else if (start && !m_run) begin m_run <= 1; m_inc <= pinc; end
      if (!m_run) begin m_acc <= 0; m_ph <= 0; m_v <= 0; end
      else begin m_acc <= m_acc + m_inc; m_ph <= m_acc; m_v <= 1; end
    end
  end

  int cyc = 0, last_rise = -1, period = 0, rises = 0;
  logic prev_msb = 0;
  always @(negedge clk) begin
    int e, g;
    #1;
    cyc++;
    if (rst_n) begin
      if (m_v) begin
        e = sine_of(m_ph);
        g = int'(dac_db) - 8192;
        check(g - e <= 2 && e - g <= 2, $sformatf("DAC word got %0d exp %0d", g, e));
      end else
        check(dac_db == 14'h2000, "mid-scale when idle");
      check(dac_sleep == !m_run, "sleep");
      if (dac_db[13] && !prev_msb) begin
        if (last_rise >= 0) period = cyc - last_rise;
        last_rise = cyc; rises++;
      end
      prev_msb = dac_db[13];
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #2 rst_n = 1;
    repeat (5) @(posedge clk);
    check(!running && dac_sleep, "idle");
    #2 start = 1; @(posedge clk); #2 start = 0;
    #2 pinc = 16'd100;       // ignored until the next start
    repeat (400) @(posedge clk);
    check(running, "running");
    check(period == 16 && rises > 20, $sformatf("10 MHz period: %0d clocks", period));
    #2 reset = 1; @(posedge clk); #2 reset = 0;
    repeat (5) @(posedge clk);
    check(!running && dac_sleep && dac_db == 14'h2000, "stopped");
    #2 pinc = 16'd1024; start = 1; @(posedge clk); #2 start = 0;
    repeat (400) @(posedge clk);
    check(period == 64, $sformatf("restart period %0d", period));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

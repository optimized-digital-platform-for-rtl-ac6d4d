// Self-checking testbench of the ADC controller with 16 behavioural ADCs.
// Each ADC converts a fresh random value at every rising edge of cnv; the
// testbench checks that every data_ready strobe presents exactly the values
// converted, that samples arrive every 64 clocks (625 kS/s at 40 MHz) with
// cnv high for 47 clocks, that no conversion is shorter than the ADC needs,
// that a stop trigger ends acquisition after the frame in progress, and that
// the hard reset stops everything at once.
module tb_adc_ctrl;
  localparam int N = 16;
  logic clk = 0, hard_rst_n = 1, start = 0, stop = 0;
  logic sck, cnv, data_ready, conv_start, running;
  logic [N-1:0] sdo;
  logic [N-1:0][15:0] samples, vals, exp_cur, exp_prev;
  int short_convs [N];
  int checks = 0, failures = 0;

  adc_ctrl dut (.clk, .hard_rst_n, .start, .stop, .sck, .cnv, .sdo, .samples, .data_ready,
    .conv_start, .running);

  for (genvar i = 0; i < N; i++) begin : g_adc
    ad7903_model u_adc (.cnv, .sck, .value(vals[i]), .sdo(sdo[i]), .short_convs(short_convs[i]));
  end

  always #12.5 clk = ~clk;   // 40 MHz
  initial #1 hard_rst_n = 0;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s @%0t", msg, $time); end
  endtask

  initial begin
    for (int i = 0; i < N; i++) vals[i] = 16'($urandom);
    exp_cur = '0; exp_prev = '0;
  end
  always @(posedge cnv) begin
    exp_prev = exp_cur;
    exp_cur  = vals;
    #1;
    for (int i = 0; i < N; i++) vals[i] = 16'($urandom);
  end

  int cyc = 0, last_dr = -1, frames = 0, cnv_hi = 0, cnv_len = 0, bad_period = 0, bad_cnv = 0;
  int n_cs = 0;
  always @(posedge clk) begin
    cyc++;
    if (cnv) cnv_hi++;
    else if (cnv_hi != 0) begin cnv_len = cnv_hi; if (cnv_hi != 47) bad_cnv++; cnv_hi = 0; end
    if (conv_start) n_cs++;
    if (data_ready) begin
      frames++;
      if (last_dr >= 0 && cyc - last_dr != 64) bad_period++;
      last_dr = cyc;
      #1 check(samples == (cnv ? exp_prev : exp_cur), "samples equal converted values");
    end
  end

  int f0, since;
  initial begin
    repeat (3) @(posedge clk);
    #2 hard_rst_n = 1;
    repeat (5) @(posedge clk);
    check(!running && !cnv, "idle");
    #2 start = 1; @(posedge clk); #2 start = 0;
    repeat (64 * 100) @(posedge clk);
    check(frames >= 99 && frames <= 100, $sformatf("100 frames in 6400 clocks (%0d)", frames));
    check(bad_period == 0, "data_ready every 64 clocks");
    check(bad_cnv == 0 && cnv_len == 47, $sformatf("cnv high 47 clocks (%0d)", cnv_len));
    check(n_cs == frames + 1, "one conversion start per frame");
    // stop trigger: the frame in progress completes, then idle
    repeat (10) @(posedge clk);
    #3 f0 = frames;
    #2 stop = 1; @(posedge clk); #2 stop = 0;
    repeat (100) @(posedge clk);
    check(!running && frames == f0 + 1 && !cnv, $sformatf("stop after current frame (%0d)", frames - f0));
    for (int i = 0; i < N; i++) check(short_convs[i] == 0, "conversion time respected");
    // restart and hard reset in the middle of a conversion
    last_dr = -1;
    #2 start = 1; @(posedge clk); #2 start = 0;
    repeat (64 * 5 + 20) @(posedge clk);
    f0 = frames;
    #2 hard_rst_n = 0;
    #1 check(!running && !cnv && !data_ready, "hard reset stops at once");
    repeat (3) @(posedge clk);
    #2 hard_rst_n = 1;
    repeat (200) @(posedge clk);
    check(frames == f0 && !running, "no data after hard reset");
    check(bad_period == 0, "data_ready every 64 clocks after restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

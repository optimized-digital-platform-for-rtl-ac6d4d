// Self-checking testbench of the heater DAC serial programmer.
// A DAC model samples sdin on the falling edge of sclk while sync_n is low
// and checks, when sync_n rises, that exactly 24 bits arrived.  The
// testbench compares each received word with the offered one, checks that
// sync_n stays high for at least 3 clocks between words, and that with
// instructions always available a word starts every 27 clocks (1 MHz at
// 27 MHz).  Random gaps in the offer and a clear in mid-word are included.
module tb_act_programmer;
  logic clk = 0, rst_n = 1, clear = 0, in_valid = 0;
  logic in_ready, sclk, sync_n, sdin, frame_done;
  logic [23:0] in_instr;
  int checks = 0, failures = 0;

  act_programmer dut (.clk, .rst_n, .clear, .in_valid, .in_ready, .in_instr, .sclk, .sync_n,
    .sdin, .frame_done);

  always #18.5 clk = ~clk;    // 27 MHz
  initial #1 rst_n = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s @%0t", msg, $time); end
  endtask

  logic [23:0] sent [$];
  logic [23:0] rx = 0;
  int nbits = 0, words = 0, hi_run = 100, cyc = 0, last_start = -1, period = 0, bad_gap = 0;
  bit aborted = 0, after_clear = 0;   // an aborted word may be followed at once
  always @(negedge sclk) if (!sync_n) begin rx = {rx[22:0], sdin}; nbits++; end
  always @(posedge sync_n) begin
    if (aborted) aborted = 0;
    else begin
      words++;
      check(nbits == 24, $sformatf("24 bits per word (%0d)", nbits));
      if (sent.size() > 0) check(rx == sent.pop_front(), "word content");
      else check(0, "word without an accepted instruction");
    end
    nbits = 0;
  end
  always @(posedge clk) begin
    cyc++;
    if (!sync_n && hi_run != 0) begin
      if (hi_run < 3 && !after_clear) bad_gap++;
      after_clear = 0;
      if (last_start >= 0) period = cyc - last_start;
      last_start = cyc;
    end
    hi_run = sync_n ? hi_run + 1 : 0;
  end

  bit burst;
  int w0, c0;
  initial begin
    repeat (3) @(posedge clk);
    #2 rst_n = 1;
    for (int k = 0; k < 12000; k++) begin
      burst = (k < 3000) || (k % 400 < 300);
      in_valid = burst || ($urandom_range(3) == 0);
      in_instr = 24'($urandom);
      if (k == 8005) begin clear = 1; after_clear = 1; if (!sync_n) aborted = 1; end
      #1;
      if (in_valid && in_ready) sent.push_back(in_instr);
      if (k == 2999) check(period == 27, $sformatf("word period %0d clocks", period));
      if (k == 1000) begin w0 = words; c0 = cyc; end
      if (k == 2000) check(words - w0 >= 37 && words - w0 <= 38, $sformatf("1 MHz word rate: %0d words in 1000 clocks", words - w0));
      @(posedge clk); #2;
      if (clear) begin
        sent.delete();
        clear = 0;
      end
    end
    in_valid = 0;
    repeat (40) @(posedge clk);
    check(sent.size() == 0, "every accepted word sent");
    check(bad_gap == 0, "at least 3 clocks between words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

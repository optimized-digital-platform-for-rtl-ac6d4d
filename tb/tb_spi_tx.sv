// Self-checking testbench of the serial word writer.
// Two instances are tested: one that changes data on the rising edge (for
// a device sampling on the falling edge, like the bias DAC) and one that
// changes it on the falling edge (for a device sampling on the rising edge,
// like the digital potentiometer).  Device models sample sdin on their edge
// while sync_n is low and rebuild the word.  Checked: the received word and
// its length (24 bits), one bit per clock (sync_n low for 24 clocks), the
// done pulse, and the reset trigger (device reset low for two clocks, any
// transfer aborted).
module tb_spi_tx;
  logic clk = 0, rst_n = 1, start = 0, reset = 0;
  logic [23:0] word;
  logic sclk_a, sync_a, sdin_a, rst_a, busy_a, done_a;
  logic sclk_b, sync_b, sdin_b, rst_b, busy_b, done_b;
  int checks = 0, failures = 0;

  spi_tx dut_a (.clk, .rst_n, .start, .reset, .word, .sclk(sclk_a), .sync_n(sync_a),
    .sdin(sdin_a), .dev_rst_n(rst_a), .busy(busy_a), .done(done_a));
  spi_tx #(.LAUNCH_NEGEDGE(1'b1)) dut_b (.clk, .rst_n, .start, .reset, .word, .sclk(sclk_b),
    .sync_n(sync_b), .sdin(sdin_b), .dev_rst_n(rst_b), .busy(busy_b), .done(done_b));

  always #5 clk = ~clk;
  initial #1 rst_n = 0;     // a falling edge, so that the asynchronous resets act

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s @%0t", msg, $time); end
  endtask

  logic [23:0] rx_a = 0, rx_b = 0;
  int n_a = 0, n_b = 0, low_a = 0, dones = 0;
  always @(negedge sclk_a) if (!sync_a) begin rx_a <= {rx_a[22:0], sdin_a}; n_a++; end
  always @(posedge sclk_b) if (!sync_b) begin rx_b <= {rx_b[22:0], sdin_b}; n_b++; end
  always @(posedge clk) begin
    if (!sync_a) low_a++;
    if (done_a) dones++;
  end

  int rl_a, rl_b;
  initial begin
    repeat (3) @(posedge clk);
    #2 rst_n = 1;
    repeat (3) @(posedge clk);
    check(sync_a && sync_b && rst_a && rst_b && !busy_a, "idle levels");
    for (int k = 0; k < 30; k++) begin
      word = 24'($urandom);
      n_a = 0; n_b = 0; low_a = 0; dones = 0;
      @(posedge clk); #2 start = 1; @(posedge clk); #2 start = 0;
      word = ~word;
      wait (!busy_a && !busy_b); repeat (3) @(posedge clk);
      check(rx_a == ~word && n_a == 24, $sformatf("falling-edge device got %h (%0d bits)", rx_a, n_a));
      check(rx_b == ~word && n_b == 24, $sformatf("rising-edge device got %h (%0d bits)", rx_b, n_b));
      check(low_a == 24, $sformatf("sync low %0d clocks", low_a));
      check(dones == 1, "one done pulse");
    end
    // reset trigger in the middle of a transfer
    word = 24'hA5A5A5;
    @(posedge clk); #2 start = 1; @(posedge clk); #2 start = 0;
    repeat (5) @(posedge clk); #2 reset = 1; @(posedge clk); #2 reset = 0;
    rl_a = 0; rl_b = 0;
    repeat (6) begin if (!rst_a) rl_a++; if (!rst_b) rl_b++; @(posedge clk); #2; end
    check(rl_a == 2 && rl_b == 2, $sformatf("device reset %0d/%0d clocks", rl_a, rl_b));
    check(sync_a && sync_b && !busy_a, "transfer aborted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

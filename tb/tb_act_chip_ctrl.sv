// Self-checking testbench of one heater DAC channel group (four channels).
// Clocks: 160 MHz for the data generators, 27 MHz for the serial bus.  A
// model of the four-channel DAC decodes each 24-bit frame (sampled on the
// falling edge of sclk while sync_n is low) into its channel registers.
// Checked on every frame: the command bits, the channel order A, B, C, D,
// and the word of each channel.  Checked over the run: the register
// values (the DC words of undithered channels exactly; the dithered channel
// within dc +/- amp and actually moving), one frame every 27 serial clocks,
// the reset trigger stopping the bus, and a new DC value reaching the DAC.
module tb_act_chip_ctrl;
  logic clk_dds = 0, clk = 0, rst_n = 1, dds_run = 0, start = 0, reset = 0;
  logic dith_step;
  logic [3:0][15:0] dc, amp;
  logic [3:0][15:0] pinc;
  logic [3:0] dith_en;
  logic sclk, sync_n, sdin, running, frame_done;
  int checks = 0, failures = 0;

  act_chip_ctrl dut (.clk_dds, .rst_dds_n(rst_n), .dds_run, .dith_step, .dc, .pinc, .amp, .dith_en,
    .clk, .rst_n, .start, .reset, .sclk, .sync_n, .sdin, .running, .frame_done);

  always #3.125 clk_dds = ~clk_dds;   // 160 MHz
  always #18.5  clk = ~clk;           // 27 MHz
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

  int div = 0;
  always @(posedge clk_dds) div <= (div + 1) % 32;
  assign dith_step = dds_run && div == 0;

  // DAC model
  logic [23:0] rx = 0;
  logic [15:0] dac_reg [4];
  int nb = 0, frames = 0, exp_ch = 0, bad_order = 0, bad_cmd = 0;
  int mn3 = 70000, mx3 = -1;
  always @(negedge sclk) if (!sync_n) begin rx = {rx[22:0], sdin}; nb++; end
  always @(posedge sync_n) begin
    if (nb == 24) begin
      frames++;
      if (rx[23:19] != 5'b00010) bad_cmd++;
      if (int'(rx[18:16]) != exp_ch) bad_order++;
      // every frame: command bits, channel order, value of the channel
      check(rx[23:19] == 5'b00010, $sformatf("frame %0d command bits %b", frames, rx[23:19]));
      check(int'(rx[18:16]) == exp_ch, $sformatf("frame %0d channel %0d expected %0d", frames, rx[18:16], exp_ch));
      if (rx[17:16] == 2'd0 || rx[17:16] == 2'd2)
        check(rx[15:0] == dc[rx[17:16]], $sformatf("frame %0d channel %0d word %0d", frames, rx[17:16], rx[15:0]));
      if (rx[17:16] == 2'd3)
        check(int'(rx[15:0]) >= 47000 - 2 && int'(rx[15:0]) <= 53000 + 2,
              $sformatf("frame %0d dithered word %0d", frames, rx[15:0]));
      exp_ch = (int'(rx[18:16]) + 1) % 4;
      dac_reg[rx[17:16]] = rx[15:0];
      if (rx[17:16] == 2'd3) begin
        if (int'(rx[15:0]) < mn3) mn3 = rx[15:0];
        if (int'(rx[15:0]) > mx3) mx3 = rx[15:0];
      end
    end
    nb = 0;
  end

  int f0;
  initial begin
    dc   = {16'd50000, 16'd1234, 16'd40000, 16'd20000};
    amp  = {16'd3000, 16'd0, 16'd0, 16'd0};
    pinc = {16'd4096, 16'd0, 16'd0, 16'd0};
    dith_en = 4'b1000;
    for (int i = 0; i < 4; i++) dac_reg[i] = 0;
    repeat (3) @(posedge clk);
    #2 rst_n = 1;
    @(posedge clk_dds); #1 dds_run = 1;
    repeat (5) @(posedge clk);
    check(sync_n && !running, "idle bus before start");
    #2 start = 1; @(posedge clk); #2 start = 0;
    repeat (270) @(posedge clk);
    f0 = frames;
    repeat (2700) @(posedge clk);
    check(frames - f0 >= 99 && frames - f0 <= 101, $sformatf("one frame per 27 clocks (%0d in 2700)", frames - f0));
    check(bad_order == 0 && bad_cmd == 0, "channel order and command bits");
    check(dac_reg[0] == 16'd20000 && dac_reg[1] == 16'd40000 && dac_reg[2] == 16'd1234, "DC words");
    check(mn3 >= 47000 - 2 && mx3 <= 53000 + 2 && mx3 - mn3 > 4000,
          $sformatf("dithered channel range %0d..%0d", mn3, mx3));
    // new DC value
    dc[1] = 16'd777;
    repeat (300) @(posedge clk);
    check(dac_reg[1] == 16'd777, "new DC value reaches the DAC");
    // reset trigger
    #2 reset = 1; @(posedge clk); #2 reset = 0;
    repeat (3) @(posedge clk);
    f0 = frames;
    repeat (300) @(posedge clk);
    check(frames == f0 && sync_n && !running, "bus stopped by reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

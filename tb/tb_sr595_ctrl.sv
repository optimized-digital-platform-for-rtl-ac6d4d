// Self-checking testbench of the 74HC595 shift-register loader.
// Two controllers (8 bits for the PGA gain pins, 16 bits for the chained
// heater-switch registers) drive behavioural models of the register chain:
// shift on the rising edge of srclk, copy to the outputs on the rising edge of
// the storage strobe, clear while srclr_n is low.  The test checks that the
// outputs equal the written word, that exactly N_BITS clock pulses occur per
// load with the strobe low only while shifting, that a transfer takes N_BITS
// clocks, and that a reset trigger clears the register for two clocks.
module tb_sr595_ctrl;
  logic clk = 0, rst_n = 1;
  logic start8 = 0, reset8 = 0, start16 = 0, reset16 = 0;
  logic [7:0]  d8;
  logic [15:0] d16;
  logic srclk8, ser8, load8, clr8, busy8, srclk16, ser16, load16, clr16, busy16;
  int checks = 0, failures = 0;

  sr595_ctrl #(.N_BITS(8)) dut8 (.clk, .rst_n, .start(start8), .reset(reset8), .data_in(d8),
    .srclk(srclk8), .ser(ser8), .load_data(load8), .srclr_n(clr8), .busy(busy8));
  sr595_ctrl #(.N_BITS(16)) dut16 (.clk, .rst_n, .start(start16), .reset(reset16), .data_in(d16),
    .srclk(srclk16), .ser(ser16), .load_data(load16), .srclr_n(clr16), .busy(busy16));

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

  // register-chain models
  logic [7:0]  sh8 = 0, q8 = 0;
  logic [15:0] sh16 = 0, q16 = 0;
  int pulses8 = 0, pulses16 = 0;
  always @(posedge srclk8 or negedge clr8)
    if (!clr8) sh8 <= 0; else begin sh8 <= {sh8[6:0], ser8}; pulses8++; end
  always @(posedge load8) q8 <= sh8;
  always @(posedge srclk16 or negedge clr16)
    if (!clr16) sh16 <= 0; else begin sh16 <= {sh16[14:0], ser16}; pulses16++; end
  always @(posedge load16) q16 <= sh16;

  // the storage strobe may only be low while the shift clock runs
  int low8 = 0;
  always @(posedge clk) if (!load8) low8++;

  int t0, t1, clr_len;
  initial begin
    repeat (3) @(posedge clk);
    #2 rst_n = 1;
    repeat (3) @(posedge clk);
    for (int k = 0; k < 40; k++) begin
      d8 = 8'($urandom); d16 = 16'($urandom);
      pulses8 = 0; pulses16 = 0; low8 = 0;
      @(posedge clk); #2 start8 = 1; start16 = 1;
      t0 = $time;
      @(posedge clk); #2 start8 = 0; start16 = 0;
      d8 = ~d8; d16 = ~d16;               // input captured at start
      wait (!busy16); t1 = $time;
      repeat (3) @(posedge clk);
      check(q8 == ~d8, $sformatf("8-bit word %h got %h", ~d8, q8));
      check(q16 == ~d16, $sformatf("16-bit word %h got %h", ~d16, q16));
      check(pulses8 == 8 && pulses16 == 16, $sformatf("pulse count %0d %0d", pulses8, pulses16));
      check(low8 == 8, $sformatf("strobe low for %0d clocks", low8));
      check((t1 - t0 + 2) / 10 == 17, $sformatf("16-bit transfer %0d clocks", (t1 - t0 + 2) / 10));
    end
    // reset trigger: clear pulse of two clocks
    @(posedge clk); #2 reset8 = 1; @(posedge clk); #2 reset8 = 0;
    clr_len = 0;
    repeat (6) begin @(posedge clk); #1 if (!clr8) clr_len++; end
    check(clr_len == 2, $sformatf("clear pulse %0d clocks", clr_len));
    @(posedge load8 or posedge clk);
    #2 start8 = 1; d8 = 8'h00; @(posedge clk); #2 start8 = 0;
    wait (!busy8); repeat (3) @(posedge clk);
    check(q8 == 8'h00 && sh8 == 0, "cleared then zero written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

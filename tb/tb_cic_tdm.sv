// Self-checking testbench of the time-shared CIC notch filter with its
// default size (D = 8, M = 64, 16 channels).
// Model: each output is the sum of the last D*M inputs of its channel,
// divided by D*M = 512 (floor) and taken modulo 2^32; one output per D
// inputs of a channel.  Checked: the clearing sweep (ready low for
// 16*64 clocks), every output value and its channel, the output rate, unit
// DC gain, and the notch: a tone with a period of exactly 512 input samples
// (1.22 kHz at 625 kS/s) is removed.
module tb_cic_tdm;
  localparam int N = 16, D = 8, M = 64, L = D * M;
  logic clk = 0, rst_n = 1;
  logic ready, in_valid = 0, out_valid;
  logic [3:0] in_ch = 0, out_ch;
  logic signed [31:0] in_data = 0, out_data;
  int checks = 0, failures = 0;

  cic_tdm dut (.clk, .rst_n, .ready, .in_valid, .in_ch, .in_data, .out_valid, .out_ch, .out_data);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s @%0t", msg, $time); end
  endtask

  longint hist [N][$];
  int n_in [N];
  int outs = 0;

  task automatic send(input int ch, input int x);
    longint s;
    bit dec;
    @(posedge clk); #1;
    in_valid = 1; in_ch = 4'(ch); in_data = x;
    hist[ch].push_back(longint'(x));
    if (hist[ch].size() > L) void'(hist[ch].pop_front());
    n_in[ch]++;
    dec = (n_in[ch] % D) == 0;
    s = 0;
    foreach (hist[ch][i]) s += hist[ch][i];
    @(posedge clk); #1;
    in_valid = 0;
    check(out_valid == dec, "one output per D inputs");
    if (dec) begin
      outs++;
      check(out_ch == 4'(ch), "channel tag");
      check(out_data == 32'(s >>> 9), $sformatf("ch %0d got %0d exp %0d", ch, out_data, s >>> 9));
    end
  endtask

  int t_ready, x;
  real ph;
  initial begin
    for (int i = 0; i < N; i++) n_in[i] = 0;
    repeat (2) @(posedge clk);
    #2 rst_n = 1;
    t_ready = 0;
    while (!ready) begin @(posedge clk); #1 t_ready++; end
    check(t_ready == N * M, $sformatf("clearing takes %0d clocks", t_ready));
    // random data, round-robin over the channels, large values to exercise wrap-around
    for (int k = 0; k < 1200; k++)
      for (int c = 0; c < N; c++)
        send(c, (c == 7) ? 32'sh7fffff00 : int'($urandom));
    // DC gain and notch on channel 2 (1200 inputs so far -> fresh window after 512)
    for (int k = 0; k < 600; k++) send(2, 100000);
    check(out_data == 100000, $sformatf("unit DC gain (%0d)", out_data));
    for (int k = 0; k < 1024; k++) begin
      ph = 2.0 * 3.14159265358979 * real'(k) / real'(L);
      send(2, $rtoi(1000000.0 * $sin(ph)));
    end
    check(out_data < 5 && out_data > -5, $sformatf("1.22 kHz notch (%0d)", out_data));
    check(outs == (1200 * N + 1624) / D, $sformatf("output count %0d", outs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

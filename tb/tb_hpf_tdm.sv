// Self-checking testbench of the time-shared high-pass filter.
// An integer model of the direct-form-II recursion, kept per channel,
//   w[n] = x[n] + floor(alpha * w[n-1] / 2^15) (31-bit),  y = w[n] - w[n-1],
// saturated to 17 bits, predicts every output; channels arrive in random
// order with random gaps.  Also checked: one clock of latency, the channel
// tag, and that a constant input decays to (nearly) zero at the output.
module tb_hpf_tdm;
  localparam int N = 16;
  logic clk = 0, rst_n = 1;
  logic signed [15:0] alpha, in_data;
  logic in_valid = 0;
  logic [3:0] in_ch = 0, out_ch;
  logic out_valid;
  logic signed [16:0] out_data;
  int checks = 0, failures = 0;

  hpf_tdm dut (.clk, .rst_n, .alpha, .in_valid, .in_ch, .in_data, .out_valid, .out_ch, .out_data);

  always #5 clk = ~clk;
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

  longint w [N];
  function automatic longint wrap(input longint v, input int bits);
    longint m;
    m = v & ((64'sd1 <<< bits) - 1);
    return (m >= (64'sd1 <<< (bits - 1))) ? m - (64'sd1 <<< bits) : m;
  endfunction

  longint e_y;
  int     e_ch;
  task automatic send(input int ch, input int x);
    longint wn, y;
    @(posedge clk); #1;
    in_valid = 1; in_ch = 4'(ch); in_data = 16'(x);
    wn = wrap(longint'(x) + ((w[ch] * longint'(alpha)) >>> 15), 31);
    y  = wn - w[ch];
    if (y > 65535) y = 65535;
    if (y < -65536) y = -65536;
    w[ch] = wn;
    @(posedge clk); #1;
    in_valid = 0;
    check(out_valid && out_ch == 4'(ch), "valid and channel one clock later");
    check(longint'(out_data) == y, $sformatf("ch %0d y got %0d exp %0d", ch, out_data, y));
  endtask

  int x, ch;
  initial begin
    for (int i = 0; i < N; i++) w[i] = 0;
    alpha = 16'sh7F00;
    repeat (3) @(posedge clk);
    #2 rst_n = 1;
    for (int k = 0; k < 8000; k++) begin
      ch = $urandom_range(N - 1);
      x  = (k % 500 < 250) ? int'($urandom_range(65535)) - 32768 : ((k % 40 < 20) ? 32767 : -32768);
      send(ch, x);
      if ($urandom_range(3) == 0) @(posedge clk);
    end
    // offset removal: a constant input decays
    alpha = 16'sh7E00;
    for (int k = 0; k < 6000; k++) send(3, 12000);
    check(out_data < 200 && out_data > -200, $sformatf("DC removed (%0d)", out_data));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

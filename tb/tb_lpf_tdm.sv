// Self-checking testbench of the time-shared low-pass filter.
// An integer model per channel,
//   w[n] = x[n] + floor(alpha * w[n-1] / 2^15) (32-bit),
//   y    = floor((w[n] + w[n-1]) / 2),
// predicts every output for random channels and inputs.  Also checked: one
// clock of latency and the DC gain 1/(1-alpha) (x8 for alpha = 7/8).
module tb_lpf_tdm;
  localparam int N = 16;
  logic clk = 0, rst_n = 1;
  logic signed [15:0] alpha;
  logic signed [16:0] in_data;
  logic in_valid = 0;
  logic [3:0] in_ch = 0, out_ch;
  logic out_valid;
  logic signed [31:0] out_data;
  int checks = 0, failures = 0;

  lpf_tdm dut (.clk, .rst_n, .alpha, .in_valid, .in_ch, .in_data, .out_valid, .out_ch, .out_data);

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

  task automatic send(input int ch, input int x);
    longint wn, y;
    @(posedge clk); #1;
    in_valid = 1; in_ch = 4'(ch); in_data = 17'(x);
    wn = wrap(longint'(x) + ((w[ch] * longint'(alpha)) >>> 15), 32);
    y  = (wn + w[ch]) >>> 1;
    w[ch] = wn;
    @(posedge clk); #1;
    in_valid = 0;
    check(out_valid && out_ch == 4'(ch), "valid and channel one clock later");
    check(longint'(out_data) == y, $sformatf("ch %0d y got %0d exp %0d", ch, out_data, y));
  endtask

  initial begin
    for (int i = 0; i < N; i++) w[i] = 0;
    alpha = 16'sh7FF8;
    repeat (3) @(posedge clk);
    #2 rst_n = 1;
    for (int k = 0; k < 8000; k++) begin
      send($urandom_range(N - 1), int'($urandom_range(131071)) - 65536);
      if ($urandom_range(3) == 0) @(posedge clk);
    end
    alpha = 16'sh7000;
    for (int k = 0; k < 300; k++) send(5, 1000);
    check(out_data >= 7990 && out_data <= 8000, $sformatf("DC gain 8 (%0d)", out_data));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

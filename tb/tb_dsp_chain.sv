// Self-checking testbench of the complete time-multiplexed lock-in chain,
// at its default size (16 channels, CIC D = 8, M = 64).
// Frames arrive every 64 clocks (625 kS/s at 40 MHz) as an ADC controller
// would deliver them: conv_start at each sampling instant, data_ready and the
// next conv_start together at the end of the frame.  The reference bits
// change at random at every sampling instant.  An integer model of
// HPF -> square-wave mixer -> LPF -> CIC for every channel and path, using
// the reference sampled at each frame's own sampling instant, predicts every
// result.  The run starts with the CIC enabled (one result per channel every
// 8 frames), switches to the bypass (every frame) and back.  Also checked:
// all 16 channels of a frame are delivered within 20 clocks of data_ready,
// each result once and in channel order.
module tb_dsp_chain;
  localparam int N = 16, P = 4, D = 8, M = 64, L = D * M;
  logic clk = 0, rst_n = 1;
  logic signed [15:0] alpha_hpf = 16'sh7F00, alpha_lpf = 16'sh7000;
  logic cic_en = 1, conv_start = 0, data_ready = 0;
  logic [N-1:0][15:0] samples = '0;
  logic [P-1:0] refs = '0, refs_used;
  logic ready, res_valid;
  logic [3:0] res_ch;
  logic [P-1:0][31:0] res_data;
  int checks = 0, failures = 0;

  dsp_chain dut (.clk, .rst_n, .alpha_hpf, .alpha_lpf, .cic_en, .conv_start, .data_ready,
    .samples, .refs, .ready, .res_valid, .res_ch, .res_data, .refs_used);

  always #12.5 clk = ~clk;
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

  function automatic longint wrap(input longint v, input int bits);
    longint m;
    m = v & ((64'sd1 <<< bits) - 1);
    return (m >= (64'sd1 <<< (bits - 1))) ? m - (64'sd1 <<< bits) : m;
  endfunction

  // ---- chain model ----------------------------------------------------
  longint hw [N];
  longint lw [N][P];
  longint cic_hist [N][P][$];
  int     cic_n [N];
  typedef struct { int ch; longint v [P]; } res_t;
  res_t exp_q [$];

  task automatic model_frame(input logic [N-1:0][15:0] s, input logic [P-1:0] r, input bit cic);
    longint wn, y, m, l, sum;
    res_t e;
    for (int c = 0; c < N; c++) begin
      wn = wrap(longint'(signed'(s[c])) + ((hw[c] * longint'(alpha_hpf)) >>> 15), 31);
      y  = wn - hw[c];
      if (y > 65535) y = 65535;
      if (y < -65536) y = -65536;
      hw[c] = wn;
      e.ch = c;
      if (cic) cic_n[c]++;
      for (int p = 0; p < P; p++) begin
        m  = r[p] ? ((y == -65536) ? 65535 : -y) : y;
        wn = wrap(m + ((lw[c][p] * longint'(alpha_lpf)) >>> 15), 32);
        l  = (wn + lw[c][p]) >>> 1;
        lw[c][p] = wn;
        if (cic) begin
          cic_hist[c][p].push_back(l);
          if (cic_hist[c][p].size() > L) void'(cic_hist[c][p].pop_front());
          sum = 0;
          foreach (cic_hist[c][p][i]) sum += cic_hist[c][p][i];
          e.v[p] = wrap(sum >>> 9, 32);
        end else
          e.v[p] = l;
      end
      if (!cic || (cic_n[c] % D) == 0) exp_q.push_back(e);
    end
  endtask

  // ---- result checking ---------------------------------------------------
  int got = 0, late = 0, since_dr = 0, last_frame_results = 0;
  always @(posedge clk) begin
    since_dr++;
    if (data_ready) since_dr = 0;
    if (res_valid) begin
      res_t e;
      got++;
      if (since_dr > 20) late++;
      if (exp_q.size() == 0) check(0, "unexpected result");
      else begin
        e = exp_q.pop_front();
        check(res_ch == 4'(e.ch), $sformatf("channel order got %0d exp %0d", res_ch, e.ch));
        for (int p = 0; p < P; p++)
          check(longint'(signed'(res_data[p])) == e.v[p],
                $sformatf("ch %0d path %0d got %0d exp %0d", e.ch, p, signed'(res_data[p]), e.v[p]));
      end
    end
  end

  // ---- frame source ------------------------------------------------------
  logic [P-1:0] ref_of_frame;
  int frame = 0;
  real ph;
  task automatic run_frames(input int n);
    logic [N-1:0][15:0] s;
    logic [P-1:0] cur;
    for (int k = 0; k < n; k++) begin
      repeat (63) @(posedge clk);
      #1;
      for (int c = 0; c < N; c++) begin
        ph = 2.0 * 3.14159265358979 * real'(frame) * real'(c + 1) / 97.0;
        s[c] = 16'($rtoi(20000.0 * $sin(ph)) + int'($urandom_range(2000)) - 1000 + 500 * c);
      end
      samples = s; data_ready = 1; conv_start = 1;
      model_frame(s, ref_of_frame, cic_en);
      cur = ref_of_frame;
      refs = 4'($urandom);
      ref_of_frame = refs;
      @(posedge clk); #1;
      data_ready = 0; conv_start = 0;
      check(refs_used == cur, "reference of the frame's own sampling instant");
      frame++;
    end
  endtask

  int t_wait;
  initial begin
    for (int c = 0; c < N; c++) begin
      hw[c] = 0; cic_n[c] = 0;
      for (int p = 0; p < P; p++) lw[c][p] = 0;
    end
    repeat (2) @(posedge clk);
    #2 rst_n = 1;
    t_wait = 0;
    while (!ready) begin @(posedge clk); #1 t_wait++; end
    check(t_wait <= 1030, "clearing done");
    // first sampling instant
    refs = 4'b0110; ref_of_frame = refs;
    @(posedge clk); #1 conv_start = 1; @(posedge clk); #1 conv_start = 0;
    run_frames(600);
    repeat (30) @(posedge clk);
    check(got == 600 / D * N, $sformatf("CIC mode: %0d results", got));
    cic_en = 0; got = 0;
    run_frames(100);
    repeat (30) @(posedge clk);
    check(got == 100 * N, $sformatf("bypass mode: %0d results", got));
    cic_en = 1; got = 0;
    run_frames(64);
    repeat (40) @(posedge clk);
    check(got == 64 / D * N, $sformatf("CIC again: %0d results", got));
    check(late == 0, "results within 20 clocks of data_ready");
    check(exp_q.size() == 0, "no result missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench of the DDS.
// Checks every output against a floating-point sine/cosine of the expected
// phase (at most 2 LSB apart), the period of the MSB square wave for a given
// phase increment (f = pinc/2^16 * f_clk), the phase offset, aclken forcing the
// outputs to zero without stopping the accumulator, and the step enable.
module tb_dds;
  localparam int PW = 16, OW = 14;
  logic aclk = 0, aresetn = 0, aclken = 0, step = 1;
  logic [PW-1:0] pinc, poff;
  logic signed [OW-1:0] sine, cosine;
  logic tvalid;
  logic [PW-1:0] acc;
  int checks = 0, failures = 0;

  dds #(.PHASE_W(PW), .OUT_W(OW)) dut (.aclk, .aresetn, .aclken, .step, .pinc, .poff,
    .sine, .cosine, .tvalid, .phase_acc(acc));

  always #5 aclk = ~aclk;

  initial begin
    repeat (200000) @(posedge aclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_val(input int ph, input bit cosw);
    real a, v;
    int q;
    q = ph & 16'hfff0;              // table resolution: 2 quadrant + 10 address bits
    a = 2.0 * 3.14159265358979 * (real'(q) + 8.0) / 65536.0;
    v = (cosw ? $cos(a) : $sin(a)) * 8191.0;
    return $rtoi(v >= 0.0 ? v + 0.5 : v - 0.5);
  endfunction

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  int prev_acc, ph, e_s, e_c, edges, first_edge, last_edge, cyc;
  logic prev_msb;
  initial begin
    pinc = 16'd1234; poff = 16'd0;
    repeat (3) @(posedge aclk);
    aresetn = 1; aclken = 1;
    // sweep: compare each output with the phase of the previous cycle
    @(posedge aclk); #1;
    for (int i = 0; i < 3000; i++) begin
      prev_acc = acc;
      @(posedge aclk); #1;
      ph = (prev_acc + poff) & 16'hffff;
      e_s = expect_val(ph, 0);
      e_c = expect_val(ph, 1);
      check((sine - e_s) <= 2 && (e_s - sine) <= 2, $sformatf("sine ph=%0d got %0d exp %0d", ph, sine, e_s));
      check((cosine - e_c) <= 2 && (e_c - cosine) <= 2, $sformatf("cos ph=%0d got %0d exp %0d", ph, cosine, e_c));
      check(acc == ((prev_acc + pinc) & 16'hffff), "accumulator step");
      if (i == 1500) poff = 16'd20000;
    end
    // square-wave period: pinc = 2^10 gives 64 cycles
    pinc = 16'd1024; poff = 0;
    edges = 0; prev_msb = sine[OW-1];
    for (cyc = 0; cyc < 1000; cyc++) begin
      @(posedge aclk); #1;
      if (prev_msb && !sine[OW-1]) begin
        if (edges == 0) first_edge = cyc;
        last_edge = cyc; edges++;
      end
      prev_msb = sine[OW-1];
    end
    check(edges >= 14 && (last_edge - first_edge) == 64 * (edges - 1), $sformatf("square period edges=%0d span=%0d", edges, last_edge-first_edge));
    // aclken low: zero output, accumulator runs
    aclken = 0; prev_acc = acc;
    @(posedge aclk); @(posedge aclk); #1;
    check(sine == 0 && cosine == 0 && !tvalid, "aclken zeroes output");
    check(acc == ((prev_acc + 2*1024) & 16'hffff), "accumulator keeps running");
    // step low freezes the phase
    aclken = 1; step = 0; prev_acc = acc;
    repeat (5) @(posedge aclk); #1;
    check(acc == prev_acc && tvalid, "step low holds phase");
    // reset
    aresetn = 0; @(posedge aclk); #1;
    check(acc == 0 && sine == 0, "reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

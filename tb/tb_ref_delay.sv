// Self-checking testbench of the reference delay line: two instances (depth
// 1, the value used in the processing chain, and depth 3) are shifted at
// random instants; q must always equal the input presented DEPTH shifts
// earlier (zero before that), and must hold between shifts.
module tb_ref_delay;
  logic clk = 0, rst_n = 1, shift = 0;
  logic [3:0] d, q1, q3;
  int checks = 0, failures = 0;

  ref_delay dut1 (.clk, .rst_n, .shift, .d, .q(q1));
  ref_delay #(.W(4), .DEPTH(3)) dut3 (.clk, .rst_n, .shift, .d, .q(q3));

  always #5 clk = ~clk;
  initial #1 rst_n = 0;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s @%0t", msg, $time); end
  endtask

  logic [3:0] hist [$];
  initial begin
    d = 0;
    repeat (3) @(posedge clk);
    #2 rst_n = 1;
    hist = {4'h0, 4'h0, 4'h0};
    for (int k = 0; k < 5000; k++) begin
      d = 4'($urandom);
      shift = ($urandom_range(3) == 0);
      @(posedge clk); #1;
      if (shift) hist.push_back(d);
      check(q1 == hist[hist.size()-1], "depth 1");
      check(q3 == hist[hist.size()-3], "depth 3");
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

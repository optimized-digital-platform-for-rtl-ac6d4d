// Self-checking testbench of the host parameter memory: random writes
// (data on one wire, address on another, stored on the write trigger),
// changes of the wires without a trigger, and out-of-range addresses; after
// every clock all registers must equal a testbench copy.
module tb_host_regfile;
  localparam int N = 128;
  logic clk = 0, rst_n = 1, trig_write = 0;
  logic [15:0] wire_data = 0, wire_addr = 0;
  logic [N-1:0][15:0] regs;
  logic [15:0] model [N];
  int checks = 0, failures = 0;

  host_regfile dut (.clk, .rst_n, .wire_data, .wire_addr, .trig_write, .regs);

  always #12.5 clk = ~clk;
  initial #1 rst_n = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s @%0t", msg, $time); end
  endtask

  bit ok;
  initial begin
    for (int i = 0; i < N; i++) model[i] = 0;
    repeat (3) @(posedge clk);
    #2 rst_n = 1;
    for (int k = 0; k < 5000; k++) begin
      wire_data  = 16'($urandom);
      wire_addr  = ($urandom_range(9) == 0) ? 16'($urandom_range(65535, N)) : 16'($urandom_range(N - 1));
      trig_write = ($urandom_range(1) == 0);
      @(posedge clk); #1;
      if (trig_write && wire_addr < N) model[wire_addr] = wire_data;
      trig_write = 0;
      ok = 1;
      for (int i = 0; i < N; i++) if (regs[i] != model[i]) ok = 0;
      check(ok, "register contents");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

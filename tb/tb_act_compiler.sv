// Self-checking testbench of the heater DAC instruction compiler: with the
// programmer's ready signal toggled at random, every offered instruction must
// carry the write-DAC-register command (bits 23:19 = 00010), the current
// channel address (bits 18:16) and that channel's word, the channel must
// advance A, B, C, D, A... on every accepted instruction only, and clear must
// restart from channel A with nothing offered.
module tb_act_compiler;
  logic clk = 0, rst_n = 1, clear = 0, enable = 0, prog_ready = 0;
  logic [3:0][15:0] words;
  logic instr_valid;
  logic [23:0] instr;
  logic [1:0] cur_ch;
  int checks = 0, failures = 0;

  act_compiler dut (.clk, .rst_n, .clear, .enable, .words, .prog_ready, .instr_valid, .instr, .cur_ch);

  always #5 clk = ~clk;
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

  int exp_ch = 0, accepted = 0;
  initial begin
    for (int i = 0; i < 4; i++) words[i] = 16'($urandom);
    repeat (3) @(posedge clk);
    #2 rst_n = 1;
    @(posedge clk); #1;
    check(!instr_valid, "nothing offered while disabled");
    enable = 1;
    for (int k = 0; k < 4000; k++) begin
      prog_ready = ($urandom_range(2) == 0);
      for (int i = 0; i < 4; i++) if ($urandom_range(7) == 0) words[i] = 16'($urandom);
      if (k == 2000) clear = 1;
      #1;
      if (clear) check(!instr_valid, "nothing offered during clear");
      else begin
        check(instr_valid, "offered");
        check(instr[23:19] == 5'b00010, "command bits");
        check(instr[18:16] == 3'(exp_ch), $sformatf("channel %0d exp %0d", instr[18:16], exp_ch));
        check(instr[15:0] == words[exp_ch], "word of the channel");
      end
      @(posedge clk); #1;
      if (clear) exp_ch = 0;
      else if (prog_ready) begin exp_ch = (exp_ch + 1) % 4; accepted++; end
      clear = 0;
    end
    check(accepted > 1000, "instructions accepted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

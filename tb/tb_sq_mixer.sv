// Self-checking testbench of the square-wave mixer: random and corner
// values with both reference levels; the output must be the input for a 0
// reference and its negation for a 1 reference (the most negative value
// saturating to the most positive).
module tb_sq_mixer;
  localparam int W = 17;
  logic signed [W-1:0] in_data, out_data;
  logic ref_bit;
  int checks = 0, failures = 0;
  logic clk = 0;

  sq_mixer dut (.in_data, .ref_bit, .out_data);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input int v, input bit r);
    int e;
    in_data = W'(v); ref_bit = r;
    #1;
    e = r ? -v : v;
    if (e > 65535) e = 65535;
    checks++;
    if (int'(out_data) != e) begin
      failures++;
      if (failures < 10) $display("FAIL in=%0d ref=%0d out=%0d exp=%0d", v, r, out_data, e);
    end
  endtask

  initial begin
    try(-65536, 1); try(-65536, 0); try(65535, 1); try(65535, 0); try(0, 1); try(0, 0);
    try(1, 1); try(-1, 1);
    for (int k = 0; k < 20000; k++) try(int'($urandom_range(131071)) - 65536, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

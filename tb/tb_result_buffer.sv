// Self-checking testbench of the result buffer (64 streams of 256 words).
// Results arrive for 16 channels in turn, four paths each; a queue per stream
// in the testbench models the FIFOs.  Checked: every word read back in order
// from randomly chosen streams, rd_count and rd_empty, the keep-one-in-N
// decimation (N = 1 and 3), the overflow flag (set only when a stream is
// written while full, with the extra word dropped), and clr.
module tb_result_buffer;
  localparam int NCH = 16, NP = 4, NS = NCH * NP, DEPTH = 256;
  logic clk = 0, rst_n = 1, clr = 0, res_valid = 0, rd_en = 0;
  logic [15:0] decim = 0;
  logic [3:0] res_ch = 0;
  logic [NP-1:0][31:0] res_data = '0;
  logic [5:0] rd_sel = 0;
  logic [31:0] rd_data;
  logic rd_empty, overflow, kept;
  logic [8:0] rd_count;
  int checks = 0, failures = 0;

  result_buffer dut (.clk, .rst_n, .clr, .decim, .res_valid, .res_ch, .res_data, .rd_sel, .rd_en,
    .rd_data, .rd_empty, .rd_count, .overflow, .kept);

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

  logic [31:0] q [NS][$];
  int seen [NCH];
  bit m_ovf = 0;

  task automatic push_result(input int ch);
    @(posedge clk); #1;
    res_valid = 1; res_ch = 4'(ch);
    for (int p = 0; p < NP; p++) res_data[p] = $urandom;
    if (decim <= 1 || seen[ch] % int'(decim) == 0) begin
      for (int p = 0; p < NP; p++) begin
        if (q[ch * NP + p].size() < DEPTH) q[ch * NP + p].push_back(res_data[p]);
        else m_ovf = 1;
      end
    end
    seen[ch]++;
    @(posedge clk); #1;
    res_valid = 0;
  endtask

  task automatic pop(input int s, input int n);
    rd_sel = 6'(s);
    for (int i = 0; i < n; i++) begin
      #1;
      check(int'(rd_count) == q[s].size(), $sformatf("count stream %0d: %0d vs %0d", s, rd_count, q[s].size()));
      check(rd_empty == (q[s].size() == 0), "empty flag");
      if (q[s].size() == 0) break;
      check(rd_data == q[s].pop_front(), $sformatf("data stream %0d", s));
      rd_en = 1;
      @(posedge clk); #1 rd_en = 0;
    end
  endtask

  initial begin
    for (int c = 0; c < NCH; c++) seen[c] = 0;
    repeat (3) @(posedge clk);
    #2 rst_n = 1;
    // no decimation, interleaved reads
    for (int r = 0; r < 40; r++) begin
      for (int c = 0; c < NCH; c++) push_result(c);
      pop($urandom_range(NS - 1), $urandom_range(5));
    end
    for (int s = 0; s < NS; s++) pop(s, 300);
    check(!overflow && !m_ovf, "no overflow yet");
    // keep one in three
    decim = 3;
    for (int c = 0; c < NCH; c++) seen[c] = 0;
    #1 clr = 1; @(posedge clk); #1 clr = 0;
    for (int r = 0; r < 30; r++) for (int c = 0; c < NCH; c++) push_result(c);
    for (int s = 0; s < NS; s++) begin
      check(q[s].size() == 10, "decimated count model");
      pop(s, 300);
    end
    // overflow of channel 5's streams
    decim = 1;
    for (int r = 0; r < DEPTH + 3; r++) push_result(5);
    check(overflow && m_ovf, "overflow flagged");
    pop(21, 300);
    pop(20, 300);
    #1 clr = 1; @(posedge clk); #1 clr = 0;
    for (int s = 0; s < NS; s++) q[s].delete();
    #1 check(!overflow && rd_empty && rd_count == 0, "clr empties and clears the flag");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

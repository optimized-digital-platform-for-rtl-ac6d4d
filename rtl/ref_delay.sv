// Delay line for the digital demodulation references.
// The samples reach the mixers through registers clocked once per sample; the
// square-wave references must pass through the same number of sample-rate
// registers, or the demodulation phase would depend on the intermediate
// frequency.  DEPTH registers, all advanced by `shift` (the sample strobe),
// delay the W reference bits.  Output valid after DEPTH shifts; cleared by
// reset.  The idea follows the description; DEPTH matches this design's
// pipeline (one holding register between sampling and processing).
module ref_delay #(
  parameter int unsigned W     = 4,
  parameter int unsigned DEPTH = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] line [DEPTH];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) line[i] <= '0;
    end else if (shift) begin
      line[0] <= d;
      for (int i = 1; i < DEPTH; i++) line[i] <= line[i-1];
    end
  end
  assign q = line[DEPTH-1];
endmodule

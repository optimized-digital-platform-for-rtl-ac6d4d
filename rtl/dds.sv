// Direct digital synthesizer with sine and cosine outputs.
//
// A PHASE_W-bit phase accumulator adds the phase increment every time `step`
// is high; the programmable phase offset is added to the accumulator before
// the look-up, so f_out = pinc / 2^PHASE_W * f_step.  Only a quarter of a sine
// period is tabulated: the two phase MSBs pick the quadrant, the next LUT_AW
// bits address the table (mirrored in quadrants 1 and 3, negated in 2 and 3).
// Table entry k holds round((2^(OUT_W-1)-1) * sin(pi/2 * (k+0.5) / 2^LUT_AW)),
// computed at elaboration by a fixed-point Taylor series, so no table file is
// needed.  The half-step offset makes the table symmetric and keeps every
// output non-zero, so the output MSB is a clean square wave that is 0 while
// the sine is positive (the demodulation references use it that way).
//
// Ports follow the synthesizer core the board uses: aclk, aresetn
// (synchronous, active low; restarts from phase 0), aclken (when low the
// outputs are forced to zero but the accumulator keeps running), a phase
// increment and offset, and the sine/cosine output with a valid flag.  The
// extra `step` input advances the accumulator; tie it high to run at the clock
// rate or pulse it to run at an integer fraction of the clock.
// Timing: sine/cosine are registered; they show the phase accumulated up to
// the previous clock edge.  The 16-bit phase and 14-bit output widths are the
// described ones; the table depth (LUT_AW) is this design's choice.
module dds #(
  parameter int unsigned PHASE_W = 16,
  parameter int unsigned OUT_W   = 14,
  parameter int unsigned LUT_AW  = 10
) (
  input  logic                     aclk,
  input  logic                     aresetn,
  input  logic                     aclken,
  input  logic                     step,
  input  logic [PHASE_W-1:0]       pinc,
  input  logic [PHASE_W-1:0]       poff,
  output logic signed [OUT_W-1:0]  sine,
  output logic signed [OUT_W-1:0]  cosine,
  output logic                     tvalid,
  output logic [PHASE_W-1:0]       phase_acc
);

  localparam int unsigned LUT_N = 1 << LUT_AW;
  typedef logic [OUT_W-2:0] rom_t [LUT_N];

  // sin(pi/2*(2k+1)/2^(LUT_AW+1)) scaled to OUT_W-1 bits, Q30 Taylor series
  function automatic rom_t gen_rom();
    rom_t r;
    longint x, term, sum, a_q;
    for (int k = 0; k < LUT_N; k++) begin
      x    = (64'sd1686629713 * longint'(2*k+1)) >>> (LUT_AW + 1);
      term = x;
      sum  = x;
      for (int n = 1; n <= 7; n++) begin
        term = (term * x) >>> 30;
        term = (term * x) >>> 30;
        term = -term / longint'((2*n) * (2*n+1));
        sum  = sum + term;
      end
      a_q  = (sum * longint'((1 << (OUT_W-1)) - 1) + (64'sd1 <<< 29)) >>> 30;
      r[k] = a_q[OUT_W-2:0];
    end
    return r;
  endfunction

  localparam rom_t ROM = gen_rom();

  logic [PHASE_W-1:0] phase;
  assign phase = phase_acc + poff;

  // quarter-wave mapping of one phase value to a signed amplitude
  function automatic logic signed [OUT_W-1:0] lookup(input logic [PHASE_W-1:0] ph);
    logic [1:0]        quad;
    logic [LUT_AW-1:0] idx;
    logic [OUT_W-1:0]  mag;
    quad = ph[PHASE_W-1 -: 2];
    idx  = ph[PHASE_W-3 -: LUT_AW];
    mag  = {1'b0, ROM[quad[0] ? ~idx : idx]};
    return quad[1] ? -mag : mag;
  endfunction

  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      phase_acc <= '0;
      sine      <= '0;
      cosine    <= '0;
      tvalid    <= 1'b0;
    end else begin
      if (step) phase_acc <= phase_acc + pinc;
      tvalid <= aclken;
      if (aclken) begin
        sine   <= lookup(phase);
        cosine <= lookup(phase + PHASE_W'(1 << (PHASE_W-2)));
      end else begin
        sine   <= '0;
        cosine <= '0;
      end
    end
  end

endmodule

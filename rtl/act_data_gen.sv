// Heater word generation for one actuation chain (clock: 160 MHz).
//
// The 16-bit word sent to a heater DAC is the DC value chosen by the host plus,
// when dithering is enabled, a sine from this chain's own dither DDS:
//   word = clamp(dc + (sine * amp) >>> 13, 0, 65535)
// where sine is the 14-bit signed DDS output (peak 8191), so amp is the peak
// dither amplitude in DAC codes.  The DDS advances only on `step`, one clock
// in 32 (a 5 MHz synthesizer rate, an exact submultiple of the 160 MHz
// stimulus rate, so f_dith = pinc * 5 MHz / 2^16), and is held reset while
// `run` is low so that it starts in phase with the demodulation references.
// The clamp keeps the drive non-negative: negative heater drive is not
// allowed.  The word is registered (one clock latency).
// DC plus dither sum and the 5 MHz DDS follow the description; the amplitude
// scaling and the clamp are this design's choices.
module act_data_gen #(
  parameter int unsigned PHASE_W = 16,
  parameter int unsigned DDS_W   = 14,
  parameter int unsigned WORD_W  = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               run,
  input  logic               step,
  input  logic [WORD_W-1:0]  dc,
  input  logic [PHASE_W-1:0] pinc,
  input  logic [WORD_W-1:0]  amp,
  input  logic               dith_en,
  output logic [WORD_W-1:0]  word
);
  logic signed [DDS_W-1:0] s, c;
  logic v;
  logic [PHASE_W-1:0] acc;

  dds #(.PHASE_W(PHASE_W), .OUT_W(DDS_W)) u_dds (
    .aclk(clk), .aresetn(run), .aclken(dith_en), .step(step),
    .pinc(pinc), .poff('0), .sine(s), .cosine(c), .tvalid(v), .phase_acc(acc));

  localparam int unsigned PW = DDS_W + WORD_W + 1;
  logic signed [PW-1:0]     prod;
  logic signed [WORD_W+2:0] dith, sum;

  always_comb begin
    prod = PW'(s) * $signed({1'b0, amp});
    dith = (WORD_W+3)'(prod >>> (DDS_W - 1));
    sum  = $signed({3'b000, dc}) + dith;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                  word <= '0;
    else if (sum < 0)                            word <= '0;
    else if (sum > $signed((WORD_W+3)'((1 << WORD_W) - 1))) word <= '1;
    else                                         word <= sum[WORD_W-1:0];
  end
endmodule

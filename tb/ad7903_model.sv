// Behavioural model of one channel of a 16-bit serial SAR ADC (AD7903
// style, three-wire mode without busy indicator), for testbenches only.
// The rising edge of cnv samples the value input (the conversion result).
// While cnv is low, each falling edge of sck puts the next bit on sdo, MSB
// first, for 16 edges.  The model also reports a conversion whose cnv-high
// time is shorter than MIN_CONV_NS (29 periods of a 40 MHz clock).
module ad7903_model #(
  parameter real MIN_CONV_NS = 725.0
) (
  input  logic        cnv,
  input  logic        sck,
  input  logic [15:0] value,
  output logic        sdo,
  output int          short_convs
);
  logic [15:0] word = 16'h0;
  int   cnt = 16;
  realtime t_rise = 0;
  initial begin sdo = 1'b0; short_convs = 0; end

  always @(posedge cnv) begin
    word   = value;
    cnt    = 0;
    t_rise = $realtime;
    sdo    = 1'b0;
  end
  always @(negedge cnv) if ($realtime - t_rise < MIN_CONV_NS) short_convs++;
  always @(negedge sck) if (!cnv && cnt < 16) begin
    sdo = word[15 - cnt];
    cnt++;
  end
endmodule

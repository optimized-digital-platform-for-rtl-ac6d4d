// Controller of the second stimulation chain (clock: 160 MHz DDS clock).
//
// The second chain produces a fast sine (up to about 10 MHz) that analog
// switches can add to any heater drive, for thermal modulation faster than the
// serial heater DACs allow.  A start trigger loads the phase increment and
// releases the single DDS and wakes the parallel DAC; a reset trigger stops
// and resets the DDS and puts the DAC to sleep.  Like the first chain, the DAC
// word (straight binary, mid-scale = 0 V) and sleep are updated on the falling
// edge.  The original board description gives this entity only as a simpler copy of the
// first chain's controller with one DDS; the details here mirror stim_ctrl.
module fast_dith_ctrl #(
  parameter int unsigned PHASE_W = 16,
  parameter int unsigned OUT_W   = 14
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               reset,
  input  logic [PHASE_W-1:0] pinc,
  output logic [OUT_W-1:0]   dac_db,
  output logic               dac_sleep,
  output logic               running
);
  logic [PHASE_W-1:0] inc;
  logic signed [OUT_W-1:0] s, c;
  logic v;
  logic [PHASE_W-1:0] acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      inc     <= '0;
    end else if (reset) begin
      running <= 1'b0;
    end else if (start && !running) begin
      running <= 1'b1;
      inc     <= pinc;
    end
  end

  dds #(.PHASE_W(PHASE_W), .OUT_W(OUT_W)) u_dds (
    .aclk(clk), .aresetn(running), .aclken(1'b1), .step(1'b1),
    .pinc(inc), .poff('0), .sine(s), .cosine(c), .tvalid(v), .phase_acc(acc));

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dac_db    <= {1'b1, {(OUT_W-1){1'b0}}};
      dac_sleep <= 1'b1;
    end else begin
      dac_sleep <= !running;
      dac_db    <= v ? {~s[OUT_W-1], s[OUT_W-2:0]} : {1'b1, {(OUT_W-1){1'b0}}};
    end
  end
endmodule

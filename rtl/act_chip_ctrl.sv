// Control entity of one heater DAC chip (four actuation chains).
//
// Contains the four data generators (160 MHz domain: DC value plus dither
// sine), their clock-domain crossings, the instruction compiler and the serial
// programmer (27 MHz domain).  A start trigger (27 MHz domain) starts the
// refresh loop: the compiler hands the programmer one channel after the
// other, one 24-bit instruction every 27 clocks.  A reset trigger stops the
// loop at once, returns the programmer to idle and zeroes the registers.
// The heater words cross from 160 MHz to 27 MHz through request/acknowledge
// holding registers, so each instruction carries a complete, recent word.
// The split into data generation, compiler and programmer under one
// start/reset FSM follows the description; the crossing scheme is this
// design's.
module act_chip_ctrl #(
  parameter int unsigned N_DAC   = 4,
  parameter int unsigned PHASE_W = 16,
  parameter int unsigned WORD_W  = 16
) (
  input  logic                          clk_dds,
  input  logic                          rst_dds_n,
  input  logic                          dds_run,
  input  logic                          dith_step,
  input  logic [N_DAC-1:0][WORD_W-1:0]  dc,
  input  logic [N_DAC-1:0][PHASE_W-1:0] pinc,
  input  logic [N_DAC-1:0][WORD_W-1:0]  amp,
  input  logic [N_DAC-1:0]              dith_en,
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic                          reset,
  output logic                          sclk,
  output logic                          sync_n,
  output logic                          sdin,
  output logic                          running,
  output logic                          frame_done
);
  logic [N_DAC-1:0][WORD_W-1:0] gen_w, dst_w;
  logic [N_DAC-1:0]             upd;

  for (genvar i = 0; i < N_DAC; i++) begin : g_ch
    act_data_gen #(.PHASE_W(PHASE_W), .WORD_W(WORD_W)) u_gen (
      .clk(clk_dds), .rst_n(rst_dds_n), .run(dds_run), .step(dith_step),
      .dc(dc[i]), .pinc(pinc[i]), .amp(amp[i]), .dith_en(dith_en[i]), .word(gen_w[i]));
    cdc_word #(.W(WORD_W)) u_cdc (
      .src_clk(clk_dds), .src_rst_n(rst_dds_n), .src_data(gen_w[i]),
      .dst_clk(clk), .dst_rst_n(rst_n), .dst_data(dst_w[i]), .dst_update(upd[i]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        running <= 1'b0;
    else if (reset)    running <= 1'b0;
    else if (start)    running <= 1'b1;
  end

  logic prog_ready, instr_valid;
  logic [WORD_W+7:0] instr;
  logic [$clog2(N_DAC)-1:0] cur_ch;

  act_compiler #(.N_DAC(N_DAC), .WORD_W(WORD_W)) u_comp (
    .clk, .rst_n, .clear(reset), .enable(running), .words(dst_w),
    .prog_ready, .instr_valid, .instr, .cur_ch);

  act_programmer #(.WORD_W(WORD_W + 8), .GAP(3)) u_prog (
    .clk, .rst_n, .clear(reset), .in_valid(instr_valid), .in_ready(prog_ready),
    .in_instr(instr), .sclk, .sync_n, .sdin, .frame_done);
endmodule

// Instruction compiler for one four-channel heater DAC.
//
// Each time the programmer can take a word, the compiler builds the 24-bit
// instruction for the next DAC channel in turn (A, B, C, D, A, ...):
//   [23]    R/W = 0 (write)
//   [22]    0
//   [21:19] register select = 010 (DAC data register)
//   [18:16] channel address 000..011
//   [15:0]  the channel's 16-bit word
// so the four channels are refreshed round-robin.  `clear` restarts from
// channel A.  The concatenation of an 8-bit instruction field with the 16-bit
// word and the channel cycling follow the description; the field values are
// the converter's usual write-DAC-register command, not given there.
module act_compiler #(
  parameter int unsigned N_DAC  = 4,
  parameter int unsigned WORD_W = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          clear,
  input  logic                          enable,
  input  logic [N_DAC-1:0][WORD_W-1:0]  words,
  input  logic                          prog_ready,
  output logic                          instr_valid,
  output logic [WORD_W+7:0]             instr,
  output logic [$clog2(N_DAC)-1:0]      cur_ch
);
  localparam logic [2:0] REG_DAC = 3'b010;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                        cur_ch <= '0;
    else if (clear)                                    cur_ch <= '0;
    else if (enable && prog_ready)                     cur_ch <= cur_ch + 1'b1;
  end

  assign instr_valid = enable && !clear;
  assign instr       = {1'b0, 1'b0, REG_DAC, 3'(cur_ch), words[cur_ch]};
endmodule

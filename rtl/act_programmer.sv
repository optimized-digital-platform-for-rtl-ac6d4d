// Serial programmer of one four-channel heater DAC (AD5764R-style bus).
//
// Takes a 24-bit instruction (in_valid/in_ready handshake), drives sync_n low
// and sends the instruction MSB first, one bit per clock of the forwarded
// 27 MHz serial clock (bits change on the rising edge; the DAC samples on the
// falling edge), then holds sync_n high for GAP = 3 clocks as the DAC
// requires between words.  One instruction every 24 + 3 = 27 clocks: 1 MHz
// at 27 MHz, i.e. 250 kHz per channel when the four channels take turns.
// in_ready is high in the clocks where a new instruction can be accepted
// (idle, or the last gap clock, so back-to-back words keep the 27-clock rate).
// Word length, gap and clock follow the description.
module act_programmer #(
  parameter int unsigned WORD_W = 24,
  parameter int unsigned GAP    = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [WORD_W-1:0] in_instr,
  output logic              sclk,
  output logic              sync_n,
  output logic              sdin,
  output logic              frame_done
);
  localparam int unsigned CW = $clog2(WORD_W + GAP + 1);
  typedef enum logic [1:0] {S_IDLE, S_SHIFT, S_GAP} state_t;
  state_t state;
  logic [WORD_W-1:0] shreg;
  logic [CW-1:0] cnt;

  assign sclk     = clk;
  assign in_ready = !clear && ((state == S_IDLE) || (state == S_GAP && cnt == 0));
  assign sync_n   = (state != S_SHIFT);
  assign sdin     = (state == S_SHIFT) && shreg[WORD_W-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      shreg      <= '0;
      cnt        <= '0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      if (clear) begin
        state <= S_IDLE;
        shreg <= '0;
        cnt   <= '0;
      end else begin
        unique case (state)
          S_IDLE: if (in_valid) begin
            shreg <= in_instr;
            cnt   <= CW'(WORD_W - 1);
            state <= S_SHIFT;
          end
          S_SHIFT: begin
            shreg <= shreg << 1;
            if (cnt == 0) begin
              cnt   <= CW'(GAP - 1);
              state <= S_GAP;
            end else cnt <= cnt - 1'b1;
          end
          S_GAP: begin
            if (cnt == 0) begin
              frame_done <= 1'b1;
              if (in_valid) begin
                shreg <= in_instr;
                cnt   <= CW'(WORD_W - 1);
                state <= S_SHIFT;
              end else state <= S_IDLE;
            end else cnt <= cnt - 1'b1;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end
endmodule

// Controller of the acquisition ADCs (AD7903-style, serial output).
//
// All ADCs share the conversion pin (cnv) and the serial clock, which is the
// module clock (40 MHz) forwarded; each ADC has its own data line.  After a
// start trigger the FSM loops through
//   WAIT  (CONV_CYC = 47 clocks, cnv high: the ADCs convert; 29 would be the
//          minimum, the extra clocks set the sample rate),
//   ACQ   (ADC_W = 16 clocks, cnv low: one bit per ADC per rising edge, MSB
//          first; the ADCs shift on the falling edge),
//   END   (1 clock: the 16 words are presented and data_ready pulses),
// i.e. 64 clocks per sample, 40 MHz / 64 = 625 kS/s.  A stop trigger is
// remembered and ends the loop at the next END.  hard_rst_n is the
// asynchronous hard reset: it clears the registers and stops the FSM at once.
// conv_start pulses in the first WAIT clock (the sampling instant), which
// the demodulation references use to be sampled at the same moment.
// The state sequence, the cycle counts and the start/stop/hard-reset triggers
// follow the description; data_ready is a one-clock strobe in the 40 MHz
// domain rather than a derived clock, which is this design's choice.
module adc_ctrl #(
  parameter int unsigned N_ADC    = 16,
  parameter int unsigned ADC_W    = 16,
  parameter int unsigned CONV_CYC = 47
) (
  input  logic                   clk,
  input  logic                   hard_rst_n,
  input  logic                   start,
  input  logic                   stop,
  output logic                   sck,
  output logic                   cnv,
  input  logic [N_ADC-1:0]       sdo,
  output logic [N_ADC-1:0][ADC_W-1:0] samples,
  output logic                   data_ready,
  output logic                   conv_start,
  output logic                   running
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_ACQ, S_END} state_t;
  state_t state;
  logic [$clog2(CONV_CYC+1)-1:0] cnt;
  logic [N_ADC-1:0][ADC_W-1:0] shregs;
  logic stop_req;

  assign sck = clk;

  always_ff @(posedge clk or negedge hard_rst_n) begin
    if (!hard_rst_n) begin
      state      <= S_IDLE;
      cnt        <= '0;
      shregs     <= '0;
      samples    <= '0;
      stop_req   <= 1'b0;
      cnv        <= 1'b0;
      data_ready <= 1'b0;
      conv_start <= 1'b0;
    end else begin
      data_ready <= 1'b0;
      conv_start <= 1'b0;
      if (stop && state != S_IDLE) stop_req <= 1'b1;
      unique case (state)
        S_IDLE: if (start) begin
          state      <= S_WAIT;
          cnt        <= '0;
          cnv        <= 1'b1;
          conv_start <= 1'b1;
          stop_req   <= 1'b0;
        end
        S_WAIT: begin
          cnt <= cnt + 1'b1;
          if (cnt == ($clog2(CONV_CYC+1))'(CONV_CYC - 1)) begin
            cnv   <= 1'b0;
            cnt   <= '0;
            state <= S_ACQ;
          end
        end
        S_ACQ: begin
          for (int i = 0; i < N_ADC; i++) shregs[i] <= {shregs[i][ADC_W-2:0], sdo[i]};
          cnt <= cnt + 1'b1;
          if (cnt == ($clog2(CONV_CYC+1))'(ADC_W - 1)) begin
            cnt   <= '0;
            state <= S_END;
          end
        end
        S_END: begin
          samples    <= shregs;
          data_ready <= 1'b1;
          if (stop_req || stop) begin
            state    <= S_IDLE;
            stop_req <= 1'b0;
          end else begin
            state      <= S_WAIT;
            cnv        <= 1'b1;
            conv_start <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign running = (state != S_IDLE);
endmodule

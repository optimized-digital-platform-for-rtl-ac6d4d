// Serial loader for CD74HC595 shift registers (PGA gains, heater switches).
//
// On a start trigger the word on data_in is captured and shifted out MSB
// first, one bit per clock: ser changes on the falling clock edge, so it is
// stable at the rising edge of the forwarded shift clock srclk.  srclk is the
// module clock gated (glitch-free, enable changed on the falling edge) so the
// register receives exactly N_BITS edges.  load_data is low while the word is
// shifted and rises after the last bit, which transfers the word to the
// register outputs.  A reset trigger returns the FSM to idle and pulls the
// active-low register clear srclr_n low for two clocks, zeroing the outputs.
// With N_BITS = 8 it drives one register (two PGA gain nibbles: data_in[7:4]
// to the real chains, [3:0] to the imaginary chains); with N_BITS = 16 it
// drives two chained registers (first bit ends in the last register).
// The FSM, the start/reset triggers, one bit per clock and the pin names
// follow the described entity; the gated shift clock, the falling-edge
// launch and the clear length are this design's choices.
module sr595_ctrl #(
  parameter int unsigned N_BITS = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              reset,
  input  logic [N_BITS-1:0] data_in,
  output logic              srclk,
  output logic              ser,
  output logic              load_data,
  output logic              srclr_n,
  output logic              busy
);
  typedef enum logic [1:0] {S_IDLE, S_SHIFT, S_CLEAR} state_t;
  state_t state;
  logic [N_BITS-1:0] shreg;
  logic [$clog2(N_BITS+1)-1:0] cnt;
  logic clr_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      shreg   <= '0;
      cnt     <= '0;
      clr_cnt <= 1'b0;
    end else if (reset) begin
      state   <= S_CLEAR;
      clr_cnt <= 1'b0;
      cnt     <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          shreg <= data_in;
          cnt   <= ($clog2(N_BITS+1))'(N_BITS);
          state <= S_SHIFT;
        end
        S_SHIFT: begin
          shreg <= shreg << 1;
          cnt   <= cnt - 1'b1;
          if (cnt == 1) state <= S_IDLE;
        end
        S_CLEAR: begin
          clr_cnt <= 1'b1;
          if (clr_cnt) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // falling-edge output stage
  logic sck_en;
  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ser       <= 1'b0;
      load_data <= 1'b1;
      srclr_n   <= 1'b1;
      sck_en    <= 1'b0;
    end else begin
      ser       <= (state == S_SHIFT) ? shreg[N_BITS-1] : 1'b0;
      load_data <= (state != S_SHIFT);
      srclr_n   <= (state != S_CLEAR);
      sck_en    <= (state == S_SHIFT);
    end
  end
  assign srclk = clk & sck_en;
endmodule

// Start/reset serial word writer for SPI-style converters.
//
// Used for the DAC-reference digital potentiometer of the stimulation chain
// and for the DAC that biases the ASIC pseudo-resistors.  On a start trigger
// the WORD_W-bit word is captured; sync_n goes low and the word is sent MSB
// first on sdin, one bit per clock, then sync_n returns high.  The serial
// clock is the module clock forwarded to the device (sclk), which ignores it
// while sync_n is high.  LAUNCH_NEGEDGE = 0 changes sync_n/sdin on the rising
// edge (for devices that sample on the falling edge); 1 changes them on the
// falling edge (devices that sample on the rising edge).  A reset trigger
// aborts any transfer, returns to idle and pulls dev_rst_n low for two clocks
// to reset the device.
// The start/reset FSM and one bit per clock follow the description; the word
// content (command and data) is composed by the host, and the word width
// (24 bits for both parts) and the launch edge are taken from the parts'
// usual serial formats, not from the description.
module spi_tx #(
  parameter int unsigned WORD_W         = 24,
  parameter bit          LAUNCH_NEGEDGE = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              reset,
  input  logic [WORD_W-1:0] word,
  output logic              sclk,
  output logic              sync_n,
  output logic              sdin,
  output logic              dev_rst_n,
  output logic              busy,
  output logic              done
);
  typedef enum logic [1:0] {S_IDLE, S_SHIFT, S_RESET} state_t;
  state_t state;
  logic [WORD_W-1:0] shreg;
  logic [$clog2(WORD_W+1)-1:0] cnt;
  logic rcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      shreg <= '0;
      cnt   <= '0;
      rcnt  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (reset) begin
        state <= S_RESET;
        shreg <= '0;
        cnt   <= '0;
        rcnt  <= 1'b0;
      end else begin
        unique case (state)
          S_IDLE: if (start) begin
            shreg <= word;
            cnt   <= ($clog2(WORD_W+1))'(WORD_W);
            state <= S_SHIFT;
          end
          S_SHIFT: begin
            shreg <= shreg << 1;
            cnt   <= cnt - 1'b1;
            if (cnt == 1) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end
          end
          S_RESET: begin
            rcnt <= 1'b1;
            if (rcnt) state <= S_IDLE;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  assign busy = (state != S_IDLE);
  assign sclk = clk;

  logic sync_n_d, sdin_d, rst_d;
  assign sync_n_d = (state != S_SHIFT);
  assign sdin_d   = (state == S_SHIFT) && shreg[WORD_W-1];
  assign rst_d    = (state != S_RESET);

  if (LAUNCH_NEGEDGE) begin : g_neg
    always_ff @(negedge clk or negedge rst_n)
      if (!rst_n) begin
        sync_n <= 1'b1; sdin <= 1'b0; dev_rst_n <= 1'b1;
      end else begin
        sync_n <= sync_n_d; sdin <= sdin_d; dev_rst_n <= rst_d;
      end
  end else begin : g_pos
    always_comb begin
      sync_n    = sync_n_d;
      sdin      = sdin_d;
      dev_rst_n = rst_d;
    end
  end
endmodule

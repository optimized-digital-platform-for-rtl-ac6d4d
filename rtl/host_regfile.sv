// Parameter memory written by the host.
//
// The host link offers only a limited number of 16-bit "wire" channels, too
// few for every parameter, so one wire carries the data, a second the
// address, and a write trigger (one-clock pulse) stores the data at that
// address.  All registers are readable in parallel by the rest of the design
// and reset to zero.  Addresses beyond N_REGS are ignored.  The mechanism
// follows the description; the register count and map (helios_pkg) are this
// design's.
module host_regfile
  import helios_pkg::*;
#(
  parameter int unsigned N = N_REGS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [REG_W-1:0]        wire_data,
  input  logic [REG_W-1:0]        wire_addr,
  input  logic                    trig_write,
  output logic [N-1:0][REG_W-1:0] regs
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      regs <= '0;
    else if (trig_write && wire_addr < REG_W'(N))
      regs[wire_addr[$clog2(N)-1:0]] <= wire_data;
  end
endmodule

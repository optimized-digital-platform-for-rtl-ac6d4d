// Result buffering between the lock-in chain and the host data pipe.
//
// The processing chain produces results at a fixed rate, while the host reads
// them whenever its operating system schedules the transfer, so every result
// stream (N_CH channels x N_PATH paths) has its own FIFO.  A decimator keeps
// one result in `decim` per channel (0 or 1 keeps all), which shortens long
// recordings.  The host picks a stream with rd_sel and pops 32-bit words with
// rd_en; rd_data/rd_empty/rd_count belong to the selected stream.  Any write
// to a full FIFO is dropped and reported on `overflow` (OR of all streams,
// cleared by clr).  The per-stream FIFOs, the 32-bit words and the
// keep-one-in-N decimation follow the description; the FIFO depth and the
// single clock domain on both sides are this design's choices.
module result_buffer
  import helios_pkg::*;
#(
  parameter int unsigned N_CH       = 16,
  parameter int unsigned FIFO_DEPTH = 256
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          clr,
  input  logic [15:0]                   decim,
  input  logic                          res_valid,
  input  logic [$clog2(N_CH)-1:0]       res_ch,
  input  logic [N_PATH-1:0][RES_W-1:0]  res_data,
  input  logic [$clog2(N_CH*N_PATH)-1:0] rd_sel,
  input  logic                          rd_en,
  output logic [RES_W-1:0]              rd_data,
  output logic                          rd_empty,
  output logic [$clog2(FIFO_DEPTH):0]   rd_count,
  output logic                          overflow,
  output logic                          kept
);
  localparam int unsigned NS = N_CH * N_PATH;

  logic [15:0] dcnt [N_CH];
  always_comb kept = res_valid && (dcnt[res_ch] == 16'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_CH; i++) dcnt[i] <= '0;
    end else if (clr) begin
      for (int i = 0; i < N_CH; i++) dcnt[i] <= '0;
    end else if (res_valid) begin
      dcnt[res_ch] <= (decim <= 16'd1 || dcnt[res_ch] == decim - 16'd1) ? 16'd0 : dcnt[res_ch] + 16'd1;
    end
  end

  logic [NS-1:0][RES_W-1:0] f_data;
  logic [NS-1:0]            f_empty, f_ovf;
  logic [NS-1:0][$clog2(FIFO_DEPTH):0] f_count;

  for (genvar s = 0; s < NS; s++) begin : g_fifo
    logic ful;
    pipe_fifo #(.W(RES_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n, .clr,
      .wr_en(kept && res_ch == ($clog2(N_CH))'(s / N_PATH)),
      .wr_data(res_data[s % N_PATH]),
      .rd_en(rd_en && rd_sel == ($clog2(NS))'(s)),
      .rd_data(f_data[s]), .empty(f_empty[s]), .full(ful), .overflow(f_ovf[s]),
      .count(f_count[s]));
  end

  assign rd_data  = f_data[rd_sel];
  assign rd_empty = f_empty[rd_sel];
  assign rd_count = f_count[rd_sel];
  assign overflow = |f_ovf;
endmodule

// Synchronous first-in first-out buffer with overflow flag.
// Writes when full are dropped and set the sticky `overflow` flag (cleared by
// `clr`).  rd_data shows the oldest word while !empty; rd_en removes it.
// DEPTH must be a power of two.
module pipe_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 256
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clr,
  input  logic                      wr_en,
  input  logic [W-1:0]              wr_data,
  input  logic                      rd_en,
  output logic [W-1:0]              rd_data,
  output logic                      empty,
  output logic                      full,
  output logic                      overflow,
  output logic [$clog2(DEPTH):0]    count
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [W-1:0] mem [DEPTH];
  logic [AW:0] wp, rp;
  logic do_wr, do_rd;

  assign empty = (wp == rp);
  assign full  = (wp[AW] != rp[AW]) && (wp[AW-1:0] == rp[AW-1:0]);
  assign count = wp - rp;
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign rd_data = mem[rp[AW-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; overflow <= 1'b0;
    end else if (clr) begin
      wp <= '0; rp <= '0; overflow <= 1'b0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
      if (wr_en && full) overflow <= 1'b1;
    end
  end

  always_ff @(posedge clk)
    if (do_wr) mem[wp[AW-1:0]] <= wr_data;
endmodule

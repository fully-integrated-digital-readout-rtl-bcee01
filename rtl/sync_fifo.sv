// sync_fifo - single-clock first-word-fall-through FIFO.
//
// In the low-delay TDC it stores the 6-bit coarse times while the external
// TDC, which is slower, is still producing the matching fine results; it is
// read when a fine result completes. `full` is brought out as the FIFO-full
// status of the channel. Depth is this design's choice: eight entries cover
// the 125 ns fine-TDC delay at one hit per 25 ns bunch crossing.
//
// Interface: `wr_en` writes `wdata` unless full (then the word is dropped
// and `overflow` pulses); `rdata` always shows the oldest word and `rd_en`
// removes it. Both may happen in the same cycle.
module sync_fifo #(
  parameter int unsigned WIDTH = fit_pkg::COARSE_W,
  parameter int unsigned DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic             full,
  output logic             overflow
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr_q, rptr_q;
  logic [AW:0]      count_q;
  logic             do_wr, do_rd;

  assign empty = (count_q == '0);
  assign full  = (count_q == (AW+1)'(DEPTH));
  assign do_rd = rd_en && !empty;
  assign do_wr = wr_en && !full;
  assign rdata = mem[rptr_q];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr_q] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr_q   <= '0;
      rptr_q   <= '0;
      count_q  <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= wr_en && full;
      if (do_wr) wptr_q <= (wptr_q == AW'(DEPTH - 1)) ? '0 : wptr_q + 1'b1;
      if (do_rd) rptr_q <= (rptr_q == AW'(DEPTH - 1)) ? '0 : rptr_q + 1'b1;
      count_q <= count_q + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

endmodule

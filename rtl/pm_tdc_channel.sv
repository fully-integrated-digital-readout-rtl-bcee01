// pm_tdc_channel - low-delay time measurement of one Processing Module channel.
//
// The coarse FPGA TDC stamps the CFD edge against the 40 MHz reference in
// 416.7 ps bins within 2 cycles; that 6-bit value is given out at once as the
// fast timing output and pushed into a FIFO. About 105 ns later the external
// TDC delivers the same hit with 13 ps LSBs over its serial port; when the
// shift register holds a complete word, the FIFO is popped (the "logic"
// block of the diagram), the correction logic merges both values into a
// 12-bit time, and the time shift and window comparator produce the aligned
// channel time and the in-window trigger bit. The chain of blocks is the
// block diagram's; the FIFO depth and the handling of a fine word without a
// coarse partner (`orphan`, dropped) are this design's choices.
//
// Timing: result 3 cycles after the last serial bit pair of the fine TDC.
module pm_tdc_channel
  import fit_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic                        clk,
  input  logic                        rst,
  // sampled signals (deserialiser words, bit 0 earliest)
  input  logic [SAMPLES_PER_CLK-1:0]  cfd_samples,
  input  logic [SAMPLES_PER_CLK-1:0]  ref_samples,
  // serial port of the external TDC
  input  logic                        tdc_frame,
  input  logic [1:0]                  tdc_sdata,   // two bits per cycle, [1] first
  // slow control
  input  logic signed [TIME_W-1:0]    time_shift,
  input  logic [WINDOW_W-1:0]         window,
  // fast timing output
  output logic                        fast_valid,
  output logic [COARSE_W-1:0]         fast_time,
  output logic                        ref_tick,
  // merged result
  output logic                        res_valid,
  output logic signed [TIME_W-1:0]    res_time,
  output logic                        res_in_window,
  // status
  output logic                        fifo_full,
  output logic                        fifo_overflow,
  output logic                        mismatch,
  output logic                        orphan
);

  logic                  fine_valid;
  logic [FINE_W-1:0]     fine;
  logic [COARSE_W-1:0]   fifo_rdata;
  logic                  fifo_empty;
  logic                  pop;
  logic                  m_valid;
  logic signed [TIME_W-1:0] m_time;

  coarse_tdc u_coarse (
    .clk, .rst, .cfd_samples, .ref_samples,
    .coarse_valid(fast_valid), .coarse(fast_time), .ref_tick
  );

  sync_fifo #(.WIDTH(COARSE_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst,
    .wr_en(fast_valid), .wdata(fast_time),
    .rd_en(pop), .rdata(fifo_rdata),
    .empty(fifo_empty), .full(fifo_full), .overflow(fifo_overflow)
  );

  tdc_shift_reg u_sr (
    .clk, .rst, .frame(tdc_frame), .sdata(tdc_sdata),
    .fine_valid, .fine
  );

  assign pop = fine_valid && !fifo_empty;

  always_ff @(posedge clk) begin
    if (rst) orphan <= 1'b0;
    else     orphan <= fine_valid && fifo_empty;
  end

  tdc_merge u_merge (
    .clk, .rst, .in_valid(pop), .coarse(fifo_rdata), .fine,
    .out_valid(m_valid), .time_out(m_time), .mismatch
  );

  time_window u_win (
    .clk, .rst, .in_valid(m_valid), .time_in(m_time),
    .time_shift, .window,
    .out_valid(res_valid), .time_out(res_time), .in_window(res_in_window)
  );

endmodule

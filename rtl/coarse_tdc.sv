// coarse_tdc - FPGA part of the low-delay TDC of one channel.
//
// Two event capture units share one free-running 4-bit counter of the
// 300 MHz cycles: one stamps the CFD output, the other the 40 MHz reference
// clock. The subtractor takes the CFD stamp minus the stamp of the latest
// reference edge (modulo 2^7), which gives the CFD time inside the current
// 25 ns period in 416.7 ps bins (0..59, 6 bits). That value is the fast
// timing output and is also written into the FIFO that waits for the fine
// TDC. The structure (counter, two capture units, subtractor, 7-bit stamps,
// 6-bit result) follows the block diagram; the tie rule below is this
// design's own.
//
// Tie rule: when a CFD edge and a reference edge fall into the same word,
// the CFD edge belongs to the new period only if it is not earlier than the
// reference edge. A CFD edge before the first reference edge after reset,
// or more than 59 bins after the last one, is dropped.
//
// Timing: `coarse_valid` two cycles after the word holding the CFD edge;
// `ref_tick` one cycle after the word holding a reference edge.
module coarse_tdc
  import fit_pkg::*;
#(
  parameter int unsigned SAMPLES = SAMPLES_PER_CLK
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [SAMPLES-1:0]   cfd_samples,
  input  logic [SAMPLES-1:0]   ref_samples,
  output logic                 coarse_valid,
  output logic [COARSE_W-1:0]  coarse,
  output logic                 ref_tick
);

  localparam int unsigned POS_W = $clog2(SAMPLES);
  localparam int unsigned SW    = CNT_W + POS_W;

  logic [CNT_W-1:0] cycle_q;
  logic             cfd_v, ref_v;
  logic [SW-1:0]    cfd_stamp, ref_stamp, ref_last_q, ref_sel;
  logic             ref_seen_q;
  logic             use_new;
  logic [SW-1:0]    diff;

  always_ff @(posedge clk) begin
    if (rst) cycle_q <= '0;
    else     cycle_q <= cycle_q + 1'b1;
  end

  event_capture #(.SAMPLES(SAMPLES), .CNT_W(CNT_W)) u_cap_cfd (
    .clk, .rst, .samples(cfd_samples), .cycle(cycle_q),
    .valid(cfd_v), .stamp(cfd_stamp)
  );

  event_capture #(.SAMPLES(SAMPLES), .CNT_W(CNT_W)) u_cap_ref (
    .clk, .rst, .samples(ref_samples), .cycle(cycle_q),
    .valid(ref_v), .stamp(ref_stamp)
  );

  always_comb begin
    use_new = ref_v && (cfd_stamp[POS_W-1:0] >= ref_stamp[POS_W-1:0]);
    ref_sel = use_new ? ref_stamp : ref_last_q;
    diff    = cfd_stamp - ref_sel;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ref_last_q   <= '0;
      ref_seen_q   <= 1'b0;
      coarse_valid <= 1'b0;
      coarse       <= '0;
    end else begin
      if (ref_v) begin
        ref_last_q <= ref_stamp;
        ref_seen_q <= 1'b1;
      end
      coarse_valid <= cfd_v && (use_new || ref_seen_q) && (diff < SW'(BINS_PER_BC));
      coarse       <= diff[COARSE_W-1:0];
    end
  end

  assign ref_tick = ref_v;

endmodule

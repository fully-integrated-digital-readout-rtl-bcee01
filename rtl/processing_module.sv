// processing_module - digital logic of one FIT Processing Module (PM).
//
// A PM serves N_CH analog channels. For each channel it measures the time
// of the CFD pulse with the low-delay TDC (coarse FPGA TDC merged with the
// external fine TDC) and reads the charge through the two alternating
// integrators and ADCs and the selector latch. Both results go to the
// readout ports; the in-window times and the charges also feed the
// first-level trigger adder, whose per-crossing sums are the pre-trigger
// word sent to the Trigger and Clock Module.
// The bunch-crossing tick is taken from the reference-clock capture unit of
// channel 0 (all channels share the same reference samples), and the
// even/odd crossing flag for the integrator selection toggles on each tick;
// both are this design's choices.
//
// Timing: pre-trigger word one cycle after each tick, carrying the results
// that arrived during the previous crossing period.
module processing_module
  import fit_pkg::*;
#(
  parameter int unsigned N_CH       = PM_CHANNELS,
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic [SAMPLES_PER_CLK-1:0]  ref_samples,
  input  logic [SAMPLES_PER_CLK-1:0]  cfd_samples [N_CH],
  input  logic [N_CH-1:0]             tdc_frame,
  input  logic [N_CH-1:0][1:0]        tdc_sdata,   // per channel: 2 bits per cycle
  input  logic [ADC_W-1:0]            adc1 [N_CH],
  input  logic [ADC_W-1:0]            adc2 [N_CH],
  input  logic [N_CH-1:0]             gate_strobe,
  input  logic                        baseline_strobe,
  input  logic signed [TIME_W-1:0]    time_shift [N_CH],
  input  logic [WINDOW_W-1:0]         window,
  // readout
  output logic [N_CH-1:0]             fast_valid,
  output logic [COARSE_W-1:0]         fast_time [N_CH],
  output logic [N_CH-1:0]             res_valid,
  output logic signed [TIME_W-1:0]    res_time [N_CH],
  output logic [N_CH-1:0]             res_in_window,
  output logic [N_CH-1:0]             q_strobe,
  output logic [CHARGE_W-1:0]         q_data [N_CH],
  output logic [N_CH-1:0]             q_is_baseline,
  output logic [N_CH-1:0]             fifo_full,
  output logic [N_CH-1:0]             error,
  output logic                        bc_tick,
  // to the TCM
  output pretrig_t                    pretrig
);

  logic [N_CH-1:0]  ref_ticks, ovf, mism, orph;
  logic [N_CH-1:0]  q_pulse;
  logic [ADC_W-1:0] q_val [N_CH];
  logic             bc_odd_q;

  // every channel has its own reference capture unit, as in the channel
  // diagram; they see the same samples, so channel 0's tick serves the PM
  assign bc_tick = ref_ticks[0];
  assert property (@(posedge clk) disable iff (rst) ref_ticks == '0 || ref_ticks == '1);

  always_ff @(posedge clk) begin
    if (rst)          bc_odd_q <= 1'b0;
    else if (bc_tick) bc_odd_q <= !bc_odd_q;
  end

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    pm_tdc_channel #(.FIFO_DEPTH(FIFO_DEPTH)) u_tdc (
      .clk, .rst,
      .cfd_samples(cfd_samples[c]), .ref_samples,
      .tdc_frame(tdc_frame[c]), .tdc_sdata(tdc_sdata[c]),
      .time_shift(time_shift[c]), .window,
      .fast_valid(fast_valid[c]), .fast_time(fast_time[c]),
      .ref_tick(ref_ticks[c]),
      .res_valid(res_valid[c]), .res_time(res_time[c]),
      .res_in_window(res_in_window[c]),
      .fifo_full(fifo_full[c]), .fifo_overflow(ovf[c]),
      .mismatch(mism[c]), .orphan(orph[c])
    );

    charge_mux_latch u_q (
      .clk, .rst, .bc_odd(bc_odd_q),
      .adc1(adc1[c]), .adc2(adc2[c]),
      .gate_strobe(gate_strobe[c]), .baseline_strobe,
      .strobe(q_strobe[c]), .data(q_data[c]), .is_baseline(q_is_baseline[c])
    );

    // baseline words are not physics charge and stay out of the trigger sum
    assign q_pulse[c] = q_strobe[c] && !q_is_baseline[c];
    assign q_val[c]   = q_data[c][ADC_W-1:0];
    assign error[c]   = ovf[c] | mism[c] | orph[c];
  end

  pm_trigger_sum #(.N_CH(N_CH)) u_sum (
    .clk, .rst, .bc_tick,
    .t_valid(res_valid), .t_in_window(res_in_window), .t_time(res_time),
    .q_valid(q_pulse), .q_value(q_val),
    .pretrig
  );

endmodule

// fit_top - digital readout and trigger of the FIT detector.
//
// N_PM_A Processing Modules serve the A side and N_PM_C the C side, each
// with N_CH channels (8 + 10 modules of 12 channels by default). Every PM
// measures time and charge of its channels and sends one pre-trigger word
// per bunch crossing to the Trigger and Clock Module, which forms the ORA,
// ORC, TVX, Central and Semi-Central triggers and counts them.
// Analog front end, external TDCs, ADCs, deserialisers and the optical and
// HDMI links are outside this code: their digital signals are ports here.
// PM index p < N_PM_A is on side A, the rest on side C. All logic runs on
// one clock `clk`; one set of reference-clock samples is shared by all PMs,
// as the TCM distributes the clock. The single clock domain and the shared
// time window setting are this design's simplifications.
//
// Timing: trigger outputs about 25 cycles after the PM pre-trigger words.
module fit_top
  import fit_pkg::*;
#(
  parameter int unsigned N_PM_A_P   = N_PM_A,
  parameter int unsigned N_PM_C_P   = N_PM_C,
  parameter int unsigned N_CH       = PM_CHANNELS,
  parameter int unsigned FIFO_DEPTH = 8,
  localparam int unsigned N_PM      = N_PM_A_P + N_PM_C_P
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic [SAMPLES_PER_CLK-1:0]  ref_samples,
  input  logic [SAMPLES_PER_CLK-1:0]  cfd_samples [N_PM][N_CH],
  input  logic [N_PM-1:0][N_CH-1:0]   tdc_frame,
  input  logic [N_PM-1:0][N_CH-1:0][1:0] tdc_sdata,
  input  logic [ADC_W-1:0]            adc1 [N_PM][N_CH],
  input  logic [ADC_W-1:0]            adc2 [N_PM][N_CH],
  input  logic [N_PM-1:0][N_CH-1:0]   gate_strobe,
  input  logic                        baseline_strobe,
  input  logic signed [TIME_W-1:0]    time_shift [N_PM][N_CH],
  input  logic [WINDOW_W-1:0]         window,
  input  tcm_cfg_t                    tcm_cfg,
  input  logic                        cnt_clear,
  // readout (towards the optical data links)
  output logic [N_PM-1:0][N_CH-1:0]   fast_valid,
  output logic [COARSE_W-1:0]         fast_time [N_PM][N_CH],
  output logic [N_PM-1:0][N_CH-1:0]   res_valid,
  output logic signed [TIME_W-1:0]    res_time [N_PM][N_CH],
  output logic [N_PM-1:0][N_CH-1:0]   res_in_window,
  output logic [N_PM-1:0][N_CH-1:0]   q_strobe,
  output logic [CHARGE_W-1:0]         q_data [N_PM][N_CH],
  output logic [N_PM-1:0][N_CH-1:0]   fifo_full,
  output logic [N_PM-1:0][N_CH-1:0]   ch_error,
  output pretrig_t                    pretrig [N_PM],
  output logic                        bc_tick,          // reference edge seen
  // triggers (towards the Central Trigger Processor) and counters
  output logic                        trig_valid,
  output trig_t                       trig,
  output logic [31:0]                 trig_count [N_TRIG],
  output logic [31:0]                 bc_count
);

  logic [N_PM-1:0] bc_ticks;
  pretrig_t        pm_a [N_PM_A_P];
  pretrig_t        pm_c [N_PM_C_P];

  for (genvar p = 0; p < N_PM; p++) begin : g_pm
    logic [N_CH-1:0] q_base_unused;
    processing_module #(.N_CH(N_CH), .FIFO_DEPTH(FIFO_DEPTH)) u_pm (
      .clk, .rst, .ref_samples,
      .cfd_samples(cfd_samples[p]),
      .tdc_frame(tdc_frame[p]), .tdc_sdata(tdc_sdata[p]),
      .adc1(adc1[p]), .adc2(adc2[p]),
      .gate_strobe(gate_strobe[p]), .baseline_strobe,
      .time_shift(time_shift[p]), .window,
      .fast_valid(fast_valid[p]), .fast_time(fast_time[p]),
      .res_valid(res_valid[p]), .res_time(res_time[p]),
      .res_in_window(res_in_window[p]),
      .q_strobe(q_strobe[p]), .q_data(q_data[p]),
      .q_is_baseline(q_base_unused),
      .fifo_full(fifo_full[p]), .error(ch_error[p]),
      .bc_tick(bc_ticks[p]),
      .pretrig(pretrig[p])
    );
    if (p < N_PM_A_P) begin : g_a
      assign pm_a[p] = pretrig[p];
    end else begin : g_c
      assign pm_c[p - N_PM_A_P] = pretrig[p];
    end
  end

  assign bc_tick = bc_ticks[0];

  // all PMs see the same reference samples and tick together
  assert property (@(posedge clk) disable iff (rst) bc_ticks == '0 || bc_ticks == '1);

  tcm_trigger #(.N_A(N_PM_A_P), .N_C(N_PM_C_P)) u_tcm (
    .clk, .rst, .pm_a, .pm_c, .cfg(tcm_cfg), .cnt_clear,
    .trig_valid, .trig, .trig_count, .bc_count
  );

endmodule

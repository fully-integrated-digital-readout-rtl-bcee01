// pm_trigger_sum - first level of the pipelined trigger adders, in each PM.
//
// Per bunch crossing the PM sends the TCM three numbers: the sum of the
// channel charges, the sum of the channel times and the number of active
// channels. A channel is active when its time lies inside the interaction
// window; only active channels add to the time sum, so the TCM can form the
// average time. The charge sum takes every channel that delivered a charge
// word in the crossing.
// Channel results collected between two reference ticks form one frame;
// on each tick the frame is summed (one adder stage, registered) and a new
// frame starts with whatever arrives in that cycle. The frame boundary at
// the reference tick and the "latest result wins" rule for a channel with
// two results in a frame are this design's choices; the three sums are from
// the design description.
//
// Timing: `pretrig.valid` one cycle after `bc_tick`.
module pm_trigger_sum
  import fit_pkg::*;
#(
  parameter int unsigned N_CH = PM_CHANNELS
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       bc_tick,
  input  logic [N_CH-1:0]            t_valid,
  input  logic [N_CH-1:0]            t_in_window,
  input  logic signed [TIME_W-1:0]   t_time [N_CH],
  input  logic [N_CH-1:0]            q_valid,
  input  logic [ADC_W-1:0]           q_value [N_CH],
  output pretrig_t                   pretrig
);

  logic [N_CH-1:0]          act_q, qv_q;
  logic signed [TIME_W-1:0] time_q [N_CH];
  logic [ADC_W-1:0]         q_q [N_CH];

  logic [PM_AMP_W-1:0]         amp_s;
  logic signed [PM_TIME_W-1:0] time_s;
  logic [NACT_W-1:0]           n_s;

  always_comb begin
    amp_s  = '0;
    time_s = '0;
    n_s    = '0;
    for (int i = 0; i < N_CH; i++) begin
      if (qv_q[i])  amp_s  = amp_s + PM_AMP_W'(q_q[i]);
      if (act_q[i]) begin
        time_s = time_s + PM_TIME_W'(time_q[i]);
        n_s    = n_s + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      act_q   <= '0;
      qv_q    <= '0;
      pretrig <= '0;
      for (int i = 0; i < N_CH; i++) begin
        time_q[i] <= '0;
        q_q[i]    <= '0;
      end
    end else begin
      pretrig.valid <= bc_tick;
      if (bc_tick) begin
        pretrig.amp_sum  <= amp_s;
        pretrig.time_sum <= time_s;
        pretrig.n_active <= n_s;
      end
      for (int i = 0; i < N_CH; i++) begin
        if (t_valid[i]) begin
          act_q[i]  <= t_in_window[i];
          time_q[i] <= t_time[i];
        end else if (bc_tick) begin
          act_q[i]  <= 1'b0;
        end
        if (q_valid[i]) begin
          qv_q[i] <= 1'b1;
          q_q[i]  <= q_value[i];
        end else if (bc_tick) begin
          qv_q[i] <= 1'b0;
        end
      end
    end
  end

endmodule

// tb_pm_trigger_sum - channel results spread over crossing frames.
// Between two ticks, random channels deliver times (in or out of the
// window) and charges, some twice. The model keeps the latest result per
// channel and, on each tick, expects the charge sum, the in-window time sum
// and count in the pre-trigger word one cycle later. Results arriving in
// the tick cycle belong to the next frame.
module tb_pm_trigger_sum;
  import fit_pkg::*;
  localparam int N = 12;
  logic clk = 1'b0, rst = 1'b1;
  logic bc_tick = 1'b0;
  logic [N-1:0] t_valid = '0, t_in_window = '0, q_valid = '0;
  logic signed [11:0] t_time [N];
  logic [11:0] q_value [N];
  pretrig_t pretrig;
  int checks = 0, failures = 0, n_frames_full = 0;

  always #5 clk = ~clk;

  pm_trigger_sum #(.N_CH(N)) dut (.clk, .rst, .bc_tick, .t_valid, .t_in_window, .t_time, .q_valid, .q_value, .pretrig);

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit act [N]; int tm [N]; bit qv [N]; int qq [N];
    int e_amp, e_t, e_n;
    bit e_valid;
    for (int i = 0; i < N; i++) begin act[i] = 0; qv[i] = 0; t_time[i] = '0; q_value[i] = '0; end
    e_valid = 0; e_amp = 0; e_t = 0; e_n = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 8000; n++) begin
      bc_tick = (n % 8 == 7);
      for (int i = 0; i < N; i++) begin
        t_valid[i]     = ($urandom % 10 == 0);
        t_in_window[i] = ($urandom % 4 != 0);
        t_time[i]      = 12'(int'($urandom % 400) - 200);
        q_valid[i]     = ($urandom % 10 == 0);
        q_value[i]     = 12'($urandom);
      end
      // expected frame sums use the state before this cycle's arrivals
      if (bc_tick) begin
        e_amp = 0; e_t = 0; e_n = 0;
        for (int i = 0; i < N; i++) begin
          if (qv[i]) e_amp += qq[i];
          if (act[i]) begin e_t += tm[i]; e_n++; end
        end
        if (e_n == N) n_frames_full++;
      end
      for (int i = 0; i < N; i++) begin
        if (t_valid[i]) begin act[i] = t_in_window[i]; tm[i] = int'(t_time[i]); end
        else if (bc_tick) act[i] = 0;
        if (q_valid[i]) begin qv[i] = 1; qq[i] = int'(q_value[i]); end
        else if (bc_tick) qv[i] = 0;
      end
      e_valid = bc_tick;
      @(negedge clk);
      checks++;
      if (pretrig.valid != e_valid ||
          (e_valid && (int'(pretrig.amp_sum) != e_amp || int'(pretrig.time_sum) != e_t ||
                       int'(pretrig.n_active) != e_n))) begin
        failures++;
        if (failures < 10) $display("n=%0d got %0d/%0d/%0d exp %0d/%0d/%0d", n,
                                    pretrig.amp_sum, pretrig.time_sum, pretrig.n_active, e_amp, e_t, e_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

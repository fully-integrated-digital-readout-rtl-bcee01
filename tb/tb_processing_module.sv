// tb_processing_module - one Processing Module, 12 channels.
// Hits come from the shared scenario; each hit drives the external TDC model
// of its channel and, two cycles later, the gate strobe with both ADC codes.
// Checked against the scenario: every channel's merged time, window flag
// and the ADC selected by the even/odd crossing flag; baseline strobes give
// baseline-marked words. The pre-trigger words are checked against a model
// of the first-level sum fed with the channel outputs seen at the ports.
// Counted mechanisms: coarse corrections up/down, in/out of window, even/odd
// integrators, baseline words and non-empty pre-trigger frames.
module tb_processing_module;
  import fit_pkg::*;
  import fit_stim_pkg::*;
  localparam int N = 12, SEED = 5, PROB = 60, NBC = 300;
  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] ref_samples = '0;
  logic [7:0] cfd_samples [N];
  logic [N-1:0] tdc_frame;
  logic [N-1:0][1:0] tdc_sdata;
  logic [11:0] adc1 [N], adc2 [N];
  logic [N-1:0] gate_strobe = '0;
  logic baseline_strobe = 1'b0;
  logic signed [11:0] time_shift [N];
  logic [6:0] window = 7'd120;
  logic [N-1:0] fast_valid, res_valid, res_in_window, q_strobe, q_is_baseline, fifo_full, error;
  logic [5:0] fast_time [N];
  logic signed [11:0] res_time [N];
  logic [12:0] q_data [N];
  logic bc_tick;
  pretrig_t pretrig;
  logic [N-1:0] hit = '0;
  logic [7:0] hit_val [N];
  int checks = 0, failures = 0;
  int res_q [N][$];
  int q_q [N][$];
  int gate_due [N], gate_m [N];
  int word = 0;
  int n_up = 0, n_down = 0, n_in = 0, n_out = 0, n_even = 0, n_odd = 0, n_base = 0, n_frames = 0;

  always #5 clk = ~clk;

  processing_module dut (.clk, .rst, .ref_samples, .cfd_samples, .tdc_frame, .tdc_sdata,
                         .adc1, .adc2, .gate_strobe, .baseline_strobe, .time_shift, .window,
                         .fast_valid, .fast_time, .res_valid, .res_time, .res_in_window,
                         .q_strobe, .q_data, .q_is_baseline, .fifo_full, .error, .bc_tick, .pretrig);

  for (genvar c = 0; c < N; c++) begin : g_tdc
    ths788_model u_tdc (.clk, .hit(hit[c]), .value(hit_val[c]), .frame(tdc_frame[c]), .sdata(tdc_sdata[c]));
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // channel outputs against the scenario, and the first-level sum model
  bit act [N]; int tm [N]; bit qv [N]; int qq [N];
  bit exp_v = 0; int e_amp, e_t, e_n;
  always @(posedge clk) begin
    if (!rst) begin
      if (exp_v || pretrig.valid) begin
        checks++;
        if (!exp_v || !pretrig.valid || int'(pretrig.amp_sum) != e_amp ||
            int'(pretrig.time_sum) != e_t || int'(pretrig.n_active) != e_n) begin
          failures++;
          if (failures < 10) $display("pretrig %0d/%0d/%0d exp %0d/%0d/%0d", pretrig.amp_sum,
                                      pretrig.time_sum, pretrig.n_active, e_amp, e_t, e_n);
        end
        if (e_n != 0) n_frames++;
      end
      exp_v = bc_tick;
      if (bc_tick) begin
        e_amp = 0; e_t = 0; e_n = 0;
        for (int c = 0; c < N; c++) begin
          if (qv[c]) e_amp += qq[c];
          if (act[c]) begin e_t += tm[c]; e_n++; end
        end
      end
      for (int c = 0; c < N; c++) begin
        if (res_valid[c]) begin act[c] = res_in_window[c]; tm[c] = int'(res_time[c]); end
        else if (bc_tick) act[c] = 0;
        if (q_strobe[c] && !q_is_baseline[c]) begin qv[c] = 1; qq[c] = int'(q_data[c][11:0]); end
        else if (bc_tick) qv[c] = 0;
        if (error[c]) begin failures++; $display("channel %0d error flag", c); end
        if (res_valid[c]) begin
          checks++;
          if (res_q[c].size() == 0) begin failures++; $display("ch %0d unexpected result", c); end
          else begin
            automatic int e = res_q[c].pop_front() - int'(time_shift[c]);
            automatic bit inw = (e <= int'(window)) && (e >= -int'(window));
            if (int'(res_time[c]) != e || res_in_window[c] != inw) begin
              failures++;
              if (failures < 10) $display("ch %0d res %0d exp %0d", c, res_time[c], e);
            end
            if (inw) n_in++; else n_out++;
          end
        end
        if (q_strobe[c]) begin
          checks++;
          if (q_q[c].size() == 0) begin failures++; $display("ch %0d unexpected charge", c); end
          else begin
            automatic int e = q_q[c].pop_front();
            if (e < 0) begin   // baseline word: adc1 = adc2 = -e - 1
              if (!q_is_baseline[c] || int'(q_data[c][11:0]) != -e - 1) begin
                failures++; $display("ch %0d baseline %h", c, q_data[c]);
              end
              n_base++;
            end else if (q_is_baseline[c] || int'(q_data[c]) != e) begin
              failures++;
              if (failures < 10) $display("ch %0d charge %h exp %h", c, q_data[c], e);
            end
          end
        end
      end
    end
  end

  initial begin
    for (int c = 0; c < N; c++) begin
      cfd_samples[c] = '0; adc1[c] = '0; adc2[c] = '0; hit_val[c] = '0;
      time_shift[c] = 12'(400 + 30 * c);
      gate_due[c] = -1; gate_m[c] = 0;
      act[c] = 0; qv[c] = 0; tm[c] = 0; qq[c] = 0;
    end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < NBC * 60 / 8; k++) begin
      automatic bit base = (k % 97 == 50);
      @(negedge clk);
      word = k;
      hit = '0;
      gate_strobe = '0;
      baseline_strobe = 1'b0;
      for (int c = 0; c < N; c++) begin
        if (gate_due[c] == k) begin
          automatic logic odd = odd_of(gate_m[c]);
          automatic logic [11:0] a1 = adc_code(SEED, gate_m[c], c, 1);
          automatic logic [11:0] a2 = adc_code(SEED, gate_m[c], c, 2);
          gate_strobe[c] = 1'b1;
          adc1[c] = a1;
          adc2[c] = a2;
          q_q[c].push_back(int'({odd, odd ? a2 : a1}));
          if (odd) n_odd++; else n_even++;
          gate_due[c] = -1;
        end else if (base) begin
          automatic logic [11:0] a = 12'($urandom);
          adc1[c] = a;
          adc2[c] = a;
          q_q[c].push_back(-int'(a) - 1);
        end
      end
      baseline_strobe = base;
      for (int i = 0; i < 8; i++) begin
        automatic int b = 8 * k + i;
        ref_samples[i] = ref_at(b);
        for (int c = 0; c < N; c++) begin
          cfd_samples[c][i] = cfd_at(SEED, c, b, PROB);
          if (cfd_samples[c][i] && !cfd_at(SEED, c, b - 1, PROB)) begin
            automatic int m = (b - REF_OFS) / 60;
            automatic int s = hit_sub(SEED, m, c) + hit_err(SEED, m, c);
            hit[c] = 1'b1;
            hit_val[c] = fine_value(SEED, m, c);
            res_q[c].push_back(merged_time(SEED, m, c));
            gate_due[c] = k + 2;
            gate_m[c] = m;
            if (s >= 32) n_up++;
            if (s < 0) n_down++;
          end
        end
      end
    end
    @(negedge clk);
    hit = '0; gate_strobe = '0;
    repeat (60) @(negedge clk);
    for (int c = 0; c < N; c++) begin
      checks++;
      if (res_q[c].size() != 0 || q_q[c].size() != 0) begin failures++; $display("ch %0d results missing", c); end
    end
    checks++;
    if (n_up == 0 || n_down == 0 || n_in == 0 || n_out == 0 || n_even == 0 || n_odd == 0 ||
        n_base == 0 || n_frames == 0) failures++;
    $display("up=%0d down=%0d in=%0d out=%0d even=%0d odd=%0d baseline=%0d active frames=%0d",
             n_up, n_down, n_in, n_out, n_even, n_odd, n_base, n_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

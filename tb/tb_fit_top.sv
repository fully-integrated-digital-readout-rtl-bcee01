// tb_fit_top - the whole FIT readout and trigger at full size: 8 A-side and
// 10 C-side Processing Modules of 12 channels each and the TCM.
// Hits follow the shared scenario with a crossing pattern that leaves one
// side empty now and then and has high-multiplicity crossings. Checked:
// every channel's merged time and window flag and every charge word against
// the scenario; every pre-trigger word against a first-level sum model fed
// with the channel outputs seen at the ports; every trigger word against a
// model of the TCM fed with the pre-trigger words, 12 cycles later; and the
// trigger counters at the end. Each trigger must fire and stay quiet at
// least once, and the channel mechanisms (coarse corrections up and down,
// in and out of window, both integrators, baseline words) must all occur.
module tb_fit_top;
  import fit_pkg::*;
  import fit_stim_pkg::*;
  localparam int NPA = N_PM_A, NPC = N_PM_C, NP = NPA + NPC, N = PM_CHANNELS;
  localparam int SEED = 21, PROB = 125, NBC = 160, TLAT = 12;
  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] ref_samples = '0;
  logic [7:0] cfd_samples [NP][N];
  logic [NP-1:0][N-1:0] tdc_frame;
  logic [NP-1:0][N-1:0][1:0] tdc_sdata;
  logic [11:0] adc1 [NP][N], adc2 [NP][N];
  logic [NP-1:0][N-1:0] gate_strobe = '0;
  logic baseline_strobe = 1'b0;
  logic signed [11:0] time_shift [NP][N];
  logic [6:0] window = 7'd120;
  tcm_cfg_t tcm_cfg;
  logic cnt_clear = 1'b0;
  logic [NP-1:0][N-1:0] fast_valid, res_valid, res_in_window, q_strobe, fifo_full, ch_error;
  logic [5:0] fast_time [NP][N];
  logic signed [11:0] res_time [NP][N];
  logic [12:0] q_data [NP][N];
  pretrig_t pretrig [NP];
  logic trig_valid;
  trig_t trig;
  logic [31:0] trig_count [N_TRIG];
  logic [31:0] bc_count;
  logic [NP-1:0][N-1:0] hit = '0;
  logic [7:0] hit_val [NP][N];
  int checks = 0, failures = 0;
  int res_q [NP][N][$];
  int q_q [NP][N][$];
  int gate_due [NP][N], gate_m [NP][N];
  int cyc = 0;
  int n_up = 0, n_down = 0, n_in = 0, n_out = 0, n_even = 0, n_odd = 0, n_base = 0;
  int fired [N_TRIG], quiet [N_TRIG];
  int trig_q[$], tcyc_q[$];

  always #5 clk = ~clk;

  fit_top dut (.clk, .rst, .ref_samples, .cfd_samples, .tdc_frame, .tdc_sdata, .adc1, .adc2,
               .gate_strobe, .baseline_strobe, .time_shift, .window, .tcm_cfg, .cnt_clear,
               .fast_valid, .fast_time, .res_valid, .res_time, .res_in_window, .q_strobe, .q_data,
               .fifo_full, .ch_error, .pretrig, .bc_tick(), .trig_valid, .trig, .trig_count, .bc_count);

  for (genvar p = 0; p < NP; p++) begin : g_pm
    for (genvar c = 0; c < N; c++) begin : g_tdc
      ths788_model u_tdc (.clk, .hit(hit[p][c]), .value(hit_val[p][c]),
                          .frame(tdc_frame[p][c]), .sdata(tdc_sdata[p][c]));
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per-PM first-level sum model state
  bit act [NP][N]; int tm [NP][N]; bit qv [NP][N]; int qq [NP][N];
  bit exp_v = 0; int e_amp [NP], e_t [NP], e_n [NP];
  logic tick_q = 1'b0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) begin
      // ---- TCM model, fed with the pre-trigger words at the ports ----
      if (pretrig[0].valid) begin
        automatic longint amp_a = 0, amp_c = 0, ts_a = 0, ts_c = 0, n_a = 0, n_c = 0, avg_a, avg_c;
        automatic bit ora, orc, tvx, cen, semi;
        for (int p = 0; p < NP; p++) begin
          if (p < NPA) begin
            amp_a += pretrig[p].amp_sum; ts_a += pretrig[p].time_sum; n_a += pretrig[p].n_active;
          end else begin
            amp_c += pretrig[p].amp_sum; ts_c += pretrig[p].time_sum; n_c += pretrig[p].n_active;
          end
        end
        avg_a = (n_a == 0) ? 0 : ts_a / n_a;
        avg_c = (n_c == 0) ? 0 : ts_c / n_c;
        ora  = n_a != 0;
        orc  = n_c != 0;
        tvx  = ora && orc && (avg_a - avg_c) >= longint'(tcm_cfg.vtx_low) && (avg_a - avg_c) <= longint'(tcm_cfg.vtx_high);
        cen  = (amp_a + amp_c) > longint'(tcm_cfg.thr_central);
        semi = (amp_a + amp_c) > longint'(tcm_cfg.thr_semicentral);
        trig_q.push_back(int'({semi, cen, tvx, orc, ora}));
        tcyc_q.push_back(cyc);
      end
      if (trig_valid) begin
        automatic logic [4:0] got = {trig.semicentral, trig.central, trig.tvx, trig.orc, trig.ora};
        checks++;
        if (trig_q.size() == 0) begin failures++; $display("unexpected trigger word"); end
        else begin
          automatic int e = trig_q.pop_front();
          automatic int c0 = tcyc_q.pop_front();
          if (got != 5'(e) || cyc - c0 != TLAT) begin
            failures++;
            if (failures < 10) $display("trig %b exp %b latency %0d", got, 5'(e), cyc - c0);
          end
        end
        for (int i = 0; i < N_TRIG; i++) if (got[i]) fired[i]++; else quiet[i]++;
      end
      // ---- first-level sums, fed with the channel outputs at the ports ----
      if (exp_v || pretrig[0].valid) begin
        for (int p = 0; p < NP; p++) begin
          checks++;
          if (!exp_v || !pretrig[p].valid || int'(pretrig[p].amp_sum) != e_amp[p] ||
              int'(pretrig[p].time_sum) != e_t[p] || int'(pretrig[p].n_active) != e_n[p]) begin
            failures++;
            if (failures < 10) $display("PM %0d pretrig %0d/%0d/%0d exp %0d/%0d/%0d", p, pretrig[p].amp_sum,
                                        pretrig[p].time_sum, pretrig[p].n_active, e_amp[p], e_t[p], e_n[p]);
          end
        end
      end
      // the PMs tick together; the tick is seen on the reference capture of
      // channel 0, one cycle before the pre-trigger word
      exp_v = 0;
      for (int p = 0; p < NP; p++) begin
        if (tick_q) begin
          exp_v = 1;
          e_amp[p] = 0; e_t[p] = 0; e_n[p] = 0;
          for (int c = 0; c < N; c++) begin
            if (qv[p][c]) e_amp[p] += qq[p][c];
            if (act[p][c]) begin e_t[p] += tm[p][c]; e_n[p]++; end
          end
        end
        for (int c = 0; c < N; c++) begin
          if (res_valid[p][c]) begin act[p][c] = res_in_window[p][c]; tm[p][c] = int'(res_time[p][c]); end
          else if (tick_q) act[p][c] = 0;
          if (q_strobe[p][c] && !q_data_base[p][c]) begin qv[p][c] = 1; qq[p][c] = int'(q_data[p][c][11:0]); end
          else if (tick_q) qv[p][c] = 0;
          if (ch_error[p][c]) begin failures++; $display("PM %0d ch %0d error flag", p, c); end
          if (res_valid[p][c]) begin
            checks++;
            if (res_q[p][c].size() == 0) begin failures++; $display("unexpected result"); end
            else begin
              automatic int e = res_q[p][c].pop_front() - int'(time_shift[p][c]);
              automatic bit inw = (e <= int'(window)) && (e >= -int'(window));
              if (int'(res_time[p][c]) != e || res_in_window[p][c] != inw) begin
                failures++;
                if (failures < 10) $display("PM %0d ch %0d res %0d exp %0d", p, c, res_time[p][c], e);
              end
              if (inw) n_in++; else n_out++;
            end
          end
          if (q_strobe[p][c]) begin
            checks++;
            if (q_q[p][c].size() == 0) begin failures++; $display("unexpected charge"); end
            else begin
              automatic int e = q_q[p][c].pop_front();
              if (e < 0) begin
                if (int'(q_data[p][c][11:0]) != -e - 1) begin failures++; $display("baseline word wrong"); end
              end else if (int'(q_data[p][c]) != e) begin
                failures++;
                if (failures < 10) $display("PM %0d ch %0d charge %h exp %h", p, c, q_data[p][c], e);
              end
            end
          end
        end
      end
    end
  end

  // the reference tick: first word with a reference edge, one cycle later
  // (mirrors the capture of a 0->1 step in the reference samples)
  logic ref_last = 1'b1;
  logic [NP-1:0][N-1:0] q_data_base = '0;   // baseline words are sent in known cycles
  logic [NP-1:0][N-1:0] base_next = '0;
  always @(posedge clk) begin
    if (rst) begin
      tick_q <= 1'b0;
      ref_last <= 1'b1;
    end else begin
      tick_q <= |(ref_samples & ~{ref_samples[6:0], ref_last});
      ref_last <= ref_samples[7];
    end
    q_data_base <= base_next;
  end

  initial begin
    for (int i = 0; i < N_TRIG; i++) begin fired[i] = 0; quiet[i] = 0; end
    tcm_cfg.vtx_low = -13'sd50;
    tcm_cfg.vtx_high = 13'sd50;
    tcm_cfg.thr_central = 32'd250000;
    tcm_cfg.thr_semicentral = 32'd110000;
    for (int p = 0; p < NP; p++) begin
      e_amp[p] = 0; e_t[p] = 0; e_n[p] = 0;
      for (int c = 0; c < N; c++) begin
        cfd_samples[p][c] = '0; adc1[p][c] = '0; adc2[p][c] = '0; hit_val[p][c] = '0;
        time_shift[p][c] = 12'(350 + 7 * ((p * N + c) % 40));
        gate_due[p][c] = -1; gate_m[p][c] = 0;
        act[p][c] = 0; qv[p][c] = 0; tm[p][c] = 0; qq[p][c] = 0;
      end
    end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < NBC * 60 / 8; k++) begin
      automatic bit base = (k % 97 == 50);
      @(negedge clk);
      hit = '0;
      gate_strobe = '0;
      baseline_strobe = base;
      base_next = '0;
      for (int p = 0; p < NP; p++) begin
        for (int c = 0; c < N; c++) begin
          if (gate_due[p][c] == k) begin
            automatic logic odd = odd_of(gate_m[p][c]);
            automatic logic [11:0] a1 = adc_code(SEED, gate_m[p][c], p * N + c, 1);
            automatic logic [11:0] a2 = adc_code(SEED, gate_m[p][c], p * N + c, 2);
            gate_strobe[p][c] = 1'b1;
            adc1[p][c] = a1;
            adc2[p][c] = a2;
            q_q[p][c].push_back(int'({odd, odd ? a2 : a1}));
            if (odd) n_odd++; else n_even++;
            gate_due[p][c] = -1;
          end else if (base) begin
            automatic logic [11:0] a = 12'($urandom);
            adc1[p][c] = a;
            adc2[p][c] = a;
            q_q[p][c].push_back(-int'(a) - 1);
            base_next[p][c] = 1'b1;
            n_base++;
          end
        end
      end
      for (int i = 0; i < 8; i++) begin
        automatic int b = 8 * k + i;
        ref_samples[i] = ref_at(b);
        for (int p = 0; p < NP; p++) begin
          for (int c = 0; c < N; c++) begin
            automatic int ch = p * N + c;
            cfd_samples[p][c][i] = cfd_at(SEED, ch, b, PROB);
            if (cfd_samples[p][c][i] && !cfd_at(SEED, ch, b - 1, PROB)) begin
              automatic int m = (b - REF_OFS) / 60;
              automatic int s = hit_sub(SEED, m, ch) + hit_err(SEED, m, ch);
              hit[p][c] = 1'b1;
              hit_val[p][c] = fine_value(SEED, m, ch);
              res_q[p][c].push_back(merged_time(SEED, m, ch));
              gate_due[p][c] = k + 2;
              gate_m[p][c] = m;
              if (s >= 32) n_up++;
              if (s < 0) n_down++;
            end
          end
        end
      end
    end
    @(negedge clk);
    hit = '0; gate_strobe = '0; baseline_strobe = 1'b0; base_next = '0;
    repeat (80) @(negedge clk);
    for (int p = 0; p < NP; p++)
      for (int c = 0; c < N; c++) begin
        checks++;
        if (res_q[p][c].size() != 0 || q_q[p][c].size() != 0) begin failures++; $display("PM %0d ch %0d results missing", p, c); end
      end
    checks++;
    if (trig_q.size() != 0) begin failures++; $display("trigger words missing"); end
    for (int i = 0; i < N_TRIG; i++) begin
      checks++;
      if (fired[i] == 0 || quiet[i] == 0 || int'(trig_count[i]) != fired[i]) begin
        failures++;
        $display("trigger %0d fired %0d quiet %0d counter %0d", i, fired[i], quiet[i], trig_count[i]);
      end
    end
    checks++;
    if (n_up == 0 || n_down == 0 || n_in == 0 || n_out == 0 || n_even == 0 || n_odd == 0 || n_base == 0)
      failures++;
    $display("channel hits: correction up=%0d down=%0d, in window=%0d out=%0d, even=%0d odd=%0d, baseline words=%0d",
             n_up, n_down, n_in, n_out, n_even, n_odd, n_base);
    $display("triggers over %0d crossings: ORA=%0d ORC=%0d TVX=%0d Central=%0d SemiCentral=%0d",
             bc_count, fired[0], fired[1], fired[2], fired[3], fired[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

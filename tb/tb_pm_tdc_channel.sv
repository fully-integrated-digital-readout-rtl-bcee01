// tb_pm_tdc_channel - one channel of the low-delay TDC with the external
// TDC model. Hits come in about 80 % of the crossings, back to back at the
// full 40 MHz rate. For every hit the fast timing output must give the
// coarse bin and the merged result must give the true time plus the fine
// TDC error, minus the time shift, with the in-window flag, no later than
// 125 ns (37 cycles of 300 MHz) after the word holding the CFD edge.
// Coarse corrections up, down and none must all occur.
module tb_pm_tdc_channel;
  import fit_pkg::*;
  import fit_stim_pkg::*;
  localparam int SEED = 11, PROB = 80, NBC = 300;
  localparam int MAX_LAT = 37;
  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] cfd_samples = '0, ref_samples = '0;
  logic tdc_frame;
  logic [1:0] tdc_sdata;
  logic signed [11:0] time_shift = 12'sd800;
  logic [6:0] window = 7'd100;
  logic fast_valid, ref_tick, res_valid, res_in_window, fifo_full, fifo_overflow, mismatch, orphan;
  logic [5:0] fast_time;
  logic signed [11:0] res_time;
  logic hit = 1'b0;
  logic [7:0] hit_val = '0;
  int checks = 0, failures = 0;
  int fast_q[$], res_q[$], word_q[$];
  int word = 0, max_lat = 0;
  int n_up = 0, n_down = 0, n_in = 0, n_out = 0;

  always #5 clk = ~clk;

  pm_tdc_channel dut (.clk, .rst, .cfd_samples, .ref_samples, .tdc_frame, .tdc_sdata,
                      .time_shift, .window, .fast_valid, .fast_time, .ref_tick,
                      .res_valid, .res_time, .res_in_window, .fifo_full, .fifo_overflow,
                      .mismatch, .orphan);

  ths788_model u_tdc (.clk, .hit, .value(hit_val), .frame(tdc_frame), .sdata(tdc_sdata));

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst) begin
      if (fast_valid) begin
        checks++;
        if (fast_q.size() == 0 || fast_time != 6'(fast_q[0])) begin
          failures++;
          $display("fast %0d exp %0d", fast_time, fast_q.size() ? fast_q[0] : -1);
        end
        if (fast_q.size()) void'(fast_q.pop_front());
      end
      if (res_valid) begin
        checks++;
        if (res_q.size() == 0) begin
          failures++;
          $display("unexpected result");
        end else begin
          automatic int e = res_q.pop_front() - int'(time_shift);
          automatic int lat = word - word_q.pop_front();
          automatic bit inw = (e <= int'(window)) && (e >= -int'(window));
          if (lat > max_lat) max_lat = lat;
          if (int'(res_time) != e || res_in_window != inw || lat > MAX_LAT) begin
            failures++;
            if (failures < 10) $display("res %0d/%b exp %0d/%b lat %0d", res_time, res_in_window, e, inw, lat);
          end
          if (inw) n_in++; else n_out++;
        end
      end
      if (mismatch || orphan || fifo_overflow) begin
        failures++;
        $display("error flag: mismatch %b orphan %b overflow %b", mismatch, orphan, fifo_overflow);
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < NBC * 60 / 8; k++) begin
      @(negedge clk);
      word = k;
      hit = 1'b0;
      for (int i = 0; i < 8; i++) begin
        automatic int b = 8 * k + i;
        ref_samples[i] = ref_at(b);
        cfd_samples[i] = cfd_at(SEED, 0, b, PROB);
        if (cfd_samples[i] && !cfd_at(SEED, 0, b - 1, PROB)) begin
          automatic int m = (b - REF_OFS) / 60;
          automatic int sub = hit_sub(SEED, m, 0), err = hit_err(SEED, m, 0);
          hit = 1'b1;
          hit_val = fine_value(SEED, m, 0);
          fast_q.push_back(hit_pos(SEED, m, 0, PROB));
          res_q.push_back(merged_time(SEED, m, 0));
          word_q.push_back(k);
          if (sub + err >= 32) n_up++;
          if (sub + err < 0) n_down++;
        end
      end
    end
    @(negedge clk);
    hit = 1'b0;
    repeat (60) @(negedge clk);
    checks++;
    if (fast_q.size() != 0 || res_q.size() != 0) begin failures++; $display("hits not reported"); end
    checks++;
    if (n_up == 0 || n_down == 0 || n_in == 0 || n_out == 0) failures++;
    $display("hits=%0d up=%0d down=%0d in=%0d out=%0d max latency=%0d cycles", n_in + n_out, n_up, n_down, n_in, n_out, max_lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

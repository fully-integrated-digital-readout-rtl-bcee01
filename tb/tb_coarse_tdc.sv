// tb_coarse_tdc - sampled CFD pulses against a 40 MHz reference.
// The stimulus is built sample by sample (416.7 ps bins, 8 per word). The
// reference is high for 30 of every 60 bins, its rising edge at bin
// 60*m + 3. A CFD pulse 10 bins long starts at a random bin of every other
// period. Expected coarse time = start bin - last reference edge, reported
// two cycles after the word with the CFD edge. Same-word ties between CFD
// and reference edges are counted and must occur.
module tb_coarse_tdc;
  import fit_pkg::*;
  logic       clk = 1'b0, rst = 1'b1;
  logic [7:0] cfd_samples, ref_samples;
  logic       coarse_valid, ref_tick;
  logic [5:0] coarse;
  int checks = 0, failures = 0;
  localparam int NBC = 400;
  int hit_bin [NBC];
  int exp_q[$], exp_word_q[$];
  int ties = 0, n_ref = 0;

  always #5 clk = ~clk;

  coarse_tdc dut (.clk, .rst, .cfd_samples, .ref_samples, .coarse_valid, .coarse, .ref_tick);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic ref_at(int b);
    return (b >= 3) && (((b - 3) % 60) < 30);
  endfunction

  function automatic logic cfd_at(int b);
    int m;
    m = (b - 3) / 60;
    for (int j = m - 1; j <= m; j++)
      if (j >= 0 && j < NBC && hit_bin[j] >= 0 && b >= hit_bin[j] && b < hit_bin[j] + 10)
        return 1'b1;
    return 1'b0;
  endfunction

  int word = 0;
  always @(posedge clk) begin
    if (!rst) begin
      if (ref_tick) n_ref++;
      if (coarse_valid) begin
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("unexpected coarse %0d", coarse);
        end else begin
          int e, w;
          e = exp_q.pop_front();
          w = exp_word_q.pop_front();
          if (coarse != 6'(e) || word - w != 2) begin
            failures++;
            if (failures < 10) $display("coarse %0d exp %0d latency %0d", coarse, e, word - w);
          end
        end
      end
    end
  end

  initial begin
    for (int m = 0; m < NBC; m++) begin
      hit_bin[m] = -1;
      if (m >= 2 && m % 2 == 0) begin
        automatic int pos;
        pos = (m % 10 == 0) ? int'($urandom % 8) : int'($urandom % 60);  // many near-ref hits
        hit_bin[m] = 60 * m + 3 + pos;
      end
    end
    cfd_samples = '0; ref_samples = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < NBC * 60 / 8 - 16; k++) begin
      @(negedge clk);
      word = k;   // updated before the posedge that samples word k
      for (int i = 0; i < 8; i++) begin
        automatic int b = 8 * k + i;
        ref_samples[i] = ref_at(b);
        cfd_samples[i] = cfd_at(b);
        if (cfd_samples[i] && !cfd_at(b - 1)) begin
          automatic int m = (b - 3) / 60;
          exp_q.push_back(b - (60 * m + 3));
          exp_word_q.push_back(k);
          if ((b - 3) / 8 == (60 * m + 3) / 8 && b / 8 == (60 * m + 3) / 8) ties++;
        end
      end
    end
    repeat (5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d hits never reported", exp_q.size()); end
    checks++;
    if (ties == 0) begin failures++; $display("no same-word ties"); end
    checks++;
    if (n_ref < NBC - 2) begin failures++; $display("only %0d reference ticks", n_ref); end
    $display("ties=%0d ref_ticks=%0d", ties, n_ref);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

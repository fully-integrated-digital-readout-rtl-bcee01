// tb_tcm_trigger - random pre-trigger words from 8 + 10 PMs.
// The model adds the words per side, forms the side-average times with
// truncating division and expects ORA, ORC, TVX, Central and Semi-Central
// exactly 12 cycles later (one adder stage, 10-cycle divider, output register), plus the event counters at the end.
// Each trigger must both fire and stay off at least once.
module tb_tcm_trigger;
  import fit_pkg::*;
  localparam int NA = 8, NC = 10;
  localparam int LAT = 12;
  logic clk = 1'b0, rst = 1'b1, cnt_clear = 1'b0;
  pretrig_t pm_a [NA];
  pretrig_t pm_c [NC];
  tcm_cfg_t cfg;
  logic trig_valid;
  trig_t trig;
  logic [31:0] trig_count [N_TRIG];
  logic [31:0] bc_count;
  int checks = 0, failures = 0;
  int exp_q[$], cyc_q[$];
  int cyc = 0;
  int fired [N_TRIG], quiet [N_TRIG], cnt_model [N_TRIG];
  int n_bc = 0;

  always #5 clk = ~clk;

  tcm_trigger #(.N_A(NA), .N_C(NC)) dut (.clk, .rst, .pm_a, .pm_c, .cfg, .cnt_clear,
                                         .trig_valid, .trig, .trig_count, .bc_count);

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && trig_valid) begin
      automatic int e = exp_q.pop_front();
      automatic int c = cyc_q.pop_front();
      automatic logic [4:0] got = {trig.semicentral, trig.central, trig.tvx, trig.orc, trig.ora};
      checks++;
      n_bc++;
      if (got != 5'(e) || cyc - c != LAT) begin
        failures++;
        if (failures < 10) $display("trig %b exp %b lat %0d", got, 5'(e), cyc - c);
      end
      for (int i = 0; i < N_TRIG; i++) begin
        if (got[i]) begin fired[i]++; cnt_model[i]++; end else quiet[i]++;
      end
    end
  end

  int frame_no = 0;
  task automatic drive_frame(bit valid);
    int amp_a, amp_c, ts_a, ts_c, n_a, n_c, avg_a, avg_c, tot;
    bit ora, orc, tvx, cen, semi;
    amp_a = 0; amp_c = 0; ts_a = 0; ts_c = 0; n_a = 0; n_c = 0;
    for (int i = 0; i < NA + NC; i++) begin
      pretrig_t w;
      int nact, mean;
      nact = ($urandom % 3 == 0) ? 0 : int'($urandom % 13);
      if ($urandom % 5 == 0) nact = 0;
      if (i < NA && frame_no % 6 == 1) nact = 0;     // quiet A side
      if (i >= NA && frame_no % 5 == 2) nact = 0;    // quiet C side
      mean = (i < NA) ? int'($urandom % 200) - 100 : int'($urandom % 200) - 60;
      w.valid    = valid;
      w.n_active = 4'(nact);
      w.time_sum = 16'(nact * mean);
      w.amp_sum  = 16'($urandom % 20000);
      if (i < NA) begin
        pm_a[i] = w; amp_a += int'(w.amp_sum); ts_a += int'(w.time_sum); n_a += nact;
      end else begin
        pm_c[i - NA] = w; amp_c += int'(w.amp_sum); ts_c += int'(w.time_sum); n_c += nact;
      end
    end
    if (valid) frame_no++;
    if (valid) begin
      // the side sums stay far from the width limits, so integer division matches
      avg_a = (n_a == 0) ? 0 : ts_a / n_a;
      avg_c = (n_c == 0) ? 0 : ts_c / n_c;
      tot   = amp_a + amp_c;
      ora   = n_a != 0;
      orc   = n_c != 0;
      tvx   = ora && orc && (avg_a - avg_c) >= int'(cfg.vtx_low) && (avg_a - avg_c) <= int'(cfg.vtx_high);
      cen   = tot > int'(cfg.thr_central);
      semi  = tot > int'(cfg.thr_semicentral);
      exp_q.push_back(int'({semi, cen, tvx, orc, ora}));
      cyc_q.push_back(cyc);
    end
  endtask

  initial begin
    for (int i = 0; i < N_TRIG; i++) begin fired[i] = 0; quiet[i] = 0; cnt_model[i] = 0; end
    cfg.vtx_low = -13'sd40;
    cfg.vtx_high = 13'sd40;
    cfg.thr_central = 32'd200000;
    cfg.thr_semicentral = 32'd160000;
    drive_frame(1'b0);
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      drive_frame(n % 7 == 0 || n % 7 == 3);
      @(negedge clk);
    end
    drive_frame(1'b0);
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d frames lost", exp_q.size()); end
    for (int i = 0; i < N_TRIG; i++) begin
      checks++;
      if (fired[i] == 0 || quiet[i] == 0 || int'(trig_count[i]) != cnt_model[i]) begin
        failures++;
        $display("trigger %0d fired %0d quiet %0d counter %0d model %0d", i, fired[i], quiet[i], trig_count[i], cnt_model[i]);
      end
    end
    checks++;
    if (int'(bc_count) != n_bc) failures++;
    $display("fired ora=%0d orc=%0d tvx=%0d central=%0d semicentral=%0d of %0d",
             fired[0], fired[1], fired[2], fired[3], fired[4], n_bc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tcm_trigger - trigger logic of the Trigger and Clock Module (TCM).
//
// Every bunch crossing each PM sends its pre-trigger word: charge sum, time
// sum of the in-window channels and the number of those channels. The TCM
// adds the words of each side in a second pipelined adder level and then
// forms five trigger signals for the Central Trigger Processor:
//   ORA / ORC    at least one channel on side A / C inside the time window;
//   TVX          both sides active and avgA - avgC, the difference of the
//                side-average times (time sum / active channels), inside
//                [vtx_low, vtx_high];
//   Central,     the total charge of both sides above thr_central or
//   SemiCentral  thr_semicentral.
// Each trigger has a 32-bit counter of the crossings in which it fired, and
// a further counter counts the crossings, for the detector control system.
// The trigger definitions and the two adder levels are from the design
// description. The divider, the use of the A+C charge total for the two
// multiplicity triggers and the counter widths are this design's choices.
//
// Timing: `trig_valid` 12 cycles after the PM words: adder stage, 10-cycle
// divider (8 quotient bits, enough because the mean of in-window times is
// bounded by the 7-bit window), output register. All PMs must send their words in
// the same cycle; an assertion checks it.
module tcm_trigger
  import fit_pkg::*;
#(
  parameter int unsigned N_A = N_PM_A,
  parameter int unsigned N_C = N_PM_C
) (
  input  logic         clk,
  input  logic         rst,
  input  pretrig_t     pm_a [N_A],
  input  pretrig_t     pm_c [N_C],
  input  tcm_cfg_t     cfg,
  input  logic         cnt_clear,
  output logic         trig_valid,
  output trig_t        trig,
  output logic [31:0]  trig_count [N_TRIG],   // ora, orc, tvx, central, semicentral
  output logic [31:0]  bc_count
);

  localparam int unsigned NMAX   = (N_A > N_C) ? N_A : N_C;
  localparam int unsigned LG     = (NMAX > 1) ? $clog2(NMAX) : 1;
  localparam int unsigned S_AMP_W  = PM_AMP_W + LG;
  localparam int unsigned S_TIME_W = PM_TIME_W + LG;
  localparam int unsigned S_N_W    = NACT_W + LG;
  // in-window times satisfy |t| <= window < 2^WINDOW_W, so does their mean
  localparam int unsigned QUO_W    = WINDOW_W + 1;
  localparam int unsigned DIV_LAT  = QUO_W + 2;

  // ---- second-level adders, one register stage ---------------------------
  logic                       s_valid;
  logic [S_AMP_W-1:0]         amp_a, amp_c;
  logic signed [S_TIME_W-1:0] tsum_a, tsum_c;
  logic [S_N_W-1:0]           n_a, n_c;

  always_ff @(posedge clk) begin
    logic [S_AMP_W-1:0]         aa, ac;
    logic signed [S_TIME_W-1:0] ta, tc;
    logic [S_N_W-1:0]           na, nc;
    aa = '0; ac = '0; ta = '0; tc = '0; na = '0; nc = '0;
    for (int i = 0; i < N_A; i++) begin
      aa += S_AMP_W'(pm_a[i].amp_sum);
      ta += S_TIME_W'(pm_a[i].time_sum);
      na += S_N_W'(pm_a[i].n_active);
    end
    for (int i = 0; i < N_C; i++) begin
      ac += S_AMP_W'(pm_c[i].amp_sum);
      tc += S_TIME_W'(pm_c[i].time_sum);
      nc += S_N_W'(pm_c[i].n_active);
    end
    amp_a <= aa; amp_c <= ac; tsum_a <= ta; tsum_c <= tc; n_a <= na; n_c <= nc;
    if (rst) s_valid <= 1'b0;
    else     s_valid <= pm_a[0].valid;
  end

  // ---- multiplicity and OR decisions, then delay to meet the averages ----
  logic [S_AMP_W:0] amp_tot;
  logic             ora0, orc0, cen0, semi0;
  assign amp_tot = (S_AMP_W+1)'(amp_a) + (S_AMP_W+1)'(amp_c);
  assign ora0    = (n_a != '0);
  assign orc0    = (n_c != '0);
  assign cen0    = 32'(amp_tot) > cfg.thr_central;
  assign semi0   = 32'(amp_tot) > cfg.thr_semicentral;

  logic [3:0] dly_q [DIV_LAT];
  always_ff @(posedge clk) begin
    dly_q[0] <= {ora0, orc0, cen0, semi0};
    for (int i = 1; i < DIV_LAT; i++) dly_q[i] <= dly_q[i-1];
  end

  // ---- average time per side ---------------------------------------------
  logic                       qa_valid, qc_valid, za, zc, ea, ec;
  logic signed [QUO_W:0]      avg_a, avg_c;

  pipe_divider #(.NUM_W(S_TIME_W), .DEN_W(S_N_W), .QUO_W(QUO_W)) u_div_a (
    .clk, .rst, .in_valid(s_valid), .num(tsum_a), .den(n_a),
    .out_valid(qa_valid), .quo(avg_a), .div_zero(za), .range_err(ea)
  );
  pipe_divider #(.NUM_W(S_TIME_W), .DEN_W(S_N_W), .QUO_W(QUO_W)) u_div_c (
    .clk, .rst, .in_valid(s_valid), .num(tsum_c), .den(n_c),
    .out_valid(qc_valid), .quo(avg_c), .div_zero(zc), .range_err(ec)
  );

  // ---- vertex decision and outputs ---------------------------------------
  logic signed [QUO_W+1:0]  vdiff;
  logic                     ora1, orc1, tvx1;
  assign vdiff = (QUO_W+2)'(avg_a) - (QUO_W+2)'(avg_c);
  assign ora1  = dly_q[DIV_LAT-1][3];
  assign orc1  = dly_q[DIV_LAT-1][2];
  assign tvx1  = ora1 && orc1 &&
                 ((TIME_W+1)'(vdiff) >= cfg.vtx_low) && ((TIME_W+1)'(vdiff) <= cfg.vtx_high);

  always_ff @(posedge clk) begin
    if (rst) begin
      trig_valid <= 1'b0;
      trig       <= '0;
    end else begin
      trig_valid       <= qa_valid;
      trig.ora         <= qa_valid && ora1;
      trig.orc         <= qa_valid && orc1;
      trig.tvx         <= qa_valid && tvx1;
      trig.central     <= qa_valid && dly_q[DIV_LAT-1][1];
      trig.semicentral <= qa_valid && dly_q[DIV_LAT-1][0];
    end
  end

  // ---- event counters ----------------------------------------------------
  logic [N_TRIG-1:0] tvec;
  assign tvec = {trig.semicentral, trig.central, trig.tvx, trig.orc, trig.ora};

  always_ff @(posedge clk) begin
    if (rst || cnt_clear) begin
      bc_count <= '0;
      for (int i = 0; i < N_TRIG; i++) trig_count[i] <= '0;
    end else if (trig_valid) begin
      bc_count <= bc_count + 1'b1;
      for (int i = 0; i < N_TRIG; i++) trig_count[i] <= trig_count[i] + 32'(tvec[i]);
    end
  end

  // all PM words of one crossing arrive together
  for (genvar i = 0; i < N_A; i++) begin : g_chk_a
    assert property (@(posedge clk) disable iff (rst) pm_a[i].valid == pm_a[0].valid);
  end
  for (genvar i = 0; i < N_C; i++) begin : g_chk_c
    assert property (@(posedge clk) disable iff (rst) pm_c[i].valid == pm_a[0].valid);
  end
  assert property (@(posedge clk) disable iff (rst) qa_valid == qc_valid);
  // a side without active channels is exactly a side whose division is void
  assert property (@(posedge clk) disable iff (rst) qa_valid |-> (za == !ora1) && (zc == !orc1));
  // the mean of in-window times always fits the reduced quotient
  assert property (@(posedge clk) disable iff (rst) qa_valid |-> !ea && !ec);

endmodule

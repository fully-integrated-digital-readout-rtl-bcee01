// tb_tdc_merge - coarse/fine pairs generated from a true time.
// A true time T (13 ps LSBs) inside one bunch period gives the coarse value
// C = T / 32; the fine TDC sees T + e with |e| < 16 LSBs (200 ps) and keeps
// the 7 low bits. The merged time must be T + e, so every kind of
// correction (+1, 0, -1) is exercised and counted. A pair whose overlap bits
// differ by two must raise `mismatch`.
module tb_tdc_merge;
  import fit_pkg::*;
  logic        clk = 1'b0, rst = 1'b1;
  logic        in_valid = 1'b0;
  logic [5:0]  coarse = '0;
  logic [6:0]  fine = '0;
  logic        out_valid, mismatch;
  logic signed [11:0] time_out;
  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0, n_same = 0;

  always #5 clk = ~clk;

  tdc_merge dut (.clk, .rst, .in_valid, .coarse, .fine, .out_valid, .time_out, .mismatch);

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_t;
    logic exp_mm;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 5000; n++) begin
      automatic int t = $urandom % 1920;                 // 60 bins x 32
      automatic int e = int'($urandom % 31) - 15;        // -15..15
      automatic bit bad = (n % 50 == 7);
      in_valid = 1'b1;
      coarse   = 6'(t / 32);
      if (bad) begin
        fine   = 7'((t / 32 + 2) * 32);                  // two bins off
        exp_mm = 1'b1;
      end else begin
        fine   = 7'((t + e) & 255);
        exp_mm = 1'b0;
      end
      exp_t = t + e;
      if (!bad) begin
        if ($floor(real'(t + e) / 32.0) > real'(t / 32)) n_up++;
        else if ($floor(real'(t + e) / 32.0) < real'(t / 32)) n_down++;
        else n_same++;
      end
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (!out_valid || mismatch != exp_mm || (!bad && time_out != 12'(exp_t))) begin
        failures++;
        if (failures < 10) $display("t=%0d e=%0d got %0d mm=%b", t, e, time_out, mismatch);
      end
    end
    checks++;
    if (n_up == 0 || n_down == 0 || n_same == 0) failures++;
    $display("corrections up=%0d down=%0d none=%0d", n_up, n_down, n_same);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

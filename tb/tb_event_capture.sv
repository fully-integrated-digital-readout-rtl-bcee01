// tb_event_capture - random sample words against a reference edge finder.
// Every word is random; the expected stamp is the first 0->1 step in the
// word (including the step from the previous word's last sample), combined
// with the cycle counter value given with the word, one cycle later.
module tb_event_capture;
  logic       clk = 1'b0, rst = 1'b1;
  logic [7:0] samples;
  logic [3:0] cycle;
  logic       valid;
  logic [6:0] stamp;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  event_capture dut (.clk, .rst, .samples, .cycle, .valid, .stamp);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic       last, exp_v;
    logic [6:0] exp_s;
    int         n_edges = 0;
    samples = '0; cycle = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    last = 1'b0;   // last sample driven during reset was 0
    exp_v = 1'b0; exp_s = '0;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      if (k > 0) begin
        checks++;
        if (valid !== exp_v || (exp_v && stamp !== exp_s)) begin
          failures++;
          if (failures < 10) $display("word %0d: got %b/%h exp %b/%h", k, valid, stamp, exp_v, exp_s);
        end
      end
      // sparse or dense words
      samples = (k % 3 == 0) ? 8'($urandom) : ((k % 3 == 1) ? {8{samples[7]}} : 8'($urandom) & 8'($urandom));
      cycle   = 4'($urandom);
      exp_v = 1'b0; exp_s = '0;
      for (int i = 0; i < 8; i++) begin
        logic prev;
        prev = (i == 0) ? last : samples[i-1];
        if (!exp_v && samples[i] && !prev) begin
          exp_v = 1'b1;
          exp_s = {cycle, 3'(i)};
        end
      end
      if (exp_v) n_edges++;
      last = samples[7];
    end
    checks++;
    if (n_edges < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

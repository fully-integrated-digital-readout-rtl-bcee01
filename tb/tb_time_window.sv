// tb_time_window - random times, shifts and windows.
// Expected: aligned time = time - shift (saturated to 12 bits), in-window
// when |time - shift| <= window, one cycle later.
module tb_time_window;
  logic        clk = 1'b0, rst = 1'b1;
  logic        in_valid = 1'b0;
  logic signed [11:0] time_in = '0, time_shift = '0, time_out;
  logic [6:0]  window = '0;
  logic        out_valid, in_window;
  int checks = 0, failures = 0, n_in = 0, n_out = 0;

  always #5 clk = ~clk;

  time_window dut (.clk, .rst, .in_valid, .time_in, .time_shift, .window, .out_valid, .time_out, .in_window);

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 5000; n++) begin
      automatic int d, sat;
      automatic bit exp_in;
      in_valid   = ($urandom % 8 != 0);
      time_shift = 12'($urandom % 2000);
      window     = 7'($urandom);
      time_in    = (n % 4 == 0) ? 12'($urandom) : 12'(int'(time_shift) + int'($urandom % 300) - 150);
      d   = int'(time_in) - int'(time_shift);
      sat = (d > 2047) ? 2047 : (d < -2048) ? -2048 : d;
      exp_in = in_valid && d <= int'(window) && d >= -int'(window);
      @(negedge clk);
      checks++;
      if (out_valid != in_valid || in_window != exp_in || (in_valid && int'(time_out) != sat)) begin
        failures++;
        if (failures < 10) $display("t=%0d s=%0d w=%0d got %0d/%b", time_in, time_shift, window, time_out, in_window);
      end
      if (exp_in) n_in++; else if (in_valid) n_out++;
    end
    checks++;
    if (n_in < 100 || n_out < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

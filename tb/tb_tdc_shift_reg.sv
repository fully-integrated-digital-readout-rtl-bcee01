// tb_tdc_shift_reg - serial words of the external TDC, MSB first, 2 bits a cycle.
// Checks that each complete 8-bit (4-cycle) frame yields its 7 low bits one cycle
// after the last bit, that gaps of random length are ignored and that a
// frame cut short produces nothing.
module tb_tdc_shift_reg;
  logic       clk = 1'b0, rst = 1'b1;
  logic       frame = 1'b0;
  logic [1:0] sdata = '0;
  logic       fine_valid;
  logic [6:0] fine;
  int checks = 0, failures = 0;
  int exp_q[$];
  int n_out = 0;

  always #5 clk = ~clk;

  tdc_shift_reg dut (.clk, .rst, .frame, .sdata, .fine_valid, .fine);

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one-cycle latency after the last bit: check on the following edge
  logic last_bit_q = 1'b0;
  always @(posedge clk) begin
    if (!rst) begin
      if (fine_valid) begin
        n_out++;
        checks++;
        if (exp_q.size() == 0 || fine != 7'(exp_q[0]) || !last_bit_q) begin
          failures++;
          $display("fine %h unexpected (exp %h, timing %b)", fine,
                   exp_q.size() ? exp_q[0] : -1, last_bit_q);
        end
        if (exp_q.size()) void'(exp_q.pop_front());
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 1000; n++) begin
      automatic logic [7:0] v = 8'($urandom);
      automatic int len = (n % 17 == 5) ? 2 : 4;   // some truncated frames
      repeat ($urandom % 4) begin
        @(negedge clk); frame = 1'b0; last_bit_q = 1'b0;
      end
      if (n % 17 == 5) begin
        @(negedge clk); frame = 1'b0; last_bit_q = 1'b0;
      end
      for (int b = 0; b < len; b++) begin
        @(negedge clk);
        frame = 1'b1;
        sdata = {v[7 - 2 * b], v[6 - 2 * b]};
        last_bit_q = 1'b0;
        if (b == 3) exp_q.push_back(int'(v[6:0]));
      end
      @(negedge clk);
      frame = 1'b0;
      last_bit_q = (len == 4);
    end
    repeat (4) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || n_out < 900) begin failures++; $display("missing words"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

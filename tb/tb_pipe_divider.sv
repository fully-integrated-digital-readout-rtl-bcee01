// tb_pipe_divider - one operand pair per cycle, back to back.
// Operands are built as q * den + r with |q| < 2^QUO_W, plus some out of
// that range. Expected quotient: signed numerator / unsigned divisor
// truncated towards zero (SystemVerilog integer division), zero with
// div_zero for divisor 0, range_err for out-of-range numerators, exactly
// QUO_W + 2 cycles after the operands.
module tb_pipe_divider;
  localparam int NUM_W = 20, DEN_W = 8, QUO_W = 8, LAT = QUO_W + 2;
  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0;
  logic signed [NUM_W-1:0] num = '0;
  logic signed [QUO_W:0] quo;
  logic [DEN_W-1:0] den = '0;
  logic out_valid, div_zero, range_err;
  int expe_q[$], n_err = 0;
  int checks = 0, failures = 0;
  int exp_q[$], expz_q[$], cyc_q[$];
  int cyc = 0;

  always #5 clk = ~clk;

  pipe_divider #(.NUM_W(NUM_W), .DEN_W(DEN_W), .QUO_W(QUO_W)) dut (.clk, .rst, .in_valid, .num, .den, .out_valid, .quo, .div_zero, .range_err);

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && out_valid) begin
      automatic int e = exp_q.pop_front();
      automatic int z = expz_q.pop_front();
      automatic int c = cyc_q.pop_front();
      automatic int re = expe_q.pop_front();
      checks++;
      if (int'(range_err) != re || (!re && int'(quo) != e) || int'(div_zero) != z || cyc - c != LAT) begin
        failures++;
        if (failures < 10) $display("quo %0d exp %0d z %b lat %0d", quo, e, div_zero, cyc - c);
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      automatic int a, b;
      in_valid = ($urandom % 5 != 0);
      b = (n % 13 == 0) ? 0 : int'($urandom % 121) + 1;
      if (n % 13 == 0) a = int'($urandom % 4000) - 2000;
      else if (n % 11 == 0) a = (int'($urandom % 20) + 256) * b * ((n % 2) ? 1 : -1);   // out of range
      else a = (int'($urandom % 511) - 255) * b + ((n % 3 == 0) ? -int'($urandom % b) : int'($urandom % b));
      if (b == 0 && n % 13 != 0) b = 1;
      num = NUM_W'(a);
      den = DEN_W'(b);
      if (in_valid) begin
        exp_q.push_back(b == 0 ? 0 : a / b);
        expz_q.push_back(b == 0);
        expe_q.push_back(b != 0 && (a >= b * 256 || -a >= b * 256));
        if (b != 0 && (a >= b * 256 || -a >= b * 256)) n_err++;
        cyc_q.push_back(cyc);
      end
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || n_err == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

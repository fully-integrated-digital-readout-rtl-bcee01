// tb_charge_mux_latch - even/odd crossings with gate and baseline strobes.
// Expected: on a strobe, ADC1 for even crossings and ADC2 for odd ones,
// bit 12 = odd flag, strobe and baseline marker one cycle later; the data
// word holds its value between strobes.
module tb_charge_mux_latch;
  logic        clk = 1'b0, rst = 1'b1;
  logic        bc_odd = 1'b0, gate_strobe = 1'b0, baseline_strobe = 1'b0;
  logic [11:0] adc1 = '0, adc2 = '0;
  logic        strobe, is_baseline;
  logic [12:0] data;
  int checks = 0, failures = 0, n_even = 0, n_odd = 0, n_base = 0;

  always #5 clk = ~clk;

  charge_mux_latch dut (.clk, .rst, .bc_odd, .adc1, .adc2, .gate_strobe, .baseline_strobe,
                        .strobe, .data, .is_baseline);

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [12:0] held;
    logic        held_b;
    held = '0; held_b = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 5000; n++) begin
      automatic bit s;
      bc_odd          = 1'($urandom);
      adc1            = 12'($urandom);
      adc2            = 12'($urandom);
      gate_strobe     = ($urandom % 3 == 0);
      baseline_strobe = ($urandom % 11 == 0);
      s = gate_strobe || baseline_strobe;
      if (s) begin
        held   = {bc_odd, bc_odd ? adc2 : adc1};
        held_b = baseline_strobe && !gate_strobe;
        if (held_b) n_base++; else if (bc_odd) n_odd++; else n_even++;
      end
      @(negedge clk);
      checks++;
      if (strobe != s || data != held || is_baseline != held_b) begin
        failures++;
        if (failures < 10) $display("n=%0d got %h/%b exp %h/%b", n, data, strobe, held, s);
      end
    end
    checks++;
    if (n_base == 0 || n_odd == 0 || n_even == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

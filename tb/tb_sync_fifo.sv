// tb_sync_fifo - random pushes and pops against a queue model.
// Covers simultaneous push/pop, reads of the first-word-fall-through output,
// filling to full (the overflow pulse and the dropped word) and draining.
module tb_sync_fifo;
  logic       clk = 1'b0, rst = 1'b1;
  logic       wr_en = 1'b0, rd_en = 1'b0;
  logic [5:0] wdata = '0, rdata;
  logic       empty, full, overflow;
  int checks = 0, failures = 0;
  int model[$];
  int n_full = 0, n_ovf = 0;

  always #5 clk = ~clk;

  sync_fifo #(.WIDTH(6), .DEPTH(8)) dut (.clk, .rst, .wr_en, .wdata, .rd_en, .rdata, .empty, .full, .overflow);

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_ovf;
    exp_ovf = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 20000; n++) begin
      automatic int phase = (n / 500) % 3;   // fill-biased, drain-biased, balanced
      @(negedge clk);
      // check state at this point
      checks++;
      if (empty != (model.size() == 0) || full != (model.size() == 8) ||
          (model.size() != 0 && rdata != 6'(model[0])) || overflow != exp_ovf) begin
        failures++;
        if (failures < 10) $display("n=%0d size=%0d empty=%b full=%b rdata=%0d exp=%0d ovf=%b",
                                    n, model.size(), empty, full, rdata,
                                    model.size() ? model[0] : -1, overflow);
      end
      if (full) n_full++;
      if (overflow) n_ovf++;
      wr_en = (phase == 0) ? ($urandom % 4 != 0) : (phase == 1) ? ($urandom % 4 == 0) : ($urandom % 2 == 0);
      rd_en = (phase == 0) ? ($urandom % 4 == 0) : (phase == 1) ? ($urandom % 4 != 0) : ($urandom % 2 == 0);
      wdata = 6'($urandom);
      exp_ovf = wr_en && model.size() == 8;
      // model update happens at the coming edge
      begin
        automatic bit do_rd = rd_en && model.size() != 0;
        automatic bit do_wr = wr_en && model.size() != 8;
        if (do_rd) void'(model.pop_front());
        if (do_wr) model.push_back(int'(wdata));
      end
    end
    checks++;
    if (n_full == 0 || n_ovf == 0) begin failures++; $display("full/overflow never reached"); end
    $display("full cycles=%0d overflows=%0d", n_full, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// event_capture - time-stamps the first rising edge of a sampled signal.
//
// The FPGA samples the signal with four phases of a 600 MHz clock on both
// edges, i.e. every 416.7 ps; a deserialiser hands over SAMPLES samples per
// 300 MHz cycle, sample 0 being the earliest. This unit looks for a 0->1
// step inside the word, including the step from the last sample of the
// previous word, and reports the first one as a time stamp
// {cycle counter, sample position}. With 8 samples a stamp has 4+3 = 7 bits,
// as in the block diagram of the low-delay TDC.
//
// Timing: one register stage; `valid` and `stamp` appear the cycle after
// the word. At most one edge per word is reported (the CFD output is far
// longer than 3.3 ns, so a second edge cannot occur).
// The deserialiser itself is a vendor primitive and not part of this code.
module event_capture #(
  parameter int unsigned SAMPLES = fit_pkg::SAMPLES_PER_CLK,
  parameter int unsigned CNT_W   = fit_pkg::CNT_W,
  localparam int unsigned POS_W  = $clog2(SAMPLES)
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [SAMPLES-1:0]       samples,  // bit 0 = earliest sample
  input  logic [CNT_W-1:0]         cycle,    // free-running cycle counter
  output logic                     valid,
  output logic [CNT_W+POS_W-1:0]   stamp
);

  logic              last_q;    // last sample of the previous word
  logic [SAMPLES-1:0] rise;
  logic              found;
  logic [POS_W-1:0]  pos;

  always_comb begin
    rise  = samples & ~{samples[SAMPLES-2:0], last_q};
    found = 1'b0;
    pos   = '0;
    for (int i = SAMPLES - 1; i >= 0; i--) begin
      if (rise[i]) begin
        found = 1'b1;
        pos   = POS_W'(i);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      last_q <= 1'b1;   // no edge reported on the first word after reset
      valid  <= 1'b0;
      stamp  <= '0;
    end else begin
      last_q <= samples[SAMPLES-1];
      valid  <= found;
      stamp  <= {cycle, pos};
    end
  end

endmodule

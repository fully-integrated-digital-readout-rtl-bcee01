// tdc_merge - correction logic joining the coarse and the fine TDC.
//
// The coarse FPGA time C counts 416.7 ps bins; the fine external time F
// counts 13 ps LSBs, 32 to a bin, and only its 7 low bits are kept. The two
// low bits of C and the two high kept bits of F (833 ps and 417 ps) measure
// the same thing. The two TDCs differ by less than 200 ps, under half a bin,
// so the overlapping bits can differ by at most one: C is raised by one when
// F's overlap bits are one ahead, lowered by one when they are one behind,
// and then C_adj * 32 + F[4:0] is the full time in 13 ps LSBs. A difference
// of two cannot be resolved and is flagged in `mismatch`.
// The overlap scheme is the one in the design description; the exact bit
// assignment is derived from the bit weights it gives.
//
// Timing: one register stage.
module tdc_merge
  import fit_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      in_valid,
  input  logic [COARSE_W-1:0]       coarse,
  input  logic [FINE_W-1:0]         fine,
  output logic                      out_valid,
  output logic signed [TIME_W-1:0]  time_out,
  output logic                      mismatch
);

  localparam int unsigned LOW_W = FINE_W - OVERLAP_W;  // 5 fine-only bits

  logic [OVERLAP_W-1:0]     d;
  logic signed [COARSE_W+1:0] c_adj;
  logic signed [TIME_W-1:0] t;

  always_comb begin
    d     = fine[FINE_W-1:LOW_W] - coarse[OVERLAP_W-1:0];
    c_adj = signed'({2'b00, coarse});
    unique case (d)
      2'd1:    c_adj = c_adj + 1;
      2'd3:    c_adj = c_adj - 1;
      default: ;
    endcase
    t = TIME_W'(c_adj) <<< LOW_W;
    t = t | TIME_W'(fine[LOW_W-1:0]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      time_out  <= '0;
      mismatch  <= 1'b0;
    end else begin
      out_valid <= in_valid;
      time_out  <= t;
      mismatch  <= in_valid && (d == 2'd2);
    end
  end

endmodule

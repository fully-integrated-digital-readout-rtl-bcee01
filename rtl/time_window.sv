// time_window - channel time alignment and interaction-window check.
//
// The subtractor removes a per-channel time shift (cable and electronics
// delay, set by slow control) from the merged 12-bit channel time; the range
// comparator then flags the hit when the aligned time lies within
// +-`window` LSBs of zero, i.e. the channel saw a particle at the expected
// interaction time. Subtractor, comparator and the 12-bit and 7-bit widths
// follow the block diagram; the symmetric window and the saturation of the
// difference to 12 bits are this design's choices.
//
// Timing: one register stage.
module time_window
  import fit_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      in_valid,
  input  logic signed [TIME_W-1:0]  time_in,
  input  logic signed [TIME_W-1:0]  time_shift,
  input  logic [WINDOW_W-1:0]       window,
  output logic                      out_valid,
  output logic signed [TIME_W-1:0]  time_out,
  output logic                      in_window
);

  localparam logic signed [TIME_W:0] TMAX = (TIME_W+1)'(2**(TIME_W-1) - 1);
  localparam logic signed [TIME_W:0] TMIN = -(TIME_W+1)'(2**(TIME_W-1));

  logic signed [TIME_W:0]   diff, win;
  logic signed [TIME_W-1:0] sat;
  logic                   hit;

  always_comb begin
    diff = (TIME_W+1)'(time_in) - (TIME_W+1)'(time_shift);
    if (diff > TMAX)      sat = TIME_W'(TMAX);
    else if (diff < TMIN) sat = TIME_W'(TMIN);
    else                  sat = TIME_W'(diff);
    win  = signed'((TIME_W+1)'(window));
    hit  = (diff <= win) && (diff >= -win);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      time_out  <= '0;
      in_window <= 1'b0;
    end else begin
      out_valid <= in_valid;
      time_out  <= sat;
      in_window <= in_valid && hit;
    end
  end

endmodule

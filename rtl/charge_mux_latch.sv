// charge_mux_latch - charge readout selector of one channel (CPLD logic).
//
// Each channel has two integrators, each followed by its own 12-bit ADC:
// integrator 1 takes the even bunch crossings while integrator 2 is reset,
// and the other way round for odd crossings. On a data strobe from the gate
// circuit (the CFD pulse came in time) this block selects the ADC of the
// integrator that integrated the current crossing, latches its value and
// sends it out as a 13-bit word {adc_id, value} with a one-cycle strobe.
// A baseline-measurement strobe latches the same way without a pulse, for
// pedestal measurement, and is marked by `is_baseline`.
// The 2:1 multiplexer, the latch, the 13-bit data and the baseline strobe
// are from the front-end diagram; the meaning of bit 12 and the one-cycle
// strobe are this design's choices.
//
// Timing: one register stage. The ADC values must be the conversion of the
// crossing flagged by `bc_odd` when a strobe arrives.
module charge_mux_latch
  import fit_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                bc_odd,          // 0: even crossing, 1: odd
  input  logic [ADC_W-1:0]    adc1,            // integrator 1, even crossings
  input  logic [ADC_W-1:0]    adc2,            // integrator 2, odd crossings
  input  logic                gate_strobe,
  input  logic                baseline_strobe,
  output logic                strobe,
  output logic [CHARGE_W-1:0] data,
  output logic                is_baseline
);

  always_ff @(posedge clk) begin
    if (rst) begin
      strobe      <= 1'b0;
      data        <= '0;
      is_baseline <= 1'b0;
    end else begin
      strobe <= gate_strobe || baseline_strobe;
      if (gate_strobe || baseline_strobe) begin
        data        <= {bc_odd, bc_odd ? adc2 : adc1};
        is_baseline <= baseline_strobe && !gate_strobe;
      end
    end
  end

endmodule

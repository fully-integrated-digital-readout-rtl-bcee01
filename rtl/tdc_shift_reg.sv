// tdc_shift_reg - receiver for the serial result of the external TDC.
//
// The external TDC (THS788, 8-bit mode) sends each result as RAW_W bits,
// most significant bit first, on both edges of its 300 MHz readout clock,
// while `frame` is high; a double-data-rate input register hands over
// BPC = 2 bits per cycle, the earlier one in sdata[1]. The bits go through a
// KEEP_W-bit shift register, so once the word is complete the register holds
// its KEEP_W least significant bits; the most significant bit has been
// shifted out. A word takes RAW_W / BPC = 4 cycles, shorter than the 7.5
// cycles of a bunch crossing, so a channel can take a hit every crossing. With
// 8 and 7 bits the kept range is 128 x 13 ps = 1.67 ns, enough because the
// two upper kept bits overlap the coarse FPGA TDC.
// The 7-bit register and the 8-bit mode are from the design description;
// the serial framing (frame strobe, MSB first, two bits per clock) is this
// design's model of the TDC output port.
//
// Timing: `fine_valid` pulses for one cycle, the cycle after the last bit.
module tdc_shift_reg #(
  parameter int unsigned RAW_W  = fit_pkg::FINE_RAW_W,
  parameter int unsigned KEEP_W = fit_pkg::FINE_W,
  parameter int unsigned BPC    = 2
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              frame,
  input  logic [BPC-1:0]    sdata,     // sdata[BPC-1] is the earliest bit
  output logic              fine_valid,
  output logic [KEEP_W-1:0] fine
);

  localparam int unsigned STEPS = RAW_W / BPC;
  localparam int unsigned BC_W  = (STEPS > 1) ? $clog2(STEPS) : 1;

  logic [KEEP_W-1:0] sr_q;
  logic [BC_W-1:0]   bit_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      sr_q       <= '0;
      bit_q      <= '0;
      fine_valid <= 1'b0;
    end else begin
      fine_valid <= 1'b0;
      if (frame) begin
        sr_q <= KEEP_W'({sr_q, sdata});
        if (bit_q == BC_W'(STEPS - 1)) begin
          bit_q      <= '0;
          fine_valid <= 1'b1;
        end else begin
          bit_q <= bit_q + 1'b1;
        end
      end else begin
        bit_q <= '0;   // a short frame is discarded
      end
    end
  end

  assign fine = sr_q;

endmodule

// ths788_model - behavioural model of one channel of the external TDC as
// seen from the FPGA (simulation only, not synthesizable logic).
//
// The real part is a commercial 4-channel time-to-digital converter with
// 13 ps LSB. In 8-bit mode it reports a hit as an 8-bit value (time modulo
// 256 LSB) whose last bit leaves the chip at most 105 ns after the pulse.
// Here a hit is announced by `hit` with its 8-bit result `value`; the model
// sends it LAT cycles later as a 4-cycle frame, two bits per cycle, MSB
// first (sdata[1] earlier), matching the receiver's framing. Results queue
// up, so hits may come as often as the frames can be sent.
module ths788_model #(
  parameter int LAT = 27    // hit to first bit pair, 300 MHz cycles
) (
  input  logic       clk,
  input  logic       hit,
  input  logic [7:0] value,
  output logic       frame,
  output logic [1:0] sdata
);
  int          cyc = 0;
  int          due_q[$];
  logic [7:0]  val_q[$];
  int          step = -1;
  logic [7:0]  cur = '0;

  initial begin
    frame = 1'b0;
    sdata = '0;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (hit) begin
      due_q.push_back(cyc + LAT);
      val_q.push_back(value);
    end
    if (step < 0 && due_q.size() != 0 && due_q[0] <= cyc) begin
      void'(due_q.pop_front());
      cur  = val_q.pop_front();
      step = 0;
    end
    if (step >= 0) begin
      frame <= 1'b1;
      sdata <= {cur[7 - 2 * step], cur[6 - 2 * step]};
      step  = (step == 3) ? -1 : step + 1;
    end else begin
      frame <= 1'b0;
      sdata <= '0;
    end
  end
endmodule

// pipe_divider - pipelined division of a signed sum by an unsigned count.
//
// The TCM turns the sum of channel times of one side into an average time
// by dividing by the number of active channels. Only QUO_W quotient bits
// are computed: the caller guarantees |num| < den * 2^QUO_W (for the TCM the
// average of in-window times is bounded by the 7-bit window, so 8 bits
// suffice). A first stage takes the magnitude of the numerator and loads
// its upper NUM_W - QUO_W bits as the partial remainder; QUO_W restoring
// stages then produce one quotient bit each, most significant first; a last
// stage restores the sign. The quotient is truncated towards zero. A zero
// divisor gives 0 with `div_zero`; a numerator outside the range gives
// `range_err`. The pipelined restoring scheme and the reduced quotient
// width are this design's choices; one operand pair is taken every cycle.
//
// Timing: result QUO_W + 2 cycles after the operands.
module pipe_divider #(
  parameter int unsigned NUM_W = 20,
  parameter int unsigned DEN_W = 8,
  parameter int unsigned QUO_W = 8
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [NUM_W-1:0] num,
  input  logic [DEN_W-1:0]        den,
  output logic                    out_valid,
  output logic signed [QUO_W:0]   quo,        // sign + QUO_W magnitude bits
  output logic                    div_zero,
  output logic                    range_err
);

  localparam int unsigned ST = QUO_W + 1;   // stage registers 0..QUO_W

  logic [ST-1:0]    v_q, neg_q, err_q;
  logic [QUO_W-1:0] n_q [ST];   // numerator bits still to use / quotient bits
  logic [DEN_W:0]   r_q [ST];   // partial remainder
  logic [DEN_W-1:0] d_q [ST];
  logic [NUM_W-1:0] mag;

  assign mag = num[NUM_W-1] ? NUM_W'(-num) : NUM_W'(num);

  always_ff @(posedge clk) begin
    if (rst) v_q <= '0;
    else     v_q <= {v_q[ST-2:0], in_valid};
  end

  always_ff @(posedge clk) begin
    neg_q[0] <= num[NUM_W-1];
    n_q[0]   <= mag[QUO_W-1:0];
    r_q[0]   <= (DEN_W+1)'(mag >> QUO_W);
    err_q[0] <= (den != '0) && ((mag >> QUO_W) >= NUM_W'(den));
    d_q[0]   <= den;
    for (int s = 1; s < ST; s++) begin
      logic [DEN_W+1:0] trial;
      trial = {r_q[s-1], n_q[s-1][QUO_W-1]};
      neg_q[s] <= neg_q[s-1];
      err_q[s] <= err_q[s-1];
      d_q[s]   <= d_q[s-1];
      if (trial >= {2'b00, d_q[s-1]}) begin
        r_q[s] <= (DEN_W+1)'(trial - {2'b00, d_q[s-1]});
        n_q[s] <= {n_q[s-1][QUO_W-2:0], 1'b1};
      end else begin
        r_q[s] <= (DEN_W+1)'(trial);
        n_q[s] <= {n_q[s-1][QUO_W-2:0], 1'b0};
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      quo       <= '0;
      div_zero  <= 1'b0;
      range_err <= 1'b0;
    end else begin
      out_valid <= v_q[ST-1];
      div_zero  <= v_q[ST-1] && (d_q[ST-1] == '0);
      range_err <= v_q[ST-1] && err_q[ST-1];
      if (d_q[ST-1] == '0)  quo <= '0;
      else if (neg_q[ST-1]) quo <= -signed'({1'b0, n_q[ST-1]});
      else                  quo <= signed'({1'b0, n_q[ST-1]});
    end
  end

endmodule

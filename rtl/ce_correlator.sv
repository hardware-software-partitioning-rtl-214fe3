// ce_correlator: one correlator of the channel estimator's correlator
// bench. A complex sample is multiplied by the current +/-1 chip of the
// training sequence (coef = 1 means -1, so the "multiplier" is a
// conditional negation) and added into an accumulator register that feeds
// back on itself (Figure 5.3 of the reference study, one sample per chip).
//
// Timing: clear empties the accumulator; en adds one product per clock.
// If both are set, the accumulator restarts with the current product.
// acc_i/acc_q are the register outputs.
module ce_correlator #(
  parameter int unsigned W     = 8,
  parameter int unsigned ACC_W = W + 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    en,
  input  logic                    coef,
  input  logic signed [W-1:0]     din_i,
  input  logic signed [W-1:0]     din_q,
  output logic signed [ACC_W-1:0] acc_i,
  output logic signed [ACC_W-1:0] acc_q
);

  logic signed [ACC_W-1:0] p_i, p_q;
  assign p_i = coef ? -ACC_W'(din_i) : ACC_W'(din_i);
  assign p_q = coef ? -ACC_W'(din_q) : ACC_W'(din_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_i <= '0;
      acc_q <= '0;
    end else if (en) begin
      acc_i <= (clear ? '0 : acc_i) + p_i;
      acc_q <= (clear ? '0 : acc_q) + p_q;
    end else if (clear) begin
      acc_i <= '0;
      acc_q <= '0;
    end
  end

endmodule

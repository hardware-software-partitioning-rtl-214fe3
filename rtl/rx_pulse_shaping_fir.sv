// rx_pulse_shaping_fir: receive pulse shaping (square-root raised cosine)
// FIR filter for the oversampled complex baseband stream.
//
// Direct-form FIR with one tap delay line per rail (I and Q share the
// coefficients). The coefficients are held in a small coefficient memory
// that the control side loads through coef_we / coef_addr / coef_wdata, so
// that the FDD/HSDPA and TDD coefficient sets (and other filters for study)
// can be swapped at run time. Coefficients are 10-bit signed and the FDD
// filter has 65 taps, as in the reference study; the sample width is this design's
// choice. Taps beyond the loaded length should be written with zero.
//
// Timing: a sample accepted with in_valid produces its filtered output on
// dout_i/dout_q with out_valid one clock later. Tap k multiplies the sample
// accepted k samples earlier. Full precision output, no rounding.
module rx_pulse_shaping_fir #(
  parameter int unsigned TAPS   = 65,
  parameter int unsigned COEF_W = 10,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned OUT_W  = DATA_W + COEF_W + $clog2(TAPS)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // coefficient memory write port
  input  logic                        coef_we,
  input  logic [$clog2(TAPS)-1:0]     coef_addr,
  input  logic signed [COEF_W-1:0]    coef_wdata,
  // sample stream
  input  logic                        in_valid,
  input  logic signed [DATA_W-1:0]    din_i,
  input  logic signed [DATA_W-1:0]    din_q,
  output logic                        out_valid,
  output logic signed [OUT_W-1:0]     dout_i,
  output logic signed [OUT_W-1:0]     dout_q
);

  logic signed [COEF_W-1:0] coef   [TAPS];
  logic signed [DATA_W-1:0] line_i [TAPS-1];
  logic signed [DATA_W-1:0] line_q [TAPS-1];
  logic signed [OUT_W-1:0]  sum_i, sum_q;

  always_ff @(posedge clk) begin
    if (coef_we && 32'(coef_addr) < TAPS) coef[coef_addr] <= coef_wdata;
  end

  // delay line: position 0 holds the previous sample, so tap k reads
  // position k-1 and tap 0 reads the incoming sample
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS-1; k++) begin
        line_i[k] <= '0;
        line_q[k] <= '0;
      end
    end else if (in_valid) begin
      line_i[0] <= din_i;
      line_q[0] <= din_q;
      for (int k = 1; k < TAPS-1; k++) begin
        line_i[k] <= line_i[k-1];
        line_q[k] <= line_q[k-1];
      end
    end
  end

  // products with the incoming sample at tap 0
  always_comb begin
    sum_i = OUT_W'(din_i) * OUT_W'(coef[0]);
    sum_q = OUT_W'(din_q) * OUT_W'(coef[0]);
    for (int k = 1; k < TAPS; k++) begin
      sum_i += OUT_W'(line_i[k-1]) * OUT_W'(coef[k]);
      sum_q += OUT_W'(line_q[k-1]) * OUT_W'(coef[k]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      dout_i    <= '0;
      dout_q    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        dout_i <= sum_i;
        dout_q <= sum_q;
      end
    end
  end

endmodule

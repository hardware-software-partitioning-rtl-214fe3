// psch_sub_matched_filter: one quarter of the primary synchronisation code
// (PSC) matched filter.
//
// A delay line of TAPS*K samples holds the input; every K-th position is a
// tap (K = oversampling rate, so K-1 plain delays sit between two taps).
// Each tap is multiplied by a +/-1 coefficient given as a sign bit
// (pg[j] = 1 means -1), which in hardware is a conditional negation, and
// the tap products are summed. The sum g goes out either as it is or as
// its absolute value: long_mode = 1 selects |g|, long_mode = 0 the signed
// sum. The reference study's figure shows a Short=0/Long=1 select between the two;
// which input each select value picks is this design's reading.
//
// The oldest sample leaves on dly_out so that sub filters can be chained
// into one long filter. Timing: the delay line shifts on en; g and dly_out
// are functions of the registered delay line, valid in the clock after en.
module psch_sub_matched_filter #(
  parameter int unsigned TAPS = 64,
  parameter int unsigned K    = 4,
  parameter int unsigned W    = 8,
  parameter int unsigned OW   = W + $clog2(TAPS) + 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic signed [W-1:0]    din,
  input  logic [TAPS-1:0]        pg,
  input  logic                   long_mode,
  output logic signed [OW-1:0]   g,
  output logic signed [W-1:0]    dly_out
);

  localparam int unsigned LEN = TAPS * K;

  logic signed [W-1:0]  line [LEN];
  logic signed [OW-1:0] sum;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LEN; i++) line[i] <= '0;
    end else if (en) begin
      line[0] <= din;
      for (int i = 1; i < LEN; i++) line[i] <= line[i-1];
    end
  end

  always_comb begin
    sum = '0;
    for (int j = 0; j < TAPS; j++) begin
      if (pg[j]) sum -= OW'(line[j*K]);
      else       sum += OW'(line[j*K]);
    end
  end

  assign g       = (long_mode && sum < 0) ? -sum : sum;
  assign dly_out = line[LEN-1];

endmodule

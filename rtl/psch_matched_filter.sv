// psch_matched_filter: complete P-SCH matched filter of the cell searcher,
// shared by FDD and TDD.
//
// For each of I and Q, four psch_sub_matched_filter blocks of 64 taps are
// chained into one 256-chip filter (combined matched filter) and their
// outputs g0..g3 are summed. Splitting the code into four parts shortens
// the coherent correlation length by four, so a four times larger carrier
// frequency error is tolerated when long_mode takes |g| of each part.
// The I and Q results are added and the absolute value is taken.
//
// Averaging: a circulating memory of one search period (search_len
// samples, at most SEARCH_MAX) holds the running sum of |corr| for every
// sample position. In the first period after restart the memory is
// written with the new value, later periods add to it. The running sum is
// scaled on the way out by avg_scale / 2^16 (software writes
// 2^16 / number of accumulated periods to get a mean); this is the
// multiplier of the reference study's figure. FDD uses search_len = 2560*K (one
// slot), TDD 2560*15*K (one frame); SEARCH_MAX is sized for TDD.
//
// The PSC signs are given as pg[255:0] where pg[j] multiplies the sample
// that is j chips old (so the code is loaded in time-reversed order).
//
// Timing: sample accepted on in_valid at clock t; corr_* (the coherent
// I/Q sums, used as phase reference by the S-SCH correlator) are valid at
// t+1 with corr_index = position of the sample in the search period;
// avg_* are valid at t+2. period_end marks the last position of a period.
module psch_matched_filter
  import mumor_pkg::*;
#(
  parameter int unsigned K          = 4,
  parameter int unsigned W          = 8,
  parameter int unsigned SEARCH_MAX = CHIPS_PER_SLOT * SLOTS_PER_FRAME * K,
  parameter int unsigned IDX_W      = $clog2(SEARCH_MAX),
  parameter int unsigned CORR_W     = W + 9,
  parameter int unsigned MAG_W      = CORR_W + 1,
  parameter int unsigned ACC_W      = MAG_W + 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     restart,
  input  logic [IDX_W-1:0]         search_len,
  input  logic [16:0]              avg_scale,
  input  logic [255:0]             pg,
  input  logic                     long_mode,
  input  logic                     in_valid,
  input  logic signed [W-1:0]      din_i,
  input  logic signed [W-1:0]      din_q,
  output logic                     corr_valid,
  output logic signed [CORR_W-1:0] corr_i,
  output logic signed [CORR_W-1:0] corr_q,
  output logic [IDX_W-1:0]         corr_index,
  output logic                     avg_valid,
  output logic [ACC_W-1:0]         avg_value,
  output logic [IDX_W-1:0]         avg_index,
  output logic [7:0]               avg_iter,
  output logic                     period_end
);

  localparam int unsigned SUB_W = W + 7;

  logic signed [SUB_W-1:0] g_i [4];
  logic signed [SUB_W-1:0] g_q [4];
  logic signed [W-1:0]     chain_i [5];
  logic signed [W-1:0]     chain_q [5];

  assign chain_i[0] = din_i;
  assign chain_q[0] = din_q;

  for (genvar s = 0; s < 4; s++) begin : g_sub
    psch_sub_matched_filter #(.TAPS(64), .K(K), .W(W), .OW(SUB_W)) u_sub_i (
      .clk, .rst_n, .en(in_valid), .din(chain_i[s]), .pg(pg[64*s +: 64]),
      .long_mode, .g(g_i[s]), .dly_out(chain_i[s+1]));
    psch_sub_matched_filter #(.TAPS(64), .K(K), .W(W), .OW(SUB_W)) u_sub_q (
      .clk, .rst_n, .en(in_valid), .din(chain_q[s]), .pg(pg[64*s +: 64]),
      .long_mode, .g(g_q[s]), .dly_out(chain_q[s+1]));
  end

  // combined matched filter sums and |I + Q|
  logic signed [CORR_W-1:0] sum_i, sum_q;
  logic signed [MAG_W-1:0]  iq;
  always_comb begin
    sum_i = '0;
    sum_q = '0;
    for (int s = 0; s < 4; s++) begin
      sum_i += CORR_W'(g_i[s]);
      sum_q += CORR_W'(g_q[s]);
    end
    iq = MAG_W'(sum_i) + MAG_W'(sum_q);
  end

  logic               v1;
  logic [MAG_W-1:0]   mag;
  logic [IDX_W-1:0]   idx;
  logic [7:0]         iter;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      corr_valid <= 1'b0;
      corr_i <= '0;
      corr_q <= '0;
      mag <= '0;
    end else begin
      v1 <= in_valid;
      corr_valid <= v1;
      if (v1) begin
        corr_i <= sum_i;
        corr_q <= sum_q;
        mag    <= (iq < 0) ? MAG_W'(-iq) : MAG_W'(iq);
      end
    end
  end

  assign corr_index = idx;

  // averaging memory, read-modify-write of one position per sample
  logic [ACC_W-1:0] avg_mem [SEARCH_MAX];
  logic [ACC_W-1:0] acc;
  logic [ACC_W+16:0] scaled;

  assign acc    = ACC_W'(mag) + ((iter == 8'd0) ? '0 : avg_mem[idx]);
  assign scaled = (ACC_W+17)'(acc) * (ACC_W+17)'(avg_scale);

  always_ff @(posedge clk) begin
    if (corr_valid && !restart) avg_mem[idx] <= acc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx <= '0;
      iter <= '0;
      avg_valid <= 1'b0;
      avg_value <= '0;
      avg_index <= '0;
      avg_iter <= '0;
      period_end <= 1'b0;
    end else if (restart) begin
      idx <= '0;
      iter <= '0;
      avg_valid <= 1'b0;
      period_end <= 1'b0;
    end else begin
      avg_valid <= corr_valid;
      period_end <= 1'b0;
      if (corr_valid) begin
        avg_value <= ACC_W'(scaled >> 16);
        avg_index <= idx;
        avg_iter  <= iter;
        if (idx == search_len - 1'b1) begin
          idx <= '0;
          period_end <= 1'b1;
          if (iter != 8'hFF) iter <= iter + 8'd1;
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end
  end

endmodule

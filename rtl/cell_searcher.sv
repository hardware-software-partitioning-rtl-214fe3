// cell_searcher: multi-mode (FDD/TDD) cell search front end.
//
// Data path (after the cell search diagram of the reference study):
//   - a mode multiplexer picks the FDD or the TDD sample stream;
//   - a down-sampler keeps one sample in ds_factor, at phase ds_phase, so
//     that the FDD stream reaches the K samples per chip of the matched
//     filter; in TDD a second multiplexer bypasses it and the matched
//     filter runs on the TDD stream directly;
//   - psch_matched_filter correlates with the PSC and averages over the
//     search period (one slot in FDD, one frame in TDD);
//   - psch_control finds the maximum candidates and, for n_enable periods,
//     starts one ssch_correlator per candidate at the first chip of the
//     synchronisation burst (L correlators in parallel for TDD);
//   - every correlator result is de-rotated by the coherent P-SCH
//     correlation last seen at its candidate position and stored in
//     ssch_result_ram: FDD row = slot counter (15 rows), TDD row =
//     2*candidate + burst number.
// Code-group look-up tables, metric calculation/decision and slot/frame
// start generation that follow the RAM are not part of this block; their
// inputs are the RAM read port and the candidate list.
//
// Here the S-SCH correlators take their chips from the matched-filter
// input stream (after the bypass multiplexer), so that their sample
// positions are the same as those of the P-SCH candidates in both modes.
// restart clears averaging, candidates and the result RAM.
// Status outputs: period_end marks the last sample of every averaging
// period, ssch_busy shows which S-SCH correlators are running and
// ssch_count counts the result rows written since restart.
module cell_searcher
  import mumor_pkg::*;
#(
  parameter int unsigned K          = 4,
  parameter int unsigned W          = 8,
  parameter int unsigned L          = 4,
  parameter int unsigned SEARCH_MAX = CHIPS_PER_SLOT * SLOTS_PER_FRAME * K,
  parameter int unsigned IDX_W      = $clog2(SEARCH_MAX),
  parameter int unsigned ROWS       = SLOTS_PER_FRAME,
  parameter int unsigned NCODES     = 16,
  parameter int unsigned CORR_W     = W + 9,
  parameter int unsigned ACC_W      = CORR_W + 9,
  parameter int unsigned RES_W      = 2 * CORR_W + 1,
  parameter int unsigned RAM_W      = RES_W + 4,
  parameter int unsigned CNT_W      = $clog2(L + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // configuration
  input  mode_e                  mode,
  input  logic                   restart,
  input  logic [3:0]             ds_factor,
  input  logic [3:0]             ds_phase,
  input  logic [255:0]           pg,
  input  logic                   long_mode,
  input  logic [IDX_W-1:0]       search_len,
  input  logic [16:0]            avg_scale,
  input  logic [7:0]             n_periods,
  input  logic [7:0]             n_enable,
  input  logic [CNT_W-1:0]       num_cand,
  // sample streams
  input  logic                   fdd_valid,
  input  logic signed [W-1:0]    fdd_i,
  input  logic signed [W-1:0]    fdd_q,
  input  logic                   tdd_valid,
  input  logic signed [W-1:0]    tdd_i,
  input  logic signed [W-1:0]    tdd_q,
  // results
  output logic [IDX_W-1:0]       cand_pos [L],
  output logic [ACC_W-1:0]       cand_val [L],
  output logic [CNT_W-1:0]       cand_cnt,
  output logic                   search_done,
  output logic                   enabling,
  output logic [15:0]            ssch_count,
  output logic                   period_end,
  output logic [L-1:0]           ssch_busy,
  input  logic                   rd_en,
  input  logic [$clog2(ROWS)-1:0] rd_row,
  input  logic [$clog2(NCODES)-1:0] rd_code,
  input  logic [16:0]            rd_scale,
  output logic signed [RAM_W-1:0] rd_data
);

  // mode multiplexer and down-sampler
  logic                sel_valid;
  logic signed [W-1:0] sel_i, sel_q;
  logic [3:0]          ds_cnt;
  logic                ds_valid;
  logic                tdd_mode;

  assign tdd_mode  = (mode == MODE_TDD);
  assign sel_valid = tdd_mode ? tdd_valid : fdd_valid;
  assign sel_i     = tdd_mode ? tdd_i : fdd_i;
  assign sel_q     = tdd_mode ? tdd_q : fdd_q;
  assign ds_valid  = sel_valid && (ds_cnt == ds_phase);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 ds_cnt <= '0;
    else if (restart)           ds_cnt <= '0;
    else if (sel_valid)         ds_cnt <= (ds_cnt + 4'd1 >= ds_factor) ? 4'd0 : ds_cnt + 4'd1;
  end

  // bypass multiplexer: TDD runs the matched filter on the sample stream
  logic                mf_valid;
  assign mf_valid = tdd_mode ? tdd_valid : ds_valid;

  // sample position of the matched-filter input in the search period
  logic [IDX_W-1:0] smp_index;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        smp_index <= '0;
    else if (restart)  smp_index <= '0;
    else if (mf_valid) smp_index <= (smp_index == search_len - 1'b1) ? '0 : smp_index + 1'b1;
  end

  logic                     corr_valid;
  logic signed [CORR_W-1:0] corr_i, corr_q;
  logic [IDX_W-1:0]         corr_index;
  logic                     avg_valid;
  logic [ACC_W-1:0]         avg_value;
  logic [IDX_W-1:0]         avg_index;
  logic [7:0]               avg_iter;

  psch_matched_filter #(.K(K), .W(W), .SEARCH_MAX(SEARCH_MAX), .IDX_W(IDX_W),
                        .CORR_W(CORR_W), .MAG_W(CORR_W + 1), .ACC_W(ACC_W)) u_psch_mf (
    .clk, .rst_n, .restart, .search_len, .avg_scale, .pg, .long_mode,
    .in_valid(mf_valid), .din_i(sel_i), .din_q(sel_q),
    .corr_valid, .corr_i, .corr_q, .corr_index,
    .avg_valid, .avg_value, .avg_index, .avg_iter, .period_end);

  logic [L-1:0] ssch_start;

  psch_control #(.L(L), .K(K), .IDX_W(IDX_W), .VAL_W(ACC_W), .CNT_W(CNT_W)) u_psch_ctrl (
    .clk, .rst_n, .restart, .search_len, .num_cand, .n_periods, .n_enable,
    .avg_valid, .avg_value, .avg_index, .avg_iter,
    .smp_valid(mf_valid), .smp_index,
    .cand_pos, .cand_val, .cand_cnt, .search_done, .ssch_start, .enabling);

  // S-SCH correlators, one per candidate, with their phase references
  logic signed [CORR_W-1:0] ph_i [L];
  logic signed [CORR_W-1:0] ph_q [L];
  logic signed [CORR_W-1:0] ph_now_i [L];
  logic signed [CORR_W-1:0] ph_now_q [L];
  logic [L-1:0]             ss_done;
  logic signed [RES_W-1:0]  ss_res [L][NCODES];
  logic [L-1:0]             burst;

  for (genvar k = 0; k < L; k++) begin : g_ssch
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        ph_i[k] <= '0;
        ph_q[k] <= '0;
      end else if (corr_valid && search_done && corr_index == cand_pos[k]) begin
        ph_i[k] <= corr_i;
        ph_q[k] <= corr_q;
      end
    end

    // the correlation of the burst being finished, as soon as it is out
    assign ph_now_i[k] = (corr_valid && corr_index == cand_pos[k]) ? corr_i : ph_i[k];
    assign ph_now_q[k] = (corr_valid && corr_index == cand_pos[k]) ? corr_q : ph_q[k];

    ssch_correlator #(.K(K), .W(W), .NCODES(NCODES), .PW(CORR_W), .ACC_W(W + 9),
                      .RES_W(RES_W)) u_ssch (
      .clk, .rst_n, .start(ssch_start[k]), .smp_valid(mf_valid),
      .din_i(sel_i), .din_q(sel_q), .ph_i(ph_now_i[k]), .ph_q(ph_now_q[k]),
      .busy(ssch_busy[k]), .done(ss_done[k]), .result(ss_res[k]));
  end

  // result RAM write: the lowest finished correlator wins the port
  localparam int unsigned ROW_W = $clog2(ROWS);
  logic                    wr;
  logic [ROW_W-1:0]        wr_row;
  logic signed [RES_W-1:0] wr_data [NCODES];
  logic [ROW_W-1:0]        slot_cnt;
  int                      win;

  always_comb begin
    wr = 1'b0;
    win = 0;
    for (int k = L - 1; k >= 0; k--) begin
      if (ss_done[k]) begin
        wr = 1'b1;
        win = k;
      end
    end
    wr_row  = tdd_mode ? ROW_W'(2 * win + int'(burst[win])) : slot_cnt;
    wr_data = ss_res[win];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_cnt <= '0;
      burst <= '0;
      ssch_count <= '0;
    end else if (restart) begin
      slot_cnt <= '0;
      burst <= '0;
      ssch_count <= '0;
    end else if (wr) begin
      slot_cnt <= (slot_cnt == ROW_W'(ROWS - 1)) ? '0 : slot_cnt + 1'b1;
      burst[win] <= ~burst[win];
      ssch_count <= ssch_count + 16'd1;
    end
  end

  ssch_result_ram #(.ROWS(ROWS), .NCODES(NCODES), .DW(RES_W), .ACC_W(RAM_W)) u_ram (
    .clk, .rst_n, .clear(restart), .wr, .wr_row, .wr_data,
    .rd_en, .rd_row, .rd_code, .rd_scale, .rd_data);

endmodule

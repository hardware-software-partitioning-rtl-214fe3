// mumor_rx_hw: top level of the hardware part of the multi-mode UMTS
// receiver. It joins the blocks that this design implements:
//
//   din --> rx_pulse_shaping_fir --> requantiser --+--> cell_searcher (FDD or TDD)
//                                                   +--> ce_correlator_bench
//
// - The Rx pulse-shaping filter runs on the incoming samples; its
//   coefficients are written through coef_we/coef_addr/coef_wdata.
// - The filter output is brought back to W bits by an arithmetic right
//   shift of fir_shift bits with saturation (this design's choice: the
//   reference study does not give the word lengths between the blocks).
// - The cell searcher takes the filtered stream on its FDD input when
//   mode = FDD and on its TDD input otherwise; mode is a 2-bit code
//   (0 FDD, 1 TDD, 2 HSDPA; HSDPA uses the FDD cell search).
// - The channel-estimator correlator bench sees the same filtered stream.
//   Its training chips come from outside (train_req/train_chip).
//
// Timing: the filter adds one clock, the requantiser is combinational, so
// a sample reaches both consumers one clock after in_valid. All other
// timing is that of the sub-blocks (see their headers).
//
// Parameters take the reference study's values: K = 4 samples per chip for the
// P-SCH filter, a 297*4-sample estimator window at OSR 4,
// a 65-tap filter with 10-bit coefficients (L = 4 candidates is this
// design's choice: the study leaves L open). The interconnection itself is
// this design's own; the reference study describes the blocks but not one
// bit-exact top level.
module mumor_rx_hw
  import mumor_pkg::*;
#(
  parameter int unsigned K          = 4,
  parameter int unsigned W          = 8,
  parameter int unsigned L          = 4,
  parameter int unsigned TAPS       = 65,
  parameter int unsigned COEF_W     = 10,
  parameter int unsigned WIN        = 297 * 4,
  parameter int unsigned OSR        = 4,
  parameter int unsigned LEN_W      = 12,
  parameter int unsigned SEARCH_MAX = CHIPS_PER_SLOT * SLOTS_PER_FRAME * K,
  parameter int unsigned IDX_W      = $clog2(SEARCH_MAX),
  parameter int unsigned CORR_W     = W + 9,
  parameter int unsigned ACC_W      = CORR_W + 9,
  parameter int unsigned RAM_W      = 2 * CORR_W + 5,
  parameter int unsigned CNT_W      = $clog2(L + 1),
  parameter int unsigned FIR_W      = W + COEF_W + $clog2(TAPS),
  parameter int unsigned CE_ACC_W   = W + LEN_W,
  parameter int unsigned CE_PWR_W   = 2 * CE_ACC_W,
  parameter int unsigned CE_EN_W    = CE_PWR_W + $clog2(WIN),
  parameter int unsigned CE_DLY_W   = $clog2(WIN)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [1:0]                 mode,
  // pulse-shaping filter
  input  logic                       coef_we,
  input  logic [$clog2(TAPS)-1:0]    coef_addr,
  input  logic signed [COEF_W-1:0]   coef_wdata,
  input  logic [4:0]                 fir_shift,
  input  logic                       in_valid,
  input  logic signed [W-1:0]        din_i,
  input  logic signed [W-1:0]        din_q,
  // cell searcher
  input  logic                       cs_restart,
  input  logic [3:0]                 ds_factor,
  input  logic [3:0]                 ds_phase,
  input  logic [255:0]               pg,
  input  logic                       long_mode,
  input  logic [IDX_W-1:0]           search_len,
  input  logic [16:0]                avg_scale,
  input  logic [7:0]                 n_periods,
  input  logic [7:0]                 n_enable,
  input  logic [CNT_W-1:0]           num_cand,
  output logic [IDX_W-1:0]           cand_pos [L],
  output logic [ACC_W-1:0]           cand_val [L],
  output logic [CNT_W-1:0]           cand_cnt,
  output logic                       search_done,
  output logic                       enabling,
  output logic [15:0]                ssch_count,
  output logic                       period_end,
  output logic [L-1:0]               ssch_busy,
  input  logic                       rd_en,
  input  logic [3:0]                 rd_row,
  input  logic [3:0]                 rd_code,
  input  logic [16:0]                rd_scale,
  output logic signed [RAM_W-1:0]    rd_data,
  // channel-estimator correlator bench
  input  logic                       ce_start,
  input  logic [LEN_W-1:0]           ce_corr_len,
  input  logic [7:0]                 ce_thr_pct,
  output logic                       train_req,
  input  logic                       train_chip,
  output logic                       ce_busy,
  output logic                       ce_res_valid,
  output logic [CE_DLY_W-1:0]        ce_res_delay,
  output logic signed [CE_ACC_W-1:0] ce_res_i,
  output logic signed [CE_ACC_W-1:0] ce_res_q,
  output logic [CE_PWR_W-1:0]        ce_res_power,
  output logic                       ce_res_hit,
  output logic [CE_EN_W-1:0]         ce_energy,
  output logic                       ce_done,
  // filtered stream, for observation
  output logic                       filt_valid,
  output logic signed [W-1:0]        filt_i,
  output logic signed [W-1:0]        filt_q
);
  localparam int signed SMAX = (1 <<< (W - 1)) - 1;
  localparam int signed SMIN = -(1 <<< (W - 1));

  logic                     fir_valid;
  logic signed [FIR_W-1:0]  fir_i, fir_q;
  mode_e                    mode_sel;

  rx_pulse_shaping_fir #(.TAPS(TAPS), .COEF_W(COEF_W), .DATA_W(W)) u_fir (
    .clk, .rst_n, .coef_we, .coef_addr, .coef_wdata,
    .in_valid, .din_i, .din_q,
    .out_valid(fir_valid), .dout_i(fir_i), .dout_q(fir_q)
  );

  function automatic logic signed [W-1:0] requant(input logic signed [FIR_W-1:0] x,
                                                  input logic [4:0] sh);
    logic signed [FIR_W-1:0] y;
    y = x >>> sh;
    if (y > FIR_W'(SMAX))      return W'(SMAX);
    else if (y < FIR_W'(SMIN)) return W'(SMIN);
    else                       return W'(y);
  endfunction

  always_comb begin
    filt_valid = fir_valid;
    filt_i     = requant(fir_i, fir_shift);
    filt_q     = requant(fir_q, fir_shift);
  end

  always_comb begin
    case (mode)
      2'd1:    mode_sel = MODE_TDD;
      2'd2:    mode_sel = MODE_HSDPA;
      default: mode_sel = MODE_FDD;
    endcase
  end

  cell_searcher #(.K(K), .W(W), .L(L), .SEARCH_MAX(SEARCH_MAX), .IDX_W(IDX_W),
                  .CORR_W(CORR_W), .ACC_W(ACC_W), .CNT_W(CNT_W)) u_cs (
    .clk, .rst_n, .mode(mode_sel), .restart(cs_restart), .ds_factor, .ds_phase,
    .pg, .long_mode, .search_len, .avg_scale, .n_periods, .n_enable, .num_cand,
    .fdd_valid(filt_valid && mode_sel != MODE_TDD), .fdd_i(filt_i), .fdd_q(filt_q),
    .tdd_valid(filt_valid && mode_sel == MODE_TDD), .tdd_i(filt_i), .tdd_q(filt_q),
    .cand_pos, .cand_val, .cand_cnt, .search_done, .enabling, .ssch_count,
    .period_end, .ssch_busy,
    .rd_en, .rd_row, .rd_code, .rd_scale, .rd_data
  );

  ce_correlator_bench #(.W(W), .WIN(WIN), .OSR(OSR), .LEN_W(LEN_W)) u_ce (
    .clk, .rst_n, .start(ce_start), .corr_len(ce_corr_len), .thr_pct(ce_thr_pct),
    .in_valid(filt_valid), .din_i(filt_i), .din_q(filt_q),
    .train_req, .train_chip, .busy(ce_busy),
    .res_valid(ce_res_valid), .res_delay(ce_res_delay), .res_i(ce_res_i), .res_q(ce_res_q),
    .res_power(ce_res_power), .res_hit(ce_res_hit), .energy(ce_energy), .done(ce_done)
  );
endmodule

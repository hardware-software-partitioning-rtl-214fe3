// ce_correlator_bench: hardware part of the channel estimator (correlator
// bench of Figures 5.2 and 5.4 of the reference study).
//
// A delay line of WIN samples (searching window x oversampling rate, 297 x
// 4 in FDD) runs at the sample rate. One ce_correlator per delay-line
// position multiplies its sample by the current training-sequence chip and
// accumulates. Correlation starts at the sample flagged with start (known
// training start, from synchronisation) plus WIN-1 samples, so that the
// whole window is in the delay line; after that every OSR-th sample is a
// chip instant (the chip-spaced branches of Figure 5.2 are the delay-line
// positions at the OSR phases). The training chip for each chip instant is
// taken from train_chip (sign bit) when train_req is high. After corr_len
// chips the bench reads out serially:
//   pass 1: power I^2+Q^2 of every correlator is summed (window energy);
//   pass 2: every correlator is output with its power and a flag that the
//           power reaches thr_pct/256 of the window energy, which is the
//           threshold of Figure 5.2 given as a percentage of the energy.
// res_delay is the path delay in samples: correlator k (k samples back in
// the delay line) has delay WIN-1-k relative to the training start.
// The window length is fixed at elaboration and the correlation length is
// programmable; the multipath searcher that picks the Rake parameters from
// this stream runs in software.
//
// WIN must be at least 2.
//
// Timing: pass 1 takes WIN clocks, pass 2 WIN clocks with one result per
// clock, then done pulses. Samples are ignored while reading out.
module ce_correlator_bench #(
  parameter int unsigned W        = 8,
  parameter int unsigned WIN      = 297 * 4,
  parameter int unsigned OSR      = 4,
  parameter int unsigned LEN_W    = 12,
  parameter int unsigned ACC_W    = W + LEN_W,
  parameter int unsigned PWR_W    = 2 * ACC_W,
  parameter int unsigned EN_W     = PWR_W + $clog2(WIN),
  parameter int unsigned DLY_W    = $clog2(WIN)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [LEN_W-1:0]        corr_len,
  input  logic [7:0]              thr_pct,
  input  logic                    in_valid,
  input  logic signed [W-1:0]     din_i,
  input  logic signed [W-1:0]     din_q,
  output logic                    train_req,
  input  logic                    train_chip,
  output logic                    busy,
  output logic                    res_valid,
  output logic [DLY_W-1:0]        res_delay,
  output logic signed [ACC_W-1:0] res_i,
  output logic signed [ACC_W-1:0] res_q,
  output logic [PWR_W-1:0]        res_power,
  output logic                    res_hit,
  output logic [EN_W-1:0]         energy,
  output logic                    done
);

  typedef enum logic [2:0] {S_IDLE, S_FILL, S_CORR, S_ENERGY, S_OUT} state_e;
  state_e state;

  logic signed [W-1:0] line_i [WIN];
  logic signed [W-1:0] line_q [WIN];
  logic signed [ACC_W-1:0] acc_i [WIN];
  logic signed [ACC_W-1:0] acc_q [WIN];

  logic [DLY_W-1:0]   fill_cnt;
  logic [$clog2(OSR+1)-1:0] ph_cnt;
  logic [LEN_W-1:0]   chip_cnt;
  logic [DLY_W-1:0]   rd_idx;
  logic               chip_en, first_chip;

  // delay line, position 0 holds the newest sample
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < WIN; k++) begin
        line_i[k] <= '0;
        line_q[k] <= '0;
      end
    end else if (in_valid) begin
      line_i[0] <= din_i;
      line_q[0] <= din_q;
      for (int k = 1; k < WIN; k++) begin
        line_i[k] <= line_i[k-1];
        line_q[k] <= line_q[k-1];
      end
    end
  end

  // correlator k sees the sample k positions back, counting the incoming
  // sample as position 0
  assign chip_en    = (state == S_CORR) && in_valid && (ph_cnt == '0);
  assign first_chip = chip_en && (chip_cnt == '0);
  assign train_req  = chip_en;

  for (genvar k = 0; k < WIN; k++) begin : g_corr
    logic signed [W-1:0] s_i, s_q;
    if (k == 0) begin : g_new
      assign s_i = din_i;
      assign s_q = din_q;
    end else begin : g_old
      assign s_i = line_i[k-1];
      assign s_q = line_q[k-1];
    end
    ce_correlator #(.W(W), .ACC_W(ACC_W)) u_corr (
      .clk, .rst_n, .clear(first_chip), .en(chip_en), .coef(train_chip),
      .din_i(s_i), .din_q(s_q), .acc_i(acc_i[k]), .acc_q(acc_q[k]));
  end

  // serial power and threshold
  logic signed [ACC_W-1:0] sel_i, sel_q;
  logic [PWR_W-1:0]        pwr;
  logic [EN_W+8:0]         lhs, rhs;
  assign sel_i = acc_i[rd_idx];
  assign sel_q = acc_q[rd_idx];
  assign pwr   = PWR_W'(sel_i * sel_i) + PWR_W'(sel_q * sel_q);
  assign lhs   = (EN_W+9)'(pwr) << 8;
  assign rhs   = (EN_W+9)'(energy) * (EN_W+9)'(thr_pct);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      fill_cnt <= '0;
      ph_cnt <= '0;
      chip_cnt <= '0;
      rd_idx <= '0;
      energy <= '0;
      res_valid <= 1'b0;
      res_delay <= '0;
      res_i <= '0;
      res_q <= '0;
      res_power <= '0;
      res_hit <= 1'b0;
      done <= 1'b0;
    end else begin
      res_valid <= 1'b0;
      done <= 1'b0;
      case (state)
        S_IDLE: begin
          if (start && in_valid) begin
            // the start sample enters the line now
            state <= (WIN == 2) ? S_CORR : S_FILL;
            fill_cnt <= DLY_W'(1);
            ph_cnt <= '0;
            chip_cnt <= '0;
          end
        end
        S_FILL: begin
          if (in_valid) begin
            if (fill_cnt == DLY_W'(WIN - 2)) begin
              // the next sample is position WIN-1 after start: first chip
              state <= S_CORR;
            end
            fill_cnt <= fill_cnt + 1'b1;
          end
        end
        S_CORR: begin
          if (in_valid) begin
            ph_cnt <= (ph_cnt == ($clog2(OSR+1))'(OSR - 1)) ? '0 : ph_cnt + 1'b1;
            if (ph_cnt == '0) begin
              chip_cnt <= chip_cnt + 1'b1;
              if (chip_cnt == corr_len - 1'b1) begin
                state <= S_ENERGY;
                rd_idx <= '0;
                energy <= '0;
              end
            end
          end
        end
        S_ENERGY: begin
          energy <= energy + EN_W'(pwr);
          if (rd_idx == DLY_W'(WIN - 1)) begin
            rd_idx <= '0;
            state <= S_OUT;
          end else begin
            rd_idx <= rd_idx + 1'b1;
          end
        end
        S_OUT: begin
          res_valid <= 1'b1;
          res_delay <= DLY_W'(WIN - 1) - rd_idx;
          res_i <= sel_i;
          res_q <= sel_q;
          res_power <= pwr;
          res_hit <= (lhs >= rhs);
          if (rd_idx == DLY_W'(WIN - 1)) begin
            state <= S_IDLE;
            done <= 1'b1;
          end else begin
            rd_idx <= rd_idx + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule

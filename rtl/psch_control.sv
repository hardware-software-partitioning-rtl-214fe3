// psch_control: FDD/TDD P-SCH control of the cell searcher.
//
// Maximum search: during the last averaged search period (the period whose
// iteration number is n_periods-1) every averaged correlation value that is
// a local maximum (larger than its left neighbour and not smaller than its
// right neighbour; values outside the period count as zero) is offered to a
// sorted candidate list of up to num_cand (<= L) entries, largest first.
// FDD is the special case num_cand = 1 with a one-slot search period: the
// single candidate is the absolute maximum of the slot. TDD keeps several
// local maxima because the PSC appears once or twice per frame at an
// unknown position.
//
// State machine: ACCUM (wait for the averaging periods) -> SEARCH (build the
// list) -> ENABLE (for n_enable search periods, measured on the sample
// stream smp_valid/smp_index, pulse ssch_start[k] when the current sample
// is the first chip of the synchronisation burst that ends at candidate k,
// i.e. 255*K samples before the peak, which the matched filter reports at
// the first sample of the last chip) -> DONE (list held until restart).
//
// Timing: one averaged value per clock at most; the candidate list is
// updated one clock after the value that completes a local maximum test.
// ssch_start is combinational: it is high in the clock of the sample itself.
module psch_control #(
  parameter int unsigned L      = 4,
  parameter int unsigned K      = 4,
  parameter int unsigned IDX_W  = 18,
  parameter int unsigned VAL_W  = 26,
  parameter int unsigned CNT_W  = $clog2(L + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               restart,
  input  logic [IDX_W-1:0]   search_len,
  input  logic [CNT_W-1:0]   num_cand,
  input  logic [7:0]         n_periods,
  input  logic [7:0]         n_enable,
  // averaged correlation stream from the matched filter
  input  logic               avg_valid,
  input  logic [VAL_W-1:0]   avg_value,
  input  logic [IDX_W-1:0]   avg_index,
  input  logic [7:0]         avg_iter,
  // sample stream position for enabling the S-SCH correlators
  input  logic               smp_valid,
  input  logic [IDX_W-1:0]   smp_index,
  output logic [IDX_W-1:0]   cand_pos [L],
  output logic [VAL_W-1:0]   cand_val [L],
  output logic [CNT_W-1:0]   cand_cnt,
  output logic               search_done,
  output logic [L-1:0]       ssch_start,
  output logic               enabling
);

  typedef enum logic [1:0] {S_ACCUM, S_SEARCH, S_ENABLE, S_DONE} state_e;
  state_e state;

  // the peak is seen at the first sample of the last chip of the burst
  localparam int unsigned BURST = 255 * K + 1;

  // sliding window of the two previous values of the period
  logic [VAL_W-1:0] prev_val;
  logic [IDX_W-1:0] prev_idx;
  logic             prev_ok;     // prev_val belongs to the searched period
  logic [VAL_W-1:0] left_val;    // value left of prev (0 at period start)
  logic             last_pend;   // last value of the period still to test

  // offer to the sorted list
  logic             offer;
  logic [VAL_W-1:0] offer_val;
  logic [IDX_W-1:0] offer_idx;

  logic in_search_period;
  assign in_search_period = avg_valid && (avg_iter == n_periods - 8'd1);

  always_comb begin
    offer = 1'b0;
    offer_val = prev_val;
    offer_idx = prev_idx;
    if (last_pend) begin
      // last value of the period, right neighbour counts as zero
      offer = (prev_val > left_val);
    end else if (in_search_period && prev_ok && state == S_SEARCH) begin
      offer = (prev_val > left_val) && (prev_val >= avg_value);
    end
  end

  // position of the burst start for candidate k (modulo the period)
  function automatic logic [IDX_W-1:0] start_of(input logic [IDX_W-1:0] pos,
                                                input logic [IDX_W-1:0] len);
    logic [IDX_W:0] s;
    s = {1'b0, pos} + {1'b0, len} - (IDX_W+1)'(BURST - 1);
    if (s >= {1'b0, len}) s = s - {1'b0, len};
    return s[IDX_W-1:0];
  endfunction

  logic [IDX_W-1:0] en_cnt;      // samples seen in the current enable period
  logic [7:0]       en_periods;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_ACCUM;
      prev_val <= '0;
      prev_idx <= '0;
      prev_ok <= 1'b0;
      left_val <= '0;
      last_pend <= 1'b0;
      cand_cnt <= '0;
      for (int k = 0; k < L; k++) begin
        cand_pos[k] <= '0;
        cand_val[k] <= '0;
      end
      en_cnt <= '0;
      en_periods <= '0;
    end else if (restart) begin
      state <= S_ACCUM;
      prev_ok <= 1'b0;
      last_pend <= 1'b0;
      cand_cnt <= '0;
      en_cnt <= '0;
      en_periods <= '0;
    end else begin
      // insertion into the sorted list
      if (offer) begin
        for (int k = L - 1; k >= 0; k--) begin
          if (k < int'(num_cand)) begin
            if (k < int'(cand_cnt) && offer_val > cand_val[k]) begin
              // entry k is displaced; take the offer or the entry above
              if (k == 0 || offer_val <= cand_val[k-1]) begin
                cand_val[k] <= offer_val;
                cand_pos[k] <= offer_idx;
              end else begin
                cand_val[k] <= cand_val[k-1];
                cand_pos[k] <= cand_pos[k-1];
              end
            end else if (k == int'(cand_cnt)) begin
              // free slot at the end of the list
              if (k == 0 || offer_val <= cand_val[k-1]) begin
                cand_val[k] <= offer_val;
                cand_pos[k] <= offer_idx;
              end else begin
                cand_val[k] <= cand_val[k-1];
                cand_pos[k] <= cand_pos[k-1];
              end
            end
          end
        end
        if (cand_cnt < num_cand) cand_cnt <= cand_cnt + 1'b1;
      end

      last_pend <= 1'b0;
      case (state)
        S_ACCUM: begin
          if (in_search_period && avg_index == '0) begin
            state <= S_SEARCH;
            cand_cnt <= '0;
            prev_val <= avg_value;
            prev_idx <= avg_index;
            prev_ok <= 1'b1;
            left_val <= '0;
            if (search_len == 1) last_pend <= 1'b1;
          end
        end
        S_SEARCH: begin
          if (last_pend) begin
            state <= S_ENABLE;
            prev_ok <= 1'b0;
            en_cnt <= '0;
            en_periods <= '0;
          end else if (in_search_period) begin
            left_val <= prev_val;
            prev_val <= avg_value;
            prev_idx <= avg_index;
            if (avg_index == search_len - 1'b1) last_pend <= 1'b1;
          end
        end
        S_ENABLE: begin
          if (smp_valid) begin
            if (en_cnt == search_len - 1'b1) begin
              en_cnt <= '0;
              if (en_periods == n_enable - 8'd1) state <= S_DONE;
              en_periods <= en_periods + 8'd1;
            end else begin
              en_cnt <= en_cnt + 1'b1;
            end
          end
        end
        default: ;
      endcase
    end
  end

  // S-SCH start pulses, in the same clock as the sample that carries chip 0
  always_comb begin
    for (int k = 0; k < L; k++)
      ssch_start[k] = (state == S_ENABLE) && smp_valid && (k < int'(cand_cnt)) &&
                      (smp_index == start_of(cand_pos[k], search_len));
  end

  assign search_done = (state == S_ENABLE) || (state == S_DONE);
  assign enabling    = (state == S_ENABLE);

endmodule

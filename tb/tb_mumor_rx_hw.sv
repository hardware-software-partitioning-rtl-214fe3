// End-to-end testbench for mumor_rx_hw at full size (all parameters at
// their defaults: K = 4, L = 4, a 2560*15*4-sample averaging memory, a
// 297*4-sample estimator window, a 65-tap filter).
//
// The filter is loaded with a single tap (64, shift 6) so it passes the
// stream through with one clock of delay. Then:
//   1. FDD: six 2560-chip slots at 8 samples per chip (down-sampled by 2 to
//      K = 4). Every slot carries a PSC and an SSC burst at chip 300 with a
//      slot-dependent code. Checked: the candidate position, the moment the
//      search ends (two slots of averaging), three S-SCH runs and that each
//      result-RAM row peaks at the code that was on the air.
//   2. Channel estimator: a 256-chip training sequence at 4 samples per chip
//      arrives 40 samples after the bench start. Checked: the strongest
//      delay, at least one threshold hit, WIN results.
//   3. TDD: restart in TDD mode, one 38400-chip frame period at 4 samples
//      per chip with two bursts (codes 7 and 12), averaged over one frame
//      and enabled for one more. Checked: both candidates, two S-SCH runs,
//      the RAM rows of both candidates.
// Each mechanism is counted; any mechanism that never happens is a failure.
module tb_mumor_rx_hw;
  localparam int W = 8, L = 4, K = 4;
  localparam int IDX_W = 18, CNT_W = 3, ACC_W = 26, RAM_W = 39;
  localparam int CE_DLY_W = 11, CE_ACC_W = 20, CE_PWR_W = 40, CE_EN_W = 51, WIN = 297 * 4;
  localparam int NC = 16, SLOT = 2560;

  logic clk = 0, rst_n = 0;
  logic [1:0] mode = 2'd0;
  logic coef_we = 0;
  logic [6:0] coef_addr = '0;
  logic signed [9:0] coef_wdata = '0;
  logic [4:0] fir_shift = 5'd6;
  logic in_valid = 0;
  logic signed [W-1:0] din_i = '0, din_q = '0;
  logic cs_restart = 0, long_mode = 0;
  logic [3:0] ds_factor = 4'd2, ds_phase = 4'd0;
  logic [255:0] pg;
  logic [IDX_W-1:0] search_len = IDX_W'(SLOT * K);
  logic [16:0] avg_scale = 17'd65536;
  logic [7:0] n_periods = 8'd2, n_enable = 8'd3;
  logic [CNT_W-1:0] num_cand = 3'd1;
  logic [IDX_W-1:0] cand_pos [L];
  logic [ACC_W-1:0] cand_val [L];
  logic [CNT_W-1:0] cand_cnt;
  logic search_done, enabling, period_end;
  logic [15:0] ssch_count;
  logic [L-1:0] ssch_busy;
  logic rd_en = 0;
  logic [3:0] rd_row = '0, rd_code = '0;
  logic [16:0] rd_scale = 17'd65536;
  logic signed [RAM_W-1:0] rd_data;
  logic ce_start = 0, train_chip;
  logic [11:0] ce_corr_len = 12'd256;
  logic [7:0] ce_thr_pct = 8'd20;   // 20/256 of the window energy
  logic train_req, ce_busy, ce_res_valid, ce_res_hit, ce_done;
  logic [CE_DLY_W-1:0] ce_res_delay;
  logic signed [CE_ACC_W-1:0] ce_res_i, ce_res_q;
  logic [CE_PWR_W-1:0] ce_res_power;
  logic [CE_EN_W-1:0] ce_energy;
  logic filt_valid;
  logic signed [W-1:0] filt_i, filt_q;

  int checks = 0, failures = 0;
  int psc [256];
  int ssc [NC][256];
  int hsyl [16][16];
  int xs [16] = '{1,1,1,1,1,1,-1,-1,1,-1,1,-1,1,-1,-1,1};
  int zp [16] = '{1,1,1,-1,1,1,-1,-1,1,-1,1,-1,-1,-1,-1,-1};
  int train [256];
  int cur_code, row_code [16], starts = 0;
  // mechanism counters
  int n_fir = 0, n_period = 0, n_fdd_search = 0, n_ssch = 0, n_code_ok = 0;
  int n_ce_run = 0, n_ce_hit = 0, n_ce_res = 0, n_tdd_search = 0;
  longint cyc = 0, t_first = -1, t_done = -1;
  int ce_best_d = -1;
  longint ce_best_p = -1;
  logic [L-1:0] busy_q = '0;
  logic done_q = 0;

  mumor_rx_hw dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int chip_ptr = 0;
  always_comb train_chip = (train[chip_ptr % 256] < 0);

  // counts only after reset: before it the registers hold arbitrary values
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (train_req) chip_ptr <= chip_ptr + 1;
    if (filt_valid) n_fir <= n_fir + 1;
    if (period_end) n_period <= n_period + 1;
    busy_q <= ssch_busy;
    done_q <= search_done;
    if ((ssch_busy & ~busy_q) != '0) begin
      row_code[starts % 16] <= cur_code;
      starts <= starts + 1;
      n_ssch <= n_ssch + 1;
    end
    if (search_done && !done_q) begin
      t_done <= cyc;
      if (mode == 2'd0) n_fdd_search <= n_fdd_search + 1;
      else n_tdd_search <= n_tdd_search + 1;
    end
    if (ce_done) n_ce_run <= n_ce_run + 1;
    if (ce_res_valid) begin
      n_ce_res <= n_ce_res + 1;
      if (ce_res_hit) n_ce_hit <= n_ce_hit + 1;
      if (longint'(ce_res_power) > ce_best_p) begin
        ce_best_p <= longint'(ce_res_power);
        ce_best_d <= int'(ce_res_delay);
      end
    end
  end

  task automatic check_row(input int r, input int exp_code);
    longint best; int bk;
    best = -(64'sd1 <<< 62); bk = -1;
    for (int c = 0; c < NC; c++) begin
      @(negedge clk) rd_en = 1; rd_row = 4'(r); rd_code = 4'(c);
      @(negedge clk) rd_en = 0;
      if (longint'(rd_data) > best) begin best = longint'(rd_data); bk = c; end
    end
    checks++;
    if (bk != exp_code) begin
      failures++;
      $display("FAIL row %0d peaks at code %0d, sent %0d", r, bk, exp_code);
    end else n_code_ok++;
  endtask

  function automatic int sig(input int ch, input int code);
    return 30 * psc[ch] + 30 * ssc[code][ch];
  endfunction

  task automatic send(input int s, input int reps);
    for (int r = 0; r < reps; r++) begin
      @(negedge clk);
      in_valid = 1;
      din_i = W'(s);
      din_q = W'(s);
      if (t_first < 0) t_first = cyc;
    end
  endtask

  initial begin
    hsyl[0][0] = 1;
    for (int sz = 1; sz < 16; sz *= 2)
      for (int r = 0; r < sz; r++)
        for (int c = 0; c < sz; c++) begin
          hsyl[r][c+sz] = hsyl[r][c]; hsyl[r+sz][c] = hsyl[r][c]; hsyl[r+sz][c+sz] = -hsyl[r][c];
        end
    for (int k = 0; k < NC; k++)
      for (int n = 0; n < 256; n++)
        ssc[k][n] = hsyl[k][n / 16] * ((n % 16 < 8) ? xs[n % 16] : -xs[n % 16]) * zp[n / 16];
    for (int n = 0; n < 256; n++) psc[n] = $urandom_range(0, 1) ? 1 : -1;
    for (int n = 0; n < 256; n++) train[n] = $urandom_range(0, 1) ? 1 : -1;
    for (int j = 0; j < 256; j++) pg[j] = (psc[255 - j] < 0);

    repeat (2) @(posedge clk);
    rst_n = 1;
    // filter: one tap of 64, all others 0
    for (int t = 0; t < 65; t++) begin
      @(negedge clk) coef_we = 1; coef_addr = 7'(t); coef_wdata = (t == 0) ? 10'sd64 : 10'sd0;
    end
    @(negedge clk) coef_we = 0;
    repeat (70) @(negedge clk);

    // ---------------- 1. FDD, 8 samples per chip, down-sampled by 2
    for (int slot = 0; slot < 6; slot++) begin
      cur_code = (5 * slot + 3) % NC;
      for (int ch = 0; ch < SLOT; ch++) begin
        int s;
        s = (ch >= 300 && ch < 556) ? sig(ch - 300, cur_code) : 0;
        s += int'($urandom_range(0, 6)) - 3;
        send(s, 2 * K);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (!search_done || cand_cnt != 3'd1 || int'(cand_pos[0]) != K * (300 + 255)) begin
      failures++;
      $display("FAIL FDD candidate done=%0b cnt=%0d pos=%0d exp %0d", search_done, cand_cnt, cand_pos[0], K * 555);
    end
    // the search ends right after two slots of averaging (2 * 20480 clocks)
    checks++;
    if (t_done - t_first < 2 * SLOT * 2 * K || t_done - t_first > 2 * SLOT * 2 * K + 64) begin
      failures++;
      $display("FAIL FDD search ended %0d clocks after the first sample", t_done - t_first);
    end
    checks++;
    if (int'(ssch_count) != 3 || starts != 3) begin
      failures++; $display("FAIL FDD S-SCH runs %0d starts %0d", ssch_count, starts);
    end
    for (int r = 0; r < 3; r++) check_row(r, row_code[r]);

    // ---------------- 2. channel estimator, training sequence 40 samples late
    for (int n = 0; n < WIN + 256 * 4 + 8; n++) begin
      int m, s;
      m = n - 40;
      s = (m >= 0 && m / 4 < 256) ? 20 * train[m / 4] : 0;
      s += int'($urandom_range(0, 4)) - 2;
      @(negedge clk);
      ce_start = (n == 1);      // filtered sample 0 appears one clock after din 0
      in_valid = 1; din_i = W'(s); din_q = W'(s);
    end
    @(negedge clk) in_valid = 0; ce_start = 0;
    while (!ce_busy && n_ce_run == 0) @(negedge clk);
    while (ce_busy) @(negedge clk);
    repeat (2) @(negedge clk);
    checks++;
    if (n_ce_run != 1 || n_ce_res != WIN) begin
      failures++; $display("FAIL CE runs %0d results %0d", n_ce_run, n_ce_res);
    end
    checks++;
    if (ce_best_d < 40 || ce_best_d > 43) begin
      failures++; $display("FAIL CE strongest delay %0d", ce_best_d);
    end

    // ---------------- 3. TDD: frame of 38400 chips, bursts at 1000 and 20000
    @(negedge clk) cs_restart = 1; mode = 2'd1; num_cand = 3'd2; n_periods = 8'd1; n_enable = 8'd1;
    search_len = IDX_W'(SLOT * 15 * K);
    @(negedge clk) cs_restart = 0;
    starts = 0;
    for (int fr = 0; fr < 2; fr++) begin
      for (int ch = 0; ch < SLOT * 15; ch++) begin
        int s;
        s = 0;
        if (ch >= 1000 && ch < 1256) s = sig(ch - 1000, 7);
        if (ch >= 20000 && ch < 20256) s = (4 * sig(ch - 20000, 12)) / 5;
        s += int'($urandom_range(0, 6)) - 3;
        send(s, K);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (cand_cnt != 3'd2 || int'(cand_pos[0]) != K * (1000 + 255) || int'(cand_pos[1]) != K * (20000 + 255)) begin
      failures++;
      $display("FAIL TDD candidates cnt=%0d %0d %0d", cand_cnt, cand_pos[0], cand_pos[1]);
    end
    checks++;
    if (int'(ssch_count) != 2) begin failures++; $display("FAIL TDD S-SCH runs %0d", ssch_count); end
    check_row(0, 7);
    check_row(2, 12);

    // ---------------- mechanism counts
    $display("mechanism fir_output_samples      %0d", n_fir);
    $display("mechanism psch_averaging_periods  %0d", n_period);
    $display("mechanism fdd_candidate_search    %0d", n_fdd_search);
    $display("mechanism tdd_candidate_search    %0d", n_tdd_search);
    $display("mechanism ssch_correlator_runs    %0d", n_ssch);
    $display("mechanism ssch_code_detected      %0d", n_code_ok);
    $display("mechanism ce_bench_runs           %0d", n_ce_run);
    $display("mechanism ce_threshold_hits       %0d", n_ce_hit);
    checks++; if (n_fir == 0)        begin failures++; $display("FAIL mechanism fir_output_samples never seen"); end
    checks++; if (n_period == 0)     begin failures++; $display("FAIL mechanism psch_averaging_periods never seen"); end
    checks++; if (n_fdd_search == 0) begin failures++; $display("FAIL mechanism fdd_candidate_search never seen"); end
    checks++; if (n_tdd_search == 0) begin failures++; $display("FAIL mechanism tdd_candidate_search never seen"); end
    checks++; if (n_ssch == 0)       begin failures++; $display("FAIL mechanism ssch_correlator_runs never seen"); end
    checks++; if (n_code_ok == 0)    begin failures++; $display("FAIL mechanism ssch_code_detected never seen"); end
    checks++; if (n_ce_run == 0)     begin failures++; $display("FAIL mechanism ce_bench_runs never seen"); end
    checks++; if (n_ce_hit == 0)     begin failures++; $display("FAIL mechanism ce_threshold_hits never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

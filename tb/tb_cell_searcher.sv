// Self-checking testbench for cell_searcher at K = 2 and short search
// periods. FDD: a stream at 4 samples per chip (down-sampled by 2) carries
// in every "slot" a PSC and an SSC burst with a slot-dependent code; the
// test checks the P-SCH candidate position, that the S-SCH correlators are
// started once per enabled slot and that every result-RAM row peaks at the
// code sent in that slot. TDD: after restart and a mode switch, a frame
// with two bursts at different positions is sent at 2 samples per chip;
// both candidates must be found and each correlator row must peak at the
// code of its burst.
module tb_cell_searcher;
  import mumor_pkg::*;
  localparam int K = 2, W = 8, L = 2, SMAX = 1200, IDX_W = $clog2(SMAX);
  localparam int ROWS = 15, NC = 16;
  localparam int CORR_W = W + 9, ACC_W = CORR_W + 9, RES_W = 2 * CORR_W + 1, RAM_W = RES_W + 4;
  logic clk = 0, rst_n = 0, restart = 0, long_mode = 0;
  mode_e mode = MODE_FDD;
  logic [3:0] ds_factor = 4'd2, ds_phase = 4'd0;
  logic [255:0] pg;
  logic [IDX_W-1:0] search_len;
  logic [16:0] avg_scale = 17'd65536;
  logic [7:0] n_periods = 8'd2, n_enable = 8'd3;
  logic [1:0] num_cand = 2'd1;
  logic fdd_valid = 0, tdd_valid = 0;
  logic signed [W-1:0] fdd_i = '0, fdd_q = '0, tdd_i = '0, tdd_q = '0;
  logic [IDX_W-1:0] cand_pos [L];
  logic [ACC_W-1:0] cand_val [L];
  logic [1:0] cand_cnt;
  logic search_done, enabling;
  logic [15:0] ssch_count;
  logic period_end;
  logic [L-1:0] ssch_busy;
  logic rd_en = 0;
  logic [3:0] rd_row = '0, rd_code = '0;
  logic [16:0] rd_scale = 17'd65536;
  logic signed [RAM_W-1:0] rd_data;
  int checks = 0, failures = 0;
  int psc [256];
  int ssc [NC][256];
  int hsyl [16][16];
  int xs [16] = '{1,1,1,1,1,1,-1,-1,1,-1,1,-1,1,-1,-1,1};
  int zp [16] = '{1,1,1,-1,1,1,-1,-1,1,-1,1,-1,-1,-1,-1,-1};
  int cur_code;            // SSC code of the burst now on the air
  int row_code [ROWS];     // code expected in each RAM row
  int starts = 0;

  cell_searcher #(.K(K), .W(W), .L(L), .SEARCH_MAX(SMAX), .IDX_W(IDX_W), .ROWS(ROWS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // note the code of the burst at each S-SCH start
  always @(negedge clk) begin
    if (rst_n && dut.ssch_start != '0) starts++;
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
    end
  endtask

  // one sample of the received signal at chip position ch of a burst
  function automatic int sig(input int ch, input int code);
    return 30 * psc[ch] + 30 * ssc[code][ch];
  endfunction

  initial begin
    int slen, f_rows;
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
    for (int j = 0; j < 256; j++) pg[j] = (psc[255 - j] < 0);

    // ---------------- FDD: slot = 512 chips = 1024 matched-filter samples
    slen = 1024;
    search_len = IDX_W'(slen);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int slot = 0; slot < 8; slot++) begin
      int code;
      code = (3 * slot + 5) % NC;
      for (int ch = 0; ch < 512; ch++) begin
        int s;
        s = (ch >= 100 && ch < 356) ? sig(ch - 100, code) : 0;
        s += $urandom_range(0, 6) - 3;   // noise, constant over a chip
        for (int r = 0; r < 2 * K; r++) begin
          @(negedge clk);
          fdd_valid = 1;
          fdd_i = W'(s);
          fdd_q = W'(s);
          if (dut.ssch_start != '0) begin
            row_code[starts % ROWS] = code;
          end
        end
      end
    end
    @(negedge clk) fdd_valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (!search_done || cand_cnt != 2'd1 || int'(cand_pos[0]) != 2 * (100 + 255)) begin
      failures++;
      $display("FAIL FDD candidate done=%0b cnt=%0d pos=%0d exp %0d", search_done, cand_cnt, cand_pos[0], 2 * 355);
    end
    checks++;
    if (int'(ssch_count) != 3 || starts != 3) begin
      failures++; $display("FAIL FDD S-SCH runs %0d starts %0d", ssch_count, starts);
    end
    for (int r = 0; r < 3; r++) check_row(r, row_code[r]);

    // ---------------- TDD: frame = 600 chips, bursts at chips 20 and 320
    @(negedge clk) restart = 1; mode = MODE_TDD; num_cand = 2'd2; n_enable = 8'd1;
    slen = 1200; search_len = IDX_W'(slen);
    @(negedge clk) restart = 0;
    starts = 0;
    for (int fr = 0; fr < 4; fr++) begin
      for (int ch = 0; ch < 600; ch++) begin
        int s;
        s = 0;
        if (ch >= 20 && ch < 276) s = sig(ch - 20, 7);
        if (ch >= 320 && ch < 576) s = (4 * sig(ch - 320, 12)) / 5;
        s += $urandom_range(0, 6) - 3;
        for (int r = 0; r < K; r++) begin
          @(negedge clk);
          tdd_valid = 1;
          tdd_i = W'(s);
          tdd_q = W'(s);
        end
      end
    end
    @(negedge clk) tdd_valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (cand_cnt != 2'd2 || int'(cand_pos[0]) != 2 * (20 + 255) || int'(cand_pos[1]) != 2 * (320 + 255)) begin
      failures++;
      $display("FAIL TDD candidates cnt=%0d %0d %0d", cand_cnt, cand_pos[0], cand_pos[1]);
    end
    checks++;
    if (int'(ssch_count) != 2) begin failures++; $display("FAIL TDD S-SCH runs %0d", ssch_count); end
    check_row(0, 7);    // candidate 0, first burst
    check_row(2, 12);   // candidate 1, first burst
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench for psch_control. An averaged correlation stream
// of random values is driven for several periods; a reference here finds
// the local maxima of the searched period, sorts them and keeps the
// largest num_cand. The candidate list is compared with it, then the
// S-SCH start pulses are checked: one per candidate and enable period, at
// the sample 256*K-1 positions before the candidate (modulo the period).
module tb_psch_control;
  localparam int L = 4, K = 1, IDX_W = 10, VAL_W = 16, CNT_W = $clog2(L + 1);
  localparam int SLEN = 400, NCAND = 3;
  logic clk = 0, rst_n = 0, restart = 0;
  logic [IDX_W-1:0] search_len = IDX_W'(SLEN);
  logic [CNT_W-1:0] num_cand = CNT_W'(NCAND);
  logic [7:0] n_periods = 8'd2, n_enable = 8'd2;
  logic avg_valid = 0, smp_valid = 0;
  logic [VAL_W-1:0] avg_value = '0;
  logic [IDX_W-1:0] avg_index = '0, smp_index = '0;
  logic [7:0] avg_iter = '0;
  logic [IDX_W-1:0] cand_pos [L];
  logic [VAL_W-1:0] cand_val [L];
  logic [CNT_W-1:0] cand_cnt;
  logic search_done, enabling;
  logic [L-1:0] ssch_start;
  int checks = 0, failures = 0;
  int vals [SLEN];
  int rpos [NCAND], rval [NCAND];
  int pulses [L];
  int last_idx;

  psch_control #(.L(L), .K(K), .IDX_W(IDX_W), .VAL_W(VAL_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    last_idx = int'(smp_index);
    for (int k = 0; k < L; k++) begin
      if (ssch_start[k]) begin
        int exp_s;
        pulses[k]++;
        exp_s = (int'(cand_pos[k]) - 255 * K + 4 * SLEN) % SLEN;
        checks++;
        if (last_idx != exp_s) begin
          failures++;
          $display("FAIL start k=%0d at %0d exp %0d", k, last_idx, exp_s);
        end
      end
    end
  end

  task automatic run(input int nper, input int use_vals);
    for (int p = 0; p < nper; p++)
      for (int i = 0; i < SLEN; i++) begin
        @(negedge clk);
        avg_valid = 1; smp_valid = 1;
        avg_index = IDX_W'(i); smp_index = IDX_W'(i);
        avg_iter = 8'(p);
        avg_value = (p == 1 && use_vals != 0) ? VAL_W'(vals[i]) : VAL_W'($urandom_range(0, 60000));
      end
  endtask

  initial begin
    int nloc;
    for (int i = 0; i < SLEN; i++) vals[i] = $urandom_range(0, 1000);
    vals[0] = 5000;            // edge maximum at the first position
    vals[SLEN - 1] = 4000;     // edge maximum at the last position
    vals[123] = 3000;
    // reference: sorted local maxima (strictly above left, not below right)
    for (int k = 0; k < NCAND; k++) begin rval[k] = -1; rpos[k] = 0; end
    nloc = 0;
    for (int i = 0; i < SLEN; i++) begin
      int lft, rgt;
      lft = (i == 0) ? 0 : vals[i-1];
      rgt = (i == SLEN - 1) ? 0 : vals[i+1];
      if (vals[i] > lft && vals[i] >= rgt) begin
        nloc++;
        for (int k = 0; k < NCAND; k++) begin
          if (vals[i] > rval[k]) begin
            for (int m = NCAND - 1; m > k; m--) begin rval[m] = rval[m-1]; rpos[m] = rpos[m-1]; end
            rval[k] = vals[i]; rpos[k] = i;
            break;
          end
        end
      end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(2, 1);
    @(negedge clk) avg_valid = 0; smp_valid = 0;
    repeat (2) @(negedge clk);
    checks++;
    if (!search_done) begin failures++; $display("FAIL search not done"); end
    checks++;
    if (int'(cand_cnt) != NCAND) begin failures++; $display("FAIL cand_cnt %0d", cand_cnt); end
    for (int k = 0; k < NCAND; k++) begin
      checks++;
      if (int'(cand_pos[k]) != rpos[k] || int'(cand_val[k]) != rval[k]) begin
        failures++;
        $display("FAIL cand %0d: %0d@%0d exp %0d@%0d", k, cand_val[k], cand_pos[k], rval[k], rpos[k]);
      end
    end
    run(3, 0);
    @(negedge clk) avg_valid = 0; smp_valid = 0;
    repeat (3) @(negedge clk);
    for (int k = 0; k < L; k++) begin
      checks++;
      if (pulses[k] != ((k < NCAND) ? 2 : 0)) begin
        failures++;
        $display("FAIL pulses[%0d]=%0d", k, pulses[k]);
      end
    end
    checks++;
    if (enabling) begin failures++; $display("FAIL still enabling"); end
    $display("local maxima in searched period: %0d", nloc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

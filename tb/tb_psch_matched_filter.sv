// Self-checking testbench for psch_matched_filter at K = 2 and a short
// search period. A reference computes the 256-tap +/-1 correlation of I and
// Q (per quarter in long mode), |I+Q|, the running sum over periods and the
// scaled average, and compares corr_* and avg_* for every sample. A PSC
// burst is inserted at a fixed position of every period so that a clear
// peak appears; the number of completed periods is checked too.
module tb_psch_matched_filter;
  localparam int K = 2, W = 8, SMAX = 700, IDX_W = $clog2(SMAX);
  localparam int CORR_W = W + 9, MAG_W = CORR_W + 1, ACC_W = MAG_W + 8;
  localparam int SLEN = 600;
  logic clk = 0, rst_n = 0, restart = 0, long_mode = 0, in_valid = 0;
  logic [IDX_W-1:0] search_len = IDX_W'(SLEN);
  logic [16:0] avg_scale = 17'd65536;
  logic [255:0] pg;
  logic signed [W-1:0] din_i = '0, din_q = '0;
  logic corr_valid, avg_valid, period_end;
  logic signed [CORR_W-1:0] corr_i, corr_q;
  logic [IDX_W-1:0] corr_index, avg_index;
  logic [ACC_W-1:0] avg_value;
  logic [7:0] avg_iter;
  int checks = 0, failures = 0, periods = 0, peak_hits = 0;

  psch_matched_filter #(.K(K), .W(W), .SEARCH_MAX(SMAX), .IDX_W(IDX_W)) dut (.*);
  always #5 clk = ~clk;

  int hi [$], hq [$];
  longint ref_sum [SLEN];
  int ref_idx = 0, ref_iter = 0;
  // expected values queued per accepted sample
  longint e_ci [$], e_cq [$], e_avg [$];
  int e_idx [$], e_it [$], e_cidx [$];
  int code [256];   // PSC chip in transmit order

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker on the outputs, sampled between clock edges
  always @(negedge clk) begin
    if (rst_n && corr_valid) begin
      checks++;
      if (e_ci.size() == 0) begin failures++; end
      else begin
        longint a, b; int ix;
        a = e_ci.pop_front(); b = e_cq.pop_front(); ix = e_cidx.pop_front();
        if (longint'(corr_i) != a || longint'(corr_q) != b || int'(corr_index) != ix) begin
          failures++;
          if (failures < 10) $display("FAIL corr %0d/%0d exp %0d/%0d idx %0d exp %0d", corr_i, corr_q, a, b, corr_index, ix);
        end
      end
    end
    if (rst_n && avg_valid) begin
      longint v; int ix, it;
      checks++;
      v = e_avg.pop_front(); ix = e_idx.pop_front(); it = e_it.pop_front();
      if (longint'(avg_value) != v || int'(avg_index) != ix || int'(avg_iter) != it) begin
        failures++;
        if (failures < 10) $display("FAIL avg %0d exp %0d idx %0d/%0d it %0d/%0d", avg_value, v, avg_index, ix, avg_iter, it);
      end
      if (ix == 100 && it > 0 && v > 2000) peak_hits++;
    end
    if (rst_n && period_end) periods++;
  end

  task automatic model(input int si, input int sq);
    longint ci = 0, cq = 0, part_i, part_q, m;
    hi.push_front(si); hq.push_front(sq);
    void'(hi.pop_back()); void'(hq.pop_back());
    for (int s = 0; s < 4; s++) begin
      part_i = 0; part_q = 0;
      for (int j = 64*s; j < 64*s + 64; j++) begin
        part_i += pg[j] ? -hi[j*K] : hi[j*K];
        part_q += pg[j] ? -hq[j*K] : hq[j*K];
      end
      if (long_mode) begin
        if (part_i < 0) part_i = -part_i;
        if (part_q < 0) part_q = -part_q;
      end
      ci += part_i; cq += part_q;
    end
    m = ci + cq; if (m < 0) m = -m;
    ref_sum[ref_idx] = (ref_iter == 0) ? m : ref_sum[ref_idx] + m;
    e_ci.push_back(ci); e_cq.push_back(cq);
    e_avg.push_back((ref_sum[ref_idx] * longint'(avg_scale)) >>> 16);
    e_idx.push_back(ref_idx); e_cidx.push_back(ref_idx); e_it.push_back(ref_iter);
    if (ref_idx == SLEN - 1) begin ref_idx = 0; ref_iter++; end else ref_idx++;
  endtask

  initial begin
    for (int j = 0; j < 256; j++) code[j] = $urandom_range(0, 1);
    // pg[j] multiplies the sample j chips old: time-reversed code
    for (int j = 0; j < 256; j++) pg[j] = 1'(code[255 - j]);
    for (int i = 0; i < 256 * K; i++) begin hi.push_front(0); hq.push_front(0); end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4 * SLEN + 50; n++) begin
      int pos, si, sq;
      @(negedge clk);
      in_valid = 1'b1;
      pos = n % SLEN;
      si = $urandom_range(0, 20) - 10; sq = $urandom_range(0, 20) - 10;
      // PSC burst ending at position 100 of each period
      if (pos <= 100 && pos > 100 - 256 * K) begin
        int c; c = (pos - (100 - 256 * K) - 1) / K;
        si += code[c] ? -40 : 40; sq += code[c] ? -40 : 40;
      end
      // mode changes only while the pipeline is empty
      if (n == 3 * SLEN || n == 2 * SLEN + 5) begin
        in_valid = 1'b0;
        repeat (4) @(negedge clk);
        in_valid = 1'b1;
        if (n == 3 * SLEN) avg_scale = 17'd32768;
        else long_mode = 1;
      end
      din_i = W'(si); din_q = W'(sq);
      model(si, sq);
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (periods != 4) begin failures++; $display("FAIL periods %0d", periods); end
    checks++;
    if (peak_hits < 2) begin failures++; $display("FAIL peak hits %0d", peak_hits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

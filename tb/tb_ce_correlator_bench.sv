// Self-checking testbench for ce_correlator_bench with a small window
// (WIN = 24 samples, OSR = 4) and a 64-chip training sequence. The channel
// has two paths at known delays (chips are held for OSR samples, so the
// strongest result lies within OSR samples after the first path); a reference here correlates the recorded
// sample stream for every delay, computes power, window energy and the
// threshold flags, and compares the whole result stream. The number of
// results, the strongest delay and the read-out timing (2*WIN clocks from the last chip to done) are
// checked too.
module tb_ce_correlator_bench;
  localparam int W = 8, WIN = 24, OSR = 4, LEN_W = 8, ACC_W = W + LEN_W;
  localparam int PWR_W = 2 * ACC_W, EN_W = PWR_W + $clog2(WIN), DLY_W = $clog2(WIN);
  localparam int CLEN = 64;
  logic clk = 0, rst_n = 0, start = 0, in_valid = 0, train_chip = 0;
  logic [LEN_W-1:0] corr_len = LEN_W'(CLEN);
  logic [7:0] thr_pct = 8'd40;
  logic signed [W-1:0] din_i = '0, din_q = '0;
  logic train_req, busy, res_valid, res_hit, done;
  logic [DLY_W-1:0] res_delay;
  logic signed [ACC_W-1:0] res_i, res_q;
  logic [PWR_W-1:0] res_power;
  logic [EN_W-1:0] energy;
  int checks = 0, failures = 0;
  int train [CLEN];
  longint xs_i [$], xs_q [$];     // samples from the start sample on
  longint ei [WIN], eq [WIN], ep [WIN], etot;
  int nres = 0, best_d = -1, ncyc = 0, hits = 0;
  longint best_p = -1;

  ce_correlator_bench #(.W(W), .WIN(WIN), .OSR(OSR), .LEN_W(LEN_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // training chip supplied on request, in order
  int chip_ptr = 0;
  always_comb train_chip = (train[chip_ptr % CLEN] < 0);
  always @(posedge clk) if (train_req) chip_ptr <= chip_ptr + 1;

  always @(negedge clk) begin
    if (train_req) ncyc = 0; else if (busy) ncyc++;
    if (res_valid) begin
      int d; longint thr_ok;
      d = int'(res_delay);
      nres++;
      checks++;
      thr_ok = ((ep[d] << 8) >= etot * 40) ? 1 : 0;
      if (longint'(res_i) != ei[d] || longint'(res_q) != eq[d] || longint'(res_power) != ep[d] ||
          longint'(res_hit) != thr_ok || longint'(energy) != etot) begin
        failures++;
        if (failures < 10) $display("FAIL d=%0d got %0d/%0d p%0d h%0d exp %0d/%0d p%0d h%0d E %0d/%0d",
          d, res_i, res_q, res_power, res_hit, ei[d], eq[d], ep[d], thr_ok, energy, etot);
      end
      if (res_hit) hits++;
      if (longint'(res_power) > best_p) begin best_p = longint'(res_power); best_d = d; end
    end
  end

  function automatic int tx(input int n);   // transmitted sample n after start
    if (n < 0 || n >= CLEN * OSR + WIN) return 0;
    return (n / OSR < CLEN) ? 20 * train[n / OSR] : 0;
  endfunction

  initial begin
    for (int c = 0; c < CLEN; c++) train[c] = $urandom_range(0, 1) ? 1 : -1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    // channel: path 0 at delay 5 samples, path 1 (weaker, rotated) at 14
    for (int n = 0; n < WIN + CLEN * OSR + 10; n++) begin
      int si, sq;
      @(negedge clk);
      start = (n == 0);
      in_valid = ($urandom_range(0, 4) != 0) || n == 0;
      if (!in_valid) begin n--; continue; end
      si = tx(n - 5) + tx(n - 14) / 2 + int'($urandom_range(0, 4)) - 2;
      sq = tx(n - 5) / 4 - tx(n - 14) / 2 + int'($urandom_range(0, 4)) - 2;
      din_i = W'(si); din_q = W'(sq);
      xs_i.push_back(si); xs_q.push_back(sq);
    end
    @(negedge clk) in_valid = 0; start = 0;
    // reference: correlator k at chip c reads sample WIN-1 + c*OSR - k
    etot = 0;
    for (int d = 0; d < WIN; d++) begin
      int k; k = WIN - 1 - d;
      ei[d] = 0; eq[d] = 0;
      for (int c = 0; c < CLEN; c++) begin
        ei[d] += longint'(train[c]) * xs_i[WIN - 1 + c * OSR - k];
        eq[d] += longint'(train[c]) * xs_q[WIN - 1 + c * OSR - k];
      end
      ep[d] = ei[d] * ei[d] + eq[d] * eq[d];
      etot += ep[d];
    end
    while (!done) @(negedge clk);
    @(negedge clk);
    checks++;
    if (nres != WIN) begin failures++; $display("FAIL results %0d", nres); end
    checks++;
    if (best_d < 5 || best_d > 5 + OSR - 1) begin failures++; $display("FAIL strongest delay %0d", best_d); end
    checks++;
    if (hits < 1) begin failures++; $display("FAIL no threshold hit"); end
    checks++;
    if (ncyc < 2 * WIN || ncyc > 2 * WIN + 3) begin failures++; $display("FAIL readout %0d clocks", ncyc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

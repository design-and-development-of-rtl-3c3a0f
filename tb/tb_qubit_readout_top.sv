// End-to-end testbench of the qubit readout platform, at default parameters.
//
// Two ZBT SRAM models hang on the memory pins. The test boots the platform,
// loads reference signals and reference points, and plays measurement shots
// with a prepared qubit state into the ADC inputs. The samples are the
// quantised noise-free response s_q[k] plus uniform noise. It checks:
//   * boot order: no memory access and no averaging before reset is released
//     and the clock is locked;
//   * one-tone readout (antipodal signals) and two-tone readout (orthogonal
//     signals): every q_hat equals a bit-exact model of score and decision,
//     and the prepared state; q_valid comes a fixed 6 cycles after the window
//     closes;
//   * the averager over the same shots: sums (one run) or fixed-point means
//     (another run) and header in both ZBT banks after the automatic copy;
//     re-arming for a new run;
//   * error paths: a window longer than the averager RAM (overflow), a window
//     of the wrong length (len_mismatch), a window longer than the reference
//     store (score overflow);
//   * a run of 200000 repetitions, the largest count the document reports.
// Each mechanism is counted; one that never happened is a failure.
module tb_qubit_readout_top;
  import qr_pkg::*;
  localparam int AVG_DEPTH = 4096, REF_DEPTH = 1024, REP_W = 18;
  localparam int RAW = $clog2(REF_DEPTH);
  localparam int L = 48;            // samples per measurement window
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0;
  logic rst_in, clk_locked, meas_window, avg_arm, avg_mean, scheme;
  logic signed [ADC_W-1:0] adc_a, adc_b;
  logic [REP_W-1:0] n_reps, avg_reps_done;
  logic avg_busy, avg_done, avg_overflow, avg_len_mismatch, dump_done;
  score_t [NREF-1:0] lambda0, lambda1, score;
  logic ref_we, ref_sel;
  logic [RAW-1:0] ref_addr;
  ref_t ref_data;
  logic q_valid, q_hat, score_overflow;
  logic [RAW:0] score_n;
  logic [ZBT_BANKS-1:0][ZBT_AW-1:0] zbt_addr;
  logic [ZBT_BANKS-1:0] zbt_ce_n, zbt_we_n, zbt_dq_oe;
  logic [ZBT_BANKS-1:0][ZBT_DW-1:0] zbt_dq_o, zbt_dq_i;
  logic [3:0] led;
  int unsigned n_writes [ZBT_BANKS], n_bus_err [ZBT_BANKS];

  int checks = 0, failures = 0;
  bit out_of_reset = 1'b0;
  int cycle = 0;

  // mechanism counters
  int n_boot = 0, n_one_tone = 0, n_two_tone = 0, n_avg_runs = 0, n_dumps = 0,
      n_rearm = 0, n_avg_ovf = 0, n_mismatch = 0, n_score_ovf = 0, n_q0 = 0, n_q1 = 0,
      n_full = 0, n_mean = 0;

  // noise-free signals, references, sums
  ref_t   refs [NREF][REF_DEPTH];
  int     sig_i [2][L], sig_q [2][L];      // quantised noise-free response per state
  longint sum_i [AVG_DEPTH], sum_q [AVG_DEPTH];
  int     exp_q [$], exp_t [$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  qubit_readout_top dut (.*);

  for (genvar b = 0; b < ZBT_BANKS; b++) begin : g_mem
    zbt_sram_model #(.AW(ZBT_AW), .DW(ZBT_DW), .DEPTH(8192)) u_mem (
      .clk(clk), .rst(rst_in), .addr(zbt_addr[b]), .ce_n(zbt_ce_n[b]), .we_n(zbt_we_n[b]),
      .dq_o(zbt_dq_o[b]), .dq_oe(zbt_dq_oe[b]), .dq_i(zbt_dq_i[b]),
      .n_writes(n_writes[b]), .n_bus_errors(n_bus_err[b]));
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // decision checker: every q_valid must match the queued expectation
  always @(posedge clk) begin
    if (q_valid && out_of_reset) begin
      if (exp_q.size() == 0) check(0, $sformatf("unexpected decision at cycle %0d", cycle));
      else begin
        int e, t;
        e = exp_q.pop_front();
        t = exp_t.pop_front();
        if (e >= 0) begin
          check(q_hat == e[0], $sformatf("q_hat %0b, expected %0d", q_hat, e));
          check(cycle - t == 6, $sformatf("decision %0d cycles after window end, expected 6", cycle - t));
          if (q_hat) n_q1++; else n_q0++;
        end
      end
    end
  end

  function automatic logic signed [127:0] sqd(input longint a, input longint b);
    logic signed [127:0] d;
    d = 128'(a) - 128'(b);
    return d * d;
  endfunction

  // score of samples x against the references over n positions
  task automatic score_of(input int xi [], input int xq [], input int n,
                          output longint sre [NREF], output longint sim [NREF]);
    for (int r = 0; r < NREF; r++) begin
      sre[r] = 0; sim[r] = 0;
      for (int k = 0; k < n && k < REF_DEPTH; k++) begin
        sre[r] += longint'(xi[k]) * longint'(refs[r][k].re) + longint'(xq[k]) * longint'(refs[r][k].im);
        sim[r] += longint'(xq[k]) * longint'(refs[r][k].re) - longint'(xi[k]) * longint'(refs[r][k].im);
      end
    end
  endtask

  task automatic load_refs(input bit two_tone);
    for (int r = 0; r < NREF; r++)
      for (int k = 0; k < REF_DEPTH; k++) begin
        real ph;
        if (!two_tone) ph = 2.0 * PI * 0.01 * k + ((r == 0) ? 1.0 : -1.0) * 0.45 * PI;
        else           ph = 2.0 * PI * ((r == 0) ? 0.0 : 4.0 / L) * k;  // orthogonal over L
        refs[r][k].re = REF_W'($rtoi(20000.0 * $cos(ph)));
        refs[r][k].im = REF_W'($rtoi(20000.0 * $sin(ph)));
        @(negedge clk);
        ref_we = 1; ref_sel = 1'(r); ref_addr = RAW'(k); ref_data = refs[r][k];
      end
    @(negedge clk) ref_we = 0;
    // noise-free response for each qubit state: the matching reference, scaled
    for (int q = 0; q < 2; q++)
      for (int k = 0; k < L; k++) begin
        sig_i[q][k] = int'(refs[q][k].re) / 8;
        sig_q[q][k] = int'(refs[q][k].im) / 8;
      end
    // reference points: noise-free scores
    begin
      int xi [], xq [];
      longint sre [NREF], sim [NREF];
      xi = new[L]; xq = new[L];
      for (int q = 0; q < 2; q++) begin
        for (int k = 0; k < L; k++) begin xi[k] = sig_i[q][k]; xq[k] = sig_q[q][k]; end
        score_of(xi, xq, L, sre, sim);
        for (int r = 0; r < NREF; r++) begin
          if (q == 0) begin lambda0[r].re = SCORE_W'(sre[r]); lambda0[r].im = SCORE_W'(sim[r]); end
          else        begin lambda1[r].re = SCORE_W'(sre[r]); lambda1[r].im = SCORE_W'(sim[r]); end
        end
      end
    end
    scheme = two_tone;
  endtask

  // One measurement window of len samples. state < 0: random samples and no
  // decision check. Returns nothing; queues the expected decision.
  task automatic shot(input int state, input int len, input int noise, input int gap);
    int xi [], xq [];
    longint sre [NREF], sim [NREF];
    logic signed [127:0] d0, d1;
    xi = new[len]; xq = new[len];
    for (int k = 0; k < len; k++) begin
      if (state >= 0 && k < L) begin
        xi[k] = sig_i[state][k] + $urandom_range(0, 2 * noise) - noise;
        xq[k] = sig_q[state][k] + $urandom_range(0, 2 * noise) - noise;
      end else begin
        xi[k] = $urandom_range(0, 16383) - 8192;
        xq[k] = $urandom_range(0, 16383) - 8192;
      end
      @(negedge clk);
      meas_window = 1'b1;
      adc_a = ADC_W'(xi[k]);
      adc_b = ADC_W'(xq[k]);
      if (k < AVG_DEPTH) begin
        sum_i[k] += longint'(xi[k]);
        sum_q[k] += longint'(xq[k]);
      end
    end
    @(negedge clk);
    meas_window = 1'b0;
    adc_a = '0; adc_b = '0;
    if (state >= 0) begin
      score_of(xi, xq, len, sre, sim);
      d0 = 0; d1 = 0;
      for (int r = 0; r < NREF; r++)
        if (r == 0 || scheme) begin
          d0 += sqd(sre[r], lambda0[r].re) + sqd(sim[r], lambda0[r].im);
          d1 += sqd(sre[r], lambda1[r].re) + sqd(sim[r], lambda1[r].im);
        end
      exp_q.push_back((d0 < d1) ? 0 : 1);
      check(((d0 < d1) ? 0 : 1) == state, "model decides the prepared state");
    end else begin
      exp_q.push_back(-1);
    end
    exp_t.push_back(cycle + 1);
    repeat (gap - 1) @(negedge clk);
  endtask

  task automatic clear_sums();
    for (int k = 0; k < AVG_DEPTH; k++) begin sum_i[k] = 0; sum_q[k] = 0; end
  endtask

  task automatic rearm(input int n);
    @(negedge clk);
    n_reps = REP_W'(n);
    avg_arm = 1'b1;
    @(negedge clk);
    avg_arm = 1'b0;
    clear_sums();
    n_rearm++;
  endtask

  // waits for the averager and the copy into the ZBT banks, checks contents
  // expected SRAM word: the sum, or in mean mode sum*2^18/N truncated toward zero
  function automatic logic [ZBT_DW-1:0] expect_word(input bit mean, input longint sum, input int reps);
    if (!mean) return ZBT_DW'(sum);
    return ZBT_DW'((sum * 262144) / reps);
  endfunction

  task automatic check_dump(input int reps, input int len, input string tag, input bit mean = 0);
    int t;
    t = 0;
    while (!avg_done && t < 100) begin @(negedge clk); t++; end
    check(avg_done, {tag, ": averager done"});
    check(avg_reps_done == REP_W'(reps), $sformatf("%s: %0d repetitions", tag, avg_reps_done));
    n_avg_runs++;
    t = 0;
    while (!dump_done && t < 60 * AVG_DEPTH) begin @(negedge clk); t++; end
    repeat (5) @(negedge clk);   // ZBT write pipeline
    check(dump_done && led[2], {tag, ": results copied"});
    n_dumps++;
    check(g_mem[0].u_mem.peek(0) == ZBT_DW'(reps), {tag, ": header repetitions"});
    check(g_mem[1].u_mem.peek(0) == {mean, 31'(len)}, {tag, ": header length and mode"});
    if (mean) n_mean++;
    for (int k = 0; k < len; k++) begin
      check(g_mem[0].u_mem.peek(k + 1) == expect_word(mean, sum_i[k], reps), $sformatf("%s: bank A word %0d", tag, k));
      check(g_mem[1].u_mem.peek(k + 1) == expect_word(mean, sum_q[k], reps), $sformatf("%s: bank B word %0d", tag, k));
    end
  endtask

  initial begin
    rst_in = 1'b1; clk_locked = 1'b0; meas_window = 0; avg_arm = 0; avg_mean = 0; scheme = 0;
    adc_a = 0; adc_b = 0; n_reps = 16; lambda0 = '0; lambda1 = '0;
    ref_we = 0; ref_sel = 0; ref_addr = 0; ref_data = '0;
    clear_sums();
    // ---- boot: nothing may happen before reset is released and clock locked
    repeat (10) @(negedge clk);
    rst_in = 1'b0;
    out_of_reset = 1'b1;          // registers hold reset values from here on
    repeat (10) begin
      @(negedge clk);
      check(&zbt_ce_n && !avg_busy && led == 4'b0, "idle before clock lock");
    end
    clk_locked = 1'b1;
    repeat (6) @(negedge clk);
    check(led[0] && avg_busy, "running and averaging after boot");
    check(n_writes[0] == 0 && n_writes[1] == 0, "no memory writes at boot");
    if (led[0]) n_boot++;

    // ---- one-tone readout, averaged over 16 shots at the same time
    load_refs(1'b0);
    for (int s = 0; s < 16; s++) shot($urandom_range(0, 1), L, 400, $urandom_range(2, 6));
    n_one_tone += 16;
    check_dump(16, L, "one tone run");

    // ---- two-tone readout with a new averaging run that stores means
    load_refs(1'b1);
    avg_mean = 1'b1;
    rearm(20);
    for (int s = 0; s < 20; s++) shot($urandom_range(0, 1), L, 400, $urandom_range(2, 6));
    n_two_tone += 20;
    check_dump(20, L, "two tone run, means", 1'b1);
    avg_mean = 1'b0;

    // ---- error paths
    rearm(3);
    shot(-1, AVG_DEPTH + 4, 0, 4);                 // too long for RAM and reference store
    @(negedge clk);
    check(avg_overflow, "averager overflow");
    check(score_overflow && score_n == (RAW+1)'(REF_DEPTH), "score overflow");
    if (avg_overflow) n_avg_ovf++;
    if (score_overflow) n_score_ovf++;
    shot(-1, 100, 0, 6);                           // wrong length
    check(!score_overflow && score_n == 100, "score of a short window");
    shot(-1, AVG_DEPTH, 0, 6);
    check(avg_len_mismatch, "length mismatch");
    if (avg_len_mismatch) n_mismatch++;
    check(score_overflow && score_n == (RAW+1)'(REF_DEPTH), "score overflow again");
    // the sums at positions the short window did not reach hold 2 windows
    check_dump(3, AVG_DEPTH, "overflow run");

    // ---- the largest repetition count reported: 200000
    rearm(200000);
    for (int s = 0; s < 200000; s++) shot(-1, 4, 0, 1 + (s % 2));
    check_dump(200000, 4, "200000 repetitions");
    if (avg_reps_done == REP_W'(200000)) n_full++;

    repeat (10) @(negedge clk);
    check(exp_q.size() == 0, "every window decided");
    check(n_bus_err[0] == 0 && n_bus_err[1] == 0, "ZBT bus timing");
    $display("mechanisms: boot=%0d one_tone=%0d two_tone=%0d q0=%0d q1=%0d avg_runs=%0d dumps=%0d rearm=%0d avg_overflow=%0d len_mismatch=%0d score_overflow=%0d full_count=%0d mean_runs=%0d",
             n_boot, n_one_tone, n_two_tone, n_q0, n_q1, n_avg_runs, n_dumps, n_rearm,
             n_avg_ovf, n_mismatch, n_score_ovf, n_full, n_mean);
    check(n_boot > 0 && n_one_tone > 0 && n_two_tone > 0 && n_q0 > 0 && n_q1 > 0 &&
          n_avg_runs > 0 && n_dumps > 0 && n_rearm > 0 && n_avg_ovf > 0 && n_mismatch > 0 &&
          n_score_ovf > 0 && n_full > 0 && n_mean > 0, "every mechanism happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

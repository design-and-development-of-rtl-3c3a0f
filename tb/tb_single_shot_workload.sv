// Single-shot readout workload on the whole design at default parameters.
//
// This plays the readout experiment the receiver is meant for, at realistic
// sizes, and includes the calibration that a user would run first:
//   1. Calibration of the references: for each qubit state, an averaging run
//      of 256 prepared shots in mean mode. The means are read from the SRAM
//      models and loaded, scaled by 16, as reference signals s_0 and s_1.
//   2. Calibration of the reference points: 32 more shots per state; the
//      mean of the scores the hardware reports becomes lambda_0, lambda_1.
//   3. Test: 28 shots per prepared state.
// This is done for both schemes:
//   * one tone, homodyne (IF = 0): a 2 us window (200 samples at 100 MHz);
//     the state turns the response phase by +-0.45 pi; only s_0 is used;
//   * two tone: the ground state leaves a 0 Hz component, the excited state
//     one at the 2 MHz difference frequency; the 250-sample window spans
//     5 periods of it.
// The noise-free response is A*exp(j*phase) times a resonator loading
// transient 1 - exp(-k/20); an excited qubit decays to the ground state after
// an exponentially distributed lifetime of mean 10 us, after which the
// ground-state response is sent. Gaussian noise (sum of 12 uniforms) at an
// SNR of -10 dB is added and the samples are clipped to 14 bits.
//
// Checks: every score and decision the hardware reports equals a bit-exact
// model computed here, decisions come 6 cycles after each window, and in the
// test shots every qubit that stayed in its prepared state for the whole
// window is decided correctly, and at least 80 % of all shots are (an
// excited qubit that decays early in the window reads as ground state). The
// header of each averaging run is checked, and each reference against the
// expected mean response (for the excited state including its decay).
module tb_single_shot_workload;
  import qr_pkg::*;
  localparam int AVG_DEPTH = 4096, REF_DEPTH = 1024, REP_W = 18;
  localparam int RAW = $clog2(REF_DEPTH);
  localparam real PI = 3.14159265358979;
  localparam real AMP = 800.0;              // response amplitude in ADC LSB
  localparam int  N_CAL = 256, N_LAMBDA = 32, N_TEST = 28;

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
  int len;                                   // current window length
  real sig_re [2][REF_DEPTH], sig_im [2][REF_DEPTH];   // noise-free responses
  ref_t refs [NREF][REF_DEPTH];
  // expectations for each decision
  longint exp_re [$][NREF], exp_im [$][NREF];
  int     exp_dec [$], exp_t [$];
  // collected hardware scores and decisions, and whether the qubit stayed
  // in its prepared state for the whole window
  longint got_re [$][NREF], got_im [$][NREF];
  int     got_q [$];
  bit     kept [$];

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

  // every decision: score and q_hat against the model, and its latency
  always @(posedge clk) begin
    if (q_valid && out_of_reset) begin
      if (exp_dec.size() == 0) check(0, $sformatf("unexpected decision at cycle %0d", cycle));
      else begin
        longint er [NREF], ei [NREF];
        longint gr [NREF], gi [NREF];
        int e, t;
        er = exp_re[0]; ei = exp_im[0];
        exp_re.delete(0); exp_im.delete(0);
        e = exp_dec[0]; t = exp_t[0];
        exp_dec.delete(0); exp_t.delete(0);
        for (int r = 0; r < NREF; r++) begin
          gr[r] = longint'(score[r].re); gi[r] = longint'(score[r].im);
          check(gr[r] == er[r] && gi[r] == ei[r], $sformatf("score %0d of a window", r));
        end
        check(q_hat == e[0], "decision equals the model");
        check(cycle - t == 6, $sformatf("decision %0d cycles after window end", cycle - t));
        got_re.push_back(gr); got_im.push_back(gi); got_q.push_back(int'(q_hat));
      end
    end
  end

  function automatic real gauss();
    real g = 0.0;
    for (int i = 0; i < 12; i++) g += real'($urandom) / 4294967296.0;
    return g - 6.0;
  endfunction

  function automatic int clip14(input real x);
    int v = $rtoi(x >= 0.0 ? x + 0.5 : x - 0.5);
    if (v > 8191) v = 8191;
    if (v < -8192) v = -8192;
    return v;
  endfunction

  function automatic logic signed [127:0] sqd(input longint a, input longint b);
    logic signed [127:0] d;
    d = 128'(a) - 128'(b);
    return d * d;
  endfunction

  // noise-free responses of both states for the scheme
  task automatic make_signals(input bit two_tone);
    for (int k = 0; k < REF_DEPTH; k++) begin
      real load, ph0, ph1;
      load = 1.0 - $exp(-real'(k) / 20.0);
      if (!two_tone) begin ph0 = 0.2 + 0.45 * PI; ph1 = 0.2 - 0.45 * PI; end
      else begin ph0 = 0.2; ph1 = 2.0 * PI * 0.02 * k; end
      sig_re[0][k] = AMP * load * $cos(ph0); sig_im[0][k] = AMP * load * $sin(ph0);
      sig_re[1][k] = AMP * load * $cos(ph1); sig_im[1][k] = AMP * load * $sin(ph1);
    end
  endtask

  // one measurement window with prepared state q; queues the model's result
  task automatic shot(input int q, input int gap);
    int xi [], xq [];
    int decay;
    real sigma;
    longint sre [NREF], sim [NREF];
    logic signed [127:0] d0, d1;
    xi = new[len]; xq = new[len];
    // lifetime in samples, exponential with mean 1000 (10 us)
    decay = (q == 1) ? $rtoi(-1000.0 * $ln(1.0 - real'($urandom) / 4294967296.0)) : 0;
    sigma = AMP * $sqrt(10.0 / 2.0);     // SNR -10 dB, noise split over I and Q
    for (int k = 0; k < len; k++) begin
      int s;
      s = (q == 1 && k < decay) ? 1 : 0;
      xi[k] = clip14(sig_re[s][k] + sigma * gauss());
      xq[k] = clip14(sig_im[s][k] + sigma * gauss());
      @(negedge clk);
      meas_window = 1'b1;
      adc_a = ADC_W'(xi[k]);
      adc_b = ADC_W'(xq[k]);
    end
    @(negedge clk);
    meas_window = 1'b0;
    adc_a = '0; adc_b = '0;
    for (int r = 0; r < NREF; r++) begin
      sre[r] = 0; sim[r] = 0;
      for (int k = 0; k < len; k++) begin
        sre[r] += longint'(xi[k]) * refs[r][k].re + longint'(xq[k]) * refs[r][k].im;
        sim[r] += longint'(xq[k]) * refs[r][k].re - longint'(xi[k]) * refs[r][k].im;
      end
    end
    d0 = 0; d1 = 0;
    for (int r = 0; r < NREF; r++)
      if (r == 0 || scheme) begin
        d0 += sqd(sre[r], longint'(lambda0[r].re)) + sqd(sim[r], longint'(lambda0[r].im));
        d1 += sqd(sre[r], longint'(lambda1[r].re)) + sqd(sim[r], longint'(lambda1[r].im));
      end
    exp_re.push_back(sre); exp_im.push_back(sim);
    kept.push_back(q == 0 || decay >= len);
    exp_dec.push_back((d0 < d1) ? 0 : 1);
    exp_t.push_back(cycle + 1);
    repeat (gap - 1) @(negedge clk);
  endtask

  task automatic wait_decisions();
    repeat (10) @(negedge clk);
    check(exp_dec.size() == 0, "every window decided");
  endtask

  // averaging run of N_CAL shots of state q in mean mode; loads reference r
  task automatic calibrate_reference(input int q, input int r);
    int t;
    real err = 0.0;
    @(negedge clk);
    n_reps = REP_W'(N_CAL); avg_mean = 1'b1; avg_arm = 1'b1;
    @(negedge clk);
    avg_arm = 1'b0;
    for (int s = 0; s < N_CAL; s++) shot(q, 3);
    t = 0;
    while (!dump_done && t < 100000) begin @(negedge clk); t++; end
    repeat (5) @(negedge clk);
    check(dump_done && avg_reps_done == REP_W'(N_CAL), "calibration run complete");
    check(g_mem[0].u_mem.peek(0) == N_CAL && g_mem[1].u_mem.peek(0) == {1'b1, 31'(len)},
          "calibration header");
    wait_decisions();
    got_re.delete(); got_im.delete(); got_q.delete(); kept.delete();
    // reference = 16 x mean, from the Q13.18 words; compared with the
    // expected mean, which for the excited state includes its decay
    for (int k = 0; k < REF_DEPTH; k++) begin
      if (k < len) begin
        real alive, mre, mim;
        alive = (q == 1) ? $exp(-real'(k + 1) / 1000.0) : 1.0;
        mre = alive * sig_re[q][k] + (1.0 - alive) * sig_re[0][k];
        mim = alive * sig_im[q][k] + (1.0 - alive) * sig_im[0][k];
        refs[r][k].re = REF_W'($signed(g_mem[0].u_mem.peek(k + 1)) >>> 14);
        refs[r][k].im = REF_W'($signed(g_mem[1].u_mem.peek(k + 1)) >>> 14);
        err += ($itor(refs[r][k].re) / 16.0 - mre) ** 2 + ($itor(refs[r][k].im) / 16.0 - mim) ** 2;
      end else refs[r][k] = '0;
      @(negedge clk);
      ref_we = 1; ref_sel = 1'(r); ref_addr = RAW'(k); ref_data = refs[r][k];
    end
    @(negedge clk) ref_we = 0;
    // averaging 256 shots shrinks the noise 16-fold: rms error near sigma/16
    err = $sqrt(err / len);
    $display("reference %0d from state %0d: rms error %.1f LSB (noise sigma %.1f)",
             r, q, err, AMP * $sqrt(5.0));
    check(err < 1.5 * AMP * $sqrt(5.0) / 16.0, "averaged reference close to the response");
  endtask

  // lambda_q = mean hardware score over N_LAMBDA shots of state q
  task automatic calibrate_points();
    longint acc_re [2][NREF], acc_im [2][NREF];
    for (int q = 0; q < 2; q++)
      for (int r = 0; r < NREF; r++) begin acc_re[q][r] = 0; acc_im[q][r] = 0; end
    for (int q = 0; q < 2; q++) begin
      got_re.delete(); got_im.delete(); got_q.delete(); kept.delete();
      for (int s = 0; s < N_LAMBDA; s++) shot(q, 4);
      wait_decisions();
      for (int s = 0; s < got_re.size(); s++)
        for (int r = 0; r < NREF; r++) begin
          acc_re[q][r] += got_re[s][r]; acc_im[q][r] += got_im[s][r];
        end
    end
    for (int r = 0; r < NREF; r++) begin
      lambda0[r].re = SCORE_W'(acc_re[0][r] / N_LAMBDA); lambda0[r].im = SCORE_W'(acc_im[0][r] / N_LAMBDA);
      lambda1[r].re = SCORE_W'(acc_re[1][r] / N_LAMBDA); lambda1[r].im = SCORE_W'(acc_im[1][r] / N_LAMBDA);
    end
  endtask

  task automatic run_scheme(input bit two_tone, input int window_len, input string tag);
    int correct, n_kept, kept_correct;
    len = window_len;
    scheme = two_tone;
    make_signals(two_tone);
    calibrate_reference(0, 0);
    if (two_tone) calibrate_reference(1, 1);
    calibrate_points();
    correct = 0; n_kept = 0; kept_correct = 0;
    for (int q = 0; q < 2; q++) begin
      got_q.delete(); kept.delete();
      for (int s = 0; s < N_TEST; s++) shot(q, 4);
      wait_decisions();
      for (int s = 0; s < got_q.size(); s++) begin
        if (got_q[s] == q) correct++;
        if (kept[s]) begin n_kept++; if (got_q[s] == q) kept_correct++; end
      end
    end
    $display("%s, %0d-sample window: %0d of %0d test shots decided as prepared; %0d of %0d without decay in the window",
             tag, len, correct, 2 * N_TEST, kept_correct, n_kept);
    check(kept_correct == n_kept, {tag, ": every shot without decay decided as prepared"});
    check(correct * 10 >= 2 * N_TEST * 8, {tag, ": at least 80 % of all shots decided as prepared"});
  endtask

  initial begin
    rst_in = 1'b1; clk_locked = 1'b0; meas_window = 0; avg_arm = 0; avg_mean = 0; scheme = 0;
    adc_a = 0; adc_b = 0; n_reps = 1; lambda0 = '0; lambda1 = '0;
    ref_we = 0; ref_sel = 0; ref_addr = 0; ref_data = '0;
    repeat (5) @(negedge clk);
    rst_in = 1'b0;
    out_of_reset = 1'b1;          // registers hold reset values from here on
    clk_locked = 1'b1;
    while (!led[0]) @(negedge clk);
    // both reference stores start cleared
    for (int r = 0; r < NREF; r++)
      for (int k = 0; k < REF_DEPTH; k++) begin
        refs[r][k] = '0;
        @(negedge clk);
        ref_we = 1; ref_sel = 1'(r); ref_addr = RAW'(k); ref_data = '0;
      end
    @(negedge clk) ref_we = 0;
    // the boot arms a first averaging run of n_reps = 1 window; one short
    // empty window completes it before the calibration runs
    len = 4;
    for (int k = 0; k < REF_DEPTH; k++) begin sig_re[0][k] = 0.0; sig_im[0][k] = 0.0; end
    shot(0, 4);
    wait_decisions();
    run_scheme(1'b0, 200, "one tone, T = 2 us");
    run_scheme(1'b1, 250, "two tone, 5 difference periods");
    check(n_bus_err[0] == 0 && n_bus_err[1] == 0, "ZBT bus timing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

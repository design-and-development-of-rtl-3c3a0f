// Averager workloads on the whole design at default parameters.
//
// Two experiments of the kind the averager was built for, each read back
// from the SRAM models after the automatic copy:
//   1. Noisy synthetic signal, 100 repetitions, means stored: channel I
//      carries a damped 5 MHz oscillation, channel Q a Gaussian pulse, each
//      with Gaussian noise (sum of 12 uniforms, sigma 1500 LSB) over a
//      1000-sample (10 us) window. Every stored mean must equal the mean of
//      the played samples (sum * 2^18 / N, truncated), and the rms deviation
//      from the clean signal must have shrunk to sigma/sqrt(100), within 25 %.
//   2. Random pulses, 2000 repetitions, sums stored: every repetition plays a
//      square pulse of 4000 LSB starting with the window, whose length is
//      drawn from 100 fixed lengths spread like an exponential distribution
//      with a mean of 1000 ns (100 samples); the window is 600 samples. The
//      average is the probability that a pulse is still on, an exponential
//      decay: the sums must match exactly, never rise from one position to
//      the next, and the mean must be within 0.05 of exp(-t/1000 ns) at
//      t = 0.5, 1, 2 and 3 us. Channel Q gets the inverted pulse.
module tb_averager_workload;
  import qr_pkg::*;
  localparam int AVG_DEPTH = 4096, REF_DEPTH = 1024, REP_W = 18;
  localparam int RAW = $clog2(REF_DEPTH);
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
  longint sum_i [AVG_DEPTH], sum_q [AVG_DEPTH];

  always #5 clk = ~clk;

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

  // arms a run of n repetitions
  task automatic arm(input int n, input bit mean);
    @(negedge clk);
    n_reps = REP_W'(n); avg_mean = mean; avg_arm = 1'b1;
    @(negedge clk);
    avg_arm = 1'b0;
    for (int k = 0; k < AVG_DEPTH; k++) begin sum_i[k] = 0; sum_q[k] = 0; end
  endtask

  // one window of samples xi, xq, then a gap of 2 cycles
  task automatic play(input int xi [], input int xq []);
    for (int k = 0; k < xi.size(); k++) begin
      @(negedge clk);
      meas_window = 1'b1;
      adc_a = ADC_W'(xi[k]);
      adc_b = ADC_W'(xq[k]);
      sum_i[k] += longint'(xi[k]);
      sum_q[k] += longint'(xq[k]);
    end
    @(negedge clk);
    meas_window = 1'b0;
    adc_a = '0; adc_b = '0;
    @(negedge clk);
  endtask

  task automatic wait_dump(input int n, input int len, input bit mean, input string tag);
    int t = 0;
    while (!dump_done && t < 300000) begin @(negedge clk); t++; end
    repeat (5) @(negedge clk);
    check(dump_done && avg_reps_done == REP_W'(n), {tag, ": run complete and copied"});
    check(!avg_overflow && !avg_len_mismatch, {tag, ": no overflow, no length mismatch"});
    check(g_mem[0].u_mem.peek(0) == ZBT_DW'(n) && g_mem[1].u_mem.peek(0) == {mean, 31'(len)},
          {tag, ": header"});
  endtask

  function automatic logic [ZBT_DW-1:0] mean_word(input longint sum, input int n);
    return ZBT_DW'((sum * 262144) / n);
  endfunction

  // ---- 1. noisy synthetic signal, 100 repetitions, means
  task automatic noisy_signal();
    localparam int N = 100, LEN = 1000;
    localparam real SIGMA = 1500.0;
    real clean_i [LEN], clean_q [LEN];
    real dev = 0.0, expect_dev;
    int xi [], xq [];
    int bad = 0;
    xi = new[LEN]; xq = new[LEN];
    for (int k = 0; k < LEN; k++) begin
      clean_i[k] = 3000.0 * $exp(-real'(k) / 300.0) * $sin(2.0 * PI * 0.05 * k);
      clean_q[k] = 2500.0 * $exp(-(((real'(k) - 400.0) / 120.0) ** 2));
    end
    arm(N, 1'b1);
    for (int r = 0; r < N; r++) begin
      for (int k = 0; k < LEN; k++) begin
        xi[k] = clip14(clean_i[k] + SIGMA * gauss());
        xq[k] = clip14(clean_q[k] + SIGMA * gauss());
      end
      play(xi, xq);
    end
    wait_dump(N, LEN, 1'b1, "noisy signal");
    for (int k = 0; k < LEN; k++) begin
      logic [ZBT_DW-1:0] wi, wq;
      wi = g_mem[0].u_mem.peek(k + 1);
      wq = g_mem[1].u_mem.peek(k + 1);
      if (wi != mean_word(sum_i[k], N) || wq != mean_word(sum_q[k], N)) bad++;
      begin
        real ei, eq;
        ei = real'($signed(wi)) / 262144.0 - clean_i[k];
        eq = real'($signed(wq)) / 262144.0 - clean_q[k];
        dev += ei * ei + eq * eq;
      end
    end
    check(bad == 0, $sformatf("noisy signal: %0d stored means differ from the played data", bad));
    dev = $sqrt(dev / (2 * LEN));
    expect_dev = SIGMA / $sqrt(real'(N));
    $display("noisy signal: input noise %.0f LSB, after %0d repetitions %.1f LSB (expected %.1f)",
             SIGMA, N, dev, expect_dev);
    check(dev > 0.75 * expect_dev && dev < 1.25 * expect_dev, "noise shrinks by sqrt(N)");
  endtask

  // ---- 2. random pulses with exponentially distributed lengths, sums
  task automatic random_pulses();
    localparam int N = 2000, LEN = 600;
    localparam int AMP = 4000;
    int lengths [100];
    int xi [], xq [];
    int bad = 0, rising = 0;
    xi = new[LEN]; xq = new[LEN];
    // 100 lengths at the quantiles of an exponential distribution, mean 100
    for (int i = 0; i < 100; i++)
      lengths[i] = $rtoi(-100.0 * $ln(1.0 - (real'(i) + 0.5) / 100.0) + 0.5);
    arm(N, 1'b0);
    for (int r = 0; r < N; r++) begin
      int l = lengths[$urandom_range(0, 99)];
      for (int k = 0; k < LEN; k++) begin
        xi[k] = (k < l) ? AMP : 0;
        xq[k] = -xi[k];
      end
      play(xi, xq);
    end
    wait_dump(N, LEN, 1'b0, "random pulses");
    for (int k = 0; k < LEN; k++) begin
      if (g_mem[0].u_mem.peek(k + 1) != ZBT_DW'(sum_i[k]) ||
          g_mem[1].u_mem.peek(k + 1) != ZBT_DW'(sum_q[k])) bad++;
      if (k > 0 && $signed(g_mem[0].u_mem.peek(k + 1)) > $signed(g_mem[0].u_mem.peek(k))) rising++;
    end
    check(bad == 0, $sformatf("random pulses: %0d stored sums differ from the played data", bad));
    check(rising == 0, "random pulses: the average never rises");
    for (int i = 0; i < 4; i++) begin
      int k;
      real m;
      k = (i == 0) ? 50 : (i == 1) ? 100 : (i == 2) ? 200 : 300;
      m = $itor($signed(g_mem[0].u_mem.peek(k + 1))) / (real'(N) * AMP);
      $display("random pulses: average at %0d ns = %.3f, exp(-t/1000 ns) = %.3f",
               10 * k, m, $exp(-real'(k) / 100.0));
      check(m > $exp(-real'(k) / 100.0) - 0.05 && m < $exp(-real'(k) / 100.0) + 0.05,
            $sformatf("random pulses: exponential decay at %0d ns", 10 * k));
    end
  endtask

  initial begin
    rst_in = 1'b1; clk_locked = 1'b0; meas_window = 0; avg_arm = 0; avg_mean = 0; scheme = 0;
    adc_a = 0; adc_b = 0; n_reps = 1; lambda0 = '0; lambda1 = '0;
    ref_we = 0; ref_sel = 0; ref_addr = 0; ref_data = '0;
    repeat (5) @(negedge clk);
    rst_in = 1'b0;
    clk_locked = 1'b1;
    while (!led[0]) @(negedge clk);
    noisy_signal();
    random_pulses();
    check(n_bus_err[0] == 0 && n_bus_err[1] == 0, "ZBT bus timing");
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

// Testbench for the demodulator.
// Loads random complex reference signals, feeds windows of random complex
// samples (random lengths, gaps down to one cycle, full-scale corner values)
// and compares both score components with sum_k s_out[k] * conj(s_r[k])
// computed here in 64-bit arithmetic. Also checks that score_valid comes 3
// cycles after the window closes, the sample count, and the overflow flag
// for a window longer than the reference store.
module tb_demodulator;
  import qr_pkg::*;
  localparam int NR = 2, DEPTH = 64, AW = $clog2(DEPTH);
  logic clk = 1'b0;
  logic rst, window, ref_we, score_valid, overflow;
  iq_t  sample;
  logic ref_sel;
  logic [AW-1:0] ref_addr;
  ref_t ref_data;
  score_t [NR-1:0] score;
  logic [AW:0] n_samples;
  ref_t refs [NR][DEPTH];
  int checks = 0, failures = 0;
  int cycle = 0, t_low = 0;

  // expected results, queued per window
  longint exp_re [$], exp_im [$];   // NR entries per window
  int     exp_n [$], exp_t [$];
  bit     exp_ovf [$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  demodulator #(.NR(NR), .DEPTH(DEPTH)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    if (score_valid) begin
      if (exp_n.size() == 0) check(0, "unexpected score");
      else begin
        int n, t;
        n = exp_n.pop_front();
        t = exp_t.pop_front();
        check(cycle - t == 3, $sformatf("score %0d cycles after window end, expected 3", cycle - t));
        check(n_samples == (AW+1)'(n), $sformatf("n_samples %0d vs %0d", n_samples, n));
        check(overflow == exp_ovf.pop_front(), "overflow flag");
        for (int r = 0; r < NR; r++) begin
          longint er, ei;
          er = exp_re.pop_front();
          ei = exp_im.pop_front();
          check(score[r].re == SCORE_W'(er) && score[r].im == SCORE_W'(ei),
                $sformatf("score %0d: (%0d, %0d) vs (%0d, %0d)", r, score[r].re, score[r].im, er, ei));
        end
      end
    end
  end

  function automatic logic signed [ADC_W-1:0] rnd_adc(input int mode);
    if (mode == 1) return ADC_W'($urandom_range(0, 1) ? -(1 << (ADC_W-1)) : (1 << (ADC_W-1)) - 1);
    return ADC_W'($urandom);
  endfunction

  task automatic do_window(input int len, input int gap, input int mode);
    longint sr [NR], si [NR];
    int n;
    for (int r = 0; r < NR; r++) begin sr[r] = 0; si[r] = 0; end
    n = 0;
    for (int k = 0; k < len; k++) begin
      @(negedge clk);
      window = 1'b1;
      sample.i = rnd_adc(mode);
      sample.q = rnd_adc(mode);
      if (k < DEPTH) begin
        n++;
        for (int r = 0; r < NR; r++) begin
          sr[r] += longint'(sample.i) * longint'(refs[r][k].re) + longint'(sample.q) * longint'(refs[r][k].im);
          si[r] += longint'(sample.q) * longint'(refs[r][k].re) - longint'(sample.i) * longint'(refs[r][k].im);
        end
      end
    end
    @(negedge clk);
    window = 1'b0;
    sample = '0;
    exp_t.push_back(cycle + 1);     // the edge that sees window low
    exp_n.push_back(n);
    exp_ovf.push_back(len > DEPTH);
    for (int r = 0; r < NR; r++) begin exp_re.push_back(sr[r]); exp_im.push_back(si[r]); end
    repeat (gap - 1) @(negedge clk);
  endtask

  initial begin
    rst = 1'b1; window = 0; sample = '0; ref_we = 0; ref_sel = 0; ref_addr = 0; ref_data = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // load references; the first word of ref 1 and the last of ref 0 are full scale
    for (int r = 0; r < NR; r++)
      for (int k = 0; k < DEPTH; k++) begin
        @(negedge clk);
        refs[r][k].re = REF_W'($urandom);
        refs[r][k].im = REF_W'($urandom);
        if ((r == 1 && k == 0) || (r == 0 && k == DEPTH - 1)) begin
          refs[r][k].re = REF_W'(-(1 << (REF_W-1)));
          refs[r][k].im = REF_W'(-(1 << (REF_W-1)));
        end
        ref_we = 1; ref_sel = 1'(r); ref_addr = AW'(k); ref_data = refs[r][k];
      end
    @(negedge clk) ref_we = 0;
    for (int w = 0; w < 40; w++)
      do_window($urandom_range(1, DEPTH), $urandom_range(1, 6), (w % 5 == 4) ? 1 : 0);
    do_window(1, 1, 0);
    do_window(1, 1, 0);
    do_window(DEPTH, 3, 1);
    do_window(DEPTH + 10, 3, 0);   // overflow
    do_window(5, 5, 0);            // flag cleared again
    repeat (6) @(negedge clk);
    check(exp_n.size() == 0, "every window scored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

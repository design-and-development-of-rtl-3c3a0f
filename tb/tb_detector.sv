// Testbench for the minimum-distance detector.
// Directed cases: antipodal one-tone reference points (decision is the sign
// of the real part), orthogonal two-tone points, a tie (decides 1), and a
// score whose second component would flip the decision, which one-tone mode
// must ignore. Random cases over the full 48-bit range in both schemes are
// compared with squared distances computed here in 128-bit arithmetic. The
// decision must come 2 cycles after score_valid.
module tb_detector;
  import qr_pkg::*;
  localparam int NR = 2;
  logic clk = 1'b0;
  logic rst, score_valid, q_valid, q_hat;
  scheme_e scheme;
  score_t [NR-1:0] lambda0, lambda1, score;
  logic [2*(SCORE_W+1)+1:0] dist0, dist1;
  int checks = 0, failures = 0;
  int cycle = 0;
  int n_q0 = 0, n_q1 = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  detector #(.NR(NR)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic signed [127:0] sq(input logic signed [SCORE_W-1:0] a,
                                             input logic signed [SCORE_W-1:0] b);
    logic signed [127:0] d;
    d = 128'(a) - 128'(b);
    return d * d;
  endfunction

  function automatic bit model(input scheme_e s, input score_t [NR-1:0] x,
                               input score_t [NR-1:0] l0, input score_t [NR-1:0] l1);
    logic signed [127:0] d0, d1;
    d0 = 0; d1 = 0;
    for (int r = 0; r < NR; r++)
      if (r == 0 || s == SCHEME_TWO_TONE) begin
        d0 += sq(x[r].re, l0[r].re) + sq(x[r].im, l0[r].im);
        d1 += sq(x[r].re, l1[r].re) + sq(x[r].im, l1[r].im);
      end
    return !(d0 < d1);
  endfunction

  task automatic decide(input bit expected, input string tag);
    int t;
    @(negedge clk);
    score_valid = 1'b1;
    t = cycle;
    @(negedge clk);
    score_valid = 1'b0;
    @(posedge clk); #1;
    check(q_valid && cycle - t == 2, $sformatf("%s: q_valid 2 cycles after score_valid", tag));
    check(q_hat == expected, $sformatf("%s: q_hat %0b expected %0b", tag, q_hat, expected));
    if (expected) n_q1++; else n_q0++;
    @(posedge clk); #1;
    check(!q_valid, {tag, ": q_valid one cycle"});
  endtask

  function automatic logic signed [SCORE_W-1:0] rnd48(input int bits);
    logic signed [63:0] v;
    v = {$urandom, $urandom};
    return SCORE_W'(v >>> (64 - bits));
  endfunction

  initial begin
    rst = 1'b1; score_valid = 0; scheme = SCHEME_ONE_TONE;
    lambda0 = '0; lambda1 = '0; score = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // one tone, antipodal: lambda0 = +N, lambda1 = -N
    lambda0[0].re = 1000; lambda1[0].re = -1000;
    lambda0[1].re = 0;    lambda1[1].re = 0;
    score[0].re = 5;   score[0].im = 700;  decide(0, "antipodal right half");
    score[0].re = -5;  score[0].im = -700; decide(1, "antipodal left half");
    score[0].re = 0;   score[0].im = 3;    decide(1, "tie decides 1");
    // component 1 must not matter in one-tone mode
    lambda0[1].re = -1000000; lambda1[1].re = 1000000;
    score[0].re = 100; score[0].im = 0; score[1].re = 900000; score[1].im = 0;
    decide(0, "one tone ignores component 1");
    scheme = SCHEME_TWO_TONE;
    decide(1, "two tone uses component 1");
    // two tone, orthogonal: lambda0 = (N, 0), lambda1 = (0, N)
    lambda0 = '0; lambda1 = '0;
    lambda0[0].re = 4096; lambda1[1].re = 4096;
    score = '0; score[0].re = 3000; score[1].re = 1000; decide(0, "orthogonal near lambda0");
    score = '0; score[0].re = 1000; score[1].re = 3000; decide(1, "orthogonal near lambda1");
    // random, full range and small range, both schemes
    for (int n = 0; n < 400; n++) begin
      int bits;
      bit e;
      bits = (n % 2) ? SCORE_W : 20;
      scheme = scheme_e'(n % 3 == 0);
      for (int r = 0; r < NR; r++) begin
        score[r].re = rnd48(bits);   score[r].im = rnd48(bits);
        lambda0[r].re = rnd48(bits); lambda0[r].im = rnd48(bits);
        lambda1[r].re = rnd48(bits); lambda1[r].im = rnd48(bits);
      end
      e = model(scheme, score, lambda0, lambda1);
      decide(e, $sformatf("random %0d", n));
    end
    check(n_q0 > 50 && n_q1 > 50, "both decisions exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

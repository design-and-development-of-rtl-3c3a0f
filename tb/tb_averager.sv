// Testbench for the averager.
// Runs several averaging runs with random samples and random gaps between
// windows (down to one idle cycle) and compares the stored sums of both
// channels with sums computed here. Also checks: the first repetition
// overwrites old RAM contents, a window already open at arm is skipped,
// done rises one cycle after the N-th window closes, full-scale samples sum
// without overflow over many repetitions, a too-long window sets overflow,
// and a window of the wrong length sets len_mismatch.
module tb_averager;
  localparam int NCH = 2, IN_W = 14, ACC_W = 32, REP_W = 18, DEPTH = 64;
  localparam int AW = $clog2(DEPTH);
  logic clk = 1'b0;
  logic rst, arm, window, busy, done, done_pulse, overflow, len_mismatch, rd_en;
  logic [REP_W-1:0] n_reps, reps_done;
  logic [AW:0] rec_len;
  logic signed [NCH-1:0][IN_W-1:0] sample;
  logic [AW-1:0] rd_addr;
  logic [NCH-1:0][ACC_W-1:0] rd_data;
  int checks = 0, failures = 0;
  longint sums [NCH][DEPTH];

  always #5 clk = ~clk;

  averager #(.NCH(NCH), .IN_W(IN_W), .ACC_W(ACC_W), .REP_W(REP_W), .DEPTH(DEPTH)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic signed [IN_W-1:0] rnd_sample(input int mode);
    case (mode)
      1:       return (IN_W)'(-(1 << (IN_W-1)));      // full scale negative
      2:       return (IN_W)'((1 << (IN_W-1)) - 1);   // full scale positive
      default: return (IN_W)'($urandom);
    endcase
  endfunction

  // one window of len samples; the sums are updated when pos < lim
  task automatic do_window(input int len, input int lim, input int gap, input int mode);
    for (int k = 0; k < len; k++) begin
      @(negedge clk);
      window = 1'b1;
      for (int c = 0; c < NCH; c++) begin
        sample[c] = rnd_sample(mode);
        if (k < lim) sums[c][k] += longint'($signed(sample[c]));
      end
    end
    for (int g = 0; g < gap; g++) begin
      @(negedge clk);
      window = 1'b0;
      sample = '0;
    end
  endtask

  task automatic start_run(input int n);
    @(negedge clk);
    n_reps = REP_W'(n);
    arm = 1'b1;
    @(negedge clk);
    arm = 1'b0;
    for (int c = 0; c < NCH; c++)
      for (int k = 0; k < DEPTH; k++) sums[c][k] = 0;
  endtask

  task automatic check_sums(input int len, input string tag);
    int bad;
    bad = 0;
    for (int k = 0; k < len; k++) begin
      @(negedge clk);
      rd_en = 1'b1; rd_addr = AW'(k);
      @(negedge clk);
      rd_en = 1'b0;
      for (int c = 0; c < NCH; c++) begin
        checks++;
        if (rd_data[c] != ACC_W'(sums[c][k])) begin
          failures++; bad++;
          if (bad < 5) $display("FAIL %s ch%0d pos %0d: %0d vs %0d", tag, c, k,
                                $signed(rd_data[c]), sums[c][k]);
        end
      end
    end
  endtask

  // runs n repetitions of length len and checks timing of done
  task automatic run(input int n, input int len, input int mode, input string tag);
    start_run(n);
    for (int r = 0; r < n; r++) begin
      do_window(len, len, (r == n - 1) ? 1 : $urandom_range(1, 4), mode);
      if (r < n - 1) check(!done, {tag, ": not done early"});
    end
    // window went low at the last negedge; the DUT sees it at the next edge
    @(posedge clk); #1;
    check(done && done_pulse, {tag, ": done one cycle after the last window"});
    check(!busy, {tag, ": not busy when done"});
    check(reps_done == REP_W'(n), $sformatf("%s: reps_done %0d", tag, reps_done));
    check(rec_len == (AW+1)'(len), $sformatf("%s: rec_len %0d", tag, rec_len));
    check(!overflow && !len_mismatch, {tag, ": no error flags"});
    check_sums(len, tag);
  endtask

  initial begin
    rst = 1'b1; arm = 0; window = 0; sample = '0; rd_en = 0; rd_addr = 0; n_reps = 1;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    check(!busy && !done, "idle after reset");
    run(5, 20, 0, "run A");
    // second run over the same RAM: first repetition must overwrite
    run(7, 33, 0, "run B");
    run(1, DEPTH, 0, "single repetition, full depth");
    run(300, 3, 1, "300 reps full-scale negative");
    run(300, 3, 2, "300 reps full-scale positive");
    // window already open when armed is skipped
    @(negedge clk);
    window = 1'b1;
    n_reps = 2; arm = 1'b1;
    @(negedge clk);
    arm = 1'b0;
    repeat (5) @(negedge clk);
    for (int c = 0; c < NCH; c++) for (int k = 0; k < DEPTH; k++) sums[c][k] = 0;
    window = 1'b0;
    @(negedge clk);
    check(busy && reps_done == 0, "open window at arm not counted");
    do_window(10, 10, 2, 0);
    do_window(10, 10, 1, 0);
    @(posedge clk); #1;
    check(done && reps_done == 2, "skip run done");
    check_sums(10, "skip run");
    // overflow: first window longer than the RAM
    start_run(2);
    do_window(DEPTH + 5, DEPTH, 2, 0);
    do_window(DEPTH, DEPTH, 1, 0);
    @(posedge clk); #1;
    check(done && overflow, "overflow flagged");
    check(rec_len == (AW+1)'(DEPTH), "rec_len clipped to depth");
    check_sums(DEPTH, "overflow run");
    // length mismatch: later window shorter or longer
    start_run(3);
    do_window(12, 12, 2, 0);
    do_window(12, 12, 2, 0);
    check(!len_mismatch, "no mismatch yet");
    do_window(15, 12, 1, 0);
    @(posedge clk); #1;
    check(done && len_mismatch && !overflow, "length mismatch flagged");
    check_sums(12, "mismatch run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench for result_writer.
// A RAM model with the averager's one-cycle read latency supplies the sums.
// The testbench records every ZBT write request of both banks and checks
// the header words, that word k of channel c lands at BASE+1+k of bank c
// with the right data, that each word is written once, that the copy of L
// words takes L+2 cycles, and that the writer waits while the controllers
// are not ready. In mean mode every word must equal (sum * 2^18) / N,
// truncated toward zero, computed here independently, and a copy of L words
// must take L*54+2 cycles.
module tb_result_writer;
  import qr_pkg::*;
  localparam int NCH = 2, ACC_W = 32, REP_W = 18, DEPTH = 128;
  localparam int AW = $clog2(DEPTH);
  localparam logic [ZBT_AW-1:0] BASE = 21'h100;
  logic clk = 1'b0;
  logic rst, clear, start, mean_mode, rd_en, busy, done;
  logic [AW:0] rec_len;
  logic [REP_W-1:0] n_reps;
  logic [AW-1:0] rd_addr;
  logic [NCH-1:0][ACC_W-1:0] rd_data;
  zbt_req_t [NCH-1:0] req;
  logic [NCH-1:0] ready;
  logic [ACC_W-1:0] ram [NCH][DEPTH];
  logic [ZBT_DW-1:0] written [NCH][int];
  int   nwr [NCH][int];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  result_writer #(.NCH(NCH), .ACC_W(ACC_W), .REP_W(REP_W), .DEPTH(DEPTH), .BASE(BASE)) dut (.*);

  // averager read port model
  always @(posedge clk) if (rd_en) for (int c = 0; c < NCH; c++) rd_data[c] <= ram[c][rd_addr];

  // request recorder (requests count only while ready)
  always @(posedge clk) begin
    for (int c = 0; c < NCH; c++)
      if (req[c].valid && ready[c]) begin
        if (!req[c].we) begin checks++; failures++; $display("FAIL read request"); end
        written[c][req[c].addr] = req[c].wdata;
        nwr[c][req[c].addr] = nwr[c].exists(req[c].addr) ? nwr[c][req[c].addr] + 1 : 1;
      end
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // expected word: sum or fixed-point mean
  function automatic logic [ZBT_DW-1:0] expect_word(input bit mean, input logic [ACC_W-1:0] sum, input int reps);
    longint v;
    if (!mean) return sum;
    v = (longint'($signed(sum)) * 262144) / reps;   // truncates toward zero
    return ZBT_DW'(v);
  endfunction

  task automatic copy(input int len, input int reps, input int wait_cycles, input string tag,
                      input bit mean = 0);
    int t;
    for (int c = 0; c < NCH; c++) begin
      written[c].delete(); nwr[c].delete();
      for (int k = 0; k < DEPTH; k++) begin
        // sums a real run can produce: |sum| <= 8192 * reps
        longint s;
        s = longint'($urandom_range(0, 2 * 8192)) - 8192;
        s = s * reps - longint'($urandom_range(0, reps - 1));
        if (s < -longint'(8192) * reps) s = -longint'(8192) * reps;
        ram[c][k] = (k % 3 == 0) ? ACC_W'(s) : $urandom;
        if (mean) ram[c][k] = ACC_W'(s);
      end
    end
    @(negedge clk);
    ready = '0;
    start = 1'b1; rec_len = (AW+1)'(len); n_reps = REP_W'(reps); mean_mode = mean;
    @(negedge clk);
    start = 1'b0;
    rec_len = '0; n_reps = '0; mean_mode = 0;   // values must have been latched
    repeat (wait_cycles) begin
      @(negedge clk);
      check(!req[0].valid && !req[1].valid && busy, {tag, ": waits while not ready"});
    end
    ready = '1;
    t = 0;
    while (!done && t < 100000) begin @(negedge clk); t++; end
    check(t == (mean ? len * 54 + 2 : len + 2),
          $sformatf("%s: copy took %0d cycles, expected %0d", tag, t, mean ? len * 54 + 2 : len + 2));
    check(!busy, {tag, ": not busy when done"});
    check(written[0][BASE] == ZBT_DW'(reps), {tag, ": header repetitions"});
    check(written[1][BASE] == {mean, 31'(len)}, {tag, ": header length and mode"});
    for (int c = 0; c < NCH; c++) begin
      check(written[c].size() == len + 1, $sformatf("%s: bank %0d has %0d words", tag, c, written[c].size()));
      for (int k = 0; k < len; k++) begin
        check(written[c].exists(BASE + 1 + k) && written[c][BASE + 1 + k] == expect_word(mean, ram[c][k], reps) &&
              nwr[c][BASE + 1 + k] == 1, $sformatf("%s: bank %0d word %0d", tag, c, k));
      end
    end
  endtask

  initial begin
    rst = 1'b1; clear = 0; start = 0; mean_mode = 0; rec_len = 0; n_reps = 0; ready = '1;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(!busy && !done, "idle after reset");
    copy(10, 200000, 0, "short");
    copy(DEPTH, 1234, 5, "full depth after wait");
    copy(1, 7, 2, "one word");
    copy(20, 200000, 0, "mean of 200000", 1);
    copy(20, 3, 1, "mean of 3", 1);
    copy(5, 1, 0, "mean of 1", 1);
    copy(DEPTH, 77, 0, "mean full depth", 1);
    @(negedge clk);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    check(!done && !busy, "clear returns to idle");
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

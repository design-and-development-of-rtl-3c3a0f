// Testbench for seq_divider at its default widths (50-bit signed dividend,
// 18-bit divisor).
// Every division is compared with the simulator's own 64-bit signed
// division, which truncates toward zero like the divider. Cases: directed
// corners (zero, +-1, largest positive and most negative dividend, divisor 1
// and the largest divisor, exact and inexact quotients of both signs), the
// documented result for a zero divisor, and random operands of all sizes.
// For each division the testbench also checks that done is a single pulse
// exactly NW+1 cycles after start, that busy is high in between, that a
// start while busy is ignored, and that the quotient holds after done.
module tb_seq_divider;
  localparam int NW = 50, DW = 18;
  logic clk = 1'b0;
  logic rst, start, busy, done;
  logic signed [NW-1:0] dividend, quotient;
  logic [DW-1:0] divisor;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  seq_divider #(.NW(NW), .DW(DW)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic signed [NW-1:0] model(input logic signed [NW-1:0] a, input logic [DW-1:0] b);
    if (b == 0) return a[NW-1] ? NW'(1) : '1;     // documented zero-divisor result
    return NW'(longint'(a) / longint'({1'b0, b}));
  endfunction

  task automatic divide(input logic signed [NW-1:0] a, input logic [DW-1:0] b, input bit poke_busy);
    logic signed [NW-1:0] expect_q;
    int t;
    expect_q = model(a, b);
    @(negedge clk);
    start = 1'b1; dividend = a; divisor = b;
    @(negedge clk);
    start = 1'b0; dividend = NW'({$urandom, $urandom}); divisor = DW'($urandom);  // must be latched
    t = 0;   // clock edges after the edge that took start
    while (!done && t < 200) begin
      check(busy, "busy while dividing");
      if (poke_busy && t == 10) start = 1'b1;                 // ignored while busy
      else start = 1'b0;
      @(negedge clk);
      t++;
    end
    start = 1'b0;
    check(t == NW + 1, $sformatf("done after %0d cycles, expected %0d", t, NW + 1));
    check(quotient == expect_q,
          $sformatf("%0d / %0d = %0d, expected %0d", a, b, quotient, expect_q));
    @(negedge clk);
    check(!done && !busy, "done is one pulse");
    check(quotient == expect_q, "quotient holds");
  endtask

  initial begin
    logic signed [NW-1:0] a;
    logic [DW-1:0] b;
    rst = 1'b1; start = 0; dividend = '0; divisor = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(!busy && !done, "idle after reset");
    divide(0, 5, 0);
    divide(1, 1, 0);
    divide(-1, 1, 0);
    divide(-1, 2, 0);
    divide(7, 2, 0);
    divide(-7, 2, 0);
    divide(-8, 2, 1);
    divide({1'b0, {(NW-1){1'b1}}}, 1, 0);
    divide({1'b1, {(NW-1){1'b0}}}, 1, 0);
    divide({1'b1, {(NW-1){1'b0}}}, '1, 0);
    divide({1'b0, {(NW-1){1'b1}}}, '1, 1);
    divide(NW'(64'sd200000 * 8191 * 262144), 200000, 0);
    divide(-NW'(64'sd200000 * 8192 * 262144), 200000, 0);
    divide(12345, 0, 0);
    divide(-12345, 0, 0);
    for (int i = 0; i < 400; i++) begin
      a = NW'({$urandom, $urandom});
      a = a >>> $urandom_range(0, NW - 1);
      b = DW'($urandom) >> $urandom_range(0, DW - 1);
      if (b == 0) b = 1;
      divide(a, b, i % 7 == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

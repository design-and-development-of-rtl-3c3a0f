// Testbench for dual_port_ram.
// Fills the RAM through the write port, reads it back through the read port
// (data one cycle after the address), checks read-first behaviour when both
// ports address the same word, read-enable gating, and a read-modify-write
// loop of the kind the averager runs.
module tb_dual_port_ram;
  localparam int W = 32, DEPTH = 64, AW = $clog2(DEPTH);
  logic clk = 1'b0;
  logic re_a, we_b;
  logic [AW-1:0] addr_a, addr_b;
  logic [W-1:0]  rdata_a, wdata_b;
  logic [W-1:0]  model [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dual_port_ram #(.W(W), .DEPTH(DEPTH)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    re_a = 0; we_b = 0; addr_a = 0; addr_b = 0; wdata_b = 0;
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we_b = 1; addr_b = AW'(a); wdata_b = $urandom; model[a] = wdata_b;
    end
    @(negedge clk) we_b = 0;
    // read back, address in one cycle, data after the next edge
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      re_a = 1; addr_a = AW'(a);
      @(negedge clk);
      re_a = 0;
      check(rdata_a == model[a], $sformatf("read %0d: %h vs %h", a, rdata_a, model[a]));
    end
    // same address on both ports: old value is read
    @(negedge clk);
    re_a = 1; addr_a = 5; we_b = 1; addr_b = 5; wdata_b = 32'hDEAD_BEEF;
    @(negedge clk);
    re_a = 0; we_b = 0;
    check(rdata_a == model[5], "read-first on collision");
    model[5] = 32'hDEAD_BEEF;
    @(negedge clk);
    re_a = 1; addr_a = 5;
    @(negedge clk);
    re_a = 0;
    check(rdata_a == 32'hDEAD_BEEF, "written value after collision");
    // re_a low holds the output
    addr_a = 7;
    @(negedge clk);
    check(rdata_a == 32'hDEAD_BEEF, "output held while re_a low");
    // read-modify-write: add a to every word, one word per cycle
    for (int a = 0; a <= DEPTH; a++) begin
      @(negedge clk);
      re_a = (a < DEPTH); addr_a = AW'(a);
      we_b = (a > 0); addr_b = AW'(a - 1); wdata_b = rdata_a + W'(a - 1);
      if (a > 0) model[a-1] = model[a-1] + W'(a - 1);
    end
    @(negedge clk) begin re_a = 0; we_b = 0; end
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      re_a = 1; addr_a = AW'(a);
      @(negedge clk);
      re_a = 0;
      check(rdata_a == model[a], $sformatf("rmw %0d: %h vs %h", a, rdata_a, model[a]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench for boot_loader: start-up order and timing.
// Checks that nothing is enabled while reset is held or the clock is not
// locked, that ram_en rises 3 edges after both conditions hold, that dsp_run
// follows exactly one cycle later with a single dsp_start pulse, and that
// losing lock or a new reset stops both again.
module tb_boot_loader;
  logic clk = 1'b0;
  logic rst_in, clk_locked;
  logic ram_en, dsp_run, dsp_start;
  int   checks = 0, failures = 0;
  int   starts = 0;

  always #5 clk = ~clk;

  boot_loader dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (ram_en=%0b dsp_run=%0b dsp_start=%0b)", what, ram_en, dsp_run, dsp_start);
    end
  endtask

  always @(posedge clk) if (dsp_start) starts++;

  // Waits for both conditions then measures the start-up sequence.
  task automatic expect_boot(input string tag);
    int n;
    n = 0;
    while (!ram_en && n < 20) begin
      @(posedge clk); #1; n++;
      if (!ram_en) check(!dsp_run && !dsp_start, {tag, ": core idle before ram_en"});
    end
    check(n == 3, $sformatf("%s: ram_en after %0d edges, expected 3", tag, n));
    check(!dsp_run, {tag, ": dsp_run not with ram_en"});
    @(posedge clk); #1;
    check(dsp_run && dsp_start, {tag, ": dsp_run and dsp_start one cycle after ram_en"});
    @(posedge clk); #1;
    check(dsp_run && ram_en && !dsp_start, {tag, ": dsp_start is a single pulse"});
  endtask

  initial begin
    rst_in = 1'b1;
    clk_locked = 1'b0;
    repeat (5) begin
      @(posedge clk); #1;
      check(!ram_en && !dsp_run && !dsp_start, "held in reset");
    end
    // reset released, clock not yet locked
    rst_in = 1'b0;
    repeat (10) begin
      @(posedge clk); #1;
      check(!ram_en && !dsp_run, "waits for lock");
    end
    clk_locked = 1'b1;
    expect_boot("first boot");
    repeat (20) begin
      @(posedge clk); #1;
      check(ram_en && dsp_run && !dsp_start, "stays running");
    end
    // loss of lock stops everything
    clk_locked = 1'b0;
    repeat (3) @(posedge clk);
    #1 check(!ram_en && !dsp_run, "stopped after loss of lock");
    clk_locked = 1'b1;
    expect_boot("relock");
    // new reset
    #2 rst_in = 1'b1;
    @(posedge clk); #1;
    @(posedge clk); #1;
    check(!ram_en && !dsp_run, "stopped by reset");
    rst_in = 1'b0;
    expect_boot("after reset");
    check(starts == 3, $sformatf("%0d start pulses, expected 3", starts));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

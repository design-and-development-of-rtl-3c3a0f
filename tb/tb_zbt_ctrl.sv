// Testbench for zbt_ctrl with a behavioural pipelined ZBT SRAM.
// Streams back-to-back writes, then back-to-back reads, then interleaved
// reads and writes with no idle cycles (the point of ZBT), and checks data,
// the 3-cycle read response latency, that the bus is driven only in write
// data cycles, and that no access is made while the controller is disabled.
module tb_zbt_ctrl;
  import qr_pkg::*;
  logic clk = 1'b0;
  logic rst, en;
  zbt_req_t req;
  logic ready, rsp_valid;
  logic [ZBT_DW-1:0] rsp_rdata;
  logic [ZBT_AW-1:0] zbt_addr;
  logic zbt_ce_n, zbt_we_n, zbt_dq_oe;
  logic [ZBT_DW-1:0] zbt_dq_o, zbt_dq_i;
  int unsigned n_writes, n_bus_errors;
  int checks = 0, failures = 0;
  int cycle = 0;

  logic [ZBT_DW-1:0] model [int];
  // expected read responses: data and issue cycle
  logic [ZBT_DW-1:0] exp_q [$];
  int                exp_t [$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  zbt_ctrl dut (.*);

  zbt_sram_model #(.AW(ZBT_AW), .DW(ZBT_DW), .DEPTH(4096)) u_mem (
    .clk(clk), .rst(rst), .addr(zbt_addr), .ce_n(zbt_ce_n), .we_n(zbt_we_n),
    .dq_o(zbt_dq_o), .dq_oe(zbt_dq_oe), .dq_i(zbt_dq_i),
    .n_writes(n_writes), .n_bus_errors(n_bus_errors));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // response checker
  always @(posedge clk) begin
    if (rsp_valid) begin
      if (exp_q.size() == 0) check(0, "unexpected response");
      else begin
        logic [ZBT_DW-1:0] d;
        int t;
        d = exp_q.pop_front();
        t = exp_t.pop_front();
        check(rsp_rdata == d, $sformatf("read data %h, expected %h", rsp_rdata, d));
        check(cycle - t == 4, $sformatf("read latency %0d edges, expected 4 (response after edge 3)", cycle - t));
      end
    end
  end

  task automatic issue(input bit we, input int unsigned a, input logic [ZBT_DW-1:0] d);
    @(negedge clk);
    req.valid = 1'b1; req.we = we; req.addr = ZBT_AW'(a); req.wdata = d;
    if (we) model[a] = d;
    else begin
      exp_q.push_back(model.exists(a) ? model[a] : '0);
      exp_t.push_back(cycle + 1);   // accepted at the coming edge
    end
  endtask

  task automatic idle(input int n);
    repeat (n) begin @(negedge clk); req = '0; end
  endtask

  initial begin
    rst = 1'b1; en = 1'b0; req = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // disabled: requests are not accepted
    @(negedge clk);
    check(!ready, "not ready while disabled");
    req.valid = 1; req.we = 1; req.addr = 7; req.wdata = 32'h1234;
    idle(6);
    check(n_writes == 0, "no write while disabled");
    en = 1'b1;
    @(negedge clk);
    check(ready, "ready when enabled");
    // back-to-back writes
    for (int a = 0; a < 64; a++) issue(1, a, $urandom);
    idle(5);
    check(n_writes == 64, $sformatf("%0d writes reached the SRAM, expected 64", n_writes));
    for (int a = 0; a < 64; a++)
      check(u_mem.peek(a) == model[a], $sformatf("SRAM word %0d", a));
    // back-to-back reads
    for (int a = 0; a < 64; a++) issue(0, a, '0);
    idle(6);
    // interleaved, no idle cycles between read and write
    for (int k = 0; k < 200; k++) begin
      int unsigned a;
      a = $urandom_range(0, 127);
      if ($urandom_range(0, 1)) issue(1, a, $urandom);
      else                      issue(0, a, '0);
    end
    idle(6);
    check(exp_q.size() == 0, "all reads answered");
    check(n_bus_errors == 0, $sformatf("%0d bus timing errors", n_bus_errors));
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

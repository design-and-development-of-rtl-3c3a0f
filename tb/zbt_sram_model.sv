// Behavioural model of one bank of pipelined ZBT SRAM, for simulation only.
//
// Address and control are sampled at a rising edge; the data transfer for
// that access happens two edges later: a write takes dq at that edge, a read
// drives dq_i in the cycle before it. The bidirectional bus is split into the
// controller's dq_o/dq_oe and the model's dq_i. Only DEPTH words are modelled
// (the address wraps); the real part holds 2M words. Reads of words never
// written return zero.
module zbt_sram_model #(
  parameter int unsigned AW    = 21,
  parameter int unsigned DW    = 32,
  parameter int unsigned DEPTH = 65536
) (
  input  logic          clk,
  input  logic          rst,      // clears the access pipeline and counters
  input  logic [AW-1:0] addr,
  input  logic          ce_n,
  input  logic          we_n,
  input  logic [DW-1:0] dq_o,
  input  logic          dq_oe,
  output logic [DW-1:0] dq_i,
  output int unsigned   n_writes,
  output int unsigned   n_bus_errors
);
  logic [DW-1:0] mem [DEPTH];
  logic          p1_v = 1'b0, p1_w = 1'b0, p2_v = 1'b0, p2_w = 1'b0;
  logic [AW-1:0] p1_a, p2_a;

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    n_writes = 0;
    n_bus_errors = 0;
  end

  always @(posedge clk) begin
    if (rst) begin
      p1_v <= 1'b0; p2_v <= 1'b0;
      n_writes <= 0; n_bus_errors <= 0;
    end else begin
    // data phase of the access sampled two edges ago
    if (p2_v && p2_w) begin
      if (!dq_oe) n_bus_errors <= n_bus_errors + 1;
      mem[p2_a % DEPTH] <= dq_o;
      n_writes <= n_writes + 1;
    end else if (dq_oe) begin
      n_bus_errors <= n_bus_errors + 1;   // controller drives when it should not
    end
    p2_v <= p1_v; p2_w <= p1_w; p2_a <= p1_a;
    p1_v <= !ce_n; p1_w <= !we_n; p1_a <= addr;
    end
  end

  always_comb dq_i = (p2_v && !p2_w) ? mem[p2_a % DEPTH] : '0;

  // direct access for testbench checks
  function automatic logic [DW-1:0] peek(input int unsigned a);
    return mem[a % DEPTH];
  endfunction
  function automatic void poke(input int unsigned a, input logic [DW-1:0] d);
    mem[a % DEPTH] = d;
  endfunction
endmodule

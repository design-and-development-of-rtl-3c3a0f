// Simple dual-port RAM: one synchronous read port (A) and one write port (B).
//
// Both the averager and the demodulator's reference store are built on it.
// The averager reads the running sum of a sample position on port A and, one
// cycle later, writes the updated sum back on port B, so both ports work in
// the same cycle on different positions. Read data appears one clock after
// the address (block-RAM timing). A read and a write to the same address in
// the same cycle return the old contents (read-first). The contents are not
// reset; users must write a word before reading it.
module dual_port_ram #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 4096,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  // port A: read
  input  logic          re_a,
  input  logic [AW-1:0] addr_a,
  output logic [W-1:0]  rdata_a,
  // port B: write
  input  logic          we_b,
  input  logic [AW-1:0] addr_b,
  input  logic [W-1:0]  wdata_b
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (re_a) rdata_a <= mem[addr_a];
  end

  always_ff @(posedge clk) begin
    if (we_b) mem[addr_b] <= wdata_b;
  end

endmodule

// Memory controller for one bank of pipelined ZBT SRAM.
//
// ZBT ("zero bus turnaround") SRAM accepts one read or write on every clock
// with no idle cycles between reads and writes, so at the 100 MHz system
// clock the controller moves one 32-bit word per cycle per bank. A request
// (req.valid, req.we, req.addr, req.wdata) is accepted on every cycle in
// which ready (= en) is high. The controller registers address and control
// onto the SRAM pins; the SRAM samples them one edge later and transfers data
// two edges after that (pipelined ZBT): write data is on dq_o with dq_oe high
// in the cycle that ends with that edge, and read data is taken from dq_i at
// that edge.
//
// Timing, counted in rising edges from the edge that accepts a request:
//   edge 0  address, ce_n = 0 and we_n on the pins
//   edge 1  SRAM samples address and control
//   edge 2  write data put on dq_o / dq_oe (read: SRAM drives dq_i)
//   edge 3  SRAM takes write data; read data captured, rsp_valid high after it
// The bidirectional DQ bus is split into dq_o, dq_oe and dq_i; the pad
// buffer joins them. The one-word-per-cycle rate is the document's; pin
// timing of a pipelined ZBT part is this design's assumption.
module zbt_ctrl
  import qr_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              en,          // from the boot loader
  // user side
  input  zbt_req_t          req,
  output logic              ready,
  output logic              rsp_valid,
  output logic [ZBT_DW-1:0] rsp_rdata,
  // SRAM pins
  output logic [ZBT_AW-1:0] zbt_addr,
  output logic              zbt_ce_n,
  output logic              zbt_we_n,
  output logic [ZBT_DW-1:0] zbt_dq_o,
  output logic              zbt_dq_oe,
  input  logic [ZBT_DW-1:0] zbt_dq_i
);

  // s1: after edge 0 (SRAM samples the address at edge 1)
  // s2: after edge 1; s3: after edge 2 (the DQ data cycle, ends at edge 3)
  logic              s1_wr, s1_rd, s2_wr, s2_rd, s3_rd;
  logic [ZBT_DW-1:0] s1_wdata, s2_wdata;

  assign ready = en;

  always_ff @(posedge clk) begin
    if (rst) begin
      zbt_addr  <= '0;
      zbt_ce_n  <= 1'b1;
      zbt_we_n  <= 1'b1;
      s1_wr     <= 1'b0;
      s1_rd     <= 1'b0;
      s1_wdata  <= '0;
      s2_wr     <= 1'b0;
      s2_rd     <= 1'b0;
      s2_wdata  <= '0;
      s3_rd     <= 1'b0;
      zbt_dq_o  <= '0;
      zbt_dq_oe <= 1'b0;
      rsp_valid <= 1'b0;
      rsp_rdata <= '0;
    end else begin
      // edge 0: address and control to the pins
      if (req.valid && en) begin
        zbt_addr <= req.addr;
        zbt_ce_n <= 1'b0;
        zbt_we_n <= !req.we;
      end else begin
        zbt_ce_n <= 1'b1;
        zbt_we_n <= 1'b1;
      end
      s1_wr    <= req.valid && en && req.we;
      s1_rd    <= req.valid && en && !req.we;
      s1_wdata <= req.wdata;
      // edge 1: the SRAM samples address and control
      s2_wr     <= s1_wr;
      s2_rd     <= s1_rd;
      s2_wdata  <= s1_wdata;
      // edge 2: write data onto the bus for the SRAM's data cycle
      zbt_dq_oe <= s2_wr;
      zbt_dq_o  <= s2_wdata;
      s3_rd     <= s2_rd;
      // edge 3: capture read data
      rsp_valid <= s3_rd;
      if (s3_rd) rsp_rdata <= zbt_dq_i;
    end
  end

endmodule

// Result writer: copies the averaged traces into the external ZBT SRAM.
//
// The host computer has no live link to the DSP core; it reads the board's
// ZBT SRAM after a run. When the averager reports completion (`start`), this
// block copies the results of both channels into the two banks, channel c
// into bank c:
//     bank A word BASE      : number of repetitions N
//     bank B word BASE      : bit 31 = mean mode, low bits = record length L
//     bank c word BASE+1+k  : result of channel c at sample position k, k < L
// In sum mode (mean_mode = 0) the result is the 32-bit sum over the N
// repetitions, streamed at one word per bank per cycle: the copy takes L+2
// cycles. In mean mode (mean_mode = 1) the result is the average sum/N as a
// signed fixed-point number with FRAC fractional bits (Q13.18 for 14-bit
// samples), truncated toward zero. A sequential divider per channel needs
// ACC_W+FRAC+1 cycles, so a mean copy takes L*(ACC_W+FRAC+4)+2 cycles:
// 4096 words in about 2.2 ms at 100 MHz.
//
// The copy reads the averager's RAM (one cycle read latency) and issues the
// ZBT writes afterwards; it only advances while both controllers are ready
// (they must not drop ready during a copy other than through reset). `done`
// stays high from the cycle after the last write request until `clear` (a
// new averaging run) or the next `start`. `mean_mode`, `rec_len` and
// `n_reps` are sampled with `start`.
//
// Keeping the results in the ZBT banks for the host, and averaging
// (sum/N), follow the document; the layout, header words, fixed-point format
// and handshake are this design's choices.
module result_writer
  import qr_pkg::*;
#(
  parameter int unsigned NCH   = ZBT_BANKS,
  parameter int unsigned ACC_W = ZBT_DW,
  parameter int unsigned REP_W = 18,
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned FRAC  = 18,
  parameter logic [ZBT_AW-1:0] BASE = '0,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       clear,     // new averaging run: forget done
  input  logic                       start,
  input  logic                       mean_mode,
  input  logic [AW:0]                rec_len,
  input  logic [REP_W-1:0]           n_reps,
  // averager read port
  output logic                       rd_en,
  output logic [AW-1:0]              rd_addr,
  input  logic [NCH-1:0][ACC_W-1:0]  rd_data,
  // ZBT bank controllers
  output zbt_req_t [NCH-1:0]         req,
  input  logic [NCH-1:0]             ready,
  output logic                       busy,
  output logic                       done
);

  localparam int unsigned NW = ACC_W + FRAC;   // dividend width

  typedef enum logic [2:0] {
    RW_IDLE, RW_HEADER, RW_COPY, RW_MREAD, RW_MLOAD, RW_MDIV, RW_DONE
  } rw_state_e;

  rw_state_e   state;
  logic [AW:0] len, cnt;
  logic [REP_W-1:0] reps;
  logic        mean;
  logic        all_ready;
  logic        d_valid;         // a result word is written this cycle
  logic [AW:0] d_pos;
  logic [NCH-1:0][ACC_W-1:0] m_word;     // mean words waiting for their write
  logic [NCH-1:0]            div_done;
  logic signed [NCH-1:0][NW-1:0] div_q;

  assign all_ready = &ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= RW_IDLE;
      len     <= '0;
      reps    <= '0;
      mean    <= 1'b0;
      cnt     <= '0;
      d_valid <= 1'b0;
      d_pos   <= '0;
      m_word  <= '0;
    end else begin
      d_valid <= 1'b0;
      if (clear) state <= RW_IDLE;
      else case (state)
        RW_IDLE, RW_DONE: if (start) begin
          state <= RW_HEADER;
          len   <= rec_len;
          reps  <= n_reps;
          mean  <= mean_mode;
          cnt   <= '0;
        end
        RW_HEADER: if (all_ready)
          state <= (len == '0) ? RW_DONE : (mean ? RW_MREAD : RW_COPY);
        // sum mode: one read and one write per cycle
        RW_COPY: if (all_ready) begin
          d_valid <= 1'b1;
          d_pos   <= cnt;
          cnt     <= cnt + 1'b1;
          if (cnt + 1'b1 == len) state <= RW_DONE;
        end
        // mean mode: read, divide, write
        RW_MREAD: if (all_ready) state <= RW_MLOAD;
        RW_MLOAD: state <= RW_MDIV;              // dividers load the read data
        RW_MDIV: if (&div_done) begin
          for (int c = 0; c < NCH; c++) m_word[c] <= ACC_W'(div_q[c]);
          d_valid <= 1'b1;
          d_pos   <= cnt;
          cnt     <= cnt + 1'b1;
          state   <= (cnt + 1'b1 == len) ? RW_DONE : RW_MREAD;
        end
        default: state <= RW_IDLE;
      endcase
    end
  end

  assign rd_en   = ((state == RW_COPY) || (state == RW_MREAD)) && all_ready;
  assign rd_addr = cnt[AW-1:0];

  for (genvar c = 0; c < NCH; c++) begin : g_div
    seq_divider #(.NW(NW), .DW(REP_W)) u_div (
      .clk      (clk),
      .rst      (rst),
      .start    (state == RW_MLOAD),
      .dividend ({rd_data[c], FRAC'(0)}),
      .divisor  (reps),
      .busy     (),
      .done     (div_done[c]),
      .quotient (div_q[c])
    );
  end

  always_comb begin
    for (int c = 0; c < NCH; c++) begin
      req[c] = '0;
      if (state == RW_HEADER) begin
        req[c].valid = all_ready;
        req[c].we    = 1'b1;
        req[c].addr  = BASE;
        req[c].wdata = (c == 0) ? ZBT_DW'(reps) : ({mean, (ZBT_DW-1)'(len)});
      end else if (d_valid) begin
        req[c].valid = 1'b1;
        req[c].we    = 1'b1;
        req[c].addr  = BASE + ZBT_AW'(d_pos) + 1'b1;
        req[c].wdata = ZBT_DW'(mean ? m_word[c] : rd_data[c]);
      end
    end
  end

  assign busy = ((state != RW_IDLE) && (state != RW_DONE)) || d_valid;
  assign done = (state == RW_DONE) && !d_valid;

endmodule

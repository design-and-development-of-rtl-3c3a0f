// Multi-channel averager for repeated measurements.
//
// An experiment is repeated N times; in each repetition a measurement window
// (input `window`, high for the samples that belong to the measurement) marks
// the samples to record. The averager keeps, for every sample position k of
// the window and every channel, the sum of the samples at position k over
// all repetitions so far. The sums live in a dual-port RAM per channel: in
// the cycle a sample arrives, its position's old sum is read on port A; one
// cycle later old sum + new sample is written back on port B. One sample per
// channel is therefore absorbed every clock cycle, with no stall. In the
// first repetition the RAM contents are overwritten instead of added to, so
// no clearing pass is needed. The mean of position k is sum/N; with 14-bit
// samples and 32-bit sums, N up to 2^18 = 262144 cannot overflow.
//
// Control: a one-cycle `arm` starts a run of `n_reps` repetitions (a value of
// 0 behaves as 1). A window counts only if it rises while the run is active,
// so a window already open at `arm` is skipped. The first window fixes the
// record length `rec_len` (at most DEPTH; longer windows set `overflow`).
// Later windows are accumulated up to rec_len; a window of another length
// sets `len_mismatch`. After the falling edge of the N-th window, `done`
// goes high (and `done_pulse` pulses) one cycle after the last write; the
// sums can then be read on the read port: rd_en/rd_addr, rd_data one cycle
// later. The read port is ignored while a run is active.
//
// From the document: two channels, 14-bit inputs, averaging up to 200000
// repetitions with a read-add-write loop around a dual-port RAM. This
// design's choices: the RAM depth, 32-bit sums, the arm/done control and the
// length checks.
module averager #(
  parameter int unsigned NCH   = 2,
  parameter int unsigned IN_W  = 14,
  parameter int unsigned ACC_W = 32,
  parameter int unsigned REP_W = 18,
  parameter int unsigned DEPTH = 4096,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic                           arm,
  input  logic [REP_W-1:0]               n_reps,
  input  logic                           window,
  input  logic signed [NCH-1:0][IN_W-1:0] sample,
  output logic                           busy,
  output logic                           done,
  output logic                           done_pulse,
  output logic [REP_W-1:0]               reps_done,
  output logic [AW:0]                    rec_len,
  output logic                           overflow,
  output logic                           len_mismatch,
  input  logic                           rd_en,
  input  logic [AW-1:0]                  rd_addr,
  output logic [NCH-1:0][ACC_W-1:0]      rd_data
);

  typedef enum logic [1:0] {AVG_IDLE, AVG_RUN, AVG_DONE} avg_state_e;

  avg_state_e state;
  logic       win_d, in_win;
  logic [AW:0] pos_cnt;          // position of the next sample in the window
  logic [REP_W-1:0] rep_cnt;

  logic        rise, win_end, take;
  logic [AW:0] pos, limit;

  // stage 1 (one cycle after the sample): old sum is on the RAM output
  logic                         s1_valid, s1_first;
  logic [AW-1:0]                s1_addr;
  logic signed [NCH-1:0][IN_W-1:0] s1_sample;

  logic [AW-1:0]           ram_raddr;
  logic [NCH-1:0][ACC_W-1:0] ram_rdata, ram_wdata;

  assign rise    = window && !win_d && (state == AVG_RUN);
  assign win_end = in_win && !window;
  assign pos     = rise ? '0 : pos_cnt;
  assign limit   = (rep_cnt == '0) ? (AW+1)'(DEPTH) : rec_len;
  assign take    = (rise || (in_win && window)) && (pos < limit);

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= AVG_IDLE;
      win_d        <= 1'b0;
      in_win       <= 1'b0;
      pos_cnt      <= '0;
      rep_cnt      <= '0;
      rec_len      <= '0;
      overflow     <= 1'b0;
      len_mismatch <= 1'b0;
      done_pulse   <= 1'b0;
    end else begin
      win_d      <= window;
      done_pulse <= 1'b0;
      if (arm) begin
        state        <= AVG_RUN;
        in_win       <= 1'b0;
        pos_cnt      <= '0;
        rep_cnt      <= '0;
        rec_len      <= '0;
        overflow     <= 1'b0;
        len_mismatch <= 1'b0;
      end else if (state == AVG_RUN) begin
        if (rise) begin
          in_win  <= 1'b1;
          pos_cnt <= 1;
        end else if (in_win && window) begin
          if (pos_cnt != '1) pos_cnt <= pos_cnt + 1'b1;
        end
        if ((rise || (in_win && window)) && !take) begin
          if (rep_cnt == '0) overflow     <= 1'b1;
          else               len_mismatch <= 1'b1;
        end
        if (win_end) begin
          in_win <= 1'b0;
          if (rep_cnt == '0)
            rec_len <= (pos_cnt > (AW+1)'(DEPTH)) ? (AW+1)'(DEPTH) : pos_cnt;
          else if (pos_cnt != rec_len)
            len_mismatch <= 1'b1;
          rep_cnt <= rep_cnt + 1'b1;
          if (rep_cnt + 1'b1 >= n_reps) begin
            state      <= AVG_DONE;
            done_pulse <= 1'b1;
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_valid <= 1'b0;
      s1_first <= 1'b0;
      s1_addr  <= '0;
      s1_sample <= '0;
    end else begin
      s1_valid  <= take && (state == AVG_RUN) && !arm;
      s1_first  <= (rep_cnt == '0);
      s1_addr   <= pos[AW-1:0];
      s1_sample <= sample;
    end
  end

  assign ram_raddr = (state == AVG_RUN) ? pos[AW-1:0] : rd_addr;

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    assign ram_wdata[c] = (s1_first ? '0 : ram_rdata[c]) + ACC_W'($signed(s1_sample[c]));

    dual_port_ram #(.W(ACC_W), .DEPTH(DEPTH)) u_ram (
      .clk     (clk),
      .re_a    ((state == AVG_RUN) || rd_en),
      .addr_a  (ram_raddr),
      .rdata_a (ram_rdata[c]),
      .we_b    (s1_valid),
      .addr_b  (s1_addr),
      .wdata_b (ram_wdata[c])
    );
  end

  assign rd_data   = ram_rdata;
  assign busy      = (state == AVG_RUN);
  assign done      = (state == AVG_DONE);
  assign reps_done = rep_cnt;

endmodule

// Demodulator of the single-shot receiver: computes the score.
//
// For every measurement window the demodulator forms, for each stored
// reference signal s_r (r = 0..NREF-1), the unnormalised inner product
//     score_r = sum_k s_out[k] * conj(s_r[k])
// where s_out[k] = I[k] + jQ[k] is the k-th sample of the window. This is the
// matched-filter score of the document's receiver, N times <s_out|s_r>; the
// factor 1/N is left out because the detector compares against reference
// points given in the same scale. Each term is one complex multiply-accumulate
// per reference per clock, so the window is absorbed at the full sample rate.
//
// The reference samples are held in one dual-port RAM per reference (written
// through ref_we/ref_sel/ref_addr/ref_data, for instance with averaged
// noise-free traces) and read by the position k in the window.
//
// Pipeline: cycle t sample and RAM address; t+1 reference data, products
// registered; t+2 accumulate (DSP48-style MAC). score_valid pulses for one
// cycle 3 cycles after the first cycle with `window` low, and score holds its
// value until the next window ends. Samples beyond position DEPTH-1 are ignored and set `overflow`
// for that window; n_samples reports the number of samples that were scored.
module demodulator
  import qr_pkg::*;
#(
  parameter int unsigned NR    = NREF,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned RW   = (NR > 1) ? $clog2(NR) : 1
) (
  input  logic               clk,
  input  logic               rst,
  // sample stream
  input  logic               window,
  input  iq_t                sample,
  // reference store write port
  input  logic               ref_we,
  input  logic [RW-1:0]      ref_sel,
  input  logic [AW-1:0]      ref_addr,
  input  ref_t               ref_data,
  // result
  output logic               score_valid,
  output score_t [NR-1:0]    score,
  output logic [AW:0]        n_samples,
  output logic               overflow
);

  localparam int unsigned PW = ADC_W + REF_W + 1;  // one complex product part

  logic          win_d;
  logic [AW:0]   pos_cnt;
  logic          take;

  // stage 1: reference data on the RAM outputs
  logic          s1_valid, s1_first, s1_end;
  iq_t           s1_sample;
  ref_t [NR-1:0] s1_ref;

  // stage 2: registered products
  logic          s2_valid, s2_first, s2_end;
  logic signed [NR-1:0][1:0][PW-1:0] s2_prod;   // [r][0]=re, [r][1]=im

  // accumulator
  score_t [NR-1:0] acc;
  logic [AW:0]   acc_n;
  logic          win_ovf, s1_ovf, s2_ovf;

  assign take = window && ((!win_d) || (pos_cnt < (AW+1)'(DEPTH)));

  always_ff @(posedge clk) begin
    if (rst) begin
      win_d   <= 1'b0;
      pos_cnt <= '0;
      win_ovf <= 1'b0;
    end else begin
      win_d <= window;
      if (window && !win_d) begin
        pos_cnt <= 1;
        win_ovf <= 1'b0;
      end else if (window) begin
        if (pos_cnt < (AW+1)'(DEPTH)) pos_cnt <= pos_cnt + 1'b1;
        else                          win_ovf <= 1'b1;
      end
    end
  end

  for (genvar r = 0; r < NR; r++) begin : g_ref
    dual_port_ram #(.W($bits(ref_t)), .DEPTH(DEPTH)) u_ref (
      .clk     (clk),
      .re_a    (take),
      .addr_a  ((window && !win_d) ? '0 : pos_cnt[AW-1:0]),
      .rdata_a (s1_ref[r]),
      .we_b    (ref_we && (ref_sel == RW'(r))),
      .addr_b  (ref_addr),
      .wdata_b (ref_data)
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_valid <= 1'b0; s1_first <= 1'b0; s1_end <= 1'b0; s1_sample <= '0;
      s2_valid <= 1'b0; s2_first <= 1'b0; s2_end <= 1'b0; s2_prod   <= '0;
      s1_ovf   <= 1'b0; s2_ovf   <= 1'b0;
    end else begin
      s1_valid  <= take;
      s1_first  <= window && !win_d;
      s1_end    <= !window && win_d;
      s1_sample <= sample;
      s1_ovf    <= win_ovf;

      s2_valid <= s1_valid;
      s2_first <= s1_first;
      s2_end   <= s1_end;
      s2_ovf   <= s1_ovf;
      for (int r = 0; r < NR; r++) begin
        // s_out * conj(s_r) = (I*Rre + Q*Rim) + j(Q*Rre - I*Rim)
        s2_prod[r][0] <= PW'(s1_sample.i * s1_ref[r].re) + PW'(s1_sample.q * s1_ref[r].im);
        s2_prod[r][1] <= PW'(s1_sample.q * s1_ref[r].re) - PW'(s1_sample.i * s1_ref[r].im);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc     <= '0;
      acc_n   <= '0;
    end else begin
      if (s2_valid) begin
        for (int r = 0; r < NR; r++) begin
          acc[r].re <= (s2_first ? '0 : acc[r].re) + SCORE_W'($signed(s2_prod[r][0]));
          acc[r].im <= (s2_first ? '0 : acc[r].im) + SCORE_W'($signed(s2_prod[r][1]));
        end
        acc_n <= s2_first ? (AW+1)'(1) : acc_n + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      score_valid <= 1'b0;
      score       <= '0;
      n_samples   <= '0;
      overflow    <= 1'b0;
    end else begin
      score_valid <= s2_end;
      if (s2_end) begin
        score     <= acc;
        n_samples <= acc_n;
        overflow  <= s2_ovf;
      end
    end
  end

endmodule

// Detector of the single-shot receiver: minimum-distance decision.
//
// The demodulator delivers a score vector Lambda (one complex component per
// reference signal). Two reference points lambda0 and lambda1 are the scores
// a noise-free measurement would give with the qubit in state 0 or 1; they
// can be computed, or taken as the mean scores of calibration shots. The
// detector estimates
//     q_hat = 0  if ||Lambda - lambda0|| < ||Lambda - lambda1||,  else 1
// by comparing squared Euclidean distances, exactly and without rounding.
// In the one-tone scheme the score is a point in the complex plane and only
// component 0 is used; in the two-tone scheme the score is a point in C^2
// and both components are used (NR = 2).
//
// Timing: score_valid in cycle t gives the squared distances after edge t,
// and q_hat with q_valid (one cycle) after edge t+1: two cycles of latency.
// The outputs hold until the next decision. Distances are also output for
// calibration and monitoring.
module detector
  import qr_pkg::*;
#(
  parameter int unsigned NR = NREF,
  localparam int unsigned DW = 2 * (SCORE_W + 1) + 2   // sum of up to 4 squares
) (
  input  logic            clk,
  input  logic            rst,
  input  scheme_e         scheme,
  input  score_t [NR-1:0] lambda0,
  input  score_t [NR-1:0] lambda1,
  input  logic            score_valid,
  input  score_t [NR-1:0] score,
  output logic            q_valid,
  output logic            q_hat,
  output logic [DW-1:0]   dist0,
  output logic [DW-1:0]   dist1
);

  localparam int unsigned EW = SCORE_W + 1;   // width of one difference

  logic [DW-1:0] d0_c, d1_c;
  logic          d_valid;

  // squared magnitude of a - b for one real part
  function automatic logic [DW-1:0] sqdiff(input logic signed [SCORE_W-1:0] a,
                                           input logic signed [SCORE_W-1:0] b);
    logic signed [EW-1:0] d;
    d = EW'(a) - EW'(b);
    return DW'(d * d);
  endfunction

  always_comb begin
    d0_c = '0;
    d1_c = '0;
    for (int r = 0; r < NR; r++) begin
      if (r == 0 || scheme == SCHEME_TWO_TONE) begin
        d0_c += sqdiff(score[r].re, lambda0[r].re) + sqdiff(score[r].im, lambda0[r].im);
        d1_c += sqdiff(score[r].re, lambda1[r].re) + sqdiff(score[r].im, lambda1[r].im);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      d_valid <= 1'b0;
      dist0   <= '0;
      dist1   <= '0;
      q_valid <= 1'b0;
      q_hat   <= 1'b0;
    end else begin
      d_valid <= score_valid;
      if (score_valid) begin
        dist0 <= d0_c;
        dist1 <= d1_c;
      end
      q_valid <= d_valid;
      if (d_valid) q_hat <= !(dist0 < dist1);
    end
  end

endmodule

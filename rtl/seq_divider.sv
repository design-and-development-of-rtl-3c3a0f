// Sequential signed divider, one quotient bit per clock.
//
// Computes quotient = dividend / divisor, truncated toward zero, for a signed
// dividend and a positive divisor, by restoring long division on the
// magnitudes: each cycle the partial remainder takes the next dividend bit
// and the divisor is subtracted when it fits. The sign is applied at the end.
// The averager's result writer uses it to turn a sum over N repetitions
// into a fixed-point mean.
//
// Interface and timing: `start` (while not busy) loads the operands;
// `done` pulses NW+1 cycles later with `quotient` valid, and `quotient`
// holds until the next start. A zero divisor gives a quotient of all ones
// in magnitude (the sign still applies); callers avoid it.
module seq_divider #(
  parameter int unsigned NW = 50,   // dividend and quotient width
  parameter int unsigned DW = 18    // divisor width
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 start,
  input  logic signed [NW-1:0] dividend,
  input  logic        [DW-1:0] divisor,
  output logic                 busy,
  output logic                 done,
  output logic signed [NW-1:0] quotient
);

  localparam int unsigned CW = $clog2(NW + 1);

  logic [NW-1:0] q;        // dividend bits shifting out, quotient bits in
  logic [DW-1:0] rem;      // partial remainder, always below the divisor
  logic [DW-1:0] d;
  logic          neg;
  logic [CW-1:0] cnt;
  logic [DW:0]   trial;
  logic [DW:0]   rem_sh;

  assign rem_sh = {rem, q[NW-1]};
  assign trial  = rem_sh - {1'b0, d};

  always_ff @(posedge clk) begin
    if (rst) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      q        <= '0;
      rem      <= '0;
      d        <= '0;
      neg      <= 1'b0;
      cnt      <= '0;
      quotient <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        q    <= dividend[NW-1] ? NW'(-dividend) : dividend;
        neg  <= dividend[NW-1];
        d    <= divisor;
        rem  <= '0;
        cnt  <= CW'(NW);
      end else if (busy) begin
        if (cnt == '0) begin
          busy     <= 1'b0;
          done     <= 1'b1;
          quotient <= neg ? -$signed(q) : $signed(q);
        end else begin
          cnt <= cnt - 1'b1;
          if (!trial[DW]) begin
            rem <= trial[DW-1:0];
            q   <= {q[NW-2:0], 1'b1};
          end else begin
            rem <= rem_sh[DW-1:0];
            q   <= {q[NW-2:0], 1'b0};
          end
        end
      end
    end
  end

endmodule

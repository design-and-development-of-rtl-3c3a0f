// Boot loader of the FPGA wrapper.
//
// After power-up the DSP core must not start until the board reset is
// released and the clock manager reports a locked clock. Both conditions are
// brought into the system clock domain by two-flop synchronisers. When both
// hold, ram_en (the enable of the memory controllers) rises; in the following
// cycle dsp_run rises and dsp_start pulses for one cycle to start the DSP
// algorithm. This ordering follows the document. If reset returns or the
// clock loses lock, both enables drop at once (this design's choice), and the
// sequence repeats once the conditions hold again.
//
// The two synchroniser registers carry power-up values (the FPGA's
// configuration values) as well as being written in their processes: this
// keeps the core stopped from the very first clock even if the board reset is
// never pulsed. Lint tools flag that combination; it is intended here.
//
// Timing: with rst_in low and clk_locked high from cycle 0, ram_en is high
// from the 3rd rising edge and dsp_run/dsp_start from the 4th.
module boot_loader (
  input  logic clk,
  input  logic rst_in,      // board reset, active high, asynchronous
  input  logic clk_locked,  // lock indication of the clock manager, asynchronous
  output logic ram_en,      // enable for the RAM controllers
  output logic dsp_run,     // DSP algorithm may run
  output logic dsp_start    // one-cycle start pulse for the DSP algorithm
);

  // Power-up values hold the core stopped until the synchronisers have seen
  // the real inputs; the first edge then clears the outputs.
  logic [1:0] rst_sync  = 2'b11;  // ones while reset is (or was recently) asserted
  logic [1:0] lock_sync = 2'b00;
  logic       ok;

  always_ff @(posedge clk or posedge rst_in) begin
    if (rst_in) rst_sync <= 2'b11;
    else        rst_sync <= {rst_sync[0], 1'b0};
  end

  always_ff @(posedge clk) begin
    lock_sync <= {lock_sync[0], clk_locked};
  end

  assign ok = !rst_sync[1] && lock_sync[1];

  always_ff @(posedge clk) begin
    if (!ok) begin
      ram_en    <= 1'b0;
      dsp_run   <= 1'b0;
      dsp_start <= 1'b0;
    end else begin
      ram_en    <= 1'b1;
      dsp_run   <= ram_en;
      dsp_start <= ram_en && !dsp_run;
    end
  end

endmodule

// Qubit readout platform: FPGA application top level.
//
// The application is a DSP core inside a wrapper. The wrapper holds the boot
// loader and one ZBT SRAM controller per bank. The DSP core holds two
// processing paths fed by the same samples:
//   * the averager, which sums the two ADC channels (I and Q) over repeated
//     measurement windows and, when done, has the result writer copy the
//     sums into the ZBT banks for the host to read;
//   * the single-shot receiver (demodulator and detector), which scores every
//     window against stored reference signals and decides the qubit state
//     q_hat a few cycles after the window closes.
//
// Start-up: after rst_in is released and clk_locked is high, the boot loader
// enables the memory controllers, then starts the DSP core one cycle later.
// The start also arms the averager for n_reps repetitions; avg_arm re-arms it
// for a new run. avg_mean (read when the run completes) selects whether the
// SRAM receives the sums or the means sum/N. ADC samples and the window
// marker are registered once at the pins; everything runs in one 100 MHz
// clock domain, one sample per cycle.
//
// Single-shot timing: q_valid pulses 6 cycles after the first low cycle of
// meas_window at the pins (1 input register, 3 demodulator, 2 detector):
// 60 ns at 100 MHz, well below the required decision time.
//
// The division into wrapper and DSP core, the averager with its dual-port
// RAM, the ZBT banks, the boot order and the receiver structure follow the
// document. The wiring of both paths in one core, the LED meanings and the
// pin-level ports for the reference store and reference points (the document
// leaves host communication open) are this design's choices.
module qubit_readout_top
  import qr_pkg::*;
#(
  parameter int unsigned AVG_DEPTH = 4096,
  parameter int unsigned REF_DEPTH = 1024,
  parameter int unsigned REP_W     = 18,
  localparam int unsigned AVG_W    = ZBT_DW,
  localparam int unsigned AAW      = $clog2(AVG_DEPTH),
  localparam int unsigned RAW      = $clog2(REF_DEPTH)
) (
  input  logic                            clk,          // 100 MHz system clock
  input  logic                            rst_in,
  input  logic                            clk_locked,
  // ADCs and experiment control
  input  logic signed [ADC_W-1:0]         adc_a,        // I quadrature
  input  logic signed [ADC_W-1:0]         adc_b,        // Q quadrature
  input  logic                            meas_window,
  // averager control and status
  input  logic                            avg_arm,
  input  logic [REP_W-1:0]                n_reps,
  input  logic                            avg_mean,     // store means, not sums
  output logic                            avg_busy,
  output logic                            avg_done,
  output logic [REP_W-1:0]                avg_reps_done,
  output logic                            avg_overflow,
  output logic                            avg_len_mismatch,
  output logic                            dump_done,
  // single-shot receiver configuration
  input  logic                            scheme,       // 0 one tone, 1 two tone
  input  score_t [NREF-1:0]               lambda0,
  input  score_t [NREF-1:0]               lambda1,
  input  logic                            ref_we,
  input  logic                            ref_sel,
  input  logic [RAW-1:0]                  ref_addr,
  input  ref_t                            ref_data,
  // single-shot receiver results
  output logic                            q_valid,
  output logic                            q_hat,
  output score_t [NREF-1:0]               score,
  output logic [RAW:0]                    score_n,
  output logic                            score_overflow,
  // ZBT SRAM, two banks
  output logic [ZBT_BANKS-1:0][ZBT_AW-1:0] zbt_addr,
  output logic [ZBT_BANKS-1:0]             zbt_ce_n,
  output logic [ZBT_BANKS-1:0]             zbt_we_n,
  output logic [ZBT_BANKS-1:0][ZBT_DW-1:0] zbt_dq_o,
  output logic [ZBT_BANKS-1:0]             zbt_dq_oe,
  input  logic [ZBT_BANKS-1:0][ZBT_DW-1:0] zbt_dq_i,
  // board LEDs: 0 running, 1 averaging, 2 results in RAM, 3 last q_hat
  output logic [3:0]                       led
);

  logic ram_en, dsp_run, dsp_start;
  logic mem_rst, core_rst;

  boot_loader u_boot (
    .clk        (clk),
    .rst_in     (rst_in),
    .clk_locked (clk_locked),
    .ram_en     (ram_en),
    .dsp_run    (dsp_run),
    .dsp_start  (dsp_start)
  );

  assign mem_rst  = !ram_en;
  assign core_rst = !dsp_run;

  // ---------------------------------------------------------------- inputs
  iq_t  smp;
  logic win;

  always_ff @(posedge clk) begin
    smp.i <= adc_a;
    smp.q <= adc_b;
    win   <= meas_window;
  end

  // -------------------------------------------------------------- averager
  logic                         avg_start;
  logic                         avg_done_pulse;
  logic [AAW:0]                 avg_len;
  logic                         avg_rd_en;
  logic [AAW-1:0]               avg_rd_addr;
  logic [ZBT_BANKS-1:0][AVG_W-1:0] avg_rd_data;

  assign avg_start = dsp_start || (avg_arm && dsp_run);

  averager #(
    .NCH   (ZBT_BANKS),
    .IN_W  (ADC_W),
    .ACC_W (AVG_W),
    .REP_W (REP_W),
    .DEPTH (AVG_DEPTH)
  ) u_avg (
    .clk          (clk),
    .rst          (core_rst),
    .arm          (avg_start),
    .n_reps       (n_reps),
    .window       (win),
    .sample       ({smp.q, smp.i}),
    .busy         (avg_busy),
    .done         (avg_done),
    .done_pulse   (avg_done_pulse),
    .reps_done    (avg_reps_done),
    .rec_len      (avg_len),
    .overflow     (avg_overflow),
    .len_mismatch (avg_len_mismatch),
    .rd_en        (avg_rd_en),
    .rd_addr      (avg_rd_addr),
    .rd_data      (avg_rd_data)
  );

  zbt_req_t [ZBT_BANKS-1:0] zreq;
  logic     [ZBT_BANKS-1:0] zready;

  result_writer #(
    .NCH   (ZBT_BANKS),
    .ACC_W (AVG_W),
    .REP_W (REP_W),
    .DEPTH (AVG_DEPTH)
  ) u_wr (
    .clk     (clk),
    .rst     (core_rst),
    .clear   (avg_start),
    .start   (avg_done_pulse),
    .mean_mode (avg_mean),
    .rec_len (avg_len),
    .n_reps  (avg_reps_done),
    .rd_en   (avg_rd_en),
    .rd_addr (avg_rd_addr),
    .rd_data (avg_rd_data),
    .req     (zreq),
    .ready   (zready),
    .busy    (),
    .done    (dump_done)
  );

  for (genvar b = 0; b < ZBT_BANKS; b++) begin : g_bank
    zbt_ctrl u_zbt (
      .clk       (clk),
      .rst       (mem_rst),
      .en        (ram_en),
      .req       (zreq[b]),
      .ready     (zready[b]),
      .rsp_valid (),
      .rsp_rdata (),
      .zbt_addr  (zbt_addr[b]),
      .zbt_ce_n  (zbt_ce_n[b]),
      .zbt_we_n  (zbt_we_n[b]),
      .zbt_dq_o  (zbt_dq_o[b]),
      .zbt_dq_oe (zbt_dq_oe[b]),
      .zbt_dq_i  (zbt_dq_i[b])
    );
  end

  // ------------------------------------------------- single-shot receiver
  logic            sc_valid;
  score_t [NREF-1:0] sc;

  demodulator #(
    .NR    (NREF),
    .DEPTH (REF_DEPTH)
  ) u_demod (
    .clk         (clk),
    .rst         (core_rst),
    .window      (win),
    .sample      (smp),
    .ref_we      (ref_we),
    .ref_sel     (ref_sel),
    .ref_addr    (ref_addr),
    .ref_data    (ref_data),
    .score_valid (sc_valid),
    .score       (sc),
    .n_samples   (score_n),
    .overflow    (score_overflow)
  );

  detector #(.NR(NREF)) u_det (
    .clk         (clk),
    .rst         (core_rst),
    .scheme      (scheme_e'(scheme)),
    .lambda0     (lambda0),
    .lambda1     (lambda1),
    .score_valid (sc_valid),
    .score       (sc),
    .q_valid     (q_valid),
    .q_hat       (q_hat),
    .dist0       (),
    .dist1       ()
  );

  assign score = sc;
  assign led   = {q_hat, dump_done, avg_busy, dsp_run};

endmodule

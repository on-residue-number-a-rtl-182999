// rns_converter_system: ramp-type A/D and D/A converters that work directly
// in residue number form, with the residue processing stages around them.
//
// One free-running residue counter (modulo 11, 13, 15 and 16 digit counters
// clocked together) and one ramp generator are shared by every converter.
// The ramp rises one step (1 mV) per count and falls back to 0 V when the
// counter wraps, so the counter always holds, in residue form, the ramp
// voltage in millivolts.  A sweep lasts prod(MODULI) = 34320 clocks.
//
//   A/D channel (NUM_IN of them): an analog comparator watches the input
//   against the ramp; when the input becomes less than the ramp the input
//   register loads the counter, which then is the input voltage in residue
//   form.  A polynomial evaluator follows (pipeline stage 2), correcting for
//   a non-linear ramp; its result leaves the design on adc_data/adc_valid,
//   towards a processor such as an FFT (stage 3), which is not part of it.
//
//   D/A channel (NUM_OUT of them): a residue number arriving on dac_data
//   passes a pre-correction polynomial evaluator and a linear filter (stage
//   4) into the output register.  The equality comparator closes the sample
//   switch in the clock of each sweep in which the counter equals the output
//   register, and the sample-and-hold keeps the ramp voltage of that moment
//   (stage 5).
//
//   Beside them, a residue adder/multiplier I/O unit for a microcomputer bus
//   (moduli 15, 16 by default, a byte per residue number).
//
// The ramp, comparators and sample-and-holds are behavioural models of
// analog parts (voltages as signed microvolts) and only the rest is meant for
// synthesis.  The structure follows the converter block diagram and the
// five-stage pipeline of the design; the channel handshakes, the reset
// values of the coefficient registers (identity: y = x) and the filter size
// are this design's choices.
//
// Coefficients are shifted in while the evaluator concerned is idle: for an
// A/D channel in the clocks right after its adc_valid (the next conversion
// is most of a sweep away), for a D/A channel while dac_ready is high and no
// number is being sent.
//
// Timing: one conversion per channel per sweep.  adc_valid pulses
// CORR_ORDER+3 clocks after the ramp passes the input.  A value accepted on
// dac_data (while dac_ready) reaches the output register after
// CORR_ORDER+TAPS+3 clocks and the output voltage at the next matching count.
module rns_converter_system #(
  parameter int N = rns_pkg::N_MOD,
  parameter logic [N-1:0][7:0] MODULI = rns_pkg::MODULI_15BIT,
  parameter int NUM_IN     = 1,        // A/D input channels
  parameter int NUM_OUT    = 1,        // D/A output channels
  parameter int STEP_UV    = 1000,     // ramp step, microvolts per count
  parameter int CORR_ORDER = 8,        // degree of the correction polynomials
  parameter int TAPS       = 4,        // output linear filter taps
  parameter int IO_N       = 2,        // digits of the I/O unit's numbers
  parameter logic [IO_N-1:0][7:0] IO_MODULI = rns_pkg::MODULI_8BIT,
  localparam int DW    = rns_pkg::DIGIT_W,
  localparam int IO_DW = IO_N * DW
) (
  input  logic                  clk,
  input  logic                  rst,                     // synchronous, active high

  // analog input and output (behavioural, microvolts)
  input  rns_pkg::uvolt_t       vin_uv        [NUM_IN],
  output rns_pkg::uvolt_t       vout_uv       [NUM_OUT],

  // A/D side, towards the processing stage
  output logic [N-1:0][DW-1:0]  adc_data      [NUM_IN],  // corrected conversion
  output logic [NUM_IN-1:0]     adc_valid,               // adc_data new (pulse)
  output logic [NUM_IN-1:0]     adc_overrange,           // input above the ramp's top (pulse)
  input  logic [NUM_IN-1:0]     adc_coef_shift,          // load correction coefficient
  input  logic [N-1:0][DW-1:0]  adc_coef_in,             // coefficient, highest power first

  // D/A side, from the processing stage
  input  logic [N-1:0][DW-1:0]  dac_data      [NUM_OUT], // residue number to output
  input  logic [NUM_OUT-1:0]    dac_valid,               // take dac_data
  output logic [NUM_OUT-1:0]    dac_ready,               // dac_data can be taken
  output logic [NUM_OUT-1:0]    dac_pending,             // output register not yet sampled
  input  logic [NUM_OUT-1:0]    dac_coef_shift,          // load pre-correction coefficient
  input  logic [NUM_OUT-1:0]    dac_filt_shift,          // load filter coefficient
  input  logic [N-1:0][DW-1:0]  dac_coef_in,             // coefficient for either

  // microcomputer bus of the residue adder/multiplier
  input  logic [1:0]            io_addr,
  input  logic                  io_wr,
  input  logic [IO_DW-1:0]      io_wdata,
  output logic [IO_DW-1:0]      io_rdata
);

  typedef logic [N-1:0][DW-1:0] num_t;

  function automatic int unsigned moduli_product();
    int unsigned p = 1;
    for (int i = 0; i < N; i++) p = p * int'(MODULI[i]);
    return p;
  endfunction

  localparam int unsigned STEPS = moduli_product();

  // ---------------------------------------------------------------- shared
  num_t            count;
  logic            at_zero, at_max;
  rns_pkg::uvolt_t ramp_uv;

  residue_counter #(.N(N), .MODULI(MODULI)) u_counter (
    .clk     (clk),
    .rst     (rst),
    .inc     (1'b1),
    .count   (count),
    .at_zero (at_zero),
    .at_max  (at_max)
  );

  ramp_generator #(.STEPS(STEPS), .STEP_UV(STEP_UV)) u_ramp (
    .clk     (clk),
    .rst     (rst),
    .inc     (1'b1),
    .restart (at_max),
    .ramp_uv (ramp_uv)
  );

  // ----------------------------------------------------------- A/D channels
  for (genvar c = 0; c < NUM_IN; c++) begin : g_in
    logic cmp;
    num_t raw;
    logic raw_valid;

    analog_comparator u_cmp (
      .vp_uv (vin_uv[c]),
      .vn_uv (ramp_uv),
      .out   (cmp)
    );

    input_register #(.N(N)) u_inreg (
      .clk       (clk),
      .rst       (rst),
      .count     (count),
      .at_zero   (at_zero),
      .at_max    (at_max),
      .cmp       (cmp),
      .q         (raw),
      .valid     (raw_valid),
      .overrange (adc_overrange[c])
    );

    poly_eval #(.N(N), .MODULI(MODULI), .ORDER(CORR_ORDER)) u_correct (
      .clk        (clk),
      .rst        (rst),
      .coef_shift (adc_coef_shift[c]),
      .coef_in    (adc_coef_in),
      .start      (raw_valid),
      .x          (raw),
      .busy       (),
      .done       (adc_valid[c]),
      .y          (adc_data[c])
    );
  end

  // ----------------------------------------------------------- D/A channels
  for (genvar c = 0; c < NUM_OUT; c++) begin : g_out
    num_t pre, filtered, held;
    logic pre_done, pre_busy, filt_valid, filt_busy, match;

    poly_eval #(.N(N), .MODULI(MODULI), .ORDER(CORR_ORDER)) u_precorrect (
      .clk        (clk),
      .rst        (rst),
      .coef_shift (dac_coef_shift[c]),
      .coef_in    (dac_coef_in),
      .start      (dac_valid[c] & dac_ready[c]),
      .x          (dac_data[c]),
      .busy       (pre_busy),
      .done       (pre_done),
      .y          (pre)
    );

    linear_filter #(.N(N), .MODULI(MODULI), .TAPS(TAPS)) u_filter (
      .clk        (clk),
      .rst        (rst),
      .coef_shift (dac_filt_shift[c]),
      .coef_in    (dac_coef_in),
      .in_valid   (pre_done),
      .x          (pre),
      .busy       (filt_busy),
      .out_valid  (filt_valid),
      .y          (filtered)
    );

    assign dac_ready[c] = ~pre_busy & ~filt_busy;

    output_register #(.N(N)) u_outreg (
      .clk     (clk),
      .rst     (rst),
      .load    (filt_valid),
      .d       (filtered),
      .sampled (match),
      .q       (held),
      .pending (dac_pending[c])
    );

    equality_comparator #(.N(N)) u_eq (
      .a           (held),
      .b           (count),
      .digit_match (),
      .match       (match)
    );

    sample_hold u_sh (
      .clk     (clk),
      .rst     (rst),
      .sample  (match),
      .vin_uv  (ramp_uv),
      .vout_uv (vout_uv[c])
    );
  end

  // ------------------------------------------------ microcomputer I/O unit
  residue_io_unit #(.N(IO_N), .MODULI(IO_MODULI)) u_io (
    .clk   (clk),
    .rst   (rst),
    .addr  (io_addr),
    .wr    (io_wr),
    .wdata (io_wdata),
    .rdata (io_rdata)
  );

endmodule

// phase_meter_top: single-channel digital phase meter for vibration analysis
// of rotating machinery.
//
// Inputs are the digitised vibration signal f(n) from an external 12-bit A-D
// converter (sampled at its own rate, 10.24 to 102.4 kHz) and a SYNC pulse
// from the machine, once per revolution. The frequency multiplier measures
// the revolution period and issues 45 sampling strobes per revolution; at
// each strobe the latest A-D sample is taken (so the signal is sampled a
// second time, now synchronously with the rotation) and passed through the
// 8th-order IIR band-pass/all-pass filter. The filter output feeds the
// peak-to-peak detector and the zero-crossing detector; the sample counter
// supplies each output's index within the revolution, from which the zero-
// crossing detector forms the phase angle in degrees (8 degrees per sample,
// refined to 1 degree by interpolation). Results are reported once per
// revolution and can be read, and the filter coefficients loaded, through
// the system bus interface. Which harmonic (1/2, 1 or 2 times the rotation
// frequency) is measured is set by the filter coefficients.
//
// Clocking: one system clock (32 MHz in the reference design); the frequency
// multiplier runs on every second cycle. The filter needs 324 cycles per
// sample, so the strobe rate must stay below 32 MHz / 324 = 98.7 kHz, which
// covers 45 x 2 kHz. A strobe that arrives while the filter is still busy is
// dropped and sets the overrun flag.
//
// The block structure follows the design description. The coefficient RAM,
// an external static RAM in the original prototype, is included here as an
// on-chip array; the A-D word is read as a fraction of full scale (its 12
// bits become bits 14..3 of the 16-bit filter word, so full scale is +-1.0);
// the result ports and the bus protocol are this design's own choices.
module phase_meter_top
  import phase_meter_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                sync_in,      // once-per-revolution trigger
  input  logic [ADC_W-1:0]    adc_data,     // f(n), two's complement
  input  logic                adc_valid,    // a new A-D sample
  // system bus
  input  logic                bus_cs,
  input  logic                bus_we,
  input  logic [7:0]          bus_addr,
  input  logic [DATA_W-1:0]   bus_wdata,
  output logic [DATA_W-1:0]   bus_rdata,
  output logic                bus_ack,
  // results, also readable over the bus
  output logic [PHASE_W-1:0]  phase_deg,
  output logic                phase_found,
  output logic                phase_rdy,
  output logic [DATA_W:0]     pp_amp,
  output logic                pp_valid,
  // observation: sampling strobes and filter output
  output logic                smp_strobe,   // sampling instant from the multiplier
  output logic                smp_first,    // the strobe issued at SYNC
  output sample_t             filt_y,       // filter output y(n)
  output logic                filt_valid
);

  // latest A-D sample, scaled to the filter's number format
  sample_t f_n;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         f_n <= '0;
    else if (adc_valid) f_n <= {adc_data[ADC_W-1], adc_data, 3'b000};
  end

  // frequency multiplier and sample counter
  logic                period_valid;
  logic [PERIOD_W-1:0] period;
  logic [IDX_W-1:0]    index;

  freq_multiplier u_fmult (
    .clk         (clk),
    .rst_n       (rst_n),
    .sync_in     (sync_in),
    .smp_strobe  (smp_strobe),
    .smp_first   (smp_first),
    .period      (period),
    .period_valid(period_valid)
  );

  sample_counter u_count (
    .clk       (clk),
    .rst_n     (rst_n),
    .smp_strobe(smp_strobe),
    .smp_first (smp_first),
    .index     (index)
  );

  // filter and its RAM
  ram_req_t filter_req, ram_req;
  sample_t  ram_rdata, y;
  logic     filter_busy, y_valid, overrun;

  iir_filter u_filter (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (smp_strobe),
    .x_in     (f_n),
    .ram_req  (filter_req),
    .ram_rdata(ram_rdata),
    .busy     (filter_busy),
    .y_out    (y),
    .y_valid  (y_valid),
    .overrun  (overrun)
  );

  coef_ram u_ram (
    .clk  (clk),
    .req  (ram_req),
    .rdata(ram_rdata)
  );

  // detectors
  logic zc_busy;

  peak_detector u_pp (
    .clk     (clk),
    .rst_n   (rst_n),
    .y_valid (y_valid),
    .y       (y),
    .index   (index),
    .pp_out  (pp_amp),
    .pp_valid(pp_valid),
    .pos_peak(),
    .neg_peak()
  );

  zero_cross_detector u_zc (
    .clk        (clk),
    .rst_n      (rst_n),
    .y_valid    (y_valid),
    .y          (y),
    .index      (index),
    .busy       (zc_busy),
    .phase_out  (phase_deg),
    .phase_found(phase_found),
    .phase_rdy  (phase_rdy),
    .crossing   ()
  );

  bus_interface u_bus (
    .clk         (clk),
    .rst_n       (rst_n),
    .bus_cs      (bus_cs),
    .bus_we      (bus_we),
    .bus_addr    (bus_addr),
    .bus_wdata   (bus_wdata),
    .bus_rdata   (bus_rdata),
    .bus_ack     (bus_ack),
    .filter_busy (filter_busy),
    .filter_req  (filter_req),
    .ram_req     (ram_req),
    .ram_rdata   (ram_rdata),
    .phase_out   (phase_deg),
    .phase_found (phase_found),
    .phase_rdy   (phase_rdy),
    .pp_out      (pp_amp),
    .pp_valid    (pp_valid),
    .period      (period),
    .period_valid(period_valid),
    .index       (index),
    .overrun     (overrun)
  );

  assign filt_y     = y;
  assign filt_valid = y_valid;

  // the zero-crossing divider is idle whenever a new filter output arrives
  a_zc_free: assert property (@(posedge clk) disable iff (!rst_n) y_valid |-> !zc_busy);

endmodule

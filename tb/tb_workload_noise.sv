// tb_workload_noise: phase error of the phase meter when the vibration
// signal carries broadband noise.
//
// The signal is a sine, 0.7 of full scale, at the rotation frequency with
// its positive-going zero crossing TH degrees after SYNC, plus uniformly
// distributed white noise. The noise standard deviation is 0.212 times the
// sine amplitude, the level at which the reference design reaches a phase
// error variance of one square degree. The machine turns at 1000 rev/s with
// the converter at 102.4 kHz (32 MHz clock). The filter is loaded over the
// bus with four band-pass resonators centred on 2*pi/45 (pole radius 0.97,
// this bench's choice: its bandwidth differs from the reference filter, so
// the variance is only required to be of the same order).
// After 9 revolutions of settling, the phase of 150 revolutions is collected.
// Checks: every revolution reports a crossing, the mean error against
// TH - (filter phase) + (half a converter period) is within 1.5 degrees,
// and the error standard deviation is below 2.5 degrees.
module tb_workload_noise;
  import phase_meter_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sync_in, adc_valid;
  logic [ADC_W-1:0] adc_data;
  logic bus_cs, bus_we, bus_ack;
  logic [7:0] bus_addr;
  logic [15:0] bus_wdata, bus_rdata;
  logic [PHASE_W-1:0] phase_deg;
  logic phase_found, phase_rdy, pp_valid, smp_strobe, smp_first, filt_valid;
  logic [DATA_W:0] pp_amp;
  sample_t filt_y;

  phase_meter_top dut (.*);

  always #5 clk = ~clk;

  localparam real PI = 3.141592653589793;
  localparam real AMP = 0.7, TH = 97.3, R = 0.97;
  localparam real SIGMA = 0.212 * AMP;
  localparam longint PERIOD = 32000;
  localparam int  ADC_DIV = 312, SETTLE = 9, MEASURE = 150;
  int checks = 0, failures = 0, n = 0;
  real sum = 0.0, sum2 = 0.0;

  initial begin
    #2_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cb0, cb2, ca1, ca2;
  task automatic bus_write(input logic [7:0] addr, input logic [15:0] wd);
    @(negedge clk);
    bus_cs = 1'b1; bus_we = 1'b1; bus_addr = addr; bus_wdata = wd;
    do @(negedge clk); while (!bus_ack);
    bus_cs = 1'b0;
  endtask

  function automatic real filter_phase(input real w);
    real nr, ni, dr, di;
    nr = (cb0 + cb2 * $cos(2*w)) / 16384.0;  ni = -cb2 * $sin(2*w) / 16384.0;
    dr = 1.0 - (ca1 * $cos(w) + ca2 * $cos(2*w)) / 16384.0;
    di = (ca1 * $sin(w) + ca2 * $sin(2*w)) / 16384.0;
    return 4.0 * ($atan2(ni, nr) - $atan2(di, dr)) * 180.0 / PI;
  endfunction

  longint cyc = 0;
  int rev = 0, adc_cnt = 0;
  bit running = 0;

  always @(negedge clk) begin
    if (running) begin
      real v, u;
      int code;
      cyc++;
      if (cyc % PERIOD == 0) rev++;
      sync_in = (cyc % PERIOD) < 100;
      adc_valid = 1'b0;
      if (++adc_cnt >= ADC_DIV) begin
        adc_cnt = 0;
        u = (real'($urandom) / 4294967296.0 - 0.5) * 2.0 * SIGMA * $sqrt(3.0);
        v = AMP * $sin((360.0 * real'(cyc % PERIOD) / PERIOD - TH) * PI / 180.0) + u;
        code = $rtoi(v * 2047.0 + (v >= 0 ? 0.5 : -0.5));
        if (code > 2047) code = 2047;
        if (code < -2048) code = -2048;
        adc_data = ADC_W'(code);
        adc_valid = 1'b1;
      end
    end
  end

  always @(negedge clk) begin
    if (phase_rdy && running && rev > SETTLE && n < MEASURE) begin
      real expect_ph, d;
      expect_ph = TH - filter_phase(2.0 * PI / 45.0) + 0.5 * ADC_DIV * 360.0 / PERIOD;
      d = real'(phase_deg) - expect_ph;
      while (d > 180.0) d -= 360.0;
      while (d < -180.0) d += 360.0;
      checks++;
      if (!phase_found) begin failures++; $display("revolution %0d: no crossing", rev); end
      sum += d; sum2 += d * d; n++;
    end
  end

  initial begin
    real w0, mean, sd;
    void'($urandom(7));
    sync_in = 1'b0; adc_valid = 1'b0; adc_data = '0;
    bus_cs = 1'b0; bus_we = 1'b0; bus_addr = '0; bus_wdata = '0;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    w0  = 2.0 * PI / 45.0;
    cb0 = $rtoi((1.0 - R*R) / 2.0 * 16384.0);
    cb2 = -cb0;
    ca1 = $rtoi(2.0 * R * $cos(w0) * 16384.0);
    ca2 = $rtoi(-R * R * 16384.0);
    for (int j = 0; j < N_SECTIONS; j++) begin
      bus_write(8'(8*j + 0), 16'(cb0)); bus_write(8'(8*j + 1), 16'(0));
      bus_write(8'(8*j + 2), 16'(cb2)); bus_write(8'(8*j + 3), 16'(ca1));
      bus_write(8'(8*j + 4), 16'(ca2)); bus_write(8'(8*j + 5), 16'(0));
      bus_write(8'(8*j + 6), 16'(0));
    end
    running = 1;
    wait (n == MEASURE);
    mean = sum / n;
    sd = $sqrt(sum2 / n - mean * mean);
    $display("phase error over %0d revolutions: mean %f deg, std dev %f deg, variance %f deg^2",
             n, mean, sd, sd * sd);
    checks += 2;
    if (mean > 1.5 || mean < -1.5) begin failures++; $display("mean error too large"); end
    if (sd > 2.5) begin failures++; $display("error spread too large"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_workload_rates: the phase meter across the A-D sampling rates and
// rotation speeds it is specified for.
//
// The vibration signal is a single sine, 0.8 of full scale, at the rotation
// frequency, with its positive-going zero crossing TH degrees after SYNC. The
// filter is loaded over the bus with four band-pass resonators centred on
// 2*pi/45. The machine then runs at these (speed, converter rate) pairs:
//   100 rev/s with the converter at 102.4, 51.2, 25.6 and 10.24 kHz,
//   1000 rev/s at 102.4 kHz and 10 rev/s at 102.4 kHz.
// After each change the filter is given 9 revolutions to settle; the phase
// reported for each following revolution must lie within 2 degrees of
// TH - (filter phase at 2*pi/45) + (half a converter period, in degrees).
// Cycle counts assume a 32 MHz clock.
module tb_workload_rates;
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
  localparam real AMP = 0.8, TH = 211.7, R = 0.97;
  localparam int  SETTLE = 9, MEASURE = 4, NCFG = 6;
  // (revolution period in cycles, converter period in cycles)
  int cfg_period [NCFG] = '{320000, 320000, 320000, 320000, 32000, 3200000};
  int cfg_adc    [NCFG] = '{   312,    625,   1250,   3125,   312,     312};
  int checks = 0, failures = 0, measured = 0;

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

  // filter phase at w (degrees), from the quantised coefficients
  function automatic real filter_phase(input real w);
    real nr, ni, dr, di;
    nr = (cb0 + cb2 * $cos(2*w)) / 16384.0;  ni = -cb2 * $sin(2*w) / 16384.0;
    dr = 1.0 - (ca1 * $cos(w) + ca2 * $cos(2*w)) / 16384.0;
    di = (ca1 * $sin(w) + ca2 * $sin(2*w)) / 16384.0;
    return 4.0 * ($atan2(ni, nr) - $atan2(di, dr)) * 180.0 / PI;
  endfunction

  int cfg = 0, rev_in_cfg = 0;
  longint cyc = 0, rev_start = 0;
  int adc_cnt = 0;
  bit running = 0, done_all = 0;

  always @(negedge clk) begin
    if (running) begin
      real v;
      cyc++;
      if (cyc - rev_start >= cfg_period[cfg]) begin
        rev_start = cyc;
        rev_in_cfg++;
        if (rev_in_cfg > SETTLE + MEASURE + 1) begin
          rev_in_cfg = 1;
          if (cfg == NCFG - 1) done_all = 1; else cfg++;
        end
      end
      sync_in = (cyc - rev_start) < 100;
      adc_valid = 1'b0;
      if (++adc_cnt >= cfg_adc[cfg]) begin
        adc_cnt = 0;
        v = AMP * $sin((360.0 * real'(cyc - rev_start) / real'(cfg_period[cfg]) - TH) * PI / 180.0);
        adc_data = ADC_W'($rtoi(v * 2047.0 + (v >= 0 ? 0.5 : -0.5)));
        adc_valid = 1'b1;
      end
    end
  end

  // the report made at the start of revolution rev_in_cfg covers the one before
  always @(negedge clk) begin
    if (phase_rdy && running && rev_in_cfg > SETTLE + 1) begin
      real expect_ph, d;
      expect_ph = TH - filter_phase(2.0 * PI / 45.0)
                  + 0.5 * real'(cfg_adc[cfg]) / real'(cfg_period[cfg]) * 360.0;
      while (expect_ph >= 360.0) expect_ph -= 360.0;
      while (expect_ph < 0.0) expect_ph += 360.0;
      d = real'(phase_deg) - expect_ph;
      if (d > 180.0) d -= 360.0;
      if (d < -180.0) d += 360.0;
      checks++;
      measured++;
      if (!phase_found || d > 2.0 || d < -2.0) begin
        failures++;
        $display("config %0d: phase %0d, expected %f", cfg, phase_deg, expect_ph);
      end
    end
  end

  initial begin
    real w0;
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
    rev_start = -longint'(cfg_period[0]);
    running = 1;
    wait (done_all);
    checks++;
    if (measured < NCFG * (MEASURE - 1)) begin failures++; $display("only %0d results", measured); end
    $display("results checked: %0d", measured);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

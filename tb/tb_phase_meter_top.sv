// tb_phase_meter_top: end-to-end test of the phase meter at its default
// parameters (32 MHz clock assumed: one revolution at 1000 rev/s is 32000
// cycles).
//
// The testbench models the machine and the A-D converter: the shaft angle
// runs from 0 to 360 degrees between SYNC pulses, and the vibration signal
//     f = A1 sin(angle - TH1) + A2 sin(2 angle - TH2) [+ A3 sin(angle2 / 2 - TH3)]
// (angle2 runs over two revolutions; the half-frequency term is present only
// in segment F)
// is converted to 12 bits at the converter's own rate. Over the system bus
// it loads four band-pass resonator sections (centre 2*pi/45, i.e. the
// rotation frequency) and clears the states, and it later reloads them
// centred on 4*pi/45 and on pi/45 to measure the second harmonic and the
// half-frequency component instead. It runs these
// segments:
//   A  1000 rev/s, converter at 102.56 kHz, fundamental
//   B  250 rev/s, converter at 10.24 kHz (the multiplier's rate is above the
//      converter's, so converter samples are taken more than once)
//   C  speeding up from 1000 rev/s (revolutions with fewer than 45 samples)
//   D  coefficients reloaded over the bus while running: second harmonic
//   F  coefficients reloaded again: half the rotation frequency (a crossing
//      in every second revolution only)
//   E  2500 rev/s, beyond the filter's throughput (overrun flag)
// For each steady revolution the reported phase is compared with the phase
// expected from TH1 (or TH2/2), the filter's own phase at the centre
// frequency (computed from the loaded coefficients), and the mean delay of
// half a converter period caused by taking the latest converter sample,
// within +-3 degrees plus the shift that the other components leaking
// through the filter can cause; the peak-to-peak value is compared with
// 2 A |H| within 5 % plus the other harmonic's leakage. Results read over the
// bus must equal the result ports. It counts how often each mechanism
// occurred and fails any that never did.
module tb_phase_meter_top;
  import phase_meter_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sync_in, adc_valid;
  logic [ADC_W-1:0] adc_data;
  logic bus_cs, bus_we, bus_ack;
  logic [7:0] bus_addr;
  logic [15:0] bus_wdata, bus_rdata;
  logic [PHASE_W-1:0] phase_deg;
  logic phase_found, phase_rdy, pp_valid;
  logic [DATA_W:0] pp_amp;
  logic smp_strobe, smp_first, filt_valid;
  sample_t filt_y;

  phase_meter_top dut (.*);

  always #5 clk = ~clk;

  localparam real PI  = 3.141592653589793;
  localparam real A1  = 0.45, A2 = 0.2, A3 = 0.3, TH1 = 123.4, TH2 = 250.0, TH3 = 71.0;
  int checks = 0, failures = 0;

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- machine and converter ----------------
  // hx2: twice the measured harmonic (1 = half, 2 = rotation frequency, 4 = second)
  typedef struct { int revs; int period; int adc_div; int hx2; int accel; } seg_t;
  localparam int NSEG = 6, SEG_E = 5;
  seg_t segs [NSEG] = '{
    '{16, 32000,  312, 2, 0},     // A
    '{14, 128000, 3125, 2, 0},    // B
    '{ 6, 32000,  312, 2, 1},     // C: each revolution 700 cycles shorter
    '{18, 32000,  312, 4, 0},     // D
    '{26, 32000,  312, 1, 0},     // F
    '{ 4, 12800,  312, 1, 0}      // E
  };

  longint cyc = 0;
  longint rev_start = 0;
  int     rev = -1, seg = 0, rev_in_seg = 0, period = 0, prev_period = 0, adc_cnt = 0;
  bit     running = 0, done_all = 0;
  // per revolution: period, segment, revolutions since the filter was (re)loaded
  int     rev_period [int], rev_prev_period [int], rev_seg [int], rev_since_load [int], rev_nr_in_seg [int];
  int     load_rev = 0;     // revolution at which the current coefficients were complete

  always @(negedge clk) begin
    if (running) begin
      real ang, v;
      cyc++;
      if (cyc - rev_start >= period) begin
        // next revolution
        rev_start = cyc;
        rev++;
        if (rev_in_seg >= segs[seg].revs) begin
          rev_in_seg = 0;
          if (seg == NSEG - 1) done_all = 1; else seg++;
        end
        prev_period = period;
        period = segs[seg].period - (segs[seg].accel ? 700 * rev_in_seg : 0);
        rev_in_seg++;
        rev_period[rev] = period;
        rev_prev_period[rev] = prev_period;
        rev_seg[rev] = seg;
        rev_since_load[rev] = rev - load_rev;
        rev_nr_in_seg[rev] = rev_in_seg;
      end
      sync_in = (cyc - rev_start) < 100;
      ang = 360.0 * real'(cyc - rev_start) / real'(period);
      adc_valid = 1'b0;
      if (++adc_cnt >= segs[seg].adc_div) begin
        adc_cnt = 0;
        v = A1 * $sin((ang - TH1) * PI / 180.0) + A2 * $sin((2.0 * ang - TH2) * PI / 180.0);
        if (segs[seg].hx2 == 1)
          v += A3 * $sin(((ang + 360.0 * (rev % 2)) / 2.0 - TH3) * PI / 180.0);
        if (v > 1.0) v = 1.0;          // the converter clips at full scale
        if (v < -1.0) v = -1.0;
        adc_data = ADC_W'($rtoi(v * 2047.0 + (v >= 0 ? 0.5 : -0.5)));
        adc_valid = 1'b1;
      end
    end
  end

  // ---------------- coefficients ----------------
  localparam real R = 0.97;
  int cb0, cb2, ca1, ca2;   // one resonator, all four sections equal

  function automatic void design_coefs(input int hx2);
    real w0;
    w0 = PI * hx2 / 45.0;
    cb0 = $rtoi((1.0 - R*R) / 2.0 * 16384.0);
    cb2 = -cb0;
    ca1 = $rtoi(2.0 * R * $cos(w0) * 16384.0);
    ca2 = $rtoi(-R * R * 16384.0);
  endfunction

  // response of the four quantised sections at w: y = B x + a1 y z^-1 + a2 y z^-2
  function automatic void response(input real w, output real mag, output real ph_deg);
    real nr, ni, dr, di, m, p;
    nr = (cb0 + cb2 * $cos(2*w)) / 16384.0;  ni = -cb2 * $sin(2*w) / 16384.0;
    dr = 1.0 - (ca1 * $cos(w) + ca2 * $cos(2*w)) / 16384.0;
    di = (ca1 * $sin(w) + ca2 * $sin(2*w)) / 16384.0;
    m  = $sqrt((nr*nr + ni*ni) / (dr*dr + di*di));
    p  = $atan2(ni, nr) - $atan2(di, dr);
    mag = m ** 4;
    ph_deg = 4.0 * p * 180.0 / PI;
  endfunction

  // ---------------- bus ----------------
  int bus_waits = 0;
  task automatic bus_access(input logic we, input logic [7:0] addr, input logic [15:0] wd,
                            output logic [15:0] rd);
    int c;
    @(negedge clk);
    bus_cs = 1'b1; bus_we = we; bus_addr = addr; bus_wdata = wd;
    c = 0;
    do begin @(negedge clk); c++; end while (!bus_ack);
    rd = bus_rdata;
    bus_cs = 1'b0;
    if (c > 1) bus_waits++;
  endtask

  task automatic load_filter(input int hx2);
    logic [15:0] rd;
    int cb0, cb2, ca1, ca2;   // local: the checker also designs coefficients
    real w0;
    w0  = PI * hx2 / 45.0;
    cb0 = $rtoi((1.0 - R*R) / 2.0 * 16384.0);
    cb2 = -cb0;
    ca1 = $rtoi(2.0 * R * $cos(w0) * 16384.0);
    ca2 = $rtoi(-R * R * 16384.0);
    for (int j = 0; j < N_SECTIONS; j++) begin
      bus_access(1'b1, 8'(8*j + 0), 16'(cb0), rd);
      bus_access(1'b1, 8'(8*j + 1), 16'(0), rd);
      bus_access(1'b1, 8'(8*j + 2), 16'(cb2), rd);
      bus_access(1'b1, 8'(8*j + 3), 16'(ca1), rd);
      bus_access(1'b1, 8'(8*j + 4), 16'(ca2), rd);
      bus_access(1'b1, 8'(8*j + 5), 16'(0), rd);
      bus_access(1'b1, 8'(8*j + 6), 16'(0), rd);
    end
    // read one back
    bus_access(1'b0, 8'(8*3 + 3), 16'h0, rd);
    checks++;
    if (rd !== 16'(ca1)) begin failures++; $display("coefficient read back %h", rd); end
  endtask

  // ---------------- result checking ----------------
  int n_phase_checked = 0, n_pp_checked = 0, n_found = 0, n_reports = 0;
  int n_short_rev = 0, n_reused = 0, n_overrun = 0, n_harm2 = 0, n_half = 0, n_half_checked = 0, n_strobes = 0, n_outputs = 0;
  int strobes_this_rev = 0, reused_this_rev = 0;
  bit fresh = 0;

  always @(posedge clk) begin
    if (smp_strobe) begin
      n_strobes++;
      if (smp_first) begin
        if (strobes_this_rev > 0 && strobes_this_rev < N_MULT) n_short_rev++;
        strobes_this_rev = 0;
      end
      strobes_this_rev++;
      if (!fresh) n_reused++;     // no new converter sample since the last strobe
      fresh = 0;
    end
    if (adc_valid) fresh = 1;
    if (filt_valid) n_outputs++;
  end

  // a report refers to the revolution that just ended
  always @(negedge clk) begin
    if (phase_rdy && rev >= 1) begin
      int r, s, hx2;
      real h, mag, ph, m2, p2, c, expect_ph, delay, d, am, pp_exp, pp_tol, eps, tol;
      bit expect_found;
      r = rev - 1;
      s = rev_seg[r];
      hx2 = segs[s].hx2;
      h = hx2 / 2.0;
      n_reports++;
      if (phase_found) n_found++;
      if (hx2 == 4 && phase_found) n_harm2++;
      if (hx2 == 1 && phase_found) n_half++;
      design_coefs(hx2);
      response(PI * hx2 / 45.0, mag, ph);
      // leakage of the other components present
      pp_tol = 0.0;
      if (hx2 != 2) begin response(2.0 * PI / 45.0, m2, p2); pp_tol += 2.0 * A1 * m2 * 16384.0; end
      if (hx2 != 4) begin response(4.0 * PI / 45.0, m2, p2); pp_tol += 2.0 * A2 * m2 * 16384.0; end
      if (hx2 != 1 && s == 4) begin response(PI / 45.0, m2, p2); pp_tol += 2.0 * A3 * m2 * 16384.0; end
      am = (hx2 == 2) ? A1 : (hx2 == 4) ? A2 : A3;
      // other components leaking through shift the crossing by up to asin(eps)
      // of the measured component's cycle
      eps = pp_tol / (2.0 * am * mag * 16384.0);
      tol = 3.0 + ((eps < 1.0) ? $asin(eps) : PI / 2.0) * 180.0 / PI / h;
      delay = 0.5 * segs[s].adc_div / real'(rev_period[r]) * 360.0;
      // output crossing where h * angle2 = TH - ph (mod 360), angle2 in rotation degrees
      c = (((hx2 == 2) ? TH1 : (hx2 == 4) ? TH2 : TH3) - ph) / h + delay;
      expect_found = 1'b1;
      if (hx2 == 1) begin
        while (c >= 720.0) c -= 720.0;
        while (c < 0.0) c += 720.0;
        expect_found = (r % 2) == ((c >= 360.0) ? 1 : 0);
        expect_ph = (c >= 360.0) ? c - 360.0 : c;
      end else begin
        expect_ph = c;
        while (expect_ph >= 360.0 / h) expect_ph -= 360.0 / h;
        while (expect_ph < 0.0) expect_ph += 360.0 / h;
      end
      if (s != SEG_E && !segs[s].accel && rev_period[r] == rev_prev_period[r]
          && rev_since_load[r] >= 9 && rev_nr_in_seg[r] >= 9) begin
        if (expect_found) begin
          d = real'(phase_deg) - expect_ph;
          if (d > 180.0) d -= 360.0;
          if (d < -180.0) d += 360.0;
          checks += 2;
          n_phase_checked++;
          if (hx2 == 1) n_half_checked++;
          if (!phase_found || d > tol || d < -tol) begin
            failures++;
            $display("rev %0d seg %0d: phase %0d (found %0d), expected %f +- %f", r, s, phase_deg,
                     phase_found, expect_ph, tol);
          end
        end
        // peak-to-peak: 2 A |H| +- 5 %, plus the other components leaking through
        pp_exp = 2.0 * am * mag * 16384.0;
        pp_tol += 0.05 * pp_exp;
        n_pp_checked++;
        if (real'(pp_amp) < pp_exp - pp_tol || real'(pp_amp) > pp_exp + pp_tol) begin
          failures++;
          $display("rev %0d: pp %0d, expected %f +- %f", r, pp_amp, pp_exp, pp_tol);
        end
      end
    end
  end

  // ---------------- main ----------------
  initial begin
    logic [15:0] rd;
    int last_rev, loaded_hx2;
    sync_in = 1'b0; adc_valid = 1'b0; adc_data = '0;
    bus_cs = 1'b0; bus_we = 1'b0; bus_addr = '0; bus_wdata = '0;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    load_filter(2);
    loaded_hx2 = 2;
    load_rev = 0;
    period = segs[0].period;
    rev_start = -longint'(period);   // first SYNC at once
    running = 1;
    last_rev = -1;
    while (!done_all) begin
      @(negedge clk);
      if (rev != last_rev) begin
        last_rev = rev;
        // switch the measured harmonic over the bus, while running
        if (segs[seg].hx2 != loaded_hx2) begin
          loaded_hx2 = segs[seg].hx2;
          load_filter(loaded_hx2);
          load_rev = rev + 1;
        end
      end
      if (phase_rdy) begin
        // the same result over the bus
        repeat (2) @(negedge clk);
        bus_access(1'b0, REG_PHASE, 16'h0, rd);
        checks++;
        if (rd !== {phase_found, 6'b0, phase_deg}) begin failures++; $display("bus PHASE %h", rd); end
        bus_access(1'b0, REG_PP_LO, 16'h0, rd);
        checks++;
        if (rd !== pp_amp[15:0]) begin failures++; $display("bus PP %h", rd); end
        bus_access(1'b0, REG_STATUS, 16'h0, rd);
        if (rd[2]) n_overrun++;
        checks++;
        if (!rd[1]) begin failures++; $display("period not valid"); end
        bus_access(1'b0, REG_PERIOD_LO, 16'h0, rd);
        checks++;
        if (rev_period[rev - 1] % 2 == 0 && int'(rd) != rev_period[rev - 1] / 2 && rev >= 2) begin
          failures++; $display("bus PERIOD %0d, expected %0d", rd, rev_period[rev - 1] / 2);
        end
      end
    end
    $display("strobes %0d, filter outputs %0d, reports %0d (crossing found %0d)",
             n_strobes, n_outputs, n_reports, n_found);
    $display("phase checked %0d, pp checked %0d, second-harmonic results %0d, half-frequency results %0d (checked %0d)",
             n_phase_checked, n_pp_checked, n_harm2, n_half, n_half_checked);
    $display("short revolutions %0d, converter samples taken twice %0d, bus waits %0d, overruns %0d",
             n_short_rev, n_reused, bus_waits, n_overrun);
    checks += 9;
    if (n_phase_checked < 20) begin failures++; $display("too few phase checks"); end
    if (n_pp_checked < 20) failures++;
    if (n_harm2 == 0) failures++;
    if (n_half_checked == 0) begin failures++; $display("no half-frequency result checked"); end
    if (n_short_rev == 0) failures++;
    if (n_reused == 0) failures++;
    if (bus_waits == 0) failures++;
    if (n_overrun == 0) failures++;
    if (n_outputs == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

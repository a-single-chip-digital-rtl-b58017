// tb_freq_multiplier: self-checking test of the frequency multiplier.
// Drives SYNC with a sequence of revolution periods (steady, faster, slower,
// and one too slow for a narrow period counter) and checks, for every
// revolution: the measured period, that no strobes come before a period is
// known, the number of strobes (45 when the speed is steady, fewer when the
// machine speeds up, never more than 45), and the time of every strobe,
// which must be 2*ceil(k*T/45) clock cycles after the SYNC strobe, T being
// the previous period in 16 MHz ticks (two clock cycles per tick).
module tb_freq_multiplier;
  import phase_meter_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sync_in;
  logic smp_strobe, smp_first, period_valid;
  logic [PERIOD_W-1:0] period;
  logic smp_strobe_s, smp_first_s, period_valid_s;
  logic [9:0] period_s;
  int checks = 0, failures = 0;

  freq_multiplier dut (.clk, .rst_n, .sync_in, .smp_strobe, .smp_first, .period, .period_valid);
  // narrow period counter, to see the saturation rule
  freq_multiplier #(.PW(10)) dut_s (.clk, .rst_n, .sync_in, .smp_strobe(smp_strobe_s),
    .smp_first(smp_first_s), .period(period_s), .period_valid(period_valid_s));

  always #5 clk = ~clk;

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // strobe bookkeeping
  longint cyc = 0, first_cyc = -1;
  int     k = 0;              // strobes since the last SYNC strobe
  int     t_prev = 0;         // period (ticks) used for the current revolution
  int     strobes_in_rev [$];
  int     timing_errors = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && smp_strobe) begin
      if (smp_first) begin
        if (first_cyc >= 0) strobes_in_rev.push_back(k);
        first_cyc = cyc; k = 1;
        t_prev = int'(period);
      end else begin
        longint expect_c;
        expect_c = first_cyc + 2 * ((longint'(k) * t_prev + N_MULT - 1) / N_MULT);
        if (cyc != expect_c) begin
          timing_errors++;
          $display("strobe %0d at %0d, expected %0d (T=%0d)", k, cyc - first_cyc,
                   expect_c - first_cyc, t_prev);
        end
        k++;
      end
    end
  end

  int periods [] = '{1800, 1800, 1800, 1300, 2400, 2400, 1200, 1200, 4000, 1000, 1000};

  initial begin
    sync_in = 1'b0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (10) @(negedge clk);
    // first SYNC: no period known yet
    sync_in = 1'b1; repeat (6) @(negedge clk); sync_in = 1'b0;
    foreach (periods[i]) begin
      repeat (2 * periods[i] - 6) @(negedge clk);
      checks++;
      if (i == 0 && first_cyc != -1) begin failures++; $display("strobe before a period was known"); end
      sync_in = 1'b1; repeat (6) @(negedge clk); sync_in = 1'b0;
      checks += 2;
      if (int'(period) != periods[i]) begin
        failures++; $display("period %0d, expected %0d", period, periods[i]);
      end
      if (period_valid != 1'b1) begin failures++; $display("period not valid"); end
      checks++;
      if (period_valid_s != (periods[i] <= 1023)) begin
        failures++; $display("narrow counter valid=%0d for period %0d", period_valid_s, periods[i]);
      end
      if (periods[i] <= 1023) begin
        checks++;
        if (int'(period_s) != periods[i]) begin failures++; $display("narrow period %0d", period_s); end
      end
    end
    repeat (100) @(negedge clk);
    // revolution i (i >= 1 in periods) used period i-1; it ended after periods[i] ticks
    checks++;
    if (strobes_in_rev.size() != periods.size() - 1) begin
      failures++; $display("%0d revolutions seen", strobes_in_rev.size());
    end
    foreach (strobes_in_rev[r]) begin
      int tp, tn, expect_n;
      tp = periods[r];        // period used
      tn = periods[r + 1];    // actual length
      // strobes with ceil(k*tp/45) < tn, k = 0..44
      expect_n = 0;
      for (int kk = 0; kk < N_MULT; kk++) if ((kk * tp + N_MULT - 1) / N_MULT < tn) expect_n++;
      checks++;
      if (strobes_in_rev[r] != expect_n) begin
        failures++;
        $display("revolution %0d: %0d strobes, expected %0d", r, strobes_in_rev[r], expect_n);
      end
    end
    checks++;
    if (timing_errors != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_zero_cross_detector: self-checking test of the zero-crossing detector
// and its successive-subtraction interpolation. Feeds sine revolutions of
// 45 samples with known phase (including a crossing between the last sample
// of one revolution and the first of the next, and one exactly on a sample),
// a revolution with no crossing, and random data. Each report is checked
// against the integer quotient floor(8|y(n-1)| / (y(n)+|y(n-1)|)) worked out
// by the testbench, against the sine's true phase (within 1 degree, since
// interpolation truncates), and for its timing: at most 10 cycles after the
// output of sample index 0.
module tb_zero_cross_detector;
  import phase_meter_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic y_valid, busy, phase_found, phase_rdy, crossing;
  sample_t y;
  logic [IDX_W-1:0] index;
  logic [PHASE_W-1:0] phase_out;
  int checks = 0, failures = 0;

  zero_cross_detector dut (.clk, .rst_n, .y_valid, .y, .index, .busy, .phase_out,
                           .phase_found, .phase_rdy, .crossing);

  always #5 clk = ~clk;

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int prev_v = 0, prev_idx = 0, have_prev = 0;
  int kept = -1;            // expected phase of the current revolution, -1 none

  // feeds one output; exp_true >= 0 also checks the report against a true phase
  task automatic feed(input int v, input int idx, input real true_deg);
    int wait_c;
    // expected crossing by the rule
    if (have_prev && v >= 0 && prev_v < 0) begin
      int k, ph;
      k  = (8 * (-prev_v)) / (v - prev_v);
      ph = (8 * prev_idx + k) % 360;
      if (kept < 0) kept = ph;
    end
    @(negedge clk);
    y = sample_t'(v); index = IDX_W'(idx); y_valid = 1'b1;
    @(negedge clk);
    y_valid = 1'b0;
    if (idx == 0) begin
      wait_c = 1;
      while (!phase_rdy && wait_c < 12) begin @(negedge clk); wait_c++; end
      checks += 3;
      if (wait_c > 10) begin failures++; $display("report after %0d cycles", wait_c); end
      if (phase_found != (kept >= 0)) begin failures++; $display("found = %0d", phase_found); end
      if (kept >= 0 && int'(phase_out) != kept) begin
        failures++; $display("phase %0d, expected %0d", phase_out, kept);
      end
      if (true_deg >= 0.0) begin
        real d;
        d = real'(phase_out) - true_deg;
        if (d > 180.0) d -= 360.0;
        if (d < -180.0) d += 360.0;
        checks++;
        if (d > 0.01 || d < -1.01) begin
          failures++; $display("phase %0d, true %f", phase_out, true_deg);
        end
      end
      kept = -1;
      // the crossing just handled belonged to the old revolution
    end else begin
      repeat (11) begin
        @(negedge clk);
        checks++;
        if (phase_rdy) begin failures++; $display("report at index %0d", idx); end
      end
    end
    prev_v = v; prev_idx = idx; have_prev = 1;
  endtask

  task automatic revolution(input int amp, input real deg, input real next_true);
    for (int n = 0; n < 45; n++) begin
      int v;
      v = int'(amp * $sin(2.0 * 3.141592653589793 * (n * 8.0 - deg) / 360.0));
      feed(v, n, (n == 0) ? next_true : -1.0);
    end
  endtask

  initial begin
    real degs [] = '{37.0, 100.5, 200.25, 359.3, 0.0, 180.0, 275.9, 3.0, 353.0};
    real last;
    y_valid = 1'b0; y = '0; index = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    last = -1.0;
    foreach (degs[i]) begin
      revolution(10000 + 1000 * i, degs[i], last);
      // a crossing in the last interval mixes two revolutions: rule check only
      last = (degs[i] > 344.0) ? -1.0 : degs[i];
    end
    // a revolution with no crossing
    for (int n = 0; n < 45; n++) feed(-500 - n, n, (n == 0) ? last : -1.0);
    feed(-1, 0, -1.0);
    // random data with several crossings per revolution
    for (int n = 1; n < 450; n++) feed(int'(sample_t'($urandom)), n % 45, -1.0);
    feed(100, 0, -1.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_peak_detector: self-checking test of the peak-to-peak detector.
// Part 1 feeds clean sine revolutions (45 samples, amplitude changing from
// one revolution to the next) and checks each report against the largest
// sample minus the smallest sample of the revolution before. Part 2 feeds
// random sequences and checks the stored peaks and every report against a
// direct evaluation of the peak rule on the whole input history.
module tb_peak_detector;
  import phase_meter_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic y_valid, pp_valid;
  sample_t y, pos_peak, neg_peak;
  logic [IDX_W-1:0] index;
  logic [DATA_W:0] pp_out;
  int checks = 0, failures = 0, reports = 0;

  peak_detector dut (.clk, .rst_n, .y_valid, .y, .index, .pp_out, .pp_valid, .pos_peak, .neg_peak);

  always #5 clk = ~clk;
  always @(posedge clk) if (pp_valid) reports++;

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hist [$];   // every sample fed so far

  // peaks by the rule, evaluated over the history (last decided sample wins)
  function automatic void rule_peaks(output int pos, output int neg);
    pos = 0; neg = 0;
    for (int n = 1; n + 1 < hist.size(); n++) begin
      int p0, p1;
      p0 = hist[n] - hist[n-1];
      p1 = hist[n+1] - hist[n];
      if (p0 > 0 && hist[n] > 0 && hist[n-1] > 0 && p1 < 0) pos = hist[n];
      if (p0 < 0 && hist[n] < 0 && hist[n-1] < 0 && p1 > 0) neg = hist[n];
    end
  endfunction

  task automatic feed(input int v, input int idx, input int expect_pp);
    @(negedge clk);
    y = sample_t'(v); index = IDX_W'(idx); y_valid = 1'b1;
    hist.push_back(v);
    @(negedge clk);
    y_valid = 1'b0;
    if (idx == 0) begin
      checks++;
      if (!pp_valid) begin failures++; $display("no report at index 0"); end
      else if (expect_pp >= 0 && int'(pp_out) != expect_pp) begin
        failures++; $display("pp %0d, expected %0d", pp_out, expect_pp);
      end
    end else begin
      checks++;
      if (pp_valid) begin failures++; $display("report at index %0d", idx); end
    end
    repeat ($urandom_range(0, 4)) @(negedge clk);
  endtask

  initial begin
    int amp [] = '{5000, 7000, 9000, 12000, 15000};  // rising, so no peak at a boundary
    int mx, mn, prev_pp;
    y_valid = 1'b0; y = '0; index = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    prev_pp = -1;
    foreach (amp[r]) begin
      mx = -40000; mn = 40000;
      for (int n = 0; n < 45; n++) begin
        int v;
        v = int'(amp[r] * $sin(2.0 * 3.141592653589793 * n / 45.0 + 0.37));
        feed(v, n, (n == 0) ? prev_pp : -1);
        if (v > mx) mx = v;
        if (v < mn) mn = v;
      end
      prev_pp = mx - mn;
    end
    feed(16000, 0, prev_pp);
    // random histories
    for (int n = 1; n < 400; n++) begin
      int v, pos, neg, idx;
      v = int'(sample_t'($urandom));
      if (n % 7 == 0) v = hist[hist.size()-1];   // some flat steps
      idx = n % 45;
      hist.push_back(v);
      rule_peaks(pos, neg);
      void'(hist.pop_back());
      feed(v, idx, (pos < 0 ? -pos : pos) + (neg < 0 ? -neg : neg));
      checks += 2;
      if (int'(pos_peak) != pos) begin failures++; $display("pos peak %0d, expected %0d", pos_peak, pos); end
      if (int'(neg_peak) != neg) begin failures++; $display("neg peak %0d, expected %0d", neg_peak, neg); end
    end
    checks++;
    if (reports < 10) begin failures++; $display("only %0d reports", reports); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_iir_filter: self-checking test of the serial 8th-order IIR filter.
// The testbench owns the coefficient RAM port while the filter is idle and
// loads it directly. Two coefficient sets are used: four band-pass
// resonators centred on 2*pi/45 fed with a sine (normal operation), then
// random coefficients and random full-scale inputs (which drive the sums
// into saturation). Every output is compared with a sample-by-sample model
// of the transposed direct form II sections in Q2.14 arithmetic (sums at full
// precision, truncated to 14 fraction bits and saturated when stored). The
// test also checks the 324-cycle latency (4 sections x 80 cycles plus 4),
// the states left in the RAM, and that a start while busy is dropped and
// reported as an overrun.
module tb_iir_filter;
  import phase_meter_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start, busy, y_valid, overrun;
  sample_t x_in, y_out, ram_rdata;
  ram_req_t filter_req, tb_req, ram_req;
  int checks = 0, failures = 0, saturations = 0, overruns_seen = 0;

  iir_filter dut (.clk, .rst_n, .start, .x_in, .ram_req(filter_req), .ram_rdata, .busy,
                  .y_out, .y_valid, .overrun);
  coef_ram ram (.clk, .req(ram_req), .rdata(ram_rdata));
  assign ram_req = busy ? filter_req : tb_req;

  always #5 clk = ~clk;
  always @(posedge clk) if (overrun) overruns_seen++;

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  longint b0 [4], b1 [4], b2 [4], a1 [4], a2 [4], w1 [4], w2 [4];

  function automatic longint q(input longint s);  // truncate and saturate
    longint v;
    v = s >>> 14;
    if (v > 32767) begin v = 32767; saturations++; end
    if (v < -32768) begin v = -32768; saturations++; end
    return v;
  endfunction

  function automatic longint model(input longint x);
    longint y;
    for (int j = 0; j < 4; j++) begin
      y     = q(b0[j] * x + (w1[j] <<< 14));
      w1[j] = q(b1[j] * x + a1[j] * y + (w2[j] <<< 14));
      w2[j] = q(b2[j] * x + a2[j] * y);
      x     = y;
    end
    return x;
  endfunction

  task automatic ram_write(input int addr, input longint v);
    @(negedge clk);
    tb_req = '{en: 1'b1, we: 1'b1, addr: RAM_AW'(addr), wdata: sample_t'(v)};
    @(negedge clk);
    tb_req = '0;
  endtask

  task automatic ram_check(input int addr, input longint v);
    @(negedge clk);
    tb_req = '{en: 1'b1, we: 1'b0, addr: RAM_AW'(addr), wdata: '0};
    @(negedge clk);
    tb_req = '0;
    checks++;
    if (longint'(ram_rdata) != v) begin
      failures++; $display("RAM word %0d = %0d, expected %0d", addr, ram_rdata, v);
    end
  endtask

  task automatic load_coefs();
    for (int j = 0; j < 4; j++) begin
      ram_write(8*j + 0, b0[j]); ram_write(8*j + 1, b1[j]); ram_write(8*j + 2, b2[j]);
      ram_write(8*j + 3, a1[j]); ram_write(8*j + 4, a2[j]);
      ram_write(8*j + 5, 0);     ram_write(8*j + 6, 0);
      w1[j] = 0; w2[j] = 0;
    end
  endtask

  task automatic run_sample(input longint x, input bit poke_start);
    longint expect_y;
    int lat;
    expect_y = model(x);
    @(negedge clk);
    x_in = sample_t'(x); start = 1'b1;
    @(negedge clk);
    start = 1'b0; x_in = sample_t'($urandom);
    lat = 1;
    while (!y_valid) begin
      @(negedge clk); lat++;
      if (poke_start && lat == 100) start = 1'b1;
      else start = 1'b0;
    end
    checks += 2;
    if (lat != 4 * CYC_PER_SEC + 4) begin failures++; $display("latency %0d", lat); end
    if (longint'(y_out) != expect_y) begin
      failures++; $display("y = %0d, expected %0d (x = %0d)", y_out, expect_y, x);
    end
  endtask

  initial begin
    real r, w0;
    start = 1'b0; x_in = '0; tb_req = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // band-pass resonators: H = g (1 - z^-2) / (1 - 2 r cos w0 z^-1 + r^2 z^-2)
    r = 0.9; w0 = 2.0 * 3.141592653589793 / 45.0;
    for (int j = 0; j < 4; j++) begin
      b0[j] = longint'((1.0 - r*r) / 2.0 * 16384.0);
      b1[j] = 0;
      b2[j] = -b0[j];
      a1[j] = longint'(2.0 * r * $cos(w0) * 16384.0);
      a2[j] = longint'(-r * r * 16384.0);
    end
    load_coefs();
    for (int n = 0; n < 150; n++)
      run_sample(longint'(12000.0 * $sin(w0 * n)), n == 20);
    for (int j = 0; j < 4; j++) begin
      ram_check(8*j + 5, w1[j]);
      ram_check(8*j + 6, w2[j]);
      ram_check(8*j + 3, a1[j]);
    end
    checks++;
    if (overruns_seen != 1) begin failures++; $display("%0d overruns seen", overruns_seen); end
    // random coefficients and inputs: exercises saturation
    for (int j = 0; j < 4; j++) begin
      b0[j] = longint'(sample_t'($urandom)); b1[j] = longint'(sample_t'($urandom));
      b2[j] = longint'(sample_t'($urandom)); a1[j] = longint'(sample_t'($urandom)) / 2;
      a2[j] = longint'(sample_t'($urandom)) / 4;
    end
    load_coefs();
    for (int n = 0; n < 60; n++) run_sample(longint'(sample_t'($urandom)), 1'b0);
    for (int j = 0; j < 4; j++) begin
      ram_check(8*j + 5, w1[j]);
      ram_check(8*j + 6, w2[j]);
    end
    checks++;
    if (saturations == 0) begin failures++; $display("saturation never exercised"); end
    $display("saturations %0d", saturations);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_shift_add_mult: self-checking test of the 16-cycle shift-add multiplier.
// Multiplies corner operands (most negative, most positive, zero, -1) and
// random pairs, back to back, and checks every product against the built-in
// signed multiplication and that `done` comes exactly 16 cycles after
// `start`.
module tb_shift_add_mult;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start;
  logic signed [15:0] a, b;
  logic signed [31:0] p;
  logic done;
  int checks = 0, failures = 0;

  shift_add_mult dut (.clk, .rst_n, .start, .a, .b, .p, .done);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic mul(input logic signed [15:0] x, input logic signed [15:0] y);
    int cyc;
    logic signed [31:0] expect_p;
    expect_p = 32'(x) * 32'(y);
    @(negedge clk);
    a = x; b = y; start = 1'b1;
    @(negedge clk);
    start = 1'b0; a = $urandom; b = $urandom;  // operands need not stay
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks += 2;
    if (cyc != 16) begin failures++; $display("latency %0d != 16", cyc); end
    if (p !== expect_p) begin
      failures++;
      $display("%0d * %0d = %0d, expected %0d", x, y, p, expect_p);
    end
  endtask

  initial begin
    logic signed [15:0] corner [6];
    corner = '{16'sh8000, 16'sh7fff, 16'sh0000, 16'shffff, 16'sh4000, 16'sh0001};
    start = 1'b0; a = '0; b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    foreach (corner[i]) foreach (corner[j]) mul(corner[i], corner[j]);
    repeat (300) mul(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

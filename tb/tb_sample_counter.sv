// tb_sample_counter: self-checking test of the sampling-interval counter.
// Issues revolutions of varying length (strobes with the first one marked as
// the SYNC strobe), with idle cycles in between, and checks the index after
// each strobe against a count kept by the testbench, including saturation
// when a revolution has more strobes than the counter can count.
module tb_sample_counter;
  import phase_meter_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic smp_strobe, smp_first;
  logic [IDX_W-1:0] index;
  int checks = 0, failures = 0;

  sample_counter dut (.clk, .rst_n, .smp_strobe, .smp_first, .index);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic strobe(input logic first, input int expect_idx);
    @(negedge clk);
    smp_strobe = 1'b1; smp_first = first;
    @(negedge clk);
    smp_strobe = 1'b0; smp_first = 1'b0;
    repeat ($urandom_range(0, 3)) begin
      @(negedge clk);
      checks++;
      if (int'(index) != expect_idx) begin failures++; $display("index moved without strobe"); end
    end
    checks++;
    if (int'(index) != expect_idx) begin
      failures++;
      $display("index %0d, expected %0d", index, expect_idx);
    end
  endtask

  initial begin
    smp_strobe = 1'b0; smp_first = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (index != '0) begin failures++; $display("index not reset"); end
    for (int rev = 0; rev < 6; rev++) begin
      int len;
      len = (rev == 3) ? 70 : 45 - rev;
      strobe(1'b1, 0);
      for (int s = 1; s < len; s++) strobe(1'b0, (s > 63) ? 63 : s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

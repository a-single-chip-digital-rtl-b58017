// tb_coef_ram: self-checking test of the coefficient/state RAM. Writes a
// distinct pattern to every word, reads it back in another order, then
// overwrites part of it and checks that reads return data one cycle after
// the request and that unaccessed cycles leave the read data unchanged.
module tb_coef_ram;
  import phase_meter_pkg::*;
  logic clk = 1'b0;
  ram_req_t req;
  sample_t rdata;
  sample_t model [RAM_WORDS];
  int checks = 0, failures = 0;

  coef_ram dut (.clk, .req, .rdata);

  always #5 clk = ~clk;

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int addr, input sample_t d);
    @(negedge clk);
    req = '{en: 1'b1, we: 1'b1, addr: RAM_AW'(addr), wdata: d};
    model[addr] = d;
  endtask

  task automatic rd(input int addr);
    @(negedge clk);
    req = '{en: 1'b1, we: 1'b0, addr: RAM_AW'(addr), wdata: 16'h5a5a};
    @(negedge clk);
    req = '0;
    checks++;
    if (rdata !== model[addr]) begin
      failures++;
      $display("word %0d: read %h, expected %h", addr, rdata, model[addr]);
    end
    @(negedge clk);
    checks++;
    if (rdata !== model[addr]) begin
      failures++;
      $display("word %0d: read data did not hold", addr);
    end
  endtask

  initial begin
    req = '0;
    for (int i = 0; i < RAM_WORDS; i++) wr(i, sample_t'(16'h1000 * (i % 8) + 16'(i * 37)));
    for (int i = RAM_WORDS - 1; i >= 0; i--) rd(i);
    for (int i = 0; i < RAM_WORDS; i += 3) wr(i, sample_t'($urandom));
    @(negedge clk); req = '0;
    for (int i = 0; i < RAM_WORDS; i++) rd((i * 7) % RAM_WORDS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

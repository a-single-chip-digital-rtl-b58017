// tb_bus_interface: self-checking test of the system bus interface.
// A coefficient RAM sits behind the interface. The testbench plays both the
// host (word reads and writes with the cs/ack handshake) and the filter
// (busy periods during which it writes its own words into the RAM). It
// checks that RAM accesses from the bus wait while the filter is busy and
// complete after it, that the filter's own accesses reach the RAM while it
// is busy, that read data equals what was written, and that the result
// registers (phase, peak-to-peak, period, index) and the STATUS flags,
// which a read clears, hold what the detectors reported.
module tb_bus_interface;
  import phase_meter_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic bus_cs, bus_we, bus_ack;
  logic [7:0] bus_addr;
  logic [DATA_W-1:0] bus_wdata, bus_rdata;
  logic filter_busy;
  ram_req_t filter_req, ram_req;
  sample_t ram_rdata;
  logic [PHASE_W-1:0] phase_out;
  logic phase_found, phase_rdy, pp_valid, period_valid, overrun;
  logic [DATA_W:0] pp_out;
  logic [PERIOD_W-1:0] period;
  logic [IDX_W-1:0] index;
  int checks = 0, failures = 0, waits = 0;
  sample_t model [RAM_WORDS];

  bus_interface dut (.*);
  coef_ram ram (.clk, .req(ram_req), .rdata(ram_rdata));

  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(input logic we, input logic [7:0] addr, input logic [15:0] wd,
                        output logic [15:0] rd, output int cycles);
    @(negedge clk);
    bus_cs = 1'b1; bus_we = we; bus_addr = addr; bus_wdata = wd;
    cycles = 0;
    do begin @(negedge clk); cycles++; end while (!bus_ack);
    rd = bus_rdata;
    bus_cs = 1'b0;
  endtask

  task automatic check_reg(input logic [7:0] addr, input logic [15:0] expect_v);
    logic [15:0] rd; int c;
    access(1'b0, addr, 16'h0, rd, c);
    checks += 2;
    if (rd !== expect_v) begin failures++; $display("reg %h = %h, expected %h", addr, rd, expect_v); end
    if (c != 1) begin failures++; $display("register access took %0d cycles", c); end
  endtask

  // filter model: busy for 60 cycles, writes word 31 on its 10th cycle
  task automatic filter_run(input sample_t v);
    @(negedge clk);
    filter_busy = 1'b1;
    repeat (9) @(negedge clk);
    filter_req = '{en: 1'b1, we: 1'b1, addr: RAM_AW'(31), wdata: v};
    model[31] = v;
    @(negedge clk);
    filter_req = '0;
    repeat (50) @(negedge clk);
    filter_busy = 1'b0;
  endtask

  initial begin
    logic [15:0] rd; int c;
    bus_cs = 1'b0; bus_we = 1'b0; bus_addr = '0; bus_wdata = '0;
    filter_busy = 1'b0; filter_req = '0;
    phase_out = '0; phase_found = 1'b0; phase_rdy = 1'b0; pp_out = '0; pp_valid = 1'b0;
    period = '0; period_valid = 1'b0; index = '0; overrun = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // load and read back the RAM while the filter is idle
    for (int i = 0; i < RAM_WORDS; i++) begin
      model[i] = sample_t'($urandom);
      access(1'b1, 8'(i), model[i], rd, c);
    end
    for (int i = 0; i < RAM_WORDS; i++) begin
      access(1'b0, 8'(i), 16'h0, rd, c);
      checks += 2;
      if (rd !== model[i]) begin failures++; $display("RAM %0d = %h, expected %h", i, rd, model[i]); end
      if (c != 1) begin failures++; $display("idle RAM access took %0d cycles", c); end
    end
    // bus accesses that must wait for the filter
    for (int t = 0; t < 4; t++) begin
      sample_t v;
      v = sample_t'($urandom);
      fork
        filter_run(sample_t'($urandom));
        begin
          repeat (3) @(negedge clk);
          access(1'b1, 8'(t), v, rd, c);
          model[t] = v;
          if (c > 1) waits++;
          checks++;
          if (c < 50) begin failures++; $display("bus write did not wait (%0d cycles)", c); end
        end
      join
      access(1'b0, 8'(t), 16'h0, rd, c);
      checks++;
      if (rd !== model[t]) begin failures++; $display("RAM %0d = %h after wait", t, rd); end
      access(1'b0, 8'd31, 16'h0, rd, c);
      checks++;
      if (rd !== model[31]) begin failures++; $display("filter write lost: %h", rd); end
    end
    checks++;
    if (waits != 4) begin failures++; $display("waits %0d", waits); end
    // results
    @(negedge clk);
    phase_out = 9'd213; phase_found = 1'b1; phase_rdy = 1'b1;
    pp_out = 17'h1_2345; pp_valid = 1'b1;
    period = 24'hab_cdef; period_valid = 1'b1; index = 6'd17;
    @(negedge clk);
    phase_rdy = 1'b0; pp_valid = 1'b0; phase_out = 9'd5; pp_out = '0;
    check_reg(REG_PHASE, 16'h8000 | 16'd213);
    check_reg(REG_PP_LO, 16'h2345);
    check_reg(REG_PP_HI, 16'h0001);
    check_reg(REG_PERIOD_LO, 16'hcdef);
    check_reg(REG_PERIOD_HI, 16'h00ab);
    check_reg(REG_INDEX, 16'd17);
    check_reg(REG_STATUS, 16'b011);
    check_reg(REG_STATUS, 16'b010);
    @(negedge clk); overrun = 1'b1; @(negedge clk); overrun = 1'b0;
    check_reg(REG_STATUS, 16'b110);
    check_reg(REG_STATUS, 16'b010);
    check_reg(8'h7f, 16'h0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// coef_ram: static RAM for the filter coefficients and section states.
//
// One word-wide single-port memory of DEPTH 16-bit words. Each of the four
// second-order sections uses an 8-word slot (b0, b1, b2, a1, a2, w1, w2 and a
// spare word), i.e. 16 bytes per section as in the original prototype, which
// used an external byte-wide static RAM. Here the RAM is a 16-bit wide array,
// so one coefficient or state is one access; that width is this design's own
// choice.
//
// Timing: a request (`req.en`) is taken on the rising clock edge. A write
// stores `req.wdata` at `req.addr`; a read returns the word in `rdata` in the
// following cycle. `rdata` holds its value until the next read. The contents
// are not reset: software loads coefficients and clears the states.
module coef_ram
  import phase_meter_pkg::*;
#(
  parameter int unsigned DEPTH = RAM_WORDS
) (
  input  logic     clk,
  input  ram_req_t req,
  output sample_t  rdata
);

  sample_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (req.en) begin
      if (req.we) mem[req.addr] <= req.wdata;
      else        rdata         <= mem[req.addr];
    end
  end

endmodule

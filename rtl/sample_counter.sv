// sample_counter: counts the sampling intervals since the last SYNC pulse.
//
// The phase angle is 8 degrees times the number of sampling intervals
// between SYNC and the sample before the zero crossing, plus the
// interpolated fraction. This counter supplies that number: on every
// sampling strobe it moves to the index of the new sample, 0 for the strobe
// issued at SYNC (`smp_first`) and one more for every other strobe. The index
// saturates at 2^IDX_W - 1 (it never gets there in normal operation, where
// at most N-1 = 44 strobes follow a SYNC).
//
// Timing: `index` changes on the clock edge that samples `smp_strobe` and
// then names the sample that the filter is processing.
module sample_counter
  import phase_meter_pkg::*;
#(
  parameter int unsigned W = IDX_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         smp_strobe,
  input  logic         smp_first,
  output logic [W-1:0] index
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                             index <= '0;
    else if (smp_strobe && smp_first)       index <= '0;
    else if (smp_strobe && index != '1)     index <= index + 1'b1;
  end

endmodule

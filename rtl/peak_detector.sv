// peak_detector: peak-to-peak amplitude of the filter output.
//
// For every new filter output the detector forms the difference
// p(n) = y(n) - y(n-1). A sample y(n) is taken as the positive peak when
// p(n), y(n) and y(n-1) are all positive and the next difference p(n+1) is
// negative; it is taken as the negative peak when p(n), y(n) and y(n-1) are
// all negative and p(n+1) is positive. The decision on y(n) is therefore made
// when y(n+1) arrives. The stored peaks keep their values until a newer peak
// of the same sign replaces them. At the start of each revolution the sum of
// the magnitudes of the two stored peaks is reported.
//
// Interface and timing: `y_valid` marks a filter output `y` whose sample
// index is `index`; index 0 is the first sample after SYNC. On a `y_valid`
// with index 0, the peak decision for the previous sample is made first and
// then `pp_out` (17 bits, 14 fraction bits, at most 4.0) is updated and
// `pp_valid` pulses, one cycle after `y_valid`. "Positive" and "negative" are
// strict (zero is neither).
//
// The peak rules and reporting at SYNC follow the design description; holding
// the peaks across revolutions and reporting at the first output after SYNC
// (rather than at the SYNC pulse itself, before the filter has caught up)
// are this design's own choices.
module peak_detector
  import phase_meter_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             y_valid,
  input  sample_t          y,
  input  logic [IDX_W-1:0] index,
  output logic [DATA_W:0]  pp_out,
  output logic             pp_valid,
  output sample_t          pos_peak,
  output sample_t          neg_peak
);

  sample_t                 y1_q, y2_q;     // y(n), y(n-1) relative to the new sample
  logic signed [DATA_W:0]  p1_q;           // p(n) = y(n) - y(n-1)
  logic [1:0]              hist_q;         // number of valid past samples (0..2)

  logic signed [DATA_W:0]  p_new;          // p(n+1)
  logic                    is_pos, is_neg;

  assign p_new  = (DATA_W+1)'(y) - (DATA_W+1)'(y1_q);
  assign is_pos = (hist_q == 2'd2) && (p1_q > 0) && (y1_q > 0) && (y2_q > 0) && (p_new < 0);
  assign is_neg = (hist_q == 2'd2) && (p1_q < 0) && (y1_q < 0) && (y2_q < 0) && (p_new > 0);

  // magnitudes of the peaks that will be stored after this sample
  sample_t                 pos_next, neg_next;
  logic [DATA_W:0]         pos_mag, neg_mag;
  assign pos_next = is_pos ? y1_q : pos_peak;
  assign neg_next = is_neg ? y1_q : neg_peak;
  assign pos_mag  = pos_next[DATA_W-1] ? (DATA_W+1)'(-(DATA_W+1)'(pos_next)) : (DATA_W+1)'(pos_next);
  assign neg_mag  = neg_next[DATA_W-1] ? (DATA_W+1)'(-(DATA_W+1)'(neg_next)) : (DATA_W+1)'(neg_next);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y1_q     <= '0;
      y2_q     <= '0;
      p1_q     <= '0;
      hist_q   <= '0;
      pos_peak <= '0;
      neg_peak <= '0;
      pp_out   <= '0;
      pp_valid <= 1'b0;
    end else begin
      pp_valid <= 1'b0;
      if (y_valid) begin
        y2_q     <= y1_q;
        y1_q     <= y;
        p1_q     <= p_new;
        if (hist_q != 2'd2) hist_q <= hist_q + 1'b1;
        pos_peak <= pos_next;
        neg_peak <= neg_next;
        if (index == '0) begin
          pp_out   <= pos_mag + neg_mag;
          pp_valid <= 1'b1;
        end
      end
    end
  end

endmodule

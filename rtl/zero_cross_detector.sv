// zero_cross_detector: phase angle of the filter output relative to SYNC,
// with linear interpolation to 1 degree.
//
// A zero crossing lies between samples y(n-1) and y(n) when y(n) >= 0 and
// y(n-1) < 0. With 45 samples per revolution one sampling interval is 8
// degrees, so the crossing's position inside the interval is interpolated
// linearly: k = floor(8*|y(n-1)| / (y(n) + |y(n-1)|)), a value 0..8. The
// quotient is found by successive subtraction, one step per clock cycle:
// starting from delta = 8*|y(n-1)|, the divisor y(n) + |y(n-1)| is subtracted
// and k incremented as long as delta is not smaller than the divisor. The
// phase is then 8 * (sample index of y(n-1)) + k degrees, taken modulo 360.
//
// The first crossing in a revolution is kept. When the filter output of
// sample index 0 (the first after SYNC) has been processed, including a
// crossing between the last sample of the old revolution and it, the kept
// phase is reported: `phase_rdy` pulses, `phase_out` holds the angle and
// `phase_found` tells whether the revolution had a crossing at all.
//
// Interface and timing: `y_valid` marks a filter output `y` with sample
// index `index`. A crossing occupies the divider for k+1 cycles (at most 9);
// `busy` is high meanwhile. A report follows `y_valid` after 1 cycle
// without a crossing and after at most 10 cycles with one. New outputs must
// not arrive while `busy` (the filter needs hundreds of cycles per output).
//
// The crossing rule, the 8-degree interval, the successive-subtraction
// interpolation and the 8*count + k sum follow the design description. The
// stop rule of the subtraction (continue while delta >= divisor, which yields
// the integer part of the quotient), the modulo-360 wrap, keeping the first
// crossing and the reporting point are this design's own choices.
module zero_cross_detector
  import phase_meter_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               y_valid,
  input  sample_t            y,
  input  logic [IDX_W-1:0]   index,
  output logic               busy,
  output logic [PHASE_W-1:0] phase_out,
  output logic               phase_found,
  output logic               phase_rdy,
  output logic               crossing      // pulses when a crossing is detected
);

  localparam int unsigned DW = DATA_W + 4;  // 8*|y| needs 3 more bits, plus sign

  sample_t            y1_q;        // y(n-1)
  logic [IDX_W-1:0]   idx1_q;      // its sample index
  logic               have1_q;

  logic [DW-1:0]      delta_q, div_q;
  logic [3:0]         k_q;
  logic [PHASE_W:0]   base_q;      // 8 * index of y(n-1)
  logic               div_busy_q;
  logic               report_pend_q;
  logic [PHASE_W-1:0] kept_q;
  logic               found_q;

  logic               zc_hit;
  logic [DATA_W:0]    mag1;        // |y(n-1)|
  assign mag1  = (DATA_W+1)'(-(DATA_W+1)'(signed'(y1_q)));
  assign zc_hit = y_valid && have1_q && !y[DATA_W-1] && y1_q[DATA_W-1];

  // result of a finishing division
  logic               div_end;
  logic [PHASE_W:0]   sum;
  logic [PHASE_W-1:0] phase_now;
  assign div_end   = div_busy_q && (delta_q < div_q);
  assign sum       = base_q + (PHASE_W+1)'(k_q);
  assign phase_now = (sum >= (PHASE_W+1)'(360)) ? PHASE_W'(sum - (PHASE_W+1)'(360)) : PHASE_W'(sum);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y1_q          <= '0;
      idx1_q        <= '0;
      have1_q       <= 1'b0;
      delta_q       <= '0;
      div_q         <= '0;
      k_q           <= '0;
      base_q        <= '0;
      div_busy_q    <= 1'b0;
      report_pend_q <= 1'b0;
      kept_q        <= '0;
      found_q       <= 1'b0;
      phase_out     <= '0;
      phase_found   <= 1'b0;
      phase_rdy     <= 1'b0;
      crossing      <= 1'b0;
    end else begin
      phase_rdy <= 1'b0;
      crossing  <= zc_hit;
      if (y_valid) begin
        y1_q    <= y;
        idx1_q  <= index;
        have1_q <= 1'b1;
        report_pend_q <= (index == '0);
        if (zc_hit) begin
          delta_q    <= DW'(mag1) << 3;
          div_q      <= DW'(mag1) + DW'(unsigned'(y));
          k_q        <= '0;
          base_q     <= (PHASE_W+1)'(idx1_q) << 3;
          div_busy_q <= 1'b1;
        end
      end else if (div_busy_q) begin
        if (!div_end) begin
          delta_q <= delta_q - div_q;
          k_q     <= k_q + 1'b1;
        end else begin
          div_busy_q <= 1'b0;
          if (report_pend_q) begin
            report_pend_q <= 1'b0;
            phase_out     <= found_q ? kept_q : phase_now;
            phase_found   <= 1'b1;
            phase_rdy     <= 1'b1;
            found_q       <= 1'b0;
          end else if (!found_q) begin
            kept_q  <= phase_now;
            found_q <= 1'b1;
          end
        end
      end else if (report_pend_q) begin
        report_pend_q <= 1'b0;
        phase_out     <= kept_q;
        phase_found   <= found_q;
        phase_rdy     <= 1'b1;
        found_q       <= 1'b0;
      end
    end
  end

  assign busy = div_busy_q;

endmodule

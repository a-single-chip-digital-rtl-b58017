// shift_add_mult: sequential 16 x 16 two's complement multiplier.
//
// The filter's multiplications use a plain shift-add algorithm, one multiplier
// bit per clock cycle, so a product takes 16 cycles. Each cycle the
// multiplicand is shifted one place left, the multiplier one place right, and
// the multiplicand is added to the partial product when the multiplier's low
// bit is 1. The last bit (the sign bit of the multiplier) carries weight
// -2^15, so in that cycle the multiplicand is subtracted instead.
//
// Interface and timing: assert `start` for one cycle with operands `a` and
// `b`; the first bit is consumed on that same clock edge. `done` is high in
// the 16th cycle after `start` (exactly 16 cycles from start to result), and
// `p` holds the full 32-bit product from then until the next `start`. A new
// `start` may be given in the cycle in which `done` is high, so back-to-back
// multiplies run at one per 16 cycles.
//
// The 16-cycle latency follows the design description; the LSB-first
// shift-add arrangement is this design's own choice.
module shift_add_mult #(
  parameter int unsigned W = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic signed [W-1:0]   a,      // multiplicand (coefficient)
  input  logic signed [W-1:0]   b,      // multiplier (data)
  output logic signed [2*W-1:0] p,
  output logic                  done
);

  logic signed [2*W-1:0] mcand_q;   // multiplicand, shifted left each cycle
  logic        [W-1:0]   mplier_q;  // remaining multiplier bits
  localparam int unsigned CW = $clog2(W+1);
  logic        [CW-1:0]   cnt_q;  // bits consumed so far
  logic                  busy_q;

  logic signed [2*W-1:0] a_ext;
  assign a_ext = (2*W)'(a);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p        <= '0;
      mcand_q  <= '0;
      mplier_q <= '0;
      cnt_q    <= '0;
      busy_q   <= 1'b0;
    end else if (start) begin
      // bit 0 of b is consumed on the start edge
      p        <= b[0] ? a_ext : '0;
      mcand_q  <= a_ext <<< 1;
      mplier_q <= W'(b) >> 1;
      cnt_q    <= CW'(1);
      busy_q   <= 1'b1;
    end else if (busy_q && cnt_q < CW'(W)) begin
      if (mplier_q[0]) begin
        if (cnt_q == CW'(W - 1)) p <= p - mcand_q;  // sign bit: weight -2^(W-1)
        else                p <= p + mcand_q;
      end
      mcand_q  <= mcand_q <<< 1;
      mplier_q <= mplier_q >> 1;
      cnt_q    <= cnt_q + 1'b1;
    end
  end

  assign done = busy_q && (cnt_q == CW'(W));

endmodule

// freq_multiplier: digital frequency multiplier that turns the once-per-
// revolution SYNC pulse into N sampling strobes per revolution.
//
// It runs on a tick of 1/CLK_DIV of the system clock (16 MHz from 32 MHz).
// A period counter measures the number of ticks between successive SYNC
// rising edges. At each SYNC edge the count is latched as the new period T,
// and the strobe generator restarts: it emits strobe 0 on the SYNC tick and
// then strobes 1..N-1 at ticks ceil(k*T/N) after it, using an accumulator
// that adds N per tick and subtracts T whenever it reaches T (a rate
// multiplier, so no divider is needed). The output rate therefore follows
// the previous revolution's period, and strobe N coincides with the next
// SYNC, which restarts the sequence; if the machine slows down no more than
// N-1 strobes are issued between SYNC edges. A period counter that
// saturates (SYNC slower than the 24-bit range, about 1 Hz at 16 MHz) or the
// first SYNC after reset leaves `period_valid` low and no strobes are issued.
//
// The measurement of the input period, the factor N = 45, the 16 MHz tick
// and the use of the previous period follow the design description; the
// accumulator scheme is this design's own choice (the original refers to
// another publication for its circuit).
//
// Timing: SYNC is synchronised with two flip-flops. `smp_strobe` is one
// system clock cycle wide; `smp_first` marks the strobe issued at a SYNC
// edge. `period` and `period_valid` change on the SYNC tick.
module freq_multiplier
  import phase_meter_pkg::*;
#(
  parameter int unsigned N        = N_MULT,
  parameter int unsigned PW       = PERIOD_W,
  parameter int unsigned CLK_DIV  = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                sync_in,       // asynchronous SYNC pulse
  output logic                smp_strobe,    // sampling instant
  output logic                smp_first,     // strobe aligned with SYNC
  output logic [PW-1:0] period,        // last SYNC period in ticks
  output logic                period_valid
);

  localparam int unsigned DW = (CLK_DIV > 1) ? $clog2(CLK_DIV) : 1;
  localparam int unsigned NW = $clog2(N + 1);
  localparam logic [PW-1:0] CNT_MAX = '1;

  // tick at 1/CLK_DIV of clk
  logic [DW-1:0] div_q;
  logic          tick;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        div_q <= '0;
    else if (div_q == DW'(CLK_DIV - 1)) div_q <= '0;
    else                               div_q <= div_q + 1'b1;
  end
  assign tick = (div_q == DW'(CLK_DIV - 1));

  // SYNC synchroniser and rising-edge detector; an edge waits for the tick
  logic [2:0] sync_sr;
  logic       edge_pend;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_sr   <= '0;
      edge_pend <= 1'b0;
    end else begin
      sync_sr <= {sync_sr[1:0], sync_in};
      // an edge seen in a tick cycle is used at once, otherwise it waits
      edge_pend <= tick ? 1'b0 : (edge_pend || (sync_sr[1] && !sync_sr[2]));
    end
  end
  logic sync_tick;
  assign sync_tick = tick && (edge_pend || (sync_sr[1] && !sync_sr[2]));

  logic [PW-1:0] cnt_q;      // ticks since the last SYNC edge, minus 1
  logic                seen_q;     // a SYNC edge has been seen
  logic [PW:0]   acc_q;      // rate-multiplier accumulator
  logic [NW-1:0]       pcount_q;   // strobes issued in this revolution
  logic [PW:0]   acc_add;

  assign acc_add = acc_q + (PW+1)'(N);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q        <= '0;
      seen_q       <= 1'b0;
      acc_q        <= '0;
      pcount_q     <= '0;
      period       <= '0;
      period_valid <= 1'b0;
      smp_strobe   <= 1'b0;
      smp_first    <= 1'b0;
    end else begin
      smp_strobe <= 1'b0;
      smp_first  <= 1'b0;
      if (sync_tick) begin
        // new period = ticks from the previous edge to this one
        period       <= cnt_q + 1'b1;
        period_valid <= seen_q && (cnt_q != CNT_MAX);
        seen_q       <= 1'b1;
        cnt_q        <= '0;
        acc_q        <= '0;
        pcount_q     <= NW'(1);
        smp_strobe   <= seen_q && (cnt_q != CNT_MAX);
        smp_first    <= seen_q && (cnt_q != CNT_MAX);
      end else if (tick) begin
        if (cnt_q != CNT_MAX) cnt_q <= cnt_q + 1'b1;
        if (period_valid && pcount_q < NW'(N)) begin
          if (acc_add >= {1'b0, period}) begin
            acc_q      <= acc_add - {1'b0, period};
            pcount_q   <= pcount_q + 1'b1;
            smp_strobe <= 1'b1;
          end else begin
            acc_q <= acc_add;
          end
        end
      end
    end
  end

endmodule

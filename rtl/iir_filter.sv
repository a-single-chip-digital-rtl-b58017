// iir_filter: 8th-order IIR filter built from cascaded second-order sections
// in transposed direct form II, computed serially with one shift-add
// multiplier and a single-port coefficient/state RAM.
//
// Each section j computes, with x the section input and y its output:
//     y      = b0*x + w1(n-1)
//     w1(n)  = b1*x + a1*y + w2(n-1)
//     w2(n)  = b2*x + a2*y
// (the feedback coefficients are added, so their sign is part of the stored
// value). The output of section j is the input of section j+1; the output of
// the last section is the filter output y(n). Data, coefficients and states
// are 16-bit two's complement with 14 fraction bits (-2 .. 2-2^-14).
//
// Schedule: the five products of a section are formed one after the other by
// the 16-cycle shift-add multiplier, so a section takes exactly 80 cycles and
// the four sections 320. While one product is being formed, the RAM port
// fetches the coefficient for the next product and the old states; w1(n) is
// written back at cycle 48 of the section and w2(n) when the last product is
// done. Cycle use within section j (RAM slot base 8*j):
//     c=0  start b0*x           c=1 read b1    c=2 read w1
//     c=16 y = b0*x + w1, start b1*x           c=17 read a1   c=18 read w2
//     c=32 start a1*y                           c=33 read b2
//     c=48 write w1(n), start b2*x              c=49 read a2
//     c=64 start a2*y                           c=65 read next b0
//     c=80 (= next section's c=0) write w2(n)
// Products are kept at full precision (Q4.28) while they are summed; a sum is
// truncated to 14 fraction bits and saturated to 16 bits only when it is
// stored as y or as a state.
//
// Interface and timing: a `start` pulse in an idle cycle takes `x_in`. Two
// cycles fetch the first coefficient, 320 cycles compute the sections, one
// cycle finishes: `y_valid` pulses with `y_out` 324 cycles after `start`.
// `busy` is high from the cycle after `start` until `y_valid`; while it is
// high the filter owns the RAM port (`ram_req`), otherwise the port is free
// for the system bus. A `start` while busy is dropped and pulses `overrun`.
//
// The structure, the section count, the number format, the 16-cycle
// multiply and the 80-cycle section follow the design description; the
// access schedule, truncation, saturation and the overrun rule are this
// design's own choices.
module iir_filter
  import phase_meter_pkg::*;
#(
  parameter int unsigned SECTIONS = N_SECTIONS
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  sample_t  x_in,
  output ram_req_t ram_req,
  input  sample_t  ram_rdata,
  output logic     busy,
  output sample_t  y_out,
  output logic     y_valid,
  output logic     overrun
);

  localparam int unsigned SW = (SECTIONS > 1) ? $clog2(SECTIONS) : 1;

  typedef enum logic [1:0] {S_IDLE, S_PRE0, S_PRE1, S_RUN} state_e;
  // S_RUN with sec_q == SECTIONS-1 and c_q == CYC_PER_SEC is the finish cycle

  state_e      state_q;
  logic [SW-1:0] sec_q;
  logic [6:0]  c_q;
  sample_t     x_q, y_q, coef_q, w1_q, w2_q;
  logic signed [35:0] acc_q;

  // multiplier
  logic               m_start, m_done;
  sample_t            m_a, m_b;
  logic signed [31:0] m_p;

  shift_add_mult #(.W(DATA_W)) u_mult (
    .clk  (clk),
    .rst_n(rst_n),
    .start(m_start),
    .a    (m_a),
    .b    (m_b),
    .p    (m_p),
    .done (m_done)
  );

  logic [RAM_AW-1:0] base, prev_base;
  assign base      = RAM_AW'({sec_q, 3'b000});
  assign prev_base = RAM_AW'({sec_q - 1'b1, 3'b000});

  logic fin;     // finishing cycle after the last section
  assign fin = (state_q == S_RUN) && (c_q == 7'(CYC_PER_SEC));

  // full-precision sums, truncated and saturated when stored
  logic signed [35:0] y_sum, w1_sum, w2_sum;
  assign y_sum  = 36'(m_p) + (36'(w1_q) <<< FRAC_W);
  assign w1_sum = acc_q + 36'(m_p) + (36'(w2_q) <<< FRAC_W);
  assign w2_sum = acc_q + 36'(m_p);

  function automatic sample_t to_word(input logic signed [35:0] s);
    return sat16(40'(s >>> FRAC_W));
  endfunction

  // control: multiplier start and RAM accesses
  always_comb begin
    m_start = 1'b0;
    m_a     = coef_q;
    m_b     = x_q;
    ram_req = '0;
    unique case (state_q)
      S_PRE0: ram_req = '{en: 1'b1, we: 1'b0, addr: RAM_AW'(OFS_B0), wdata: '0};
      S_RUN: begin
        if (fin) begin
          ram_req = '{en: 1'b1, we: 1'b1, addr: base | RAM_AW'(OFS_W2), wdata: to_word(w2_sum)};
        end else begin
          unique case (c_q)
            7'd0: begin
              m_start = 1'b1;
              if (sec_q != '0)
                ram_req = '{en: 1'b1, we: 1'b1, addr: prev_base | RAM_AW'(OFS_W2),
                            wdata: to_word(w2_sum)};
            end
            7'd1:  ram_req = '{en: 1'b1, we: 1'b0, addr: base | RAM_AW'(OFS_B1), wdata: '0};
            7'd2:  ram_req = '{en: 1'b1, we: 1'b0, addr: base | RAM_AW'(OFS_W1), wdata: '0};
            7'd16: m_start = 1'b1;
            7'd17: ram_req = '{en: 1'b1, we: 1'b0, addr: base | RAM_AW'(OFS_A1), wdata: '0};
            7'd18: ram_req = '{en: 1'b1, we: 1'b0, addr: base | RAM_AW'(OFS_W2), wdata: '0};
            7'd32: begin m_start = 1'b1; m_b = y_q; end
            7'd33: ram_req = '{en: 1'b1, we: 1'b0, addr: base | RAM_AW'(OFS_B2), wdata: '0};
            7'd48: begin
              m_start = 1'b1;
              ram_req = '{en: 1'b1, we: 1'b1, addr: base | RAM_AW'(OFS_W1), wdata: to_word(w1_sum)};
            end
            7'd49: ram_req = '{en: 1'b1, we: 1'b0, addr: base | RAM_AW'(OFS_A2), wdata: '0};
            7'd64: begin m_start = 1'b1; m_b = y_q; end
            7'd65:
              if (sec_q != SW'(SECTIONS - 1))
                ram_req = '{en: 1'b1, we: 1'b0, addr: base + RAM_AW'(WORDS_PER_SEC), wdata: '0};
            default: ;
          endcase
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      sec_q   <= '0;
      c_q     <= '0;
      x_q     <= '0;
      y_q     <= '0;
      coef_q  <= '0;
      w1_q    <= '0;
      w2_q    <= '0;
      acc_q   <= '0;
      y_out   <= '0;
      y_valid <= 1'b0;
      overrun <= 1'b0;
    end else begin
      y_valid <= 1'b0;
      overrun <= start && (state_q != S_IDLE);
      unique case (state_q)
        S_IDLE:
          if (start) begin
            x_q     <= x_in;
            state_q <= S_PRE0;
          end
        S_PRE0: state_q <= S_PRE1;
        S_PRE1: begin
          coef_q  <= ram_rdata;
          sec_q   <= '0;
          c_q     <= '0;
          state_q <= S_RUN;
        end
        S_RUN: begin
          c_q <= c_q + 1'b1;
          unique case (c_q)
            7'd2, 7'd18, 7'd34, 7'd50, 7'd66: coef_q <= ram_rdata;
            7'd3:  w1_q  <= ram_rdata;
            7'd16: y_q   <= to_word(y_sum);
            7'd19: w2_q  <= ram_rdata;
            7'd32, 7'd64: acc_q <= 36'(m_p);
            7'(CYC_PER_SEC - 1):
              if (sec_q != SW'(SECTIONS - 1)) begin
                sec_q <= sec_q + 1'b1;
                c_q   <= '0;
                x_q   <= y_q;
              end
            7'(CYC_PER_SEC): begin  // finish cycle
              y_out   <= y_q;
              y_valid <= 1'b1;
              state_q <= S_IDLE;
            end
            default: ;
          endcase
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy = (state_q != S_IDLE);

  // each product is read exactly when the multiplier reports it done
  a_mult_sync: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == S_RUN && c_q inside {7'd16, 7'd32, 7'd48, 7'd64, 7'd80}) |-> m_done);

endmodule

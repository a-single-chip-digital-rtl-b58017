// bus_interface: system bus access to the coefficient RAM and the results.
//
// The host reaches the filter's coefficient/state RAM and a small set of
// result registers through a synchronous 16-bit word bus. Addresses below
// RAM_WORDS (32) map to the RAM (section j at words 8j..8j+7, see
// phase_meter_pkg); the registers are:
//   0x20 PHASE     [15] a crossing was found, [8:0] phase in degrees
//   0x21 PP_LO     peak-to-peak amplitude bits [15:0] (14 fraction bits)
//   0x22 PP_HI     peak-to-peak amplitude bit 16
//   0x23 STATUS    [0] new result, [1] period valid, [2] overrun;
//                  reading STATUS clears bits 0 and 2
//   0x24 PERIOD_LO SYNC period in 16 MHz ticks, bits [15:0]
//   0x25 PERIOD_HI SYNC period bits [23:16]
//   0x26 INDEX     current sample index
// Other addresses read as 0; writes to registers are ignored.
//
// RAM sharing: the RAM has one port. The filter owns it while `filter_busy`
// is high; a bus access to the RAM waits until the filter is idle. The filter
// needs 324 of the at least ~350 cycles between samples, so a bus access
// waits at most one filter run.
//
// Handshake: the host raises `bus_cs` with `bus_we`, `bus_addr` and
// `bus_wdata` and holds them until `bus_ack` pulses for one cycle; read data
// is valid in `bus_rdata` during that cycle. The host must drop `bus_cs` or
// present a new access in the cycle after `bus_ack`. A register access is
// acknowledged in the cycle after the request, a RAM access in the cycle
// after it was granted.
//
// The document names the bus interface and says the coefficients are
// programmable over the system bus; the bus protocol, the register map and
// the arbitration are this design's own choices.
module bus_interface
  import phase_meter_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // system bus
  input  logic                bus_cs,
  input  logic                bus_we,
  input  logic [7:0]          bus_addr,
  input  logic [DATA_W-1:0]   bus_wdata,
  output logic [DATA_W-1:0]   bus_rdata,
  output logic                bus_ack,
  // RAM sharing
  input  logic                filter_busy,
  input  ram_req_t            filter_req,
  output ram_req_t            ram_req,
  input  sample_t             ram_rdata,
  // results
  input  logic [PHASE_W-1:0]  phase_out,
  input  logic                phase_found,
  input  logic                phase_rdy,
  input  logic [DATA_W:0]     pp_out,
  input  logic                pp_valid,
  input  logic [PERIOD_W-1:0] period,
  input  logic                period_valid,
  input  logic [IDX_W-1:0]    index,
  input  logic                overrun
);

  logic [DATA_W-1:0] phase_reg;
  logic [DATA_W:0]   pp_reg;
  logic              new_q, ovr_q;

  logic              ack_q;        // acknowledge this cycle
  logic              ram_rd_q;     // the acknowledged access read the RAM
  logic [DATA_W-1:0] reg_rdata_q;

  logic is_ram, bus_ram_go, reg_go;
  assign is_ram     = (bus_addr < 8'(RAM_WORDS));
  assign bus_ram_go = bus_cs && !ack_q && is_ram && !filter_busy;
  assign reg_go     = bus_cs && !ack_q && !is_ram;

  always_comb begin
    if (filter_busy)
      ram_req = filter_req;
    else if (bus_ram_go)
      ram_req = '{en: 1'b1, we: bus_we, addr: RAM_AW'(bus_addr), wdata: bus_wdata};
    else
      ram_req = '0;
  end

  logic [DATA_W-1:0] reg_val;
  always_comb begin
    unique case (bus_addr)
      REG_PHASE:     reg_val = phase_reg;
      REG_PP_LO:     reg_val = pp_reg[DATA_W-1:0];
      REG_PP_HI:     reg_val = DATA_W'(pp_reg[DATA_W]);
      REG_STATUS:    reg_val = DATA_W'({ovr_q, period_valid, new_q});
      REG_PERIOD_LO: reg_val = period[15:0];
      REG_PERIOD_HI: reg_val = DATA_W'(period[PERIOD_W-1:16]);
      REG_INDEX:     reg_val = DATA_W'(index);
      default:       reg_val = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_reg   <= '0;
      pp_reg      <= '0;
      new_q       <= 1'b0;
      ovr_q       <= 1'b0;
      ack_q       <= 1'b0;
      ram_rd_q    <= 1'b0;
      reg_rdata_q <= '0;
    end else begin
      ack_q    <= bus_ram_go || reg_go;
      ram_rd_q <= bus_ram_go && !bus_we;
      if (reg_go) reg_rdata_q <= reg_val;

      if (phase_rdy) phase_reg <= {phase_found, 6'b0, phase_out};
      if (pp_valid)  pp_reg    <= pp_out;

      // sticky flags: a read of STATUS clears them unless set again now
      if (reg_go && !bus_we && bus_addr == REG_STATUS) begin
        new_q <= 1'b0;
        ovr_q <= 1'b0;
      end
      if (phase_rdy) new_q <= 1'b1;
      if (overrun)   ovr_q <= 1'b1;
    end
  end

  assign bus_ack   = ack_q;
  assign bus_rdata = ram_rd_q ? ram_rdata : reg_rdata_q;

  // host rule: a request stays unchanged until it is acknowledged
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (bus_cs && !bus_ack) |=> (bus_ack || (bus_cs && $stable(bus_addr) && $stable(bus_we)
                                          && $stable(bus_wdata))));

endmodule

// phase_meter_pkg: constants and types shared by the phase meter blocks.
//
// Number format: filter samples, coefficients and states are 16-bit two's
// complement fixed point with 14 fraction bits (Q2.14), covering
// -2 <= x <= 2 - 2^-14. The sampling factor N = 45 gives 8 degrees per
// sampling interval (360 / 45); linear interpolation refines this to 1 degree.
//
// Coefficient RAM layout: every second-order section j owns an 8-word slot
// starting at word 8*j (16 bytes, of which 7 words are used). The word order
// inside a slot is this design's own choice.
package phase_meter_pkg;

  localparam int unsigned DATA_W        = 16;  // filter word width
  localparam int unsigned FRAC_W        = 14;  // fraction bits of a filter word
  localparam int unsigned ADC_W         = 12;  // A-D converter resolution
  localparam int unsigned N_SECTIONS    = 4;   // second-order sections (8th order)
  localparam int unsigned WORDS_PER_SEC = 8;   // RAM words reserved per section
  localparam int unsigned RAM_WORDS     = N_SECTIONS * WORDS_PER_SEC;
  localparam int unsigned RAM_AW        = $clog2(RAM_WORDS);
  localparam int unsigned N_MULT        = 45;  // samples per rotation
  localparam int unsigned DEG_PER_SMP   = 8;   // 360 / N_MULT
  localparam int unsigned PHASE_W       = 9;   // 0..359 degrees
  localparam int unsigned IDX_W         = 6;   // sample index 0..N_MULT-1
  localparam int unsigned PERIOD_W      = 24;  // SYNC period in 16 MHz ticks (1 Hz fits)
  localparam int unsigned CYC_PER_MULT  = 16;  // shift-add multiply
  localparam int unsigned CYC_PER_SEC   = 5 * CYC_PER_MULT;  // 80 cycles

  // Offsets of the words of one section inside its 8-word slot.
  typedef enum logic [2:0] {
    OFS_B0 = 3'd0,
    OFS_B1 = 3'd1,
    OFS_B2 = 3'd2,
    OFS_A1 = 3'd3,
    OFS_A2 = 3'd4,
    OFS_W1 = 3'd5,
    OFS_W2 = 3'd6,
    OFS_SPARE = 3'd7
  } sec_ofs_e;

  typedef logic signed [DATA_W-1:0] sample_t;

  // One access to the single-port coefficient RAM.
  typedef struct packed {
    logic              en;     // access this cycle
    logic              we;     // 1 = write, 0 = read
    logic [RAM_AW-1:0] addr;
    sample_t           wdata;
  } ram_req_t;

  // System bus register map (16-bit words). Addresses below RAM_WORDS reach
  // the coefficient RAM.
  localparam logic [7:0] REG_PHASE     = 8'h20;  // [15] valid, [8:0] degrees
  localparam logic [7:0] REG_PP_LO     = 8'h21;  // peak-to-peak [15:0]
  localparam logic [7:0] REG_PP_HI     = 8'h22;  // peak-to-peak [16]
  localparam logic [7:0] REG_STATUS    = 8'h23;  // [0] new result, [1] period valid, [2] overrun
  localparam logic [7:0] REG_PERIOD_LO = 8'h24;  // SYNC period [15:0]
  localparam logic [7:0] REG_PERIOD_HI = 8'h25;  // SYNC period [23:16]
  localparam logic [7:0] REG_INDEX     = 8'h26;  // current sample index

  // Saturate a wide signed value to a filter word.
  function automatic sample_t sat16(input logic signed [39:0] v);
    if (v > 40'sd32767)       return 16'sh7fff;
    else if (v < -40'sd32768) return 16'sh8000;
    else                      return v[15:0];
  endfunction

endpackage

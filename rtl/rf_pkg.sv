// rf_pkg: types, constants and arithmetic helpers shared by the digital RF
// control circuit.
//
// Data words of the control loops are 12-bit two's complement (11 bits plus
// sign, as delivered by the monitor ADCs). The frequency word sent to the
// digital synthesizer is 20-bit unsigned, one LSB = 10 Hz. Every adder in the
// loops saturates instead of wrapping, so an overload never turns a large
// positive correction into a large negative one; saturation is a choice of
// this design, the source of the architecture does not discuss it.
//
// The "ROM" boxes of the loop diagram multiply a data word by a 4-bit setting.
// Their contents are not published, so here a ROM is computed as
// rom_gain(x, k) = sat(x * k / 8): k = 8 is unity gain, k = 0 switches the
// path off and k = 15 gives 1.875.
package rf_pkg;

  localparam int unsigned DW     = 12;  // loop data word (ADC width)
  localparam int unsigned GW     = 4;   // gain / ROM setting width
  localparam int unsigned FW     = 20;  // DS frequency word, 10 Hz per LSB
  localparam int unsigned PAT_AW = 17;  // 128k-word pattern memories
  localparam int unsigned PAT_DW = 20;  // pattern word width
  localparam int unsigned NPAT   = 5;   // number of pattern kinds

  typedef logic signed [DW-1:0] dword_t;
  typedef logic        [GW-1:0] gain_t;
  typedef logic        [FW-1:0] fword_t;
  typedef logic [PAT_AW-1:0]    paddr_t;
  typedef logic [PAT_DW-1:0]    pword_t;

  // Pattern kinds held by the memory module, in memory-slot order.
  typedef enum logic [2:0] {
    PAT_FREQ  = 3'd0,  // accelerating frequency
    PAT_VOLT  = 3'd1,  // accelerating voltage
    PAT_FBIAS = 3'd2,  // ferrite bias current
    PAT_RBIAS = 3'd3,  // bias of beam position (dR REF)
    PAT_VCOR  = 3'd4   // accelerating voltage correction
  } pat_kind_e;

  // Regions of a pattern memory.
  typedef enum logic [1:0] {
    REG_IDLE = 2'd0,  // waiting for the capture event, pointer at 0
    REG_BASE = 2'd1,  // region-1, flat base, T-clock
    REG_ACC  = 2'd2,  // region-2, acceleration, B-clock
    REG_TOP  = 2'd3   // region-3, flat top, T-clock
  } region_e;

  localparam int signed DMAX = (1 <<< (DW-1)) - 1;
  localparam int signed DMIN = -(1 <<< (DW-1));

  // Saturate a wide signed value to a 12-bit data word.
  function automatic dword_t sat_d(input logic signed [31:0] v);
    if (v > DMAX)      return dword_t'(DMAX);
    else if (v < DMIN) return dword_t'(DMIN);
    else               return dword_t'(v);
  endfunction

  // Computed gain ROM: sat(x * k / 8), rounding toward minus infinity.
  function automatic dword_t rom_gain(input dword_t x, input gain_t k);
    logic signed [31:0] p;
    p = 32'(x) * $signed({28'd0, k});
    return sat_d(p >>> 3);
  endfunction

  // Saturating 12-bit addition.
  function automatic dword_t add_d(input dword_t a, input dword_t b);
    return sat_d(32'(a) + 32'(b));
  endfunction

endpackage

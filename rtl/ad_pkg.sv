// ad_pkg: types and constants shared by the RRAM anisotropic-diffusion engine.
//
// Pixels are carried as 4-bit level codes (16 levels, L_samp = 2^4). A pulse
// amplitude is carried as an unsigned number of millivolts; level k is
// programmed with k * VSTEP millivolts (0.15 V steps from 0 V upward).
// A cross-point cell's analog state is modelled as an unsigned fixed-point
// number with 4 integer bits (the level) and STATE_FRAC fraction bits, so the
// accumulation of small brightness fluxes over many iterations is kept.
//
// One pseudo-parallel crossbar cycle is ten pulse slots of one clock each
// (10 ns at 100 MHz, 100 ns per cycle): a write slot for the origin and then
// one for each of the North, South, West and East neighbours, each followed
// by a read slot. The slot order O, N, S, W, E follows the pulse train of the
// published architecture's example; the fixed-point widths and the flux law are this
// design's choices.
package ad_pkg;

  localparam int unsigned CODE_W     = 4;
  localparam int unsigned LEVELS     = 1 << CODE_W;
  localparam int unsigned VOLT_W     = 12;               // millivolts, up to 4.095 V
  localparam int unsigned STATE_FRAC = 8;
  localparam int unsigned STATE_W    = CODE_W + STATE_FRAC;
  localparam int unsigned SLOTS      = 10;               // pulse slots per crossbar cycle
  localparam int unsigned SLOT_W     = 4;
  localparam int unsigned STATE_MAX  = (LEVELS - 1) << STATE_FRAC;

  typedef logic [CODE_W-1:0]  code_t;
  typedef logic [VOLT_W-1:0]  volt_t;
  typedef logic [STATE_W-1:0] state_t;
  typedef logic [SLOT_W-1:0]  slot_t;

  // Origin pixel and its four nearest neighbours (the 4-neighbour tensor scheme).
  typedef struct packed {
    code_t o;
    code_t n;
    code_t s;
    code_t w;
    code_t e;
  } window_t;

  // What a pulse slot does to the selected cross-point cells.
  typedef enum logic [1:0] {
    OP_NONE = 2'd0,   // no pulse
    OP_PROG = 2'd1,   // write the origin level (WL = Vo, BL grounded)
    OP_DIFF = 2'd2,   // WL = Vo, BL = Vneighbour: accumulate f(Vbl - Vwl)
    OP_READ = 2'd3    // non-destructive read, levels sensed on the bit lines
  } pulse_op_e;

  // Which pixel of the window a write slot uses on the bit line.
  typedef enum logic [2:0] {
    DIR_O = 3'd0,
    DIR_N = 3'd1,
    DIR_S = 3'd2,
    DIR_W = 3'd3,
    DIR_E = 3'd4
  } dir_e;

  typedef int flux_tab_t [2*LEVELS-1];

  // Slot s (0..9): slots 0,2,4,6,8 write O,N,S,W,E; odd slots read.
  function automatic dir_e slot_dir(slot_t s);
    case (s[SLOT_W-1:1])
      3'd0:    return DIR_O;
      3'd1:    return DIR_N;
      3'd2:    return DIR_S;
      3'd3:    return DIR_W;
      default: return DIR_E;
    endcase
  endfunction

  function automatic logic slot_is_read(slot_t s);
    return s[0];
  endfunction

  // Nonlinear flux for a signed level difference d = neighbour - origin:
  //   f(d) = sigma * d * g(|d|),  g(x) = kappa^2 / (kappa^2 + x^2)
  // in units of 2^-STATE_FRAC level; g falls with the gradient so that
  // diffusion is inhibited across edges (Perona-Malik form), and
  // sigma = 2^-sigma_shift.
  function automatic int flux(int d, int kappa, int sigma_shift);
    int ad;
    int mag;
    ad  = (d < 0) ? -d : d;
    mag = (ad * (1 << STATE_FRAC) * kappa * kappa) / (kappa * kappa + ad * ad);
    mag = mag >>> sigma_shift;
    return (d < 0) ? -mag : mag;
  endfunction

  // Table of flux() indexed by d + LEVELS - 1, for d in -(LEVELS-1)..LEVELS-1.
  function automatic flux_tab_t flux_table(int kappa, int sigma_shift);
    flux_tab_t t;
    for (int k = 0; k < 2 * LEVELS - 1; k++)
      t[k] = flux(k - (LEVELS - 1), kappa, sigma_shift);
    return t;
  endfunction

  // Level read back from a cell state: round to nearest, saturate.
  function automatic code_t state_level(state_t x);
    logic [STATE_W:0] r;
    r = {1'b0, x} + (STATE_W+1)'(1 << (STATE_FRAC - 1));
    if (int'(r[STATE_W:STATE_FRAC]) > int'(LEVELS - 1)) return code_t'(LEVELS - 1);
    return r[STATE_FRAC +: CODE_W];
  endfunction

endpackage

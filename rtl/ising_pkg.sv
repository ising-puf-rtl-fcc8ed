// Shared types, constants and delay-model functions of the Ising-PUF.
//
// The Ising-PUF is a W x H lattice of cells. Each cell holds an elemental
// 4-input arbiter PUF and a spin register; the four neighbouring spins are the
// challenge of the cell's PUF, and its response is written back into the spin
// register on every annealing clock.
//
// This package holds:
//  * cell_ctrl_t - the global control lines that the control logic broadcasts
//    to every cell (clear, set-dark-cell, invert, annealing, read).
//  * ctrl_state_t - the states of the control logic.
//  * the integer delay model used by the behavioural arbiter-PUF model. A
//    real chip gets its delays from transistor mismatch; here every delay
//    element draws a nominal offset and a temperature coefficient from a hash
//    of (SEED, cell, element), so a different SEED stands for a different
//    manufactured chip. The hash, its ranges and the temperature scaling are
//    this design's own choices, tuned so that roughly 10 % to 40 % of the
//    elemental PUFs change at least one response between 20 C and 100 C, the
//    share of unstable elemental PUFs reported for the 65 nm experiments.
package ising_pkg;

  // Global control lines shared by all cells (Fig. 4 bottom bus, plus a
  // synchronous spin clear used for the initialisation step).
  typedef struct packed {
    logic clear;      // reset every spin register to 0 (initialisation)
    logic set_dark;   // set the dark-cell register of the selected cell
    logic invert;     // invert the spin of the selected cell
    logic annealing;  // every spin register loads its cell's PUF/XOR output
    logic read;       // the selected cell drives the spin-global wire
  } cell_ctrl_t;

  typedef enum logic [2:0] {
    ST_IDLE,    // waiting for a command
    ST_DARK,    // scanning cells, setting dark-cell registers
    ST_CLEAR,   // step 1: all spins to 0
    ST_MAP,     // step 2: invert spin i where challenge bit i is 1
    ST_ANNEAL,  // step 3: n_anneal simultaneous spin updates
    ST_READ,    // step 4: serial read of all spins, XOR into the response
    ST_DONE     // one-cycle completion strobe
  } ctrl_state_t;

  // Default chip instance.
  localparam int unsigned DEFAULT_SEED = 32'h1CE5_0001;

  // Delay model of one selector element, in arbitrary time units.
  localparam int BASE_DELAY  = 2000; // nominal delay of a path through a MUX
  localparam int DELAY_VAR   = 64;   // mismatch: uniform in [-DELAY_VAR, DELAY_VAR]
  localparam int TC_VAR      = 1;    // temperature coefficient in [-TC_VAR, TC_VAR]
  localparam int TC_SHIFT    = 5;    // delay shift = (coefficient * temp) >>> TC_SHIFT
  localparam int ARB_OFF_VAR = 16;   // arbiter decision offset in [-ARB_OFF_VAR, ARB_OFF_VAR]

  // 32-bit integer hash (xor-shift / multiply finaliser).
  function automatic int unsigned mix32(input int unsigned x);
    int unsigned h;
    h = x;
    h = h ^ (h >> 16);
    h = h * 32'h7feb_352d;
    h = h ^ (h >> 15);
    h = h * 32'h846c_a68b;
    h = h ^ (h >> 16);
    return h;
  endfunction

  // Hash of one variation source: element idx of cell `cell_id`, salt selects
  // which property (0: delay offset, 1: temperature coefficient, 2: arbiter).
  function automatic int unsigned puf_key(input int unsigned seed, input int cell_id,
                                          input int idx, input int salt);
    int unsigned k;
    k = (int'(cell_id) << 8) + (int'(idx) << 2) + int'(salt) * 32'h9e37_79b9;
    return mix32(seed ^ mix32(k));
  endfunction

  // Map a hash onto the integer range [-range, range].
  function automatic int spread(input int unsigned h, input int range);
    int unsigned span;
    span = 2 * range + 1;
    return int'(h % span) - range;
  endfunction

  // Nominal delay of element e (0..3) of stage s (0..3) of cell `cell_id`.
  //   e = 0: straight, top lane      e = 1: straight, bottom lane
  //   e = 2: crossed, bottom -> top  e = 3: crossed, top -> bottom
  function automatic int elem_delay(input int unsigned seed, input int cell_id,
                                    input int s, input int e);
    return BASE_DELAY + spread(puf_key(seed, cell_id, s * 4 + e, 0), DELAY_VAR);
  endfunction

  // Temperature coefficient of the same element.
  function automatic int elem_tc(input int unsigned seed, input int cell_id,
                                 input int s, input int e);
    return spread(puf_key(seed, cell_id, s * 4 + e, 1), TC_VAR);
  endfunction

  // Arbiter decision offset of a cell (setup-time asymmetry of the latch).
  function automatic int arb_offset(input int unsigned seed, input int cell_id);
    return spread(puf_key(seed, cell_id, 16, 2), ARB_OFF_VAR);
  endfunction

endpackage

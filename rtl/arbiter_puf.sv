// Behavioural model of the 4-stage arbiter PUF used as the elemental PUF of
// each Ising-PUF cell.
//
// The real part is analog in nature: a launch edge races down two lanes
// through four selector stages, and an arbiter flip-flop (top lane on D,
// bottom lane on the clock pin) records which lane arrived first. A selector
// stage passes both lanes straight through when its challenge bit is 1 and
// swaps them when it is 0. Manufacturing mismatch makes the four path delays
// of every stage slightly different, and the accumulated difference decides
// the response bit.
//
// This model reproduces that race with integer arithmetic, so it is
// synthesizable, but it is not the circuit: each of the 16 path delays is
// drawn from the delay model in ising_pkg (nominal value + mismatch +
// temperature coefficient * temp), the arrival times of both lanes are summed
// stage by stage, and the response is 1 when the top lane wins, after adding a
// small arbiter offset. The extra input `temp` (degrees Celsius) exists only
// in the model: it stands for the operating condition that makes marginal
// elemental PUFs ("dark bits") flip.
//
// Interface: challenge[s] drives selector stage s, stage 0 being the one next
// to the launch point. The response is combinational: the race is taken as
// settled within the clock cycle in which the challenge is stable, and the
// spin register of the cell captures it at the next rising clock edge. The
// launch (EN) input of the real part is not modelled.
module arbiter_puf
  import ising_pkg::*;
#(
  parameter int unsigned SEED   = DEFAULT_SEED, // chip instance
  parameter int          CELL   = 0,            // cell index inside the chip
  parameter int          STAGES = 4             // selector stages (= challenge bits)
) (
  input  logic [STAGES-1:0] challenge,
  input  logic signed [7:0] temp,      // model only: operating temperature, C
  output logic              response
);

  // Arrival times of the top and bottom lanes after each stage.
  logic signed [STAGES:0][31:0] t_top, t_bot;

  assign t_top[0] = '0;
  assign t_bot[0] = '0;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    localparam int D_ST_TOP = elem_delay(SEED, CELL, s, 0);
    localparam int D_ST_BOT = elem_delay(SEED, CELL, s, 1);
    localparam int D_CR_BT  = elem_delay(SEED, CELL, s, 2);
    localparam int D_CR_TB  = elem_delay(SEED, CELL, s, 3);
    localparam int C_ST_TOP = elem_tc(SEED, CELL, s, 0);
    localparam int C_ST_BOT = elem_tc(SEED, CELL, s, 1);
    localparam int C_CR_BT  = elem_tc(SEED, CELL, s, 2);
    localparam int C_CR_TB  = elem_tc(SEED, CELL, s, 3);

    int d_st_top, d_st_bot, d_cr_bt, d_cr_tb;
    always_comb begin
      d_st_top = D_ST_TOP + ((C_ST_TOP * int'(temp)) >>> TC_SHIFT);
      d_st_bot = D_ST_BOT + ((C_ST_BOT * int'(temp)) >>> TC_SHIFT);
      d_cr_bt  = D_CR_BT  + ((C_CR_BT  * int'(temp)) >>> TC_SHIFT);
      d_cr_tb  = D_CR_TB  + ((C_CR_TB  * int'(temp)) >>> TC_SHIFT);
    end

    // challenge 1: straight; challenge 0: lanes swapped.
    assign t_top[s+1] = challenge[s] ? signed'(t_top[s]) + d_st_top : signed'(t_bot[s]) + d_cr_bt;
    assign t_bot[s+1] = challenge[s] ? signed'(t_bot[s]) + d_st_bot : signed'(t_top[s]) + d_cr_tb;
  end

  localparam int ARB_OFF = arb_offset(SEED, CELL);

  // Top lane (D) arrives before the bottom lane (clock): the latch stores 1.
  assign response = (signed'(t_bot[STAGES]) + ARB_OFF) > signed'(t_top[STAGES]);

endmodule

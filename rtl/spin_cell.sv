// One cell of the Ising-PUF lattice.
//
// The cell holds an elemental 4-input arbiter PUF, a 1-bit spin register and
// a 1-bit dark-cell register. Its four neighbours' spins (right, upper, left,
// lower) form the 4-bit challenge of the PUF. The structure follows the cell
// schematic of the design:
//   * MUX1 picks the PUF response, or, when the dark-cell register is set,
//     the XOR of the four neighbour spins (dark-cell elimination: an unstable
//     PUF is replaced by a stable, nonlinear function of the same inputs).
//   * MUX2 picks MUX1's output, or the inverted spin while `invert` is high.
//   * MUX0 chooses what clocks the spin register: the free-running clock
//     during annealing, otherwise the clock gated by invert and cell select.
//     Here this is a clock enable on a register clocked by clk, which loads
//     at the same edges as the gated clock would.
//   * The dark-cell register has "1" on its D input and is loaded when
//     set_dark and the cell select are both high (again a clock enable).
//   * In read mode the selected cell drives the shared spin-global wire.
//     The tri-state driver of the schematic is replaced by an AND gate whose
//     outputs the array ORs together, which is the same wire function when at
//     most one cell is selected.
// The cell is selected when both its column line (x_sel) and row line (y_sel)
// are high.
//
// Own choices of this design: `clear` (synchronous spin reset used for the
// initialisation step) and the asynchronous active-low reset rst_n, which
// clears both registers; neither is drawn in the cell schematic. The model-only
// input `temp` goes to the behavioural arbiter PUF.
//
// Timing: every register change happens at the rising edge of clk after the
// control lines were set; spin_out changes one cycle after `annealing` or
// `invert` is seen. global_out is combinational in read/x_sel/y_sel.
module spin_cell
  import ising_pkg::*;
#(
  parameter int unsigned SEED = DEFAULT_SEED, // chip instance
  parameter int          CELL = 0             // cell index (selects the PUF's mismatch)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              x_sel,
  input  logic              y_sel,
  input  cell_ctrl_t        ctrl,
  input  logic signed [7:0] temp,        // model only, to the arbiter PUF
  input  logic              spin_right,
  input  logic              spin_upper,
  input  logic              spin_left,
  input  logic              spin_lower,
  output logic              spin_out,    // to the four neighbour cells
  output logic              global_out,  // this cell's drive of spin-global
  output logic              dark_out     // state of the dark-cell register
);

  logic       sel;
  logic [3:0] nbr;
  logic       puf_resp, xor_resp, mux1, mux2, spin_en;
  logic       spin_q, dark_q;

  assign sel = x_sel & y_sel;
  assign nbr = {spin_right, spin_upper, spin_left, spin_lower};

  arbiter_puf #(.SEED(SEED), .CELL(CELL)) u_puf (
    .challenge (nbr),
    .temp      (temp),
    .response  (puf_resp)
  );

  assign xor_resp = ^nbr;
  assign mux1     = dark_q ? xor_resp : puf_resp;     // MUX1
  assign mux2     = ctrl.invert ? ~spin_q : mux1;     // MUX2
  assign spin_en  = ctrl.annealing | (ctrl.invert & sel); // MUX0 as clock enable

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              spin_q <= 1'b0;
    else if (ctrl.clear)     spin_q <= 1'b0;
    else if (spin_en)        spin_q <= mux2;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    dark_q <= 1'b0;
    else if (ctrl.set_dark & sel)  dark_q <= 1'b1;
  end

  assign spin_out   = spin_q;
  assign dark_out   = dark_q;
  assign global_out = spin_q & sel & ctrl.read;

endmodule

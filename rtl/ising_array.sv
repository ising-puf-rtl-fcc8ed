// The W x H lattice of Ising-PUF cells.
//
// Cell (x, y) has index y*W + x; x counts columns from the left, y counts rows
// from the top, matching the row-major numbering sigma_1, sigma_2, ... of the
// spins. Every cell's spin output goes to its right, upper, left and lower
// neighbours, where it is one of their four challenge bits, so the cells form
// many closed loops. Cells on the edge of the array lack some neighbours; the
// missing challenge bits are tied to 0 (an open lattice, as in the small
// example lattice of the design; the document does not say what the edge
// cells see, so this is this design's choice).
//
// The column-select lines x_sel come from the X-decoder and the row-select
// lines y_sel from the Y-decoder; the global control lines in `ctrl` reach
// every cell. spin_global is the single read wire shared by all cells: it
// carries the spin of the selected cell while ctrl.read is high (an OR of the
// cells' gated outputs stands in for the tri-state wire). spins and dark are
// the register contents, brought out for observation.
//
// Timing: all spins update together at one rising clock edge per annealing
// step; spin_global is combinational.
module ising_array
  import ising_pkg::*;
#(
  parameter int unsigned SEED = DEFAULT_SEED, // chip instance
  parameter int          W    = 8,            // columns
  parameter int          H    = 8             // rows
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [W-1:0]      x_sel,
  input  logic [H-1:0]      y_sel,
  input  cell_ctrl_t        ctrl,
  input  logic signed [7:0] temp,        // model only, to every arbiter PUF
  output logic              spin_global,
  output logic [W*H-1:0]    spins,       // spins[y*W+x]
  output logic [W*H-1:0]    dark         // dark-cell registers, same order
);

  localparam int N = W * H;

  logic [N-1:0] drive;

  for (genvar y = 0; y < H; y++) begin : g_row
    for (genvar x = 0; x < W; x++) begin : g_col
      localparam int I = y * W + x;
      logic right, upper, left, lower;

      if (x < W - 1) begin : g_r
        assign right = spins[I + 1];
      end else begin : g_r0
        assign right = 1'b0;
      end
      if (y > 0) begin : g_u
        assign upper = spins[I - W];
      end else begin : g_u0
        assign upper = 1'b0;
      end
      if (x > 0) begin : g_l
        assign left = spins[I - 1];
      end else begin : g_l0
        assign left = 1'b0;
      end
      if (y < H - 1) begin : g_d
        assign lower = spins[I + W];
      end else begin : g_d0
        assign lower = 1'b0;
      end

      spin_cell #(.SEED(SEED), .CELL(I)) u_cell (
        .clk        (clk),
        .rst_n      (rst_n),
        .x_sel      (x_sel[x]),
        .y_sel      (y_sel[y]),
        .ctrl       (ctrl),
        .temp       (temp),
        .spin_right (right),
        .spin_upper (upper),
        .spin_left  (left),
        .spin_lower (lower),
        .spin_out   (spins[I]),
        .global_out (drive[I]),
        .dark_out   (dark[I])
      );
    end
  end

  assign spin_global = |drive;

endmodule

// Ising-PUF: a physically unclonable function built from a lattice of small,
// mutually interacting arbiter PUFs.
//
// The top connects the W x H cell array, the X-decoder (column selects), the
// Y-decoder (row selects) and the control logic. A challenge has one bit per
// cell: after the spins are cleared, spin i is inverted where challenge bit i
// is 1; then all cells update together for n_anneal clock cycles, each cell
// loading the response of its own elemental PUF to the four neighbour spins;
// finally the spins are read one by one over a single shared wire and XORed
// into the 1-bit response. Because every spin is both a response and a
// challenge bit of its neighbours, the lattice has many feedback loops and the
// spin pattern it develops is specific to the chip.
//
// Commands (each a one-cycle pulse while busy is low):
//   load_dark  - mark the cells whose bit in dark_bits is 1 as dark cells;
//                a dark cell replaces its PUF response by the XOR of its four
//                neighbour spins. Dark cells stay marked until rst_n.
//   start      - evaluate `challenge`; with keep_state = 1 the clear is
//                skipped and the challenge acts on the spins left by the
//                previous evaluation.
//   cfg_we     - set the annealing count (reset value N_A).
// done is a one-cycle strobe at the end of a command; response holds the
// result of the last start. During the read phase spin_bit/spin_valid/spin_idx
// show each spin as it is read, which is how the elemental CRPs are collected
// at registration (annealing count 1).
//
// Latency of start: done is high after clock edge 2*W*H + n_anneal + 1,
// counting the edge that samples start as edge 0 (one edge earlier with
// keep_state): 139 cycles for the 8 x 8 array with 10 annealing steps.
//
// SEED selects the simulated chip instance of the behavioural arbiter-PUF
// model and temp is that model's operating temperature; neither exists on a
// real chip, where both come from the silicon.
module ising_puf
  import ising_pkg::*;
#(
  parameter int unsigned SEED = DEFAULT_SEED, // chip instance (model only)
  parameter int          W    = 8,            // columns
  parameter int          H    = 8,            // rows
  parameter int          N_A  = 10,           // default annealing steps
  parameter int          NA_W = 8,
  localparam int         N    = W * H,
  localparam int         IW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load_dark,
  input  logic [N-1:0]      dark_bits,
  input  logic              start,
  input  logic [N-1:0]      challenge,
  input  logic              keep_state,
  input  logic              cfg_we,
  input  logic [NA_W-1:0]   cfg_n_anneal,
  input  logic signed [7:0] temp,          // model only
  output logic              busy,
  output logic              done,
  output logic              response,
  output logic              spin_bit,
  output logic              spin_valid,
  output logic [IW-1:0]     spin_idx,
  output logic [NA_W-1:0]   n_anneal       // current annealing count
);

  localparam int XW = (W > 1) ? $clog2(W) : 1;
  localparam int YW = (H > 1) ? $clog2(H) : 1;

  logic [XW-1:0]   x_addr;
  logic [YW-1:0]   y_addr;
  logic [W-1:0]    x_sel;
  logic [H-1:0]    y_sel;
  cell_ctrl_t      ctrl;
  logic            spin_global;
  logic [N-1:0]    spins, dark;

  ising_ctrl #(.W(W), .H(H), .N_A(N_A), .NA_W(NA_W)) u_ctrl (
    .clk          (clk),
    .rst_n        (rst_n),
    .load_dark    (load_dark),
    .dark_bits    (dark_bits),
    .start        (start),
    .challenge    (challenge),
    .keep_state   (keep_state),
    .cfg_we       (cfg_we),
    .cfg_n_anneal (cfg_n_anneal),
    .busy         (busy),
    .done         (done),
    .response     (response),
    .spin_bit     (spin_bit),
    .spin_valid   (spin_valid),
    .spin_idx     (spin_idx),
    .n_anneal     (n_anneal),
    .x_addr       (x_addr),
    .y_addr       (y_addr),
    .ctrl         (ctrl),
    .spin_global  (spin_global)
  );

  addr_decoder #(.N(W)) u_xdec (.addr(x_addr), .sel(x_sel));
  addr_decoder #(.N(H)) u_ydec (.addr(y_addr), .sel(y_sel));

  ising_array #(.SEED(SEED), .W(W), .H(H)) u_array (
    .clk         (clk),
    .rst_n       (rst_n),
    .x_sel       (x_sel),
    .y_sel       (y_sel),
    .ctrl        (ctrl),
    .temp        (temp),
    .spin_global (spin_global),
    .spins       (spins),
    .dark        (dark)
  );

endmodule

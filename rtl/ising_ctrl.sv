// Control logic of the Ising-PUF.
//
// It turns a challenge into a 1-bit response in four steps, driving the
// global control lines of the cell array and the X/Y addresses of the
// decoders:
//   1. Initialisation: one cycle with ctrl.clear, all spins become 0
//      (skipped when keep_state is set, see below).
//   2. Challenge mapping: the cells are addressed one per cycle in index
//      order (x fastest); ctrl.invert is raised in the cycle of cell i when
//      challenge[i] is 1, so that cell's spin is inverted. Only one spin is
//      inverted at a time.
//   3. Annealing: ctrl.annealing is high for n_anneal cycles; every cell
//      updates its spin at each of those clock edges.
//   4. Response generation: the cells are addressed again one per cycle with
//      ctrl.read high; the spin on spin_global is sampled each cycle, shown on
//      spin_bit/spin_valid/spin_idx, and XORed into the response.
// A separate command, load_dark, scans the cells once and raises
// ctrl.set_dark for every cell whose bit in dark_bits is 1. Dark-cell
// registers can only be set; rst_n clears them.
//
// The four steps, the single-spin inversion, the serial read over one global
// wire and the XOR of all spins follow the document. Its own choices are: the
// command handshake (start/load_dark pulses accepted when not busy, a done
// strobe at the end), scanning every cell during mapping rather than only the
// cells to be inverted (fixed latency), the keep_state input that skips the
// initialisation so that successive challenges act on the spin pattern left
// by the previous one (the challenge hysteresis the design relies on), and
// the run-time annealing count: it resets to N_A and is rewritten by cfg_we.
// A count of 1 makes each read-out spin the direct response of that cell's
// elemental PUF, which is how the elemental CRPs can be collected at
// registration.
//
// Timing, with start sampled at clock edge 0 and keep_state = 0: the clear
// happens at edge 1, the N mapping cycles at edges 2..N+1, the annealing steps
// at the next n_anneal edges, the N read cycles at the N edges after that,
// and done is high right after the last read edge, edge 2N + n_anneal + 1
// (one edge earlier with keep_state). response is valid from done
// until the next start.
module ising_ctrl
  import ising_pkg::*;
#(
  parameter int W    = 8,   // columns
  parameter int H    = 8,   // rows
  parameter int N_A  = 10,  // default number of annealing steps
  parameter int NA_W = 8,   // width of the annealing count
  parameter int XW   = (W > 1) ? $clog2(W) : 1,
  parameter int YW   = (H > 1) ? $clog2(H) : 1,
  parameter int IW   = (W * H > 1) ? $clog2(W * H) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // commands
  input  logic            load_dark,    // pulse: write dark_bits into the cells
  input  logic [W*H-1:0]  dark_bits,    // bit i: cell i is a dark cell
  input  logic            start,        // pulse: evaluate challenge
  input  logic [W*H-1:0]  challenge,    // bit i inverts spin i
  input  logic            keep_state,   // with start: skip the initialisation
  input  logic            cfg_we,       // write the annealing count
  input  logic [NA_W-1:0] cfg_n_anneal,
  // status and results
  output logic            busy,
  output logic            done,         // one-cycle strobe when a command ends
  output logic            response,     // XOR of all spins of the last start
  output logic            spin_bit,     // spin read in this cycle
  output logic            spin_valid,
  output logic [IW-1:0]   spin_idx,
  output logic [NA_W-1:0] n_anneal,     // current annealing count
  // to the array and decoders
  output logic [XW-1:0]   x_addr,
  output logic [YW-1:0]   y_addr,
  output cell_ctrl_t      ctrl,
  input  logic            spin_global
);

  localparam int N = W * H;

  ctrl_state_t     state;
  logic [XW-1:0]   xc;
  logic [YW-1:0]   yc;
  logic [NA_W-1:0] acnt;
  logic [N-1:0]    chal_q, dark_q;
  logic            acc;
  logic            last_cell;
  logic [IW-1:0]   idx;

  assign last_cell = (int'(xc) == W - 1) && (int'(yc) == H - 1);
  assign idx       = IW'(int'(yc) * W + int'(xc));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= ST_IDLE;
      xc       <= '0;
      yc       <= '0;
      acnt     <= '0;
      chal_q   <= '0;
      dark_q   <= '0;
      acc      <= 1'b0;
      response <= 1'b0;
      n_anneal <= NA_W'(N_A);
    end else begin
      if (cfg_we && state == ST_IDLE) n_anneal <= cfg_n_anneal;
      case (state)
        ST_IDLE: begin
          xc  <= '0;
          yc  <= '0;
          acc <= 1'b0;
          if (load_dark) begin
            dark_q <= dark_bits;
            state  <= ST_DARK;
          end else if (start) begin
            chal_q <= challenge;
            state  <= keep_state ? ST_MAP : ST_CLEAR;
          end
        end
        ST_DARK, ST_MAP, ST_READ: begin
          if (state == ST_READ) acc <= acc ^ spin_global;
          if (int'(xc) == W - 1) begin
            xc <= '0;
            yc <= (int'(yc) == H - 1) ? '0 : yc + 1'b1;
          end else begin
            xc <= xc + 1'b1;
          end
          if (last_cell) begin
            unique case (state)
              ST_DARK: state <= ST_DONE;
              ST_MAP: begin
                acnt  <= '0;
                state <= (n_anneal == '0) ? ST_READ : ST_ANNEAL;
              end
              default: begin
                response <= acc ^ spin_global;
                state    <= ST_DONE;
              end
            endcase
          end
        end
        ST_CLEAR: state <= ST_MAP;
        ST_ANNEAL: begin
          acnt <= acnt + 1'b1;
          if (acnt == n_anneal - 1'b1) state <= ST_READ;
        end
        ST_DONE: state <= ST_IDLE;
        default: state <= ST_IDLE;
      endcase
    end
  end

  always_comb begin
    ctrl           = '0;
    ctrl.clear     = (state == ST_CLEAR);
    ctrl.set_dark  = (state == ST_DARK) && dark_q[idx];
    ctrl.invert    = (state == ST_MAP) && chal_q[idx];
    ctrl.annealing = (state == ST_ANNEAL);
    ctrl.read      = (state == ST_READ);
  end

  assign x_addr     = xc;
  assign y_addr     = yc;
  assign busy       = (state != ST_IDLE);
  assign done       = (state == ST_DONE);
  assign spin_bit   = spin_global;
  assign spin_valid = (state == ST_READ);
  assign spin_idx   = idx;

  // At most one kind of cell operation per cycle; invert never coincides with
  // annealing, which would invert every spin at once.
  a_one_op: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({ctrl.clear, ctrl.set_dark, ctrl.invert, ctrl.annealing, ctrl.read}));

endmodule

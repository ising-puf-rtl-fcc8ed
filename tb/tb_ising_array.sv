// Self-checking testbench of the cell lattice.
//
// A 4 x 3 array (not square, so that row and column wiring cannot be mixed
// up) is driven directly with one-hot select lines and random operations.
// A model kept here holds all spins and dark-cell flags; on annealing it
// updates every spin at once from its right/upper/left/lower neighbours,
// taking 0 for a neighbour outside the array, through the lane-race
// reference of each cell's PUF, or through XOR for a dark cell. After every
// clock the whole spin vector and the dark flags are compared, and during
// read the spin-global wire must carry the selected cell's spin.
module tb_ising_array;
  import ising_pkg::*;

  localparam int unsigned SEED = 32'h0A77_A400;
  localparam int W = 4;
  localparam int H = 3;
  localparam int N = W * H;

  logic              clk = 0, rst_n = 0;
  logic [W-1:0]      x_sel;
  logic [H-1:0]      y_sel;
  cell_ctrl_t        ctrl;
  logic signed [7:0] temp;
  logic              sg;
  logic [N-1:0]      spins, dark;

  int checks = 0, failures = 0;
  int n_anneal = 0, n_edge_one = 0, n_xor = 0, n_read = 0;

  ising_array #(.SEED(SEED), .W(W), .H(H)) dut (
    .clk(clk), .rst_n(rst_n), .x_sel(x_sel), .y_sel(y_sel), .ctrl(ctrl), .temp(temp),
    .spin_global(sg), .spins(spins), .dark(dark)
  );

  always #5 clk = ~clk;

  function automatic logic ref_race(int cell_id, logic [3:0] c, int t);
    int top, bot, ntop, nbot;
    int d [4];
    top = 0;
    bot = 0;
    for (int s = 0; s < 4; s++) begin
      for (int e = 0; e < 4; e++)
        d[e] = elem_delay(SEED, cell_id, s, e) + ((elem_tc(SEED, cell_id, s, e) * t) >>> TC_SHIFT);
      if (c[s]) begin ntop = top + d[0]; nbot = bot + d[1]; end
      else      begin ntop = bot + d[2]; nbot = top + d[3]; end
      top = ntop;
      bot = nbot;
    end
    return (bot + arb_offset(SEED, cell_id)) > top;
  endfunction

  // Neighbour pattern {right, upper, left, lower} of cell (x, y).
  function automatic logic [3:0] nbrs(logic [N-1:0] s, int x, int y);
    logic [3:0] n;
    n[3] = (x < W - 1) ? s[y * W + x + 1] : 1'b0;
    n[2] = (y > 0)     ? s[(y - 1) * W + x] : 1'b0;
    n[1] = (x > 0)     ? s[y * W + x - 1] : 1'b0;
    n[0] = (y < H - 1) ? s[(y + 1) * W + x] : 1'b0;
    return n;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] m_spin, m_dark, nxt;
    int op, sx, sy;
    ctrl = '0; x_sel = '0; y_sel = '0; temp = 8'sd20;
    repeat (2) @(posedge clk);
    rst_n = 1;
    m_spin = '0;
    m_dark = '0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      ctrl = '0;
      sx = $urandom_range(0, W - 1);
      sy = $urandom_range(0, H - 1);
      x_sel = W'(1) << sx;
      y_sel = H'(1) << sy;
      op = $urandom_range(0, 9);
      if (i < 2000 && op == 1) op = 2;   // no dark cells in the first half
      case (op)
        0:             ctrl.clear     = ($urandom_range(0, 5) == 0);
        1:             ctrl.set_dark  = ($urandom_range(0, 11) == 0);
        2, 3, 4:       ctrl.invert    = 1'b1;
        5, 6:          ctrl.annealing = 1'b1;
        default:       ctrl.read      = 1'b1;
      endcase
      if (i == 3000) temp = 8'sd100;
      #1;
      checks++;
      if (sg !== (ctrl.read & m_spin[sy * W + sx])) begin
        failures++;
        $display("FAIL spin-global cell (%0d,%0d) got %b", sx, sy, sg);
      end
      if (ctrl.read) n_read++;
      nxt = m_spin;
      if (ctrl.clear) nxt = '0;
      else if (ctrl.invert) nxt[sy * W + sx] = ~m_spin[sy * W + sx];
      else if (ctrl.annealing) begin
        n_anneal++;
        for (int y = 0; y < H; y++)
          for (int x = 0; x < W; x++) begin
            if (m_dark[y * W + x]) begin
              nxt[y * W + x] = ^nbrs(m_spin, x, y);
              n_xor++;
            end else
              nxt[y * W + x] = ref_race(y * W + x, nbrs(m_spin, x, y), int'(temp));
            // an edge cell that saw a 1 from inside counts as an edge case
            if ((x == 0 || y == 0 || x == W - 1 || y == H - 1) && nbrs(m_spin, x, y) != 0)
              n_edge_one++;
          end
      end
      if (ctrl.set_dark) m_dark[sy * W + sx] = 1'b1;
      m_spin = nxt;
      @(posedge clk);
      #1;
      checks += 2;
      if (spins !== m_spin) begin
        failures++;
        $display("FAIL spins at %0t: got %b exp %b", $time, spins, m_spin);
      end
      if (dark !== m_dark) begin
        failures++;
        $display("FAIL dark at %0t: got %b exp %b", $time, dark, m_dark);
      end
    end
    $display("anneal=%0d xor-updates=%0d edge-updates=%0d reads=%0d dark=%b",
             n_anneal, n_xor, n_edge_one, n_read, m_dark);
    checks++;
    if (n_anneal == 0 || n_xor == 0 || n_read == 0 || n_edge_one == 0) begin
      failures++;
      $display("FAIL an array operation never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

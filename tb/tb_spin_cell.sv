// Self-checking testbench of one Ising-PUF cell.
//
// The cell is driven with random neighbour spins, random select lines and a
// random one of the operations clear / set-dark-cell / invert / annealing /
// read (or none) in each cycle, at a temperature that changes now and then. A
// model kept here predicts the spin and dark-cell registers:
//   clear             -> spin 0
//   invert & selected -> spin inverted; not selected -> unchanged
//   annealing         -> spin = elemental PUF response to {right, upper,
//                        left, lower}, or the XOR of the four when dark
//   set_dark & selected -> dark 1
// and the spin-global drive must equal spin only while selected and reading.
// The PUF response is recomputed here from the lane race of the delay model.
// Each path (dark/normal annealing, selected/unselected invert and set) is
// counted and must occur.
module tb_spin_cell;
  import ising_pkg::*;

  localparam int unsigned SEED = 32'h0000_5EED;
  localparam int          CELL = 9;

  logic              clk = 0, rst_n = 0;
  logic              x_sel, y_sel;
  cell_ctrl_t        ctrl;
  logic signed [7:0] temp;
  logic [3:0]        nbr;       // {right, upper, left, lower}
  logic              spin, gout, dark;

  int checks = 0, failures = 0;
  int n_anneal_puf = 0, n_anneal_xor = 0, n_inv_sel = 0, n_inv_unsel = 0;
  int n_dark_set = 0, n_dark_unsel = 0, n_read_sel = 0, n_clear = 0;

  spin_cell #(.SEED(SEED), .CELL(CELL)) dut (
    .clk(clk), .rst_n(rst_n), .x_sel(x_sel), .y_sel(y_sel), .ctrl(ctrl), .temp(temp),
    .spin_right(nbr[3]), .spin_upper(nbr[2]), .spin_left(nbr[1]), .spin_lower(nbr[0]),
    .spin_out(spin), .global_out(gout), .dark_out(dark)
  );

  always #5 clk = ~clk;

  function automatic logic ref_race(logic [3:0] c, int t);
    int top, bot, ntop, nbot;
    int d [4];
    top = 0;
    bot = 0;
    for (int s = 0; s < 4; s++) begin
      for (int e = 0; e < 4; e++)
        d[e] = elem_delay(SEED, CELL, s, e) + ((elem_tc(SEED, CELL, s, e) * t) >>> TC_SHIFT);
      if (c[s]) begin ntop = top + d[0]; nbot = bot + d[1]; end
      else      begin ntop = bot + d[2]; nbot = top + d[3]; end
      top = ntop;
      bot = nbot;
    end
    return (bot + arb_offset(SEED, CELL)) > top;
  endfunction

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %b exp %b", what, $time, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic m_spin, m_dark, sel;
    int op;
    ctrl = '0; x_sel = 0; y_sel = 0; temp = 8'sd20; nbr = '0;
    repeat (2) @(posedge clk);
    #1;
    check(spin, 1'b0, "spin after reset");
    check(dark, 1'b0, "dark after reset");
    rst_n = 1;
    m_spin = 0;
    m_dark = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      ctrl  = '0;
      x_sel = 1'($urandom_range(0, 3) != 0);
      y_sel = 1'($urandom_range(0, 3) != 0);
      nbr   = 4'($urandom);
      if ($urandom_range(0, 49) == 0) temp = 8'($urandom_range(0, 120));
      // Keep the dark-cell register clear for the first half of the run.
      op = $urandom_range(0, 9);
      if (i < 1500 && op == 1) op = 3;
      case (op)
        0:       ctrl.clear     = 1'b1;
        1:       ctrl.set_dark  = 1'b1;
        2:       ctrl.invert    = 1'b1;
        3, 4, 5: ctrl.annealing = 1'b1;
        6, 7:    ctrl.read      = 1'b1;
        default: ;
      endcase
      sel = x_sel & y_sel;
      #1;
      check(gout, spin & sel & ctrl.read, "spin-global drive");
      if (ctrl.read && sel) n_read_sel++;
      // predict the registers after the coming edge
      if (ctrl.clear) begin
        m_spin = 0;
        n_clear++;
      end else if (ctrl.invert) begin
        if (sel) begin m_spin = ~m_spin; n_inv_sel++; end
        else n_inv_unsel++;
      end else if (ctrl.annealing) begin
        if (m_dark) begin m_spin = ^nbr; n_anneal_xor++; end
        else begin m_spin = ref_race(nbr, int'(temp)); n_anneal_puf++; end
      end
      if (ctrl.set_dark) begin
        if (sel) begin m_dark = 1; n_dark_set++; end
        else n_dark_unsel++;
      end
      @(posedge clk);
      #1;
      check(spin, m_spin, "spin register");
      check(dark, m_dark, "dark-cell register");
    end
    $display("anneal puf=%0d xor=%0d invert sel=%0d unsel=%0d dark set=%0d unsel=%0d read=%0d clear=%0d",
             n_anneal_puf, n_anneal_xor, n_inv_sel, n_inv_unsel, n_dark_set, n_dark_unsel,
             n_read_sel, n_clear);
    checks++;
    if (n_anneal_puf == 0 || n_anneal_xor == 0 || n_inv_sel == 0 || n_inv_unsel == 0 ||
        n_dark_set == 0 || n_dark_unsel == 0 || n_read_sel == 0 || n_clear == 0) begin
      failures++;
      $display("FAIL a cell operation never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

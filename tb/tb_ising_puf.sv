// End-to-end testbench of the Ising-PUF at its default size (8 x 8 cells,
// 10 annealing steps), following the registration/authentication protocol
// the design is meant for.
//
// 1. Registration. With the annealing count set to 1, a challenge that sets
//    only the four neighbours of cell k to a pattern p leaves cell k's
//    elemental-PUF response to p in spin k, which the serial read-out shows.
//    Every reachable (cell, pattern) pair is read this way at 20 C and at
//    100 C. Each table entry is also checked against a lane-race reference
//    computed here. Cells whose tables differ between the two temperatures
//    are the dark cells.
// 2. Without the dark cells loaded, the same challenges are evaluated at both
//    temperatures: the dark cells make some responses differ.
// 3. The dark-cell bits are loaded and the annealing count is set back to 10.
// 4. Authentication. For 128 random challenges at 20 C, 50 C and 100 C the
//    chip's response and its whole read-out spin pattern are compared with an
//    emulator that knows only the registered 20 C tables and the dark-cell
//    bits (the secret model). A sequence of challenges with keep_state
//    checks that the spin pattern carries over from one challenge to the
//    next in both the chip and the emulator.
// Every evaluation also checks the start-to-done latency. The testbench
// counts how often each mechanism occurred (clear, inversion, annealing,
// read-out, registration runs, dark cells, XOR substitution that changed a
// spin, responses spoilt by dark cells, keep_state) and fails when one never
// did.
module tb_ising_puf;
  import ising_pkg::*;

  localparam int W = 8;
  localparam int H = 8;
  localparam int N = W * H;
  localparam int N_A = 10;
  localparam int unsigned SEED = DEFAULT_SEED;
  localparam int N_AUTH = 128;

  logic              clk = 0, rst_n = 0;
  logic              load_dark, start, keep_state, cfg_we;
  logic [N-1:0]      dark_bits, challenge;
  logic [7:0]        cfg_n_anneal, n_anneal;
  logic signed [7:0] temp;
  logic              busy, done, response, spin_bit, spin_valid;
  logic [5:0]        spin_idx;

  ising_puf dut (
    .clk(clk), .rst_n(rst_n), .load_dark(load_dark), .dark_bits(dark_bits), .start(start),
    .challenge(challenge), .keep_state(keep_state), .cfg_we(cfg_we),
    .cfg_n_anneal(cfg_n_anneal), .temp(temp), .busy(busy), .done(done), .response(response),
    .spin_bit(spin_bit), .spin_valid(spin_valid), .spin_idx(spin_idx), .n_anneal(n_anneal)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int m_clear = 0, m_invert = 0, m_anneal = 0, m_read = 0, m_reg = 0, m_dark = 0;
  int m_xor_changed = 0, m_spoilt = 0, m_keep = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

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

  // Neighbour pattern {right, upper, left, lower} of cell k; 0 off the edge.
  function automatic logic [3:0] nbrs(logic [N-1:0] s, int k);
    int x, y;
    x = k % W;
    y = k / W;
    return {(x < W - 1) ? s[k + 1] : 1'b0, (y > 0) ? s[k - W] : 1'b0,
            (x > 0) ? s[k - 1] : 1'b0, (y < H - 1) ? s[k + W] : 1'b0};
  endfunction

  // Patterns a cell can see: bits of missing neighbours stay 0.
  function automatic logic [3:0] reach_mask(int k);
    int x, y;
    x = k % W;
    y = k / W;
    return {x < W - 1, y > 0, x > 0, y < H - 1};
  endfunction

  // ---- read-out capture ----
  logic [N-1:0] rd_spins;
  always @(posedge clk) if (spin_valid) rd_spins[spin_idx] <= spin_bit;

  // ---- one evaluation on the chip ----
  task automatic run(logic [N-1:0] c, bit keep, output logic r, output logic [N-1:0] sp);
    int cyc, exp_lat;
    @(negedge clk);
    while (busy) @(negedge clk);
    challenge = c; keep_state = keep; start = 1;
    @(posedge clk);
    #1;
    start = 0;
    cyc = 0;
    while (!done && cyc < 1000) begin
      @(posedge clk);
      #1;
      cyc++;
    end
    exp_lat = 2 * N + int'(n_anneal) + 1 - (keep ? 1 : 0);
    chk(cyc == exp_lat, $sformatf("latency %0d exp %0d", cyc, exp_lat));
    r  = response;
    sp = rd_spins;
    if (!keep) m_clear++;
    m_invert += $countones(c);
    m_anneal += int'(n_anneal);
    m_read   += N;
  endtask

  task automatic set_anneal(int na);
    @(negedge clk);
    while (busy) @(negedge clk);
    cfg_we = 1; cfg_n_anneal = 8'(na);
    @(posedge clk);
    #1;
    cfg_we = 0;
    chk(n_anneal == 8'(na), "annealing count");
  endtask

  // ---- secret model: registered tables + dark bits ----
  logic [15:0] tbl20 [N];
  logic [15:0] tbl100 [N];
  logic [N-1:0] darkv;
  logic [N-1:0] emu_state;

  function automatic logic emulate(logic [N-1:0] c, bit keep, int na, bit use_dark,
                                   ref logic [N-1:0] st, ref int xor_changed);
    logic [N-1:0] s, ns;
    logic [3:0] p;
    s = keep ? st : '0;
    s = s ^ c;
    for (int a = 0; a < na; a++) begin
      for (int k = 0; k < N; k++) begin
        p = nbrs(s, k);
        if (use_dark && darkv[k]) begin
          ns[k] = ^p;
          if (ns[k] != tbl20[k][p]) xor_changed++;
        end else ns[k] = tbl20[k][p];
      end
      s = ns;
    end
    st = s;
    return ^s;
  endfunction

  task automatic register_at(int t, ref logic [15:0] tbl [N]);
    logic r;
    logic [N-1:0] sp, c;
    logic [3:0] p;
    temp = 8'(t);
    for (int k = 0; k < N; k++) begin
      tbl[k] = '0;
      for (int pi = 0; pi < 16; pi++) begin
        p = 4'(pi);
        if ((p & ~reach_mask(k)) != 0) continue;
        c = '0;
        if (p[3]) c[k + 1] = 1'b1;
        if (p[2]) c[k - W] = 1'b1;
        if (p[1]) c[k - 1] = 1'b1;
        if (p[0]) c[k + W] = 1'b1;
        run(c, 1'b0, r, sp);
        m_reg++;
        tbl[k][pi] = sp[k];
        chk(sp[k] == ref_race(k, p, t),
            $sformatf("registered CRP cell %0d pattern %b at %0d C", k, p, t));
      end
    end
  endtask

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] chal [N_AUTH];
  logic         resp20 [N_AUTH];

  initial begin
    logic r, e;
    logic [N-1:0] sp, st;
    int dummy, ndiff;
    load_dark = 0; start = 0; keep_state = 0; cfg_we = 0; cfg_n_anneal = '0;
    dark_bits = '0; challenge = '0; temp = 8'sd20;
    repeat (3) @(posedge clk);
    rst_n = 1;
    chk(n_anneal == 8'(N_A), "annealing count after reset");

    // ---- 1. registration ----
    set_anneal(1);
    register_at(20, tbl20);
    register_at(100, tbl100);
    darkv = '0;
    for (int k = 0; k < N; k++) darkv[k] = (tbl20[k] != tbl100[k]);
    m_dark = $countones(darkv);
    $display("registration: %0d runs, %0d of %0d cells dark", m_reg, m_dark, N);

    // ---- 2. dark cells not yet eliminated ----
    set_anneal(N_A);
    for (int i = 0; i < N_AUTH; i++) chal[i] = {$urandom, $urandom};
    ndiff = 0;
    for (int i = 0; i < 32; i++) begin
      temp = 8'sd20;
      run(chal[i], 1'b0, r, sp);
      temp = 8'sd100;
      run(chal[i], 1'b0, e, sp);
      if (r != e) ndiff++;
    end
    m_spoilt = ndiff;
    $display("without dark-cell elimination: %0d of 32 responses differ between 20 C and 100 C",
             ndiff);

    // ---- 3. load dark-cell bits ----
    @(negedge clk);
    while (busy) @(negedge clk);
    dark_bits = darkv; load_dark = 1;
    @(posedge clk);
    #1;
    load_dark = 0;
    while (!done) @(posedge clk);
    @(posedge clk);
    #1;

    // ---- 4. authentication at three temperatures ----
    ndiff = 0;
    foreach (resp20[i]) resp20[i] = 1'b0;
    for (int ti = 0; ti < 3; ti++) begin
      int t;
      t = (ti == 0) ? 20 : (ti == 1) ? 50 : 100;
      temp = 8'(t);
      for (int i = 0; i < N_AUTH; i++) begin
        run(chal[i], 1'b0, r, sp);
        st = '0;
        e = emulate(chal[i], 1'b0, N_A, 1'b1, st, m_xor_changed);
        chk(r == e, $sformatf("response challenge %0d at %0d C: chip %b emulator %b", i, t, r, e));
        chk(sp == st, $sformatf("spin pattern challenge %0d at %0d C", i, t));
        if (ti == 0) resp20[i] = r;
        else if (r != resp20[i]) ndiff++;
      end
    end
    $display("with dark-cell elimination: %0d of %0d responses differ from 20 C", ndiff,
             2 * N_AUTH);

    // ---- challenge sequence with keep_state ----
    temp = 8'sd20;
    emu_state = '0;
    for (int i = 0; i < 32; i++) begin
      bit keep;
      keep = (i != 0);
      run(chal[i], keep, r, sp);
      e = emulate(chal[i], keep, N_A, 1'b1, emu_state, dummy);
      chk(r == e && sp == emu_state, $sformatf("keep_state sequence step %0d", i));
      if (keep) m_keep++;
    end

    $display("mechanisms: clear=%0d invert=%0d anneal=%0d read=%0d registration=%0d dark=%0d",
             m_clear, m_invert, m_anneal, m_read, m_reg, m_dark);
    $display("            xor-changed=%0d spoilt-responses=%0d keep_state=%0d",
             m_xor_changed, m_spoilt, m_keep);
    chk(m_clear > 0,       "clear never happened");
    chk(m_invert > 0,      "inversion never happened");
    chk(m_anneal > 0,      "annealing never happened");
    chk(m_read > 0,        "read-out never happened");
    chk(m_reg > 0,         "registration never happened");
    chk(m_dark > 0,        "no dark cell found");
    chk(m_xor_changed > 0, "dark-cell XOR never changed a spin");
    chk(m_spoilt > 0,      "dark cells never spoilt a response");
    chk(m_keep > 0,        "keep_state never used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench of the Ising-PUF control logic.
//
// The control logic runs a 4 x 2 array here, replaced by a simple array
// model: a spin vector that clear, invert (at the decoded address) and
// annealing act on, and that drives spin_global during read. The model's
// annealing rule is an arbitrary fixed function (spin i becomes
// spin[i] XOR spin[i+1] XOR spin[i+3], indices modulo N), since only the
// sequencing is under test. The testbench checks
//   * the response against the XOR of a model computed here from the
//     challenge alone (clear, XOR in the challenge, n annealing steps),
//   * that set_dark hits exactly the cells whose dark bit is 1,
//   * the number of clear, invert and annealing cycles of each evaluation,
//   * the read order and values on spin_bit/spin_idx,
//   * the latency from start to done: 2N + n_anneal + 1 cycles, one less
//     with keep_state,
//   * keep_state (no clear, state carried over), an annealing count of 0, 1
//     and the default N_A, and that commands are ignored while busy.
module tb_ising_ctrl;
  import ising_pkg::*;

  localparam int W = 4;
  localparam int H = 2;
  localparam int N = W * H;
  localparam int N_A = 10;
  localparam int IW = $clog2(N);

  logic           clk = 0, rst_n = 0;
  logic           load_dark, start, keep_state, cfg_we;
  logic [N-1:0]   dark_bits, challenge;
  logic [7:0]     cfg_n_anneal, n_anneal;
  logic           busy, done, response, spin_bit, spin_valid;
  logic [IW-1:0]  spin_idx;
  logic [1:0]     x_addr;
  logic [0:0]     y_addr;
  cell_ctrl_t     ctrl;
  logic           spin_global;

  int checks = 0, failures = 0;

  ising_ctrl #(.W(W), .H(H), .N_A(N_A)) dut (
    .clk(clk), .rst_n(rst_n), .load_dark(load_dark), .dark_bits(dark_bits), .start(start),
    .challenge(challenge), .keep_state(keep_state), .cfg_we(cfg_we), .cfg_n_anneal(cfg_n_anneal),
    .busy(busy), .done(done), .response(response), .spin_bit(spin_bit), .spin_valid(spin_valid),
    .spin_idx(spin_idx), .n_anneal(n_anneal), .x_addr(x_addr), .y_addr(y_addr), .ctrl(ctrl),
    .spin_global(spin_global)
  );

  always #5 clk = ~clk;

  // ---- array model ----
  logic [N-1:0] arr, dark_seen;
  int           n_clear, n_inv, n_ann, n_read;
  int           addr;
  assign addr        = int'(y_addr) * W + int'(x_addr);
  assign spin_global = ctrl.read & arr[addr];

  function automatic logic [N-1:0] step(logic [N-1:0] s);
    logic [N-1:0] r;
    for (int i = 0; i < N; i++) r[i] = s[i] ^ s[(i + 1) % N] ^ s[(i + 3) % N];
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (ctrl.clear)     begin arr <= '0; n_clear <= n_clear + 1; end
    if (ctrl.invert)    begin arr[addr] <= ~arr[addr]; n_inv <= n_inv + 1; end
    if (ctrl.annealing) begin arr <= step(arr); n_ann <= n_ann + 1; end
    if (ctrl.set_dark)  dark_seen[addr] <= 1'b1;
    if (ctrl.read)      n_read <= n_read + 1;
  end

  // ---- read order monitor ----
  int rd_pos;
  always @(posedge clk) if (spin_valid) begin
    checks++;
    if (int'(spin_idx) != rd_pos || spin_bit !== arr[rd_pos]) begin
      failures++;
      $display("FAIL read slot %0d: idx=%0d bit=%b exp %b", rd_pos, spin_idx, spin_bit, arr[rd_pos]);
    end
    rd_pos <= rd_pos + 1;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Expected state after an evaluation, computed from the challenge alone.
  logic [N-1:0] ref_state;

  task automatic evaluate(logic [N-1:0] c, bit keep, int na);
    int cyc;
    logic [N-1:0] s;
    s = keep ? ref_state : '0;
    s = s ^ c;
    for (int k = 0; k < na; k++) s = step(s);
    ref_state = s;
    n_clear = 0; n_inv = 0; n_ann = 0; n_read = 0; rd_pos = 0;
    @(negedge clk);
    challenge = c; keep_state = keep; start = 1;
    @(posedge clk);
    #1;
    start = 0;
    cyc = 0;
    // a second start while busy must be ignored
    @(negedge clk);
    start = 1; challenge = ~c;
    @(posedge clk);
    cyc++;
    #1;
    start = 0;
    while (!done) begin
      @(posedge clk);
      #1;
      cyc++;
      if (cyc > 1000) break;
    end
    chk(cyc == 2 * N + na + 1 - (keep ? 1 : 0),
        $sformatf("latency %0d (n_anneal=%0d keep=%0b)", cyc, na, keep));
    chk(response === ^s, $sformatf("response %b exp %b", response, ^s));
    chk(arr === s, "final spin state");
    chk(n_clear == (keep ? 0 : 1), $sformatf("clear cycles %0d", n_clear));
    chk(n_inv == $countones(c), $sformatf("invert cycles %0d", n_inv));
    chk(n_ann == na, $sformatf("annealing cycles %0d exp %0d", n_ann, na));
    chk(n_read == N && rd_pos == N, $sformatf("read cycles %0d", n_read));
    @(posedge clk);
    #1;
    chk(!busy && !done, "idle after done");
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int keeps;
    load_dark = 0; start = 0; keep_state = 0; cfg_we = 0; cfg_n_anneal = '0;
    dark_bits = '0; challenge = '0; arr = '0; dark_seen = '0; ref_state = '0;
    keeps = 0;
    repeat (2) @(posedge clk);
    #1;
    chk(n_anneal == 8'(N_A), "annealing count resets to N_A");
    rst_n = 1;

    // dark-cell loading
    @(negedge clk);
    dark_bits = 8'b1010_0110; load_dark = 1;
    @(posedge clk);
    #1;
    load_dark = 0;
    wait (done);
    @(posedge clk);
    #1;
    chk(dark_seen === 8'b1010_0110, $sformatf("set_dark cells %b", dark_seen));

    // evaluations at the default annealing count
    for (int i = 0; i < 40; i++) begin
      bit keep;
      keep = (i > 0) && ($urandom_range(0, 2) == 0);
      if (keep) keeps++;
      evaluate(N'($urandom), keep, N_A);
    end
    // other annealing counts
    for (int j = 0; j < 3; j++) begin
      int na;
      na = (j == 0) ? 1 : (j == 1) ? 0 : 3;
      @(negedge clk);
      cfg_we = 1; cfg_n_anneal = 8'(na);
      @(posedge clk);
      #1;
      cfg_we = 0;
      chk(n_anneal == 8'(na), "annealing count written");
      for (int i = 0; i < 5; i++) evaluate(N'($urandom), 1'b0, na);
    end
    chk(keeps > 0, "keep_state exercised");
    $display("keep_state evaluations: %0d", keeps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

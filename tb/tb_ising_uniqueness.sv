// Uniqueness and robustness of the Ising-PUF over several chip instances.
//
// NCHIP chips of the default 8 x 8 size, differing only in the mismatch of
// their elemental PUFs (SEED), receive the same 128 random challenges, the
// challenge count per instance of the design's evaluation.
//   * Uniqueness: the mean Hamming distance between the 128-bit response
//     streams of every chip pair must lie between 40 % and 60 % (ideal 50 %).
//   * Robustness: each chip's dark cells are found from its elemental-PUF
//     tables at 20 C and 100 C (computed here from the lane-race reference;
//     the end-to-end testbench does the same through the chip's own read-out)
//     and loaded. The streams at 20 C and at 50 C must then be identical;
//     without the dark-cell bits loaded they are also compared, and the
//     distance is reported.
// All chips run in lock step, so one latency check covers them.
module tb_ising_uniqueness;
  import ising_pkg::*;

  localparam int NCHIP = 8;
  localparam int W = 8;
  localparam int H = 8;
  localparam int N = W * H;
  localparam int NCH = 128;

  logic              clk = 0, rst_n = 0;
  logic              load_dark, start;
  logic [N-1:0]      challenge;
  logic [N-1:0]      dark_bits [NCHIP];
  logic signed [7:0] temp;
  logic [NCHIP-1:0]  busy, done, resp;

  int checks = 0, failures = 0;

  function automatic int unsigned chip_seed(int i);
    return 32'h1CE5_0001 + 32'(i) * 32'h0101_0101;
  endfunction

  for (genvar i = 0; i < NCHIP; i++) begin : g_chip
    logic       sb, sv;
    logic [5:0] si;
    logic [7:0] na;
    ising_puf #(.SEED(chip_seed(i))) u_chip (
      .clk(clk), .rst_n(rst_n), .load_dark(load_dark), .dark_bits(dark_bits[i]),
      .start(start), .challenge(challenge), .keep_state(1'b0), .cfg_we(1'b0),
      .cfg_n_anneal(8'd0), .temp(temp), .busy(busy[i]), .done(done[i]), .response(resp[i]),
      .spin_bit(sb), .spin_valid(sv), .spin_idx(si), .n_anneal(na)
    );
  end

  always #5 clk = ~clk;

  function automatic logic ref_race(int unsigned seed, int cell_id, logic [3:0] c, int t);
    int top, bot, ntop, nbot;
    int d [4];
    top = 0;
    bot = 0;
    for (int s = 0; s < 4; s++) begin
      for (int e = 0; e < 4; e++)
        d[e] = elem_delay(seed, cell_id, s, e) + ((elem_tc(seed, cell_id, s, e) * t) >>> TC_SHIFT);
      if (c[s]) begin ntop = top + d[0]; nbot = bot + d[1]; end
      else      begin ntop = bot + d[2]; nbot = top + d[3]; end
      top = ntop;
      bot = nbot;
    end
    return (bot + arb_offset(seed, cell_id)) > top;
  endfunction

  function automatic logic [3:0] reach_mask(int k);
    return {k % W < W - 1, k / W > 0, k % W > 0, k / W < H - 1};
  endfunction

  logic [N-1:0] chal [NCH];
  logic [NCH-1:0] stream [NCHIP];

  task automatic run_all(int t);
    int cyc;
    temp = 8'(t);
    for (int j = 0; j < NCH; j++) begin
      @(negedge clk);
      while (busy != '0) @(negedge clk);
      challenge = chal[j]; start = 1;
      @(posedge clk);
      #1;
      start = 0;
      cyc = 0;
      while (done == '0 && cyc < 1000) begin
        @(posedge clk);
        #1;
        cyc++;
      end
      checks++;
      if (cyc != 2 * N + 10 + 1 || done != '1) begin
        failures++;
        $display("FAIL latency %0d done=%b", cyc, done);
      end
      for (int i = 0; i < NCHIP; i++) stream[i][j] = resp[i];
    end
  endtask

  function automatic int hd(logic [NCH-1:0] a, logic [NCH-1:0] b);
    return $countones(a ^ b);
  endfunction

  initial begin : watchdog
    repeat (500_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NCH-1:0] s20 [NCHIP];
    logic [NCH-1:0] s50 [NCHIP];
    int sum, pairs, ndark, raw;
    real uniq;
    load_dark = 0; start = 0; challenge = '0; temp = 8'sd20;
    for (int i = 0; i < NCHIP; i++) dark_bits[i] = '0;
    for (int j = 0; j < NCH; j++) chal[j] = {$urandom, $urandom};
    repeat (3) @(posedge clk);
    rst_n = 1;

    // raw robustness, no dark-cell elimination
    run_all(20);
    s20 = stream;
    run_all(50);
    raw = 0;
    for (int i = 0; i < NCHIP; i++) raw += hd(s20[i], stream[i]);

    // dark cells of each chip from its 20 C / 100 C elemental tables
    ndark = 0;
    for (int i = 0; i < NCHIP; i++)
      for (int k = 0; k < N; k++)
        for (int p = 0; p < 16; p++)
          if ((4'(p) & ~reach_mask(k)) == 0 &&
              ref_race(chip_seed(i), k, 4'(p), 20) != ref_race(chip_seed(i), k, 4'(p), 100))
            dark_bits[i][k] = 1'b1;
    for (int i = 0; i < NCHIP; i++) ndark += $countones(dark_bits[i]);
    @(negedge clk);
    while (busy != '0) @(negedge clk);
    load_dark = 1;
    @(posedge clk);
    #1;
    load_dark = 0;

    run_all(20);
    s20 = stream;
    run_all(50);
    s50 = stream;

    sum = 0;
    pairs = 0;
    for (int a = 0; a < NCHIP; a++)
      for (int b = a + 1; b < NCHIP; b++) begin
        sum += hd(s20[a], s20[b]);
        pairs++;
      end
    uniq = 100.0 * real'(sum) / real'(pairs * NCH);
    $display("dark cells: %0d of %0d (%.1f %%)", ndark, NCHIP * N,
             100.0 * real'(ndark) / real'(NCHIP * N));
    $display("uniqueness (mean inter-chip HD): %.2f %%", uniq);
    $display("20 C vs 50 C HD without dark-cell elimination: %.2f %%",
             100.0 * real'(raw) / real'(NCHIP * NCH));
    checks++;
    if (uniq < 40.0 || uniq > 60.0) begin failures++; $display("FAIL uniqueness out of range"); end
    for (int i = 0; i < NCHIP; i++) begin
      checks++;
      if (s20[i] != s50[i]) begin
        failures++;
        $display("FAIL chip %0d: %0d responses change between 20 C and 50 C", i, hd(s20[i], s50[i]));
      end
    end
    checks++;
    if (ndark == 0) begin failures++; $display("FAIL no dark cells"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

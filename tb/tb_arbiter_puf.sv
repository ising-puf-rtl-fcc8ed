// Self-checking testbench of the behavioural arbiter-PUF model.
//
// Three model instances (different cells of one chip, and one cell of another
// chip) are driven with all 16 challenges at three temperatures. The expected
// response is recomputed here by racing the two lanes through the stages with
// the per-element delays of the delay model: a 1-stage is straight, a 0-stage
// swaps the lanes, and the response is 1 when the top lane arrives first.
// The testbench also checks that the responses are not constant and that
// the instances differ from one another.
module tb_arbiter_puf;
  import ising_pkg::*;

  localparam int unsigned SEED_A = DEFAULT_SEED;
  localparam int unsigned SEED_B = 32'hBEEF_0007;

  logic [3:0]        chal;
  logic signed [7:0] temp;
  logic              r0, r1, r2;
  int                checks = 0, failures = 0;
  int                ones0 = 0, diff01 = 0, diff02 = 0;
  int                temps [3] = '{20, 100, -40};

  arbiter_puf #(.SEED(SEED_A), .CELL(0))  u0 (.challenge(chal), .temp(temp), .response(r0));
  arbiter_puf #(.SEED(SEED_A), .CELL(37)) u1 (.challenge(chal), .temp(temp), .response(r1));
  arbiter_puf #(.SEED(SEED_B), .CELL(0))  u2 (.challenge(chal), .temp(temp), .response(r2));

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

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s chal=%b temp=%0d got=%b exp=%b", what, chal, temp, got, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (temps[k]) begin
      for (int c = 0; c < 16; c++) begin
        chal = 4'(c);
        temp = 8'(temps[k]);
        #1;
        check(r0, ref_race(SEED_A, 0, chal, temps[k]), "cell0");
        check(r1, ref_race(SEED_A, 37, chal, temps[k]), "cell37");
        check(r2, ref_race(SEED_B, 0, chal, temps[k]), "chipB");
        ones0  = ones0 + (r0 ? 1 : 0) + (r1 ? 1 : 0) + (r2 ? 1 : 0);
        diff01 = diff01 + ((r0 != r1) ? 1 : 0);
        diff02 = diff02 + ((r0 != r2) ? 1 : 0);
      end
    end
    // Responses must depend on the challenge and on the instance.
    checks++;
    if (ones0 == 0 || ones0 == 144) begin failures++; $display("FAIL constant responses"); end
    checks++;
    if (diff01 == 0 || diff02 == 0) begin failures++; $display("FAIL instances identical"); end
    $display("ones=%0d/144 diff(cell0,cell37)=%0d diff(chipA,chipB)=%0d /48", ones0, diff01, diff02);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

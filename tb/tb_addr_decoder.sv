// Self-checking testbench of the one-hot address decoder.
//
// An 8-line decoder (the X/Y decoder size of the 8 x 8 array) and a 5-line
// decoder are driven with every address their inputs can carry. The expected
// select bus has exactly bit `addr` set, or no bit when addr >= N.
module tb_addr_decoder;
  logic [2:0] a8, a5;
  logic [7:0] s8;
  logic [4:0] s5;
  int checks = 0, failures = 0;

  addr_decoder #(.N(8)) u8 (.addr(a8), .sel(s8));
  addr_decoder #(.N(5)) u5 (.addr(a5), .sel(s5));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] e8;
    logic [4:0] e5;
    for (int a = 0; a < 8; a++) begin
      a8 = 3'(a);
      a5 = 3'(a);
      #1;
      e8 = 8'b1 << a;
      e5 = (a < 5) ? 5'(1 << a) : 5'b0;
      checks += 2;
      if (s8 !== e8) begin failures++; $display("FAIL N=8 addr=%0d sel=%b exp=%b", a, s8, e8); end
      if (s5 !== e5) begin failures++; $display("FAIL N=5 addr=%0d sel=%b exp=%b", a, s5, e5); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Address decoder of the Ising-PUF (used once for the columns, X-decoder, and
// once for the rows, Y-decoder).
//
// Turns a binary address into a one-hot select bus: sel[addr] is 1 and every
// other line is 0. An address at or above N selects nothing. Purely
// combinational. The document names the X and Y decoders and what they select;
// a plain one-hot decoder is this design's reading of them.
module addr_decoder #(
  parameter int N  = 8,                    // number of select lines
  parameter int AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [AW-1:0] addr,
  output logic [N-1:0]  sel
);

  always_comb begin
    sel = '0;
    for (int i = 0; i < N; i++)
      if (int'(addr) == i) sel[i] = 1'b1;
  end

endmodule

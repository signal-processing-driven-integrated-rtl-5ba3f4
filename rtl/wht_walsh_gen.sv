// Walsh code generator in sequency order.
//
// Row k of the sequency-ordered 64-point Walsh matrix has exactly k sign
// changes. Its element n is (-1)^popcount(h & n), where h is the bit
// reversal of the Gray code of k (the row's position in natural Hadamard
// order). The output bit is 1 where the code is -1, which selects the
// crossed connection of the input sampling network. The document only
// names the generator; this construction is the standard one.
//
// Timing: combinational.
module wht_walsh_gen #(
  parameter int unsigned LOG2N = 6     // 64-point transform
) (
  input  logic [LOG2N-1:0] seq,        // sequency (row)
  input  logic [LOG2N-1:0] n,          // sample index (column)
  output logic             neg         // 1: multiply by -1
);

  logic [LOG2N-1:0] gray, h;

  assign gray = seq ^ (seq >> 1);

  always_comb begin
    for (int i = 0; i < LOG2N; i++) h[i] = gray[LOG2N-1-i];
  end

  assign neg = ^(h & n);

endmodule

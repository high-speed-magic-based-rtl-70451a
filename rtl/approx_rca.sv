// approx_rca -- N-bit ripple-carry adder with K approximate low-order cells.
//
// Word-level, combinational form of the adders evaluated in the description:
// bits 0..K-1 use the approximate cell KIND, bits K..N-1 the exact cell, and
// the carry ripples through all of them. For N = 8 the three "Outlines" are
// K = 3, 4 and 5. The result is N+1 bits wide (carry-out on top). This is the
// functional model used inside approx_mult8; the in-memory implementation of
// the same adder is magic_rca.
module approx_rca
  import magic_pkg::*;
#(
  parameter int unsigned N    = 8,
  parameter int unsigned K    = 3,
  parameter fa_kind_t    KIND = FA_MAFA1
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  logic [N:0] c;
  assign c[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_bit
    approx_fa u_fa (
      .kind ((i < K) ? KIND : FA_EXACT),
      .a    (a[i]),
      .b    (b[i]),
      .c    (c[i]),
      .sum  (sum[i]),
      .cout (c[i+1])
    );
  end

  assign cout = c[N];
endmodule

// johnson_decoder: one-AND-gate state decoder of an N-bit Johnson counter.
//
// dec[k] is 1 exactly in count k (0 .. 2N-1, count 0 = all zeros, each
// count shifting one more 1, then one more 0, in from the Q0 side).
// Each line is a single 2-input AND of two neighbouring bits, true or
// complemented (the terms are this design's choice):
//   count 0     : Q0*      AND Q(N-1)*
//   count k     : Q(k-1)   AND Qk*       (0 < k < N)
//   count N     : Q0       AND Q(N-1)
//   count N+k   : Q(k-1)*  AND Qk        (0 < k < N)
// Because the counter changes one bit per clock, no line can glitch.
// Purely combinational; N >= 2.
module johnson_decoder #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   q,
  output logic [2*N-1:0] dec
);

  assign dec[0] = ~q[0] & ~q[N-1];
  assign dec[N] =  q[0] &  q[N-1];

  for (genvar k = 1; k < N; k++) begin : g_dec
    assign dec[k]   =  q[k-1] & ~q[k];
    assign dec[N+k] = ~q[k-1] &  q[k];
  end

endmodule

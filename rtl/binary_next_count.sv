// binary_next_count: the Next Count Logic of the binary counters.
//
// nxt = cnt + 1 (modulo 2^WIDTH), written as the published gate equations:
//   NC0 = NOT Cout0,  NCi = Couti XOR (Cout(i-1) AND ... AND Cout0).
// The AND terms are shared as a ripple chain, WIDTH-2 two-input ANDs and
// WIDTH-1 XORs plus one inverter. Purely combinational. The same block is
// used by the Hamming counter (fed with the corrected count) and by the TMR
// binary counter (fed with the voted count).
module binary_next_count #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] cnt,
  output logic [WIDTH-1:0] nxt
);

  // carry[i] = AND of cnt[i-1:0]; carry[0] = 1 makes NC0 = NOT cnt[0].
  logic [WIDTH-1:0] carry;

  assign carry[0] = 1'b1;

  for (genvar i = 1; i < WIDTH; i++) begin : g_carry
    assign carry[i] = carry[i-1] & cnt[i-1];
  end

  assign nxt = cnt ^ carry;

endmodule

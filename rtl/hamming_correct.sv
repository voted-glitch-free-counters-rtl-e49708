// hamming_correct: the Correction Logic of the Hamming-code counter.
//
// The syndrome is S = parity(C) XOR P, recomputing every check bit from the
// registered count bits and comparing it with the registered check bit. The
// error line of information bit i, Ei, is 1 when S equals that bit's code
// (for 4 bits: E0 = S0 S1* S2, E1 = S0 S1 S2, E2 = S0 S1 S2*, E3 = S0* S1 S2),
// and the corrected output is Couti = Ci XOR Ei. A single flipped count bit
// is thus corrected in real time; a flipped check bit gives a one-hot syndrome
// that matches no Ei and leaves the count alone. Purely combinational.
module hamming_correct #(
  parameter int unsigned INFO_W  = 4,
  parameter int unsigned CHECK_W = 3
) (
  input  logic [INFO_W-1:0]  c,
  input  logic [CHECK_W-1:0] p,
  output logic [INFO_W-1:0]  cout,
  output logic [CHECK_W-1:0] syndrome
);

  logic [CHECK_W-1:0] p_calc;
  logic [INFO_W-1:0]  err;

  hamming_parity #(.INFO_W(INFO_W), .CHECK_W(CHECK_W)) u_parity (
    .d(c),
    .p(p_calc)
  );

  assign syndrome = p_calc ^ p;

  for (genvar i = 0; i < INFO_W; i++) begin : g_err
    localparam hamming_pkg::code_t CODE = hamming_pkg::bit_code(INFO_W, i);
    assign err[i] = (syndrome == CODE[CHECK_W-1:0]);
  end

  assign cout = c ^ err;

endmodule

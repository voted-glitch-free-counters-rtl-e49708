// hamming_parity: check-bit generator of the Hamming-code counter (the Next
// Parity Logic, and the first half of the syndrome in the Correction Logic).
//
// p[j] = XOR of the information bits d[i] covered by check bit j. For
// INFO_W = 4 the coverage is the published one:
//   P0 = C2^C1^C0,  P1 = C3^C2^C1,  P2 = C3^C1^C0.
// Other widths use the coverage rule of hamming_pkg (this design's choice).
// Purely combinational.
module hamming_parity #(
  parameter int unsigned INFO_W  = 4,
  parameter int unsigned CHECK_W = 3
) (
  input  logic [INFO_W-1:0]  d,
  output logic [CHECK_W-1:0] p
);

  for (genvar j = 0; j < CHECK_W; j++) begin : g_check
    localparam hamming_pkg::mask_t MASK = hamming_pkg::cover_mask(INFO_W, j);
    assign p[j] = ^(d & MASK[INFO_W-1:0]);
  end

endmodule

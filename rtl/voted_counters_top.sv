// voted_counters_top: the five counters side by side.
//
//   cascaded_ring_counter  the proposed counter: CASCADE_STAGES 2-bit TMR
//                          Johnson stages (16 bits of count for 8 stages),
//                          bit-flip immune, each stage decoded glitch-free
//   tmr_ring_counter       RING_N-bit Johnson counter of TMR bits, bit-flip
//                          immune and glitch-free decoded as a whole
//   hamming_counter        HAMMING_W-bit binary counter with Hamming-code
//                          single-error correction
//   tmr_binary_counter     TMR_BIN_W-bit binary counter of TMR bits
//   johnson_counter        plain JOHNSON_N-bit Johnson counter, decoded
//
// All counters run free on the shared clk and are cleared together by the
// asynchronous active-low rst_n; each has its own outputs. The ring
// counters' one-hot decodes come from johnson_decoder instances. Sharing the
// clock and reset is this design's choice; the parameters default to the
// published sizes.
module voted_counters_top #(
  parameter int unsigned CASCADE_STAGES = 8,
  parameter int unsigned RING_N         = 4,
  parameter int unsigned HAMMING_W      = 4,
  parameter int unsigned TMR_BIN_W      = 4,
  parameter int unsigned JOHNSON_N      = 4
) (
  input  logic                                           clk,
  input  logic                                           rst_n,
  output logic [2*CASCADE_STAGES-1:0]                    casc_q,
  output logic [CASCADE_STAGES-1:0][3:0]                 casc_dec,
  output logic [RING_N-1:0]                              ring_q,
  output logic [2*RING_N-1:0]                            ring_dec,
  output logic [HAMMING_W-1:0]                           ham_count,
  output logic [hamming_pkg::check_bits(HAMMING_W)-1:0]  ham_syndrome,
  output logic [TMR_BIN_W-1:0]                           tmr_count,
  output logic [JOHNSON_N-1:0]                           john_q,
  output logic [2*JOHNSON_N-1:0]                         john_dec
);

  cascaded_ring_counter #(.STAGES(CASCADE_STAGES)) u_cascade (
    .clk(clk), .rst_n(rst_n), .q(casc_q), .stage_dec(casc_dec)
  );

  tmr_ring_counter #(.N(RING_N)) u_ring (
    .clk(clk), .rst_n(rst_n), .q(ring_q)
  );

  johnson_decoder #(.N(RING_N)) u_ring_dec (.q(ring_q), .dec(ring_dec));

  hamming_counter #(.INFO_W(HAMMING_W)) u_hamming (
    .clk(clk), .rst_n(rst_n), .count(ham_count), .syndrome(ham_syndrome)
  );

  tmr_binary_counter #(.WIDTH(TMR_BIN_W)) u_tmr_bin (
    .clk(clk), .rst_n(rst_n), .count(tmr_count)
  );

  johnson_counter #(.N(JOHNSON_N)) u_johnson (
    .clk(clk), .rst_n(rst_n), .q(john_q)
  );

  johnson_decoder #(.N(JOHNSON_N)) u_john_dec (.q(john_q), .dec(john_dec));

endmodule

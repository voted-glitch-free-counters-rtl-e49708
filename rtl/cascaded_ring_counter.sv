// cascaded_ring_counter: single bit-flip immune counter made of cascaded
// 2-bit TMR Johnson ring stages.
//
// A Johnson counter needs N flip-flops for 2N states; a 2-bit one, however,
// has 4 states, as many as a 2-bit binary counter. Chaining STAGES such
// stages, each a base-4 digit that advances when all lower digits wrap,
// gives 4^STAGES states: the bit usage of a binary counter (8 stages = 16
// bits = 65536 states) with every flip-flop a TMR set. Within one stage only
// one bit changes per clock, so each stage's own 4-line decoder
// (johnson_decoder, one AND gate per line) is glitch-free; a decode that
// spans several stages is not, since several stages may step on one edge.
//
// All stages share clk. Stage 0 is free running (cin tied to 1, so only its
// single carry AND remains); stage s+1 is enabled by the carry of stage s on
// the same edge. The last stage's carry output is left unconnected.
//
// Interface: q[2s+1:2s] = stage s bits (Q1 Q0), stage_dec[s][k] = 1 when
// stage s holds digit k. The count value is the base-4 number with digit s
// = {Q1, Q0 XOR Q1} of stage s; it advances by one per rising clk edge.
// rst_n (asynchronous, active low) gives count 0. Synchronous carries and
// the reset are this design's own choices.
module cascaded_ring_counter #(
  parameter int unsigned STAGES = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  output logic [2*STAGES-1:0]     q,
  output logic [STAGES-1:0][3:0]  stage_dec
);

  // carry[s] enables stage s; carry[STAGES] would feed a further stage and
  // is not used (the last stage's carry gates are removed by synthesis).
  logic [STAGES:0] carry;

  assign carry[0] = 1'b1;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    ring_stage u_stage (
      .clk  (clk),
      .rst_n(rst_n),
      .cin  (carry[s]),
      .q    (q[2*s +: 2]),
      .cout (carry[s+1])
    );

    johnson_decoder #(.N(2)) u_dec (
      .q  (q[2*s +: 2]),
      .dec(stage_dec[s])
    );
  end

endmodule

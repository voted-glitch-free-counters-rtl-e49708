// johnson_counter: plain N-bit Johnson (twisted ring) counter.
//
// A shift register Q0 -> Q1 -> ... -> Q(N-1) whose first D input is the
// complement output Q(N-1)* of the last flip-flop. It steps through 2N states
// (for N = 4: 0000, 1000, 1100, 1110, 1111, 0111, 0011, 0001, written
// Q0 Q1 Q2 Q3) and changes exactly one bit per clock, so any state can be
// decoded by one AND gate without glitches (see johnson_decoder).
//
// Interface: q[i] = Qi, updated on each rising clk edge. rst_n
// (asynchronous, active low) gives state 0 (all zeros). The structure
// follows the published 4-bit counter; reset is this design's own. It has
// no redundancy: tmr_ring_counter is its bit-flip immune form.
module johnson_counter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [N-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= {q[N-2:0], ~q[N-1]};
  end

endmodule

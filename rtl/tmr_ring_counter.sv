// tmr_ring_counter: N-bit Johnson ring counter built from TMR bits.
//
// Every flip-flop of the Johnson counter is replaced by a TMR bit (three
// flip-flops and a majority voter, tmr_register). The voted outputs are
// shifted along the ring, with an inversion from the last voted bit to the
// first bit's input. The counter is therefore both single bit-flip immune
// (one flipped copy never reaches a voted output and is rewritten at the
// next edge) and glitch-free decodable (one voted bit changes per clock).
// For N = 4 it uses 12 flip-flops, as stated for this counter.
//
// Interface: q[i] = voted Qi, sequence as johnson_counter, one step per
// rising clk edge. rst_n (asynchronous, active low) clears all copies; the
// reset is this design's own.
module tmr_ring_counter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [N-1:0] q
);

  logic [N-1:0] nxt;

  assign nxt = {q[N-2:0], ~q[N-1]};

  tmr_register #(.WIDTH(N)) u_reg (
    .clk(clk), .rst_n(rst_n), .d(nxt), .q(q)
  );

endmodule

// ring_stage: one 2-bit TMR Johnson ring stage of the cascaded counter.
//
// The stage is a base-4 digit held as a 2-bit Johnson count (Q0 Q1):
//   00 (0) -> 10 (1) -> 11 (2) -> 01 (3) -> 00 (0)
// Both bits are TMR bits (tmr_register). When the carry input cin is 1 the
// stage takes one Johnson step on the rising clk edge; when it is 0 the
// voted value is loaded back, which holds the count and also rewrites a
// flipped copy. The carry output is cout = cin AND Q0* AND Q1 (two 2-input
// ANDs): it is 1 in the cycle in which this stage wraps from 3 to 0, and
// enables the next stage on that same edge.
//
// Interface: q[0] = Q0, q[1] = Q1 (voted); cout is combinational from cin and
// q. rst_n (asynchronous, active low) clears all copies.
// The 2-bit Johnson digit with TMR flip-flops and two carry AND gates follows
// the published description; the hold-by-reload enable, the carry term and
// the reset are this design's own choices.
module ring_stage (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cin,
  output logic [1:0] q,
  output logic       cout
);

  logic [1:0] step;
  logic [1:0] nxt;

  assign step = {q[0], ~q[1]};
  assign nxt  = cin ? step : q;
  assign cout = cin & ~q[0] & q[1];

  tmr_register #(.WIDTH(2)) u_reg (
    .clk(clk), .rst_n(rst_n), .d(nxt), .q(q)
  );

endmodule

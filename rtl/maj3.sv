// maj3: two-out-of-three majority voter of one TMR bit.
// y = (a AND b) OR (b AND c) OR (a AND c): three 2-input ANDs feeding an OR,
// the gate structure of the published TMR bit. Purely combinational; a single
// wrong input never changes y.
module maj3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);
  assign y = (a & b) | (b & c) | (a & c);
endmodule

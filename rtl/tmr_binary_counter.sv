// tmr_binary_counter: free-running binary counter with a TMR count register.
//
// The count register is a tmr_register (three flip-flops and a majority
// voter per bit). The voted count is the output and feeds the same Next
// Count Logic as the Hamming counter (binary_next_count), whose result is
// loaded into all three copies on each rising clk edge. One flipped copy
// never reaches the voted count, and is overwritten at the next edge.
//
// Interface: count advances by one per clock, wrapping at 2^WIDTH.
// rst_n (asynchronous, active low) clears all copies. The structure follows
// the published 4-bit TMR counter; reset is this design's own.
module tmr_binary_counter #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [WIDTH-1:0] count
);

  logic [WIDTH-1:0] nxt;

  binary_next_count #(.WIDTH(WIDTH)) u_next (.cnt(count), .nxt(nxt));

  tmr_register #(.WIDTH(WIDTH)) u_reg (
    .clk(clk), .rst_n(rst_n), .d(nxt), .q(count)
  );

endmodule

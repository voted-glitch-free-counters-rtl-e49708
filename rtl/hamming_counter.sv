// hamming_counter: free-running binary counter protected by a Hamming code.
//
// INFO_W count bits C and CHECK_W parity bits P are held in two plain
// registers. Each cycle the Correction Logic (hamming_correct) repairs a
// single flipped bit of the registered word into the corrected count Cout,
// which is the counter's output. Cout feeds the Next Count Logic
// (binary_next_count), and the Next Parity Logic (hamming_parity) computes
// the check bits of that next count, so C and P are both rewritten with a
// clean code word on every rising clk edge: a flipped bit lasts at most until
// the next edge and never reaches the count.
//
// Interface: count = corrected count, advancing by one per clock;
// syndrome = S, nonzero while the registered word holds an error.
// rst_n (asynchronous, active low) clears count and parity (the code word of
// 0 is all zeros). Structure and equations follow the published 4-bit
// counter (m = 3 check bits); CHECK_W for other widths is the smallest m with
// 2^m-1-m >= INFO_W. The reset and the syndrome port are this design's own.
module hamming_counter #(
  parameter  int unsigned INFO_W  = 4,
  localparam int unsigned CHECK_W = hamming_pkg::check_bits(INFO_W)
) (
  input  logic               clk,
  input  logic               rst_n,
  output logic [INFO_W-1:0]  count,
  output logic [CHECK_W-1:0] syndrome
);

  logic [INFO_W-1:0]  c_q;   // Count Bit Register
  logic [CHECK_W-1:0] p_q;   // Parity Bit Register
  logic [INFO_W-1:0]  cout;  // corrected count
  logic [INFO_W-1:0]  nc;    // next count
  logic [CHECK_W-1:0] np;    // next parity

  hamming_correct #(.INFO_W(INFO_W), .CHECK_W(CHECK_W)) u_correct (
    .c(c_q), .p(p_q), .cout(cout), .syndrome(syndrome)
  );

  binary_next_count #(.WIDTH(INFO_W)) u_next (.cnt(cout), .nxt(nc));

  hamming_parity #(.INFO_W(INFO_W), .CHECK_W(CHECK_W)) u_next_parity (
    .d(nc), .p(np)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_q <= '0;
      p_q <= '0;
    end else begin
      c_q <= nc;
      p_q <= np;
    end
  end

  assign count = cout;

endmodule

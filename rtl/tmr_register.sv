// tmr_register: WIDTH triple-modular-redundant (TMR) bits.
//
// Every bit is held by three D flip-flops (copies a, b and c) that load the
// same data on the same clock edge; a majority voter (maj3) per bit forms the
// output. A single upset in one copy cannot change the voted output, and the
// copy is rewritten with good data at the next clock edge, since in the
// counters d is computed from the voted q.
//
// Interface: d is loaded into all copies on every rising clk edge; q is the
// voted value, valid one clock after d (plus the voter's delay).
// rst_n (asynchronous, active low) loads RESET_VAL into all copies.
// The three-flop-plus-voter structure follows the published TMR bit; the
// reset is this design's own addition.
module tmr_register #(
  parameter int unsigned     WIDTH     = 1,
  parameter logic [WIDTH-1:0] RESET_VAL = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] ff_a, ff_b, ff_c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ff_a <= RESET_VAL;
      ff_b <= RESET_VAL;
      ff_c <= RESET_VAL;
    end else begin
      ff_a <= d;
      ff_b <= d;
      ff_c <= d;
    end
  end

  for (genvar i = 0; i < WIDTH; i++) begin : g_vote
    maj3 u_vote (.a(ff_a[i]), .b(ff_b[i]), .c(ff_c[i]), .y(q[i]));
  end

endmodule

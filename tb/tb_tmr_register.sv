// tb_tmr_register: self-checking test of tmr_register (WIDTH = 4).
// Loads random data every cycle and checks the voted output one clock later.
// After each edge it upsets one random bit of one random copy (force/release
// of the flip-flop) and checks that the voted output is unchanged; it also
// upsets the same bit in two copies at once and checks that the vote then
// follows the majority, and that the next edge repairs the copies.
module tb_tmr_register;
  localparam int unsigned W = 4;

  logic         clk = 1'b0;
  logic         rst_n;
  logic [W-1:0] d, q, exp_q, snap;
  int checks = 0, failures = 0, upsets = 0;

  tmr_register #(.WIDTH(W)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  // Invert bit b of copy k (0 = a, 1 = b, 2 = c).
  task automatic upset(input int k, input int b);
    logic [W-1:0] m;
    m = W'(1) << b;
    case (k)
      0: begin snap = dut.ff_a ^ m; force dut.ff_a = snap; release dut.ff_a; end
      1: begin snap = dut.ff_b ^ m; force dut.ff_b = snap; release dut.ff_b; end
      default: begin snap = dut.ff_c ^ m; force dut.ff_c = snap; release dut.ff_c; end
    endcase
    upsets++;
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int b;
    rst_n = 1'b0;
    d     = '1;
    #12;
    check(q, '0, "reset value");
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      d     = W'($urandom);
      exp_q = d;
      @(posedge clk);
      #1;
      check(q, exp_q, "load");
      upset(int'($urandom_range(0, 2)), int'($urandom_range(0, W-1)));
      #1;
      check(q, exp_q, "single upset masked");
    end
    // Two copies of one bit upset: the vote must follow them (shows that
    // the output really is a majority of the copies).
    @(negedge clk);
    d = 4'b0101;
    @(posedge clk);
    #1;
    b = 1;
    upset(0, b);
    upset(2, b);
    #1;
    check(q, 4'b0111, "double upset outvotes");
    @(posedge clk);
    #1;
    check(q, 4'b0101, "next edge repairs copies");
    check(dut.ff_a ^ dut.ff_b, '0, "copies equal after repair");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

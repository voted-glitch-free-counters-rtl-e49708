// tb_johnson_counter: checks the 4-bit Johnson counter against the published
// count sequence (written Q0 Q1 Q2 Q3): 0000 1000 1100 1110 1111 0111 0011
// 0001, repeating, and that exactly one bit changes on every clock. A 3-bit
// counter is checked against the same rule (2N = 6 states, period 6).
module tb_johnson_counter;
  logic       clk = 1'b0;
  logic       rst_n;
  logic [3:0] q4, prev4;
  logic [2:0] q3, exp3;
  int checks = 0, failures = 0;

  // Published sequence, each entry written as the string Q0 Q1 Q2 Q3.
  localparam logic [3:0] SEQ [8] = '{4'b0000, 4'b1000, 4'b1100, 4'b1110,
                                     4'b1111, 4'b0111, 4'b0011, 4'b0001};

  johnson_counter #(.N(4)) dut4 (.clk(clk), .rst_n(rst_n), .q(q4));
  johnson_counter #(.N(3)) dut3 (.clk(clk), .rst_n(rst_n), .q(q3));

  always #5 clk = ~clk;

  function automatic logic [3:0] as_written(input logic [3:0] q);
    return {q[0], q[1], q[2], q[3]};
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: q4=%b q3=%b", what, $time, q4, q3);
    end
  endtask

  initial begin : watchdog
    repeat (200) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    #12;
    check(q4 == 0 && q3 == 0, "reset");
    exp3 = '0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 1; n <= 40; n++) begin
      prev4 = q4;
      @(posedge clk);
      #1;
      exp3 = {exp3[1:0], ~exp3[2]};
      check(as_written(q4) == SEQ[n % 8], "4-bit sequence");
      check($countones(q4 ^ prev4) == 1, "one bit changes per clock");
      check(q3 == exp3, "3-bit sequence");
      if (n % 6 == 0) check(q3 == 0, "3-bit period 6");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ring_stage: drives one 2-bit TMR ring stage with a random carry input
// and checks it against a base-4 digit model: the stage bits (Q0 Q1) follow
// 00, 10, 11, 01 for digits 0..3, the digit advances only when cin is 1,
// cout is 1 exactly when cin is 1 and the digit is 3, and a flipped copy
// injected after an edge changes neither the outputs nor the next step.
module tb_ring_stage;
  localparam int unsigned CYCLES = 3000;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       cin;
  logic [1:0] q;
  logic       cout;
  int digit = 0;
  int checks = 0, failures = 0, carries = 0, holds = 0, upsets = 0;

  ring_stage dut (.clk(clk), .rst_n(rst_n), .cin(cin), .q(q), .cout(cout));

  always #5 clk = ~clk;

  // Stage bits {Q1, Q0} of a digit: 0 -> 00, 1 -> Q0 only, 2 -> both, 3 -> Q1 only.
  function automatic logic [1:0] enc(input int dg);
    case (dg)
      0:       return 2'b00;
      1:       return 2'b01;
      2:       return 2'b11;
      default: return 2'b10;
    endcase
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t: q=%b cout=%b digit=%0d cin=%b",
                                  what, $time, q, cout, digit, cin);
    end
  endtask

  task automatic upset(input int k, input int b);
    logic [1:0] v;
    case (k)
      0: begin v = dut.u_reg.ff_a ^ 2'(1 << b); force dut.u_reg.ff_a = v; release dut.u_reg.ff_a; end
      1: begin v = dut.u_reg.ff_b ^ 2'(1 << b); force dut.u_reg.ff_b = v; release dut.u_reg.ff_b; end
      default: begin v = dut.u_reg.ff_c ^ 2'(1 << b); force dut.u_reg.ff_c = v; release dut.u_reg.ff_c; end
    endcase
    upsets++;
  endtask

  initial begin : watchdog
    repeat (CYCLES + 50) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    cin   = 1'b0;
    #12;
    check(q == 2'b00, "reset");
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < CYCLES; n++) begin
      @(negedge clk);
      cin = ($urandom_range(0, 2) != 0);
      #1;
      check(cout == (cin && digit == 3), "carry out");
      if (cout) carries++;
      if (!cin) holds++;
      @(posedge clk);
      if (cin) digit = (digit + 1) % 4;
      #1;
      check(q == enc(digit), "stage bits");
      if (n % 2 == 0) begin
        upset(int'($urandom_range(0, 2)), int'($urandom_range(0, 1)));
        #1;
        check(q == enc(digit), "upset masked");
      end
    end
    check(carries > 0 && holds > 0, "carry and hold both seen");
    $display("carries %0d holds %0d upsets %0d", carries, holds, upsets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_tmr_ring_counter: checks the 4-bit TMR Johnson counter against the
// published sequence 0000 1000 1100 1110 1111 0111 0011 0001 (Q0 Q1 Q2 Q3),
// that exactly one voted bit changes per clock (glitch-free decoding), and
// that a flipped copy of any bit, injected after most clock edges, never
// reaches the voted outputs or the following counts.
module tb_tmr_ring_counter;
  localparam int unsigned CYCLES = 2000;

  logic       clk = 1'b0;
  logic       rst_n;
  logic [3:0] q, prev;
  int checks = 0, failures = 0, upsets = 0;

  localparam logic [3:0] SEQ [8] = '{4'b0000, 4'b1000, 4'b1100, 4'b1110,
                                     4'b1111, 4'b0111, 4'b0011, 4'b0001};

  tmr_ring_counter #(.N(4)) dut (.clk(clk), .rst_n(rst_n), .q(q));

  always #5 clk = ~clk;

  function automatic logic [3:0] as_written(input logic [3:0] v);
    return {v[0], v[1], v[2], v[3]};
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t: q=%b", what, $time, q);
    end
  endtask

  task automatic upset(input int k, input int b);
    logic [3:0] v;
    case (k)
      0: begin v = dut.u_reg.ff_a ^ 4'(1 << b); force dut.u_reg.ff_a = v; release dut.u_reg.ff_a; end
      1: begin v = dut.u_reg.ff_b ^ 4'(1 << b); force dut.u_reg.ff_b = v; release dut.u_reg.ff_b; end
      default: begin v = dut.u_reg.ff_c ^ 4'(1 << b); force dut.u_reg.ff_c = v; release dut.u_reg.ff_c; end
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
    #12;
    check(q == 0, "reset");
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 1; n <= CYCLES; n++) begin
      prev = q;
      @(posedge clk);
      #1;
      check(as_written(q) == SEQ[n % 8], "sequence");
      check($countones(q ^ prev) == 1, "one voted bit changes per clock");
      if (n % 5 != 0) begin
        upset(int'($urandom_range(0, 2)), int'($urandom_range(0, 3)));
        #1;
        check(as_written(q) == SEQ[n % 8], "upset masked");
      end
    end
    $display("upsets %0d", upsets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_tmr_binary_counter: runs the TMR binary counter at 4 and at 16 bits
// against a reference count, one step per clock. After most edges one random
// copy of one random bit of each counter's TMR register is flipped; the
// voted count must not change, and the next count must still be right. The
// 16-bit counter is run through its full wrap.
module tb_tmr_binary_counter;
  localparam int unsigned CYCLES = 66000;

  logic        clk = 1'b0;
  logic        rst_n;
  logic [3:0]  cnt4, exp4;
  logic [15:0] cnt16, exp16;
  int checks = 0, failures = 0, upsets = 0, wraps16 = 0;

  tmr_binary_counter #(.WIDTH(4))  dut4  (.clk(clk), .rst_n(rst_n), .count(cnt4));
  tmr_binary_counter #(.WIDTH(16)) dut16 (.clk(clk), .rst_n(rst_n), .count(cnt16));

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t (cnt4=%h exp %h, cnt16=%h exp %h)",
                                  what, $time, cnt4, exp4, cnt16, exp16);
    end
  endtask

  task automatic upset4(input int k, input int b);
    logic [3:0] v;
    case (k)
      0: begin v = dut4.u_reg.ff_a ^ 4'(1 << b); force dut4.u_reg.ff_a = v; release dut4.u_reg.ff_a; end
      1: begin v = dut4.u_reg.ff_b ^ 4'(1 << b); force dut4.u_reg.ff_b = v; release dut4.u_reg.ff_b; end
      default: begin v = dut4.u_reg.ff_c ^ 4'(1 << b); force dut4.u_reg.ff_c = v; release dut4.u_reg.ff_c; end
    endcase
    upsets++;
  endtask

  task automatic upset16(input int k, input int b);
    logic [15:0] v;
    case (k)
      0: begin v = dut16.u_reg.ff_a ^ 16'(1 << b); force dut16.u_reg.ff_a = v; release dut16.u_reg.ff_a; end
      1: begin v = dut16.u_reg.ff_b ^ 16'(1 << b); force dut16.u_reg.ff_b = v; release dut16.u_reg.ff_b; end
      default: begin v = dut16.u_reg.ff_c ^ 16'(1 << b); force dut16.u_reg.ff_c = v; release dut16.u_reg.ff_c; end
    endcase
  endtask

  initial begin : watchdog
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    #12;
    exp4  = '0;
    exp16 = '0;
    check(cnt4 == 0 && cnt16 == 0, "reset");
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < CYCLES; n++) begin
      @(posedge clk);
      exp4  = exp4 + 4'd1;
      exp16 = exp16 + 16'd1;
      if (exp16 == 0) wraps16++;
      #1;
      check(cnt4 == exp4, "4-bit count");
      check(cnt16 == exp16, "16-bit count");
      if (n % 3 != 2) begin
        upset4(int'($urandom_range(0, 2)), int'($urandom_range(0, 3)));
        upset16(int'($urandom_range(0, 2)), int'($urandom_range(0, 15)));
        #1;
        check(cnt4 == exp4 && cnt16 == exp16, "upset masked by vote");
      end
    end
    check(wraps16 == 1, "16-bit counter wrapped once");
    $display("upsets %0d, 16-bit wraps %0d", upsets, wraps16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

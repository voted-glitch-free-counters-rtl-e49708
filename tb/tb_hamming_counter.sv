// tb_hamming_counter: runs the Hamming-code counter at 4 information bits
// (3 check bits) and at 16 (5 check bits) against a plain reference count.
// Every cycle, just after the clock edge, one random bit of the registered
// code word (count bit or check bit) of each counter is flipped. The
// corrected count must stay right, the syndrome must show the error, and
// the next edge must leave a clean word (syndrome 0) holding count + 1.
// The 16-bit counter is run through its full 65536-count wrap.
module tb_hamming_counter;
  localparam int unsigned CYCLES = 66000;

  logic        clk = 1'b0;
  logic        rst_n;
  logic [3:0]  cnt4;
  logic [2:0]  syn4;
  logic [15:0] cnt16;
  logic [4:0]  syn16;
  logic [3:0]  exp4;
  logic [15:0] exp16;
  int checks = 0, failures = 0;
  int corrected_count_bit = 0, ignored_check_bit = 0, wraps16 = 0;

  hamming_counter #(.INFO_W(4))  dut4  (.clk(clk), .rst_n(rst_n), .count(cnt4),  .syndrome(syn4));
  hamming_counter #(.INFO_W(16)) dut16 (.clk(clk), .rst_n(rst_n), .count(cnt16), .syndrome(syn16));

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t (cnt4=%h exp %h, cnt16=%h exp %h)",
                                  what, $time, cnt4, exp4, cnt16, exp16);
    end
  endtask

  // Flip one bit of the 7-bit word of dut4: bits 0..3 count, 4..6 parity.
  task automatic upset4(input int b);
    logic [3:0] c;
    logic [2:0] p;
    if (b < 4) begin
      c = dut4.c_q ^ 4'(1 << b); force dut4.c_q = c; release dut4.c_q;
      corrected_count_bit++;
    end else begin
      p = dut4.p_q ^ 3'(1 << (b - 4)); force dut4.p_q = p; release dut4.p_q;
      ignored_check_bit++;
    end
  endtask

  // Flip one bit of the 21-bit word of dut16: bits 0..15 count, 16..20 parity.
  task automatic upset16(input int b);
    logic [15:0] c;
    logic [4:0]  p;
    if (b < 16) begin
      c = dut16.c_q ^ 16'(1 << b); force dut16.c_q = c; release dut16.c_q;
    end else begin
      p = dut16.p_q ^ 5'(1 << (b - 16)); force dut16.p_q = p; release dut16.p_q;
    end
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
    check(cnt4 == 0 && cnt16 == 0 && syn4 == 0 && syn16 == 0, "reset");
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < CYCLES; n++) begin
      @(posedge clk);
      exp4  = exp4 + 4'd1;
      exp16 = exp16 + 16'd1;
      if (exp16 == 0) wraps16++;
      #1;
      check(cnt4 == exp4 && syn4 == 0, "4-bit count after edge");
      check(cnt16 == exp16 && syn16 == 0, "16-bit count after edge");
      if (n % 4 != 3) begin
        upset4(int'($urandom_range(0, 6)));
        upset16(int'($urandom_range(0, 20)));
        #1;
        check(cnt4 == exp4 && syn4 != 0, "4-bit count corrected after upset");
        check(cnt16 == exp16 && syn16 != 0, "16-bit count corrected after upset");
      end
    end
    check(corrected_count_bit > 0 && ignored_check_bit > 0, "both upset kinds exercised");
    check(wraps16 == 1, "16-bit counter wrapped once");
    $display("upsets of count bits %0d, of check bits %0d, 16-bit wraps %0d",
             corrected_count_bit, ignored_check_bit, wraps16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

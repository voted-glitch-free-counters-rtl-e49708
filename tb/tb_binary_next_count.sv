// tb_binary_next_count: checks the Next Count Logic against an arithmetic
// increment: exhaustively at WIDTH = 4 and with random and corner values at
// WIDTH = 16.
module tb_binary_next_count;
  logic [3:0]  c4, n4;
  logic [15:0] c16, n16;
  int checks = 0, failures = 0;

  binary_next_count #(.WIDTH(4))  dut4  (.cnt(c4),  .nxt(n4));
  binary_next_count #(.WIDTH(16)) dut16 (.cnt(c16), .nxt(n16));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      c4 = 4'(v);
      #1;
      checks++;
      if (n4 !== 4'(v + 1)) begin
        failures++;
        $display("FAIL 4-bit %0d -> %0d", v, n4);
      end
    end
    for (int n = 0; n < 3000; n++) begin
      case (n)
        0:       c16 = 16'hffff;
        1:       c16 = 16'h7fff;
        2:       c16 = 16'h00ff;
        default: c16 = 16'($urandom);
      endcase
      #1;
      checks++;
      if (n16 !== c16 + 16'd1) begin
        failures++;
        $display("FAIL 16-bit %h -> %h", c16, n16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

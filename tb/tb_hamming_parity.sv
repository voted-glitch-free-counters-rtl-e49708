// tb_hamming_parity: checks the check-bit generator. At 4 information bits
// it is compared exhaustively with the published equations
//   P0 = C2^C1^C0, P1 = C3^C2^C1, P2 = C3^C1^C0.
// At 16 information bits (5 check bits) it is compared with a reference
// that uses an explicit table of the bit codes (the values 3, 5, 6, 7, 9, ...
// of weight two or more, in ascending order).
module tb_hamming_parity;
  logic [3:0]  d4;
  logic [2:0]  p4;
  logic [15:0] d16;
  logic [4:0]  p16, ref16;
  int checks = 0, failures = 0;

  localparam logic [4:0] CODE16 [16] = '{5'd3, 5'd5, 5'd6, 5'd7, 5'd9, 5'd10,
    5'd11, 5'd12, 5'd13, 5'd14, 5'd15, 5'd17, 5'd18, 5'd19, 5'd20, 5'd21};

  hamming_parity #(.INFO_W(4),  .CHECK_W(3)) dut4  (.d(d4),  .p(p4));
  hamming_parity #(.INFO_W(16), .CHECK_W(5)) dut16 (.d(d16), .p(p16));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] e;
    for (int v = 0; v < 16; v++) begin
      d4 = 4'(v);
      e[0] = d4[2] ^ d4[1] ^ d4[0];
      e[1] = d4[3] ^ d4[2] ^ d4[1];
      e[2] = d4[3] ^ d4[1] ^ d4[0];
      #1;
      checks++;
      if (p4 !== e) begin
        failures++;
        $display("FAIL 4-bit d=%b p=%b expected %b", d4, p4, e);
      end
    end
    for (int n = 0; n < 2000; n++) begin
      d16 = (n < 16) ? 16'(1 << n) : 16'($urandom);
      ref16 = '0;
      for (int i = 0; i < 16; i++) if (d16[i]) ref16 ^= CODE16[i];
      #1;
      checks++;
      if (p16 !== ref16) begin
        failures++;
        $display("FAIL 16-bit d=%h p=%b expected %b", d16, p16, ref16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

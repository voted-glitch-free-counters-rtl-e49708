// tb_hamming_correct: checks the Correction Logic. For every 4-bit count, the
// code word (count plus published parity) is presented unchanged and with
// each of its 7 bits flipped; the corrected output must always equal the
// count, and the syndrome must be 0, the flipped count bit's code (E0..E3 of
// the published equations: 101, 111, 011, 110 as S2 S1 S0) or the flipped
// check bit's one-hot value. The same is done at 16 bits (21-bit word) on
// random counts.
module tb_hamming_correct;
  logic [3:0]  c4, o4;
  logic [2:0]  p4, s4;
  logic [15:0] c16, o16;
  logic [4:0]  p16, s16;
  int checks = 0, failures = 0;

  localparam logic [2:0] CODE4 [4]  = '{3'b101, 3'b111, 3'b011, 3'b110};
  localparam logic [4:0] CODE16 [16] = '{5'd3, 5'd5, 5'd6, 5'd7, 5'd9, 5'd10,
    5'd11, 5'd12, 5'd13, 5'd14, 5'd15, 5'd17, 5'd18, 5'd19, 5'd20, 5'd21};

  hamming_correct #(.INFO_W(4),  .CHECK_W(3)) dut4  (.c(c4),  .p(p4),  .cout(o4),  .syndrome(s4));
  hamming_correct #(.INFO_W(16), .CHECK_W(5)) dut16 (.c(c16), .p(p16), .cout(o16), .syndrome(s16));

  task automatic chk4(input logic [3:0] want, input logic [2:0] want_s);
    checks++;
    if (o4 !== want || s4 !== want_s) begin
      failures++;
      $display("FAIL 4-bit c=%b p=%b: cout=%b S=%b expected %b S=%b", c4, p4, o4, s4, want, want_s);
    end
  endtask

  task automatic chk16(input logic [15:0] want, input logic [4:0] want_s);
    checks++;
    if (o16 !== want || s16 !== want_s) begin
      failures++;
      $display("FAIL 16-bit c=%h p=%b: cout=%h S=%b expected %h S=%b", c16, p16, o16, s16, want, want_s);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0]  v4;
    logic [2:0]  par4;
    logic [15:0] v16;
    logic [4:0]  par16;
    for (int v = 0; v < 16; v++) begin
      v4 = 4'(v);
      par4 = {v4[3] ^ v4[1] ^ v4[0], v4[3] ^ v4[2] ^ v4[1], v4[2] ^ v4[1] ^ v4[0]};
      c4 = v4; p4 = par4; #1; chk4(v4, 3'b000);
      for (int i = 0; i < 4; i++) begin
        c4 = v4 ^ 4'(1 << i); p4 = par4; #1; chk4(v4, CODE4[i]);
      end
      for (int j = 0; j < 3; j++) begin
        c4 = v4; p4 = par4 ^ 3'(1 << j); #1; chk4(v4, 3'(1 << j));
      end
    end
    for (int n = 0; n < 300; n++) begin
      v16 = 16'($urandom);
      par16 = '0;
      for (int i = 0; i < 16; i++) if (v16[i]) par16 ^= CODE16[i];
      c16 = v16; p16 = par16; #1; chk16(v16, 5'd0);
      for (int i = 0; i < 16; i++) begin
        c16 = v16 ^ 16'(1 << i); p16 = par16; #1; chk16(v16, CODE16[i]);
      end
      for (int j = 0; j < 5; j++) begin
        c16 = v16; p16 = par16 ^ 5'(1 << j); #1; chk16(v16, 5'(1 << j));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_johnson_decoder: applies every state of 2-, 4- and 8-bit Johnson
// sequences (the 4-bit one as published: 0000 1000 1100 1110 1111 0111 0011
// 0001, written Q0 Q1 Q2 Q3) and checks that exactly the line of that count
// is 1.
module tb_johnson_decoder;
  logic [1:0]  q2;
  logic [3:0]  d2;
  logic [3:0]  q4;
  logic [7:0]  d4;
  logic [7:0]  q8;
  logic [15:0] d8;
  int checks = 0, failures = 0;

  localparam logic [3:0] SEQ [8] = '{4'b0000, 4'b1000, 4'b1100, 4'b1110,
                                     4'b1111, 4'b0111, 4'b0011, 4'b0001};

  johnson_decoder #(.N(2)) dut2 (.q(q2), .dec(d2));
  johnson_decoder #(.N(4)) dut4 (.q(q4), .dec(d4));
  johnson_decoder #(.N(8)) dut8 (.q(q8), .dec(d8));

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      q4 = {SEQ[k][0], SEQ[k][1], SEQ[k][2], SEQ[k][3]};
      #1;
      checks++;
      if (d4 !== 8'(1 << k)) begin
        failures++;
        $display("FAIL N=4 count %0d: dec=%b", k, d4);
      end
    end
    q2 = '0;
    q8 = '0;
    for (int k = 0; k < 16; k++) begin
      #1;
      checks++;
      if (d2 !== 4'(1 << (k % 4))) begin
        failures++;
        $display("FAIL N=2 count %0d: q=%b dec=%b", k % 4, q2, d2);
      end
      checks++;
      if (d8 !== 16'(1 << k)) begin
        failures++;
        $display("FAIL N=8 count %0d: q=%b dec=%b", k, q8, d8);
      end
      q2 = {q2[0], ~q2[1]};
      q8 = {q8[6:0], ~q8[7]};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

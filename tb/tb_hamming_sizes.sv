// tb_hamming_sizes: runs the Hamming-code counter at the largest information
// width of each code size of the standard table (m check bits, 2^m-1 total
// bits): 1 (m=2), 4 (m=3), 11 (m=4), 26 (m=5), 57 (m=6) and 120 (m=7). It
// checks that each counter uses m check bits, then runs each for 400 clocks
// against a reference count while flipping one random bit of its code word
// after most edges; the corrected count must never be wrong. Counters with
// widths under 9 bits also wrap during the run.
module tb_hamming_sizes;
  localparam int unsigned NSIZES = 6;
  localparam int unsigned WIDTHS [NSIZES] = '{1, 4, 11, 26, 57, 120};
  localparam int unsigned MS     [NSIZES] = '{2, 3, 4, 5, 6, 7};
  localparam int unsigned CYCLES = 400;

  logic clk = 1'b0;
  logic rst_n;
  int checks = 0, failures = 0;
  logic [NSIZES-1:0] done = '0;

  always #5 clk = ~clk;

  initial begin
    rst_n = 1'b0;
    #12;
    @(negedge clk);
    rst_n = 1'b1;
  end

  for (genvar g = 0; g < NSIZES; g++) begin : g_size
    localparam int unsigned W = WIDTHS[g];
    localparam int unsigned M = hamming_pkg::check_bits(W);
    logic [W-1:0] count, expect_cnt, cv;
    logic [M-1:0] syndrome, pv;

    hamming_counter #(.INFO_W(W)) dut (.clk(clk), .rst_n(rst_n), .count(count), .syndrome(syndrome));

    initial begin
      int b;
      checks++;
      if (M != MS[g]) begin
        failures++;
        $display("FAIL width %0d uses %0d check bits, expected %0d", W, M, MS[g]);
      end
      expect_cnt = '0;
      @(posedge rst_n);
      for (int n = 0; n < CYCLES; n++) begin
        @(posedge clk);
        expect_cnt = expect_cnt + 1'b1;
        #1;
        checks++;
        if (count != expect_cnt || syndrome != 0) begin
          failures++;
          $display("FAIL width %0d: count %h expected %h", W, count, expect_cnt);
        end
        if (n % 5 != 4) begin
          b = int'($urandom_range(0, W + M - 1));
          if (b < int'(W)) begin
            cv = dut.c_q ^ (W'(1) << b);
            force dut.c_q = cv;
            release dut.c_q;
          end else begin
            pv = dut.p_q ^ (M'(1) << (b - int'(W)));
            force dut.p_q = pv;
            release dut.p_q;
          end
          #1;
          checks++;
          if (count != expect_cnt || syndrome == 0) begin
            failures++;
            $display("FAIL width %0d after upset of bit %0d: count %h expected %h", W, b, count, expect_cnt);
          end
        end
      end
      done[g] = 1'b1;
    end
  end

  initial begin : watchdog
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

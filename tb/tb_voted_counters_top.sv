// tb_voted_counters_top: end-to-end test of the whole design at its default
// sizes (8-stage cascaded ring counter, 4-bit TMR ring, 4-bit Hamming, 4-bit
// TMR binary and 4-bit Johnson counters). All counters are released from
// reset together and run 65600 clocks, past one full period of the 16-bit
// cascaded counter. Every cycle each output is compared with its own
// reference model, and after most edges one flip-flop of each protected
// counter is upset (one TMR copy, or one bit of the Hamming code word).
// Mechanisms counted, each of which must occur: upsets masked by the vote
// in each TMR counter, Hamming corrections of count bits and ignored
// check-bit errors, the carry into every cascade stage, the wrap of every
// counter, edges where several cascade stages step at once, and every
// decode line of every Johnson decoder.
module tb_voted_counters_top;
  localparam int unsigned STAGES = 8;
  localparam int unsigned CYCLES = 65600;

  logic                   clk = 1'b0;
  logic                   rst_n;
  logic [2*STAGES-1:0]    casc_q, casc_prev;
  logic [STAGES-1:0][3:0] casc_dec;
  logic [3:0]             ring_q, ring_prev, john_q, ham_count, tmr_count;
  logic [7:0]             ring_dec, john_dec;
  logic [2:0]             ham_syndrome;

  // Reference models.
  logic [15:0] ref_casc;
  logic [3:0]  ref_ham, ref_tmr, ref_john;

  logic [STAGES-1:0] up_req;
  int up_copy, up_bit;

  int checks = 0, failures = 0;
  int casc_upsets = 0, ring_upsets = 0, tmr_upsets = 0;
  int ham_count_fix = 0, ham_check_err = 0;
  int casc_wraps = 0, ring_wraps = 0, ham_wraps = 0, tmr_wraps = 0, john_wraps = 0;
  int multi_stage_edges = 0;
  int casc_steps [STAGES];
  logic [7:0] ring_lines_seen, john_lines_seen;
  logic [STAGES-1:0][3:0] casc_lines_seen;

  voted_counters_top dut (
    .clk(clk), .rst_n(rst_n),
    .casc_q(casc_q), .casc_dec(casc_dec),
    .ring_q(ring_q), .ring_dec(ring_dec),
    .ham_count(ham_count), .ham_syndrome(ham_syndrome),
    .tmr_count(tmr_count),
    .john_q(john_q), .john_dec(john_dec)
  );

  always #5 clk = ~clk;

  for (genvar s = 0; s < STAGES; s++) begin : g_upset
    always @(posedge up_req[s]) begin
      logic [1:0] v;
      case (up_copy)
        0: begin
          v = dut.u_cascade.g_stage[s].u_stage.u_reg.ff_a ^ 2'(1 << up_bit);
          force dut.u_cascade.g_stage[s].u_stage.u_reg.ff_a = v;
          release dut.u_cascade.g_stage[s].u_stage.u_reg.ff_a;
        end
        1: begin
          v = dut.u_cascade.g_stage[s].u_stage.u_reg.ff_b ^ 2'(1 << up_bit);
          force dut.u_cascade.g_stage[s].u_stage.u_reg.ff_b = v;
          release dut.u_cascade.g_stage[s].u_stage.u_reg.ff_b;
        end
        default: begin
          v = dut.u_cascade.g_stage[s].u_stage.u_reg.ff_c ^ 2'(1 << up_bit);
          force dut.u_cascade.g_stage[s].u_stage.u_reg.ff_c = v;
          release dut.u_cascade.g_stage[s].u_stage.u_reg.ff_c;
        end
      endcase
    end
  end

  task automatic upset_ring(input int k, input int b);
    logic [3:0] v;
    case (k)
      0: begin v = dut.u_ring.u_reg.ff_a ^ 4'(1 << b); force dut.u_ring.u_reg.ff_a = v; release dut.u_ring.u_reg.ff_a; end
      1: begin v = dut.u_ring.u_reg.ff_b ^ 4'(1 << b); force dut.u_ring.u_reg.ff_b = v; release dut.u_ring.u_reg.ff_b; end
      default: begin v = dut.u_ring.u_reg.ff_c ^ 4'(1 << b); force dut.u_ring.u_reg.ff_c = v; release dut.u_ring.u_reg.ff_c; end
    endcase
    ring_upsets++;
  endtask

  task automatic upset_tmr(input int k, input int b);
    logic [3:0] v;
    case (k)
      0: begin v = dut.u_tmr_bin.u_reg.ff_a ^ 4'(1 << b); force dut.u_tmr_bin.u_reg.ff_a = v; release dut.u_tmr_bin.u_reg.ff_a; end
      1: begin v = dut.u_tmr_bin.u_reg.ff_b ^ 4'(1 << b); force dut.u_tmr_bin.u_reg.ff_b = v; release dut.u_tmr_bin.u_reg.ff_b; end
      default: begin v = dut.u_tmr_bin.u_reg.ff_c ^ 4'(1 << b); force dut.u_tmr_bin.u_reg.ff_c = v; release dut.u_tmr_bin.u_reg.ff_c; end
    endcase
    tmr_upsets++;
  endtask

  task automatic upset_ham(input int b);
    logic [3:0] c;
    logic [2:0] p;
    if (b < 4) begin
      c = dut.u_hamming.c_q ^ 4'(1 << b); force dut.u_hamming.c_q = c; release dut.u_hamming.c_q;
      ham_count_fix++;
    end else begin
      p = dut.u_hamming.p_q ^ 3'(1 << (b - 4)); force dut.u_hamming.p_q = p; release dut.u_hamming.p_q;
      ham_check_err++;
    end
  endtask

  function automatic logic [1:0] enc2(input logic [1:0] dg);
    case (dg)
      2'd0:    return 2'b00;
      2'd1:    return 2'b01;
      2'd2:    return 2'b11;
      default: return 2'b10;
    endcase
  endfunction

  // Johnson state k (0..7) of a 4-bit counter as q[3:0].
  function automatic logic [3:0] john4(input logic [3:0] k);
    logic [3:0] v;
    v = '0;
    for (int i = 0; i < int'(k); i++) v = {v[2:0], ~v[3]};
    return v;
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic check_outputs(input string what);
    logic ok;
    ok = 1'b1;
    for (int s = 0; s < STAGES; s++) begin
      if (casc_q[2*s +: 2] != enc2(ref_casc[2*s +: 2])) ok = 1'b0;
      if (casc_dec[s] != 4'(1 << ref_casc[2*s +: 2])) ok = 1'b0;
    end
    check(ok, {what, ": cascaded ring counter"});
    check(ring_q == john4(ref_john) && ring_dec == 8'(1 << ref_john), {what, ": TMR ring counter"});
    check(john_q == john4(ref_john) && john_dec == 8'(1 << ref_john), {what, ": Johnson counter"});
    check(ham_count == ref_ham, {what, ": Hamming counter"});
    check(tmr_count == ref_tmr, {what, ": TMR binary counter"});
  endtask

  initial begin : watchdog
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int moved;
    up_req = '0;
    foreach (casc_steps[s]) casc_steps[s] = 0;
    ring_lines_seen = '0;
    john_lines_seen = '0;
    casc_lines_seen = '0;
    rst_n = 1'b0;
    #12;
    ref_casc = '0; ref_ham = '0; ref_tmr = '0; ref_john = '0;
    check_outputs("reset");
    check(ham_syndrome == 0, "reset: clean Hamming word");
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < CYCLES; n++) begin
      casc_prev = casc_q;
      ring_prev = ring_q;
      @(posedge clk);
      ref_casc = ref_casc + 16'd1;
      ref_ham  = ref_ham + 4'd1;
      ref_tmr  = ref_tmr + 4'd1;
      ref_john = (ref_john == 4'd7) ? 4'd0 : ref_john + 4'd1;
      if (ref_casc == 0) casc_wraps++;
      if (ref_ham == 0)  ham_wraps++;
      if (ref_tmr == 0)  tmr_wraps++;
      if (ref_john == 0) begin
        john_wraps++;
        ring_wraps++;
      end
      #1;
      check_outputs("after edge");
      check(ham_syndrome == 0, "Hamming word clean after edge");
      check($countones(ring_q ^ ring_prev) == 1, "TMR ring: one bit per clock");
      moved = 0;
      for (int s = 0; s < STAGES; s++) begin
        logic [1:0] diff;
        diff = casc_q[2*s +: 2] ^ casc_prev[2*s +: 2];
        check($countones(diff) <= 1, "cascade: at most one bit per stage per clock");
        if (diff != 0) begin
          casc_steps[s]++;
          moved++;
        end
        casc_lines_seen[s] |= casc_dec[s];
      end
      if (moved > 1) multi_stage_edges++;
      ring_lines_seen |= ring_dec;
      john_lines_seen |= john_dec;
      if (n % 4 != 3) begin
        up_copy = int'($urandom_range(0, 2));
        up_bit  = int'($urandom_range(0, 1));
        up_req[$urandom_range(0, STAGES-1)] = 1'b1;
        casc_upsets++;
        upset_ring(int'($urandom_range(0, 2)), int'($urandom_range(0, 3)));
        upset_tmr(int'($urandom_range(0, 2)), int'($urandom_range(0, 3)));
        upset_ham(int'($urandom_range(0, 6)));
        #1;
        up_req = '0;
        check_outputs("after upsets");
        check(ham_syndrome != 0, "Hamming syndrome flags the upset");
      end
    end
    // Every mechanism must have happened.
    check(casc_upsets > 0 && ring_upsets > 0 && tmr_upsets > 0, "TMR upsets masked");
    check(ham_count_fix > 0, "Hamming count-bit corrections");
    check(ham_check_err > 0, "Hamming check-bit errors ignored");
    for (int s = 0; s < STAGES; s++) check(casc_steps[s] > 0, "carry into every cascade stage");
    check(casc_wraps == 1, "cascaded counter wrapped once after 65536 counts");
    check(ring_wraps > 0 && john_wraps > 0 && ham_wraps > 0 && tmr_wraps > 0, "small counters wrapped");
    check(multi_stage_edges > 0, "edges with several cascade stages stepping");
    check(&ring_lines_seen && &john_lines_seen, "every Johnson decode line used");
    check(&casc_lines_seen, "every cascade stage decode line used");
    $display("cascade: upsets %0d wraps %0d multi-stage edges %0d top-stage steps %0d",
             casc_upsets, casc_wraps, multi_stage_edges, casc_steps[STAGES-1]);
    $display("ring upsets %0d, TMR binary upsets %0d, Hamming count-bit fixes %0d, check-bit errors %0d",
             ring_upsets, tmr_upsets, ham_count_fix, ham_check_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cascaded_ring_counter: runs the 8-stage (16-bit) cascaded TMR ring
// counter through its full 65536-count period and past the wrap, against a
// 16-bit reference count. Each cycle it checks every stage's bits and its
// one-hot decode against the reference's base-4 digit, and that no stage
// changes more than one bit on an edge (each stage decodes glitch-free).
// After most edges it flips one copy of one bit in a random stage; the
// outputs must not change. It also counts the edges on which several stages
// step at once, where a decode across stages could glitch.
module tb_cascaded_ring_counter;
  localparam int unsigned STAGES = 8;
  localparam int unsigned CYCLES = 65600;

  logic                   clk = 1'b0;
  logic                   rst_n;
  logic [2*STAGES-1:0]    q, prev;
  logic [STAGES-1:0][3:0] stage_dec;
  logic [2*STAGES-1:0]    ref_cnt;
  logic [STAGES-1:0]      up_req;
  int up_copy, up_bit;
  int checks = 0, failures = 0, upsets = 0, wraps = 0, multi_stage_edges = 0;
  int steps [STAGES];

  cascaded_ring_counter #(.STAGES(STAGES)) dut (
    .clk(clk), .rst_n(rst_n), .q(q), .stage_dec(stage_dec)
  );

  always #5 clk = ~clk;

  // Upset injection into stage s: invert bit up_bit of copy up_copy.
  for (genvar s = 0; s < STAGES; s++) begin : g_upset
    always @(posedge up_req[s]) begin
      logic [1:0] v;
      case (up_copy)
        0: begin
          v = dut.g_stage[s].u_stage.u_reg.ff_a ^ 2'(1 << up_bit);
          force dut.g_stage[s].u_stage.u_reg.ff_a = v;
          release dut.g_stage[s].u_stage.u_reg.ff_a;
        end
        1: begin
          v = dut.g_stage[s].u_stage.u_reg.ff_b ^ 2'(1 << up_bit);
          force dut.g_stage[s].u_stage.u_reg.ff_b = v;
          release dut.g_stage[s].u_stage.u_reg.ff_b;
        end
        default: begin
          v = dut.g_stage[s].u_stage.u_reg.ff_c ^ 2'(1 << up_bit);
          force dut.g_stage[s].u_stage.u_reg.ff_c = v;
          release dut.g_stage[s].u_stage.u_reg.ff_c;
        end
      endcase
    end
  end

  function automatic logic [1:0] enc(input logic [1:0] dg);
    case (dg)
      2'd0:    return 2'b00;
      2'd1:    return 2'b01;
      2'd2:    return 2'b11;
      default: return 2'b10;
    endcase
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t: q=%h ref=%h", what, $time, q, ref_cnt);
    end
  endtask

  task automatic check_all(input string what);
    logic ok;
    ok = 1'b1;
    for (int s = 0; s < STAGES; s++) begin
      if (q[2*s +: 2] != enc(ref_cnt[2*s +: 2])) ok = 1'b0;
      if (stage_dec[s] != 4'(1 << ref_cnt[2*s +: 2])) ok = 1'b0;
    end
    check(ok, what);
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
    foreach (steps[s]) steps[s] = 0;
    rst_n = 1'b0;
    #12;
    ref_cnt = '0;
    check_all("reset");
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < CYCLES; n++) begin
      prev = q;
      @(posedge clk);
      ref_cnt = ref_cnt + 1'b1;
      if (ref_cnt == 0) wraps++;
      #1;
      check_all("count after edge");
      moved = 0;
      for (int s = 0; s < STAGES; s++) begin
        logic [1:0] diff;
        diff = q[2*s +: 2] ^ prev[2*s +: 2];
        check($countones(diff) <= 1, "at most one bit per stage changes");
        if (diff != 0) begin
          steps[s]++;
          moved++;
        end
      end
      if (moved > 1) multi_stage_edges++;
      if (n % 4 != 3) begin
        up_copy = int'($urandom_range(0, 2));
        up_bit  = int'($urandom_range(0, 1));
        up_req[$urandom_range(0, STAGES-1)] = 1'b1;
        upsets++;
        #1;
        up_req = '0;
        check_all("upset masked");
      end
    end
    for (int s = 0; s < STAGES; s++) check(steps[s] > 0, "every stage stepped");
    check(wraps == 1, "counter wrapped after 4^STAGES counts");
    check(steps[STAGES-1] == 4, "top stage stepped 4 times in one period");
    $display("upsets %0d, wraps %0d, edges with several stages stepping %0d, top-stage steps %0d",
             upsets, wraps, multi_stage_edges, steps[STAGES-1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

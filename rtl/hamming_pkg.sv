// hamming_pkg: constants and constant functions shared by the Hamming-code
// counter blocks (hamming_parity, hamming_correct, hamming_counter).
//
// A single-error-correcting Hamming code with m check bits protects up to
// 2^m-1-m information bits. Information bit i is given a distinct m-bit
// "code": the set of check bits whose parity covers it. When a single
// information bit flips, the syndrome equals that bit's code; when a check bit
// flips, the syndrome has weight one and matches no information bit.
//
// For the 4-bit counter the code table is the classic published one:
//   P0 covers C2,C1,C0   P1 covers C3,C2,C1   P2 covers C3,C1,C0
// i.e. codes (S2 S1 S0) C0=101, C1=111, C2=011, C3=110.
// For any other width the coverage is this design's own choice: bit i takes
// the i-th value, in ascending order, among the values of weight two or more.
package hamming_pkg;

  // Largest supported code: m = 7 (120 information bits, 127 total bits).
  localparam int unsigned MAX_CHECK_W = 8;
  localparam int unsigned MAX_INFO_W  = 128;

  typedef logic [MAX_CHECK_W-1:0] code_t;
  typedef logic [MAX_INFO_W-1:0]  mask_t;

  // Number of check bits m for a given number of information bits: the
  // smallest m >= 2 with 2^m - 1 - m >= info_w.
  function automatic int unsigned check_bits(int unsigned info_w);
    int unsigned m;
    m = 2;
    while (((1 << m) - 1 - m) < info_w) m++;
    return m;
  endfunction

  // Code (set of covering check bits) of information bit i.
  function automatic code_t bit_code(int unsigned info_w, int unsigned i);
    int unsigned n;
    if (info_w == 4) begin
      case (i)
        0:       return code_t'(3'b101);
        1:       return code_t'(3'b111);
        2:       return code_t'(3'b011);
        default: return code_t'(3'b110);
      endcase
    end
    n = 0;
    for (int unsigned v = 3; v < (1 << MAX_CHECK_W); v++) begin
      if ($countones(v) >= 2) begin
        if (n == i) return code_t'(v);
        n++;
      end
    end
    return '0;
  endfunction

  // Mask of the information bits covered by check bit j.
  function automatic mask_t cover_mask(int unsigned info_w, int unsigned j);
    mask_t mask;
    code_t code;
    mask = '0;
    for (int unsigned i = 0; i < info_w; i++) begin
      code    = bit_code(info_w, i);
      mask[i] = |(code & (code_t'(1) << j));
    end
    return mask;
  endfunction

endpackage

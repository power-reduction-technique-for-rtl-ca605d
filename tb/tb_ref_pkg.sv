// tb_ref_pkg: reference model of the coupling-aware link encoding, used by the
// testbenches. It works from whole-flit coupling costs instead of the
// per-pair detectors and counters of the RTL: for a candidate flit z sent
// after y, cost(y, z) sums over all adjacent line pairs Type I = 1,
// Type II = 2, Types III and IV = 0. An inversion is taken only when it lowers
// that cost, and among several the cheapest wins, with the tie rules and the
// Scheme II decodability rule of the design:
//   Scheme I  : odd if C_odd < C_none
//   Scheme II : odd if C_odd < C_none and C_odd < C_full; full if C_full is
//               below both and the receiver's test passes (C_even < C_full);
//               a blocked full falls back to odd if C_odd < C_none
//   Scheme III: the action whose cost is strictly below all three others
// Codes: 00 none, 01 even, 10 odd, 11 full.
package tb_ref_pkg;

  function automatic int pair_cost(input logic [1:0] p, input logic [1:0] c);
    int n_sw;
    n_sw = int'(p[0] != c[0]) + int'(p[1] != c[1]);
    if (n_sw == 1) return 1;
    if (n_sw == 2 && (c[0] != c[1])) return 2;   // opposite directions
    return 0;
  endfunction

  class link_ref #(int W = 32);
    typedef logic [W-1:0] flit_t;

    static function flit_t odd_mask();
      flit_t m;
      for (int i = 0; i < W; i++) m[i] = (i % 2 == 1);
      return m;
    endfunction

    static function flit_t even_mask();
      return ~odd_mask();
    endfunction

    static function int cost(input flit_t y, input flit_t z);
      int s;
      s = 0;
      for (int i = 0; i < W - 1; i++) s += pair_cost({y[i+1], y[i]}, {z[i+1], z[i]});
      return s;
    endfunction

    static function flit_t apply(input logic [1:0] code, input flit_t x);
      flit_t z;
      z = x;
      if (code[1]) z = z ^ odd_mask();
      if (code[0]) z = z ^ even_mask();
      return z;
    endfunction

    static function logic [1:0] decide(input int scheme, input flit_t y, input flit_t x);
      int c0, co, ce, cf;
      c0 = cost(y, x);
      co = cost(y, apply(2'b10, x));
      ce = cost(y, apply(2'b01, x));
      cf = cost(y, apply(2'b11, x));
      if (scheme == 1) return (co < c0) ? 2'b10 : 2'b00;
      if (scheme == 2) begin
        if (co < c0 && co < cf) return 2'b10;
        if (cf < c0 && cf < co) return (ce < cf) ? 2'b11 : ((co < c0) ? 2'b10 : 2'b00);
        return 2'b00;
      end
      if (co < c0 && co < cf && co < ce) return 2'b10;
      if (ce < c0 && ce < cf && ce < co) return 2'b01;
      if (cf < c0 && cf < co && cf < ce) return 2'b11;
      return 2'b00;
    endfunction

    // Payload -> unencoded W-bit flit (control lines 0).
    static function flit_t pack(input int scheme, input flit_t payload);
      flit_t x;
      x = payload;
      x[W-1] = 1'b0;
      if (scheme == 3) x[W-2] = 1'b0;
      return x;
    endfunction

    static function flit_t encode(input int scheme, input flit_t y, input flit_t payload);
      flit_t x;
      x = pack(scheme, payload);
      return apply(decide(scheme, y, x), x);
    endfunction

    // Random flit with a chosen style: 0 uniform, 1 small change of y,
    // 2 near-complement of y, 3 alternating-pattern based.
    static function flit_t stim(input int style, input flit_t y);
      flit_t r;
      for (int i = 0; i < W; i++) r[i] = $urandom_range(0, 1) == 1;
      case (style)
        1: begin
          flit_t m;
          m = '0;
          for (int k = 0; k < 3; k++) m[$urandom % W] = 1'b1;
          return y ^ m;
        end
        2: begin
          flit_t m;
          m = '0;
          for (int k = 0; k < 3; k++) m[$urandom % W] = 1'b1;
          return ~y ^ m;
        end
        3: begin
          flit_t m;
          m = '0;
          for (int k = 0; k < 2; k++) m[$urandom % W] = 1'b1;
          return ((($urandom % 2) != 0) ? odd_mask() : even_mask()) ^ m ^ ((($urandom % 2) != 0) ? y : '0);
        end
        default: return r;
      endcase
    endfunction
  endclass

endpackage

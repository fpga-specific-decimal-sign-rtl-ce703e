// tb_dec_ref_pkg: reference arithmetic and stimulus for the BCD testbenches.
//
// Values are packed BCD in a fixed 136-bit container (34 digits); only the
// low n digits are used. The reference works digit by digit on integers,
// the way one adds and subtracts on paper, so it shares no structure with
// the carry-chain formulations of the circuits under test.
package tb_dec_ref_pkg;

  localparam int MAXD = 34;
  typedef logic [4*MAXD-1:0] bcd_t;

  function automatic int dig(bcd_t v, int i);
    return int'(v[4*i +: 4]);
  endfunction

  // x + y + cin over n digits; returns {carry, sum}.
  function automatic logic [4*MAXD:0] ref_add(bcd_t x, bcd_t y, bit cin, int n);
    bcd_t s = '0;
    int   c = int'(cin);
    for (int i = 0; i < n; i++) begin
      int t = dig(x, i) + dig(y, i) + c;
      c = (t >= 10) ? 1 : 0;
      s[4*i +: 4] = 4'(t % 10);
    end
    return {1'(c), s};
  endfunction

  // x - y over n digits (mod 10^n); returns {borrow, difference}.
  function automatic logic [4*MAXD:0] ref_sub(bcd_t x, bcd_t y, int n);
    bcd_t s = '0;
    int   b = 0;
    for (int i = 0; i < n; i++) begin
      int t = dig(x, i) - dig(y, i) - b;
      b = (t < 0) ? 1 : 0;
      s[4*i +: 4] = 4'((t + 10) % 10);
    end
    return {1'(b), s};
  endfunction

  // 1 when x >= y (as n-digit numbers).
  function automatic bit ref_ge(bcd_t x, bcd_t y, int n);
    for (int i = n - 1; i >= 0; i--) begin
      if (dig(x, i) != dig(y, i)) return dig(x, i) > dig(y, i);
    end
    return 1'b1;
  endfunction

  // Sign-magnitude add/subtract by the effective-operation table:
  // returns {sign, magnitude}.
  function automatic logic [4*MAXD:0] ref_sm(bit sx, bcd_t x, bit sy, bcd_t y,
                                              bit op, int n);
    bit   ope = sx ^ sy ^ op;
    bcd_t m;
    bit   s;
    logic [4*MAXD:0] t;
    if (!ope) begin
      t = ref_add(x, y, 1'b0, n);
      m = t[4*MAXD-1:0];
      s = sx;
    end else if (ref_ge(x, y, n)) begin
      t = ref_sub(x, y, n);
      m = t[4*MAXD-1:0];
      s = sx;
    end else begin
      t = ref_sub(y, x, n);
      m = t[4*MAXD-1:0];
      s = ~sx;
    end
    return {s, m};
  endfunction

  // Random n-digit BCD value; digits above n are zero.
  function automatic bcd_t rand_bcd(int n);
    bcd_t v = '0;
    for (int i = 0; i < n; i++) v[4*i +: 4] = 4'($urandom_range(9));
    return v;
  endfunction

  function automatic bcd_t fill_bcd(int n, int d);
    bcd_t v = '0;
    for (int i = 0; i < n; i++) v[4*i +: 4] = 4'(d);
    return v;
  endfunction

  // Operand pairs that reach the corner cases as well as random ones:
  // kind 0 random, 1 equal, 2 differ in one digit, 3 all nines and a small
  // value, 4 zero operand, 5 digits that sum to 9 everywhere (long decimal
  // carry propagation), 6 short operands.
  function automatic void gen_pair(int n, int kind, output bcd_t x, output bcd_t y);
    int k;
    x = rand_bcd(n);
    y = rand_bcd(n);
    case (kind)
      1: y = x;
      2: begin
        y = x;
        k = $urandom_range(n - 1);
        y[4*k +: 4] = 4'($urandom_range(9));
      end
      3: begin
        x = fill_bcd(n, 9);
        y = '0;
        y[3:0] = 4'($urandom_range(1, 9));
        if ($urandom_range(1) != 0) begin
          bcd_t t = x; x = y; y = t;
        end
      end
      4: if ($urandom_range(1) != 0) x = '0; else y = '0;
      5: for (int i = 0; i < n; i++) y[4*i +: 4] = 4'(9 - dig(x, i));
      6: begin
        x = rand_bcd($urandom_range(1, n));
        y = rand_bcd($urandom_range(1, n));
      end
      default: ;
    endcase
  endfunction

endpackage

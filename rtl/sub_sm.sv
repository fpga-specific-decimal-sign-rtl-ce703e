// sub_sm: N-digit BCD subtractor with a sign-magnitude result ("Sub-SM"),
// ss = |x - y|, sign = (x < y).
//
// A first unsigned subtractor (sub_u) computes s = x - y mod 10^N and its
// final borrow c_n. When c_n is set the magnitude is 0 - s (mod 10^N),
// otherwise it is s - 0 = s. Rather than placing multiplexers in front of a
// second subtractor, the second borrow chain is fed with ready-made bit
// propagate and generate signals: pss = ~s (a 0 bit of s passes the borrow
// in both cases) and gss = s & c_n (a 1 bit of s only generates a borrow
// when 0 - s is being formed). The second chain gives nzz = pss ^ cc and the
// digit borrows cc[i+1], and each digit is corrected as in sub_u:
// ss = 9 - nzz after a borrow, ~nzz otherwise.
// The structure (two chained binary subtractors, pss/gss, correction) follows
// the published Sub-SM circuit; the borrow into digit 0 of each chain is 0.
//
// Interface: x, y packed BCD; ss the magnitude of x - y; sign = c_n.
// Combinational; two borrow chains in series, 8 multiplexers per digit.
module sub_sm
  import dec_pkg::*;
#(
  parameter int unsigned N = N_DIGITS
) (
  input  logic [4*N-1:0] x,
  input  logic [4*N-1:0] y,
  output logic [4*N-1:0] ss,
  output logic           sign
);

  logic [4*N-1:0] s;
  logic           c_n;

  sub_u #(.N(N)) u_first (
    .x  (x),
    .y  (y),
    .s  (s),
    .c_n(c_n)
  );

  always_comb begin
    logic       cc, pss, gss;
    bcd_digit_t nzz;
    cc = 1'b0;
    ss = '0;
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < 4; j++) begin
        pss    = ~s[4*i+j];
        gss    = s[4*i+j] & c_n;
        nzz[j] = pss ^ cc;
        cc     = pss ? cc : gss;
      end
      ss[4*i +: 4] = sub_corr(nzz, cc);
    end
  end

  assign sign = c_n;

endmodule

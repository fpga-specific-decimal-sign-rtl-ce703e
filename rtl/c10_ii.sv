// c10_ii: N-digit ten's complement BCD adder/subtractor ("C10-II"),
// sa = x + y or x - y (mod 10^N), chosen by sub (the A/S signal).
//
// Built like add_ii, with the decimal propagate and generate of each digit
// taken from the operands rather than from their binary sum. Because the
// second operand is either y or its nine's complement C9(y), the two upper-
// bit functions are computed for both cases, Qa/Ra from x and y and Qs/Rs
// from x and C9(y) (Q: upper bits sum to 4, R: upper bits sum to 5 or more),
// and sub picks one pair, the role of a wide multiplexer after two lookups.
// P and G then follow from Q, R and the low bits x[0], q[0], where
// q = sub ? C9(y) : y. In parallel the binary digit sum v = x + q is formed,
// and the digit is corrected to v + c[i] + 6*c[i+1] (mod 16). The carry into
// digit 0 is sub, completing the ten's complement.
// The split into Qa/Qs/Ra/Rs and their selection follows the published
// C10-II stage; the Q and R definitions are this design's choice.
//
// Interface and timing as c10_i.
module c10_ii
  import dec_pkg::*;
#(
  parameter int unsigned N = N_DIGITS
) (
  input  logic [4*N-1:0] x,
  input  logic [4*N-1:0] y,
  input  logic           sub,
  output logic [4*N-1:0] sa,
  output logic           c
);

  always_comb begin
    logic             cd, bc, pas, qa, ra, qs, rs, q, r, p, g, cnext;
    logic       [3:0] ha, hs, v;
    bcd_digit_t       xd, yd, cy, qd;
    cd = sub;
    sa = '0;
    for (int i = 0; i < N; i++) begin
      xd = x[4*i +: 4];
      yd = y[4*i +: 4];
      cy = c9(yd);
      ha = {1'b0, xd[3:1]} + {1'b0, yd[3:1]};
      hs = {1'b0, xd[3:1]} + {1'b0, cy[3:1]};
      qa = (ha == 4'd4);
      ra = (ha >= 4'd5);
      qs = (hs == 4'd4);
      rs = (hs >= 4'd5);
      q  = sub ? qs : qa;
      r  = sub ? rs : ra;
      qd = sub ? cy : yd;
      p  = q & (xd[0] ^ qd[0]);
      g  = r | (q & xd[0] & qd[0]);
      cnext = p ? cd : g;
      bc = 1'b0;
      for (int j = 0; j < 4; j++) begin
        pas  = xd[j] ^ qd[j];
        v[j] = pas ^ bc;
        bc   = pas ? bc : xd[j];
      end
      sa[4*i +: 4] = add_corr(v, cd, cnext);
      cd = cnext;
    end
    c = cd;
  end

endmodule

// c10_i: N-digit ten's complement BCD adder/subtractor ("C10-I"),
// sa = x + y or x - y (mod 10^N), chosen by sub (the A/S signal).
//
// Subtraction is x + C9(y) + 1, the nine's complement of every digit of y
// plus a carry of 1 into digit 0. The operand selection is folded into the
// first lookup of each bit: with q = sub ? C9(y) : y, the 4-bit binary chain
// of a digit propagates on x ^ q and generates x, giving the binary digit
// sum v[4:0]. From v the digit's decimal propagate P = (v == 9) and generate
// G = (v >= 10) are taken, one multiplexer per digit forms the decimal carry,
// and the digit is corrected to v + c[i] + 6*c[i+1] (mod 16), as in add_i.
// The structure follows the published C10-I stage; the P/G definitions and
// the correction formula are this design's reading of it.
//
// Interface: x, y packed BCD; sub = 1 subtracts; sa the N-digit result;
// c the carry out of the top digit (for a subtraction, 1 when x >= y).
// Combinational, one carry multiplexer per digit on the decimal chain.
module c10_i
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
    logic             cd, bc, pas, p, g, cnext;
    logic       [4:0] v;
    bcd_digit_t       xd, qd;
    cd = sub;
    sa = '0;
    for (int i = 0; i < N; i++) begin
      xd = x[4*i +: 4];
      qd = sub ? c9(y[4*i +: 4]) : y[4*i +: 4];
      bc = 1'b0;
      for (int j = 0; j < 4; j++) begin
        pas  = xd[j] ^ qd[j];
        v[j] = pas ^ bc;
        bc   = pas ? bc : xd[j];
      end
      v[4]  = bc;
      p     = (v == 5'd9);
      g     = (v >= 5'd10);
      cnext = p ? cd : g;
      sa[4*i +: 4] = add_corr(v[3:0], cd, cnext);
      cd = cnext;
    end
    c = cd;
  end

endmodule

// add_i: N-digit unsigned BCD adder, "Add-I" organisation.
//
// Each digit first adds its two operand digits in binary on a 4-bit carry
// chain (propagate x^y, generate x&y, carry in 0), giving u[4:0]. The
// decimal propagate P = (u == 9) and generate G = (u >= 10) are taken from
// that intermediate sum, and one carry-chain multiplexer per digit forms the
// decimal carry c[i+1] = P ? c[i] : G. The output digit is then corrected
// from u[3:0], c[i] and c[i+1]: a = u + c[i] + 6*c[i+1] (mod 16).
// The digit organisation follows the published Add-I stage; the exact
// P/G definitions and the correction formula are this design's reading of it.
//
// Interface: x, y packed BCD (digit i in bits 4i+3..4i), cin the decimal
// carry into digit 0; a = (x + y + cin) mod 10^N, cout the carry out of the
// top digit. Purely combinational; the critical path is one multiplexer
// per digit along the decimal carry chain.
module add_i
  import dec_pkg::*;
#(
  parameter int unsigned N = N_DIGITS
) (
  input  logic [4*N-1:0] x,
  input  logic [4*N-1:0] y,
  input  logic           cin,
  output logic [4*N-1:0] a,
  output logic           cout
);

  always_comb begin
    logic             c;      // decimal carry into the current digit
    logic             bc;     // binary carry inside the digit
    logic       [4:0] u;
    logic             p, g, cnext;
    bcd_digit_t       xd, yd;
    c = cin;
    a = '0;
    for (int i = 0; i < N; i++) begin
      xd = x[4*i +: 4];
      yd = y[4*i +: 4];
      bc = 1'b0;
      for (int j = 0; j < 4; j++) begin
        u[j] = xd[j] ^ yd[j] ^ bc;
        bc   = (xd[j] ^ yd[j]) ? bc : (xd[j] & yd[j]);
      end
      u[4]  = bc;
      p     = (u == 5'd9);
      g     = (u >= 5'd10);
      cnext = p ? c : g;
      a[4*i +: 4] = add_corr(u[3:0], c, cnext);
      c = cnext;
    end
    cout = c;
  end

endmodule

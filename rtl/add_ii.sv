// add_ii: N-digit unsigned BCD adder, "Add-II" organisation.
//
// The decimal propagate and generate of each digit are computed straight
// from the operand digits instead of from their binary sum, so the decimal
// carry chain does not wait for the 4-bit binary addition. Two functions of
// the upper three bits, Q = (x[3:1] + y[3:1] == 4) and R = (x[3:1] + y[3:1]
// >= 5), are combined with the low bits: P = Q & (x[0] ^ y[0]) (digit sum
// exactly 9) and G = R | Q & x[0] & y[0] (digit sum at least 10). In
// parallel the binary digit sum u[3:0] is formed on a 4-bit chain, and the
// output digit is a = u + c[i] + 6*c[i+1] (mod 16).
// The split into Q/R and P/G follows the published Add-II stage; the exact
// definitions of Q and R are this design's choice.
//
// Interface and timing as add_i: a = (x + y + cin) mod 10^N, cout the carry
// out; combinational, one carry multiplexer per digit on the critical path.
module add_ii
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
    logic             c, bc, q, r, p, g, cnext;
    logic       [3:0] hsum;   // x[3:1] + y[3:1], 0..8 for valid digits
    logic       [3:0] u;
    bcd_digit_t       xd, yd;
    c = cin;
    a = '0;
    for (int i = 0; i < N; i++) begin
      xd    = x[4*i +: 4];
      yd    = y[4*i +: 4];
      hsum  = {1'b0, xd[3:1]} + {1'b0, yd[3:1]};
      q     = (hsum == 4'd4);
      r     = (hsum >= 4'd5);
      p     = q & (xd[0] ^ yd[0]);
      g     = r | (q & xd[0] & yd[0]);
      cnext = p ? c : g;
      bc = 1'b0;
      for (int j = 0; j < 4; j++) begin
        u[j] = xd[j] ^ yd[j] ^ bc;
        bc   = (xd[j] ^ yd[j]) ? bc : (xd[j] & yd[j]);
      end
      a[4*i +: 4] = add_corr(u, c, cnext);
      c = cnext;
    end
    cout = c;
  end

endmodule

// add_iii: N-digit unsigned BCD adder, "Add-III" organisation (binary
// addition with a conditional +6 bias and a two-bit correction).
//
// For each digit the upper three bits of both operands are combined by one
// lookup per bit into t[3:0]: with h = x[3:1] + y[3:1], the biased value
// w = 2h + (h >= 4 ? 6 : 0) is formed (always even) and t = w[4:1].
// The digit is then a plain binary addition of w and x[0] + y[0] + c on a
// 4-bit carry chain: bit 0 propagates on x[0] ^ y[0] and generates x[0];
// bits 1 and 2 propagate on t and generate 0; bit 3 propagates on t[2] and
// generates t[3]. Because the bias is already in, the 4-bit carry out is the
// decimal carry, so the chain runs straight through all digits. The only
// case the bias gets wrong is a biased sum of 14 or 15 without carry (digit
// sum 8 or 9); clearing bits 2 and 1 whenever the binary result u has u[3]
// set fixes it and leaves the other digits unchanged.
// The bias-then-clear scheme follows the published Add-III stage, where the
// clearing is done by slice latches with a reset from u[3]; here it is the
// equivalent AND gates, so the module is plain combinational logic.
//
// Interface and timing as add_i: a = (x + y + cin) mod 10^N, cout the carry
// out; combinational, four carry multiplexers per digit on the chain.
module add_iii
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
    logic             c;
    logic       [3:0] h;
    logic       [3:0] wh;     // w[4:1]; w is always even
    logic       [3:0] t, p, g, u;
    bcd_digit_t       xd, yd;
    c = cin;
    a = '0;
    for (int i = 0; i < N; i++) begin
      xd = x[4*i +: 4];
      yd = y[4*i +: 4];
      h  = {1'b0, xd[3:1]} + {1'b0, yd[3:1]};
      wh = h + ((h >= 4'd4) ? 4'd3 : 4'd0);
      t  = wh;
      p  = {t[2], t[1], t[0], xd[0] ^ yd[0]};
      g  = {t[3], 1'b0, 1'b0, xd[0]};
      for (int j = 0; j < 4; j++) begin
        u[j] = p[j] ^ c;
        c    = p[j] ? c : g[j];
      end
      a[4*i +: 4] = {u[3], u[2] & ~u[3], u[1] & ~u[3], u[0]};
    end
    cout = c;
  end

endmodule

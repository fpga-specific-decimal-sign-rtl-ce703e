// c10_iii: N-digit ten's complement BCD adder/subtractor ("C10-III"),
// sa = x + y or x - y (mod 10^N), chosen by sub (the A/S signal).
//
// The biased adder add_iii has no free lookup input left for the operation
// select, so an extra stage in front of it forms the second operand digit by
// digit: q = C9(y) when subtracting and q = y when adding, with C9 given by
// four small bit equations (see dec_pkg::c9). add_iii then computes
// x + q + sub, the carry in of 1 completing the ten's complement.
// The operand stage and its equations follow the published C10-III
// description.
//
// Interface and timing as c10_i; the chain is that of add_iii, four carry
// multiplexers per digit.
module c10_iii
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

  logic [4*N-1:0] q;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      q[4*i +: 4] = sub ? c9(y[4*i +: 4]) : y[4*i +: 4];
    end
  end

  add_iii #(.N(N)) u_add (
    .x   (x),
    .y   (q),
    .cin (sub),
    .a   (sa),
    .cout(c)
  );

endmodule

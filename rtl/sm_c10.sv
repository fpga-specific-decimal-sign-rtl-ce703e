// sm_c10: N-digit sign-magnitude BCD adder/subtractor built on a ten's
// complement adder/subtractor ("SM-C10-I/-II/-III", chosen by ARCH).
//
// Operands and result are sign plus BCD magnitude, the form of a decimal
// floating-point significand. The effective operation on the magnitudes is
// ope = sx ^ sy ^ op (1: subtract). The ten's complement unit computes
// sa = |X| + |Y| or |X| - |Y| (mod 10^N) with carry out c. For an effective
// subtraction, c = 0 means |X| < |Y| and sa is the ten's complement of the
// wanted magnitude, so it is complemented back (dec_neg) when
// ne = ope & ~c. The result sign is sr = (ope & ~c) ^ sx: the sign of X,
// flipped when the subtraction went negative. A sum that overflows N digits
// is returned modulo 10^N, and X - Y with |X| = |Y| gives a zero magnitude
// carrying the sign of X. All of this follows the published SM-C10 scheme.
//
// ARCH selects the ten's complement unit: ARCH_I = c10_i, ARCH_II = c10_ii
// (the default, the fastest of the three at 34 digits), ARCH_III = c10_iii
// (the smallest).
//
// Interface: sx, sy signs (1 = negative), x_mag, y_mag packed BCD
// magnitudes, op (1 = subtract); sr, r the result sign and magnitude.
// Combinational: the ten's complement chain, then the one-multiplexer-per-
// digit chain of dec_neg.
module sm_c10
  import dec_pkg::*;
#(
  parameter int unsigned N    = N_DIGITS,
  parameter arch_e       ARCH = ARCH_II
) (
  input  logic           sx,
  input  logic [4*N-1:0] x_mag,
  input  logic           sy,
  input  logic [4*N-1:0] y_mag,
  input  logic           op,
  output logic           sr,
  output logic [4*N-1:0] r
);

  logic           ope, c, ne;
  logic [4*N-1:0] sa;

  assign ope = sx ^ sy ^ op;

  generate
    if (ARCH == ARCH_I) begin : g_c10
      c10_i #(.N(N)) u_c10 (.x(x_mag), .y(y_mag), .sub(ope), .sa(sa), .c(c));
    end else if (ARCH == ARCH_II) begin : g_c10
      c10_ii #(.N(N)) u_c10 (.x(x_mag), .y(y_mag), .sub(ope), .sa(sa), .c(c));
    end else begin : g_c10
      c10_iii #(.N(N)) u_c10 (.x(x_mag), .y(y_mag), .sub(ope), .sa(sa), .c(c));
    end
  endgenerate

  assign ne = ope & ~c;
  assign sr = ne ^ sx;

  dec_neg #(.N(N)) u_neg (
    .sa(sa),
    .ne(ne),
    .r (r)
  );

endmodule

// sm_u: N-digit sign-magnitude BCD adder/subtractor built on an unsigned
// BCD adder and a sign-magnitude BCD subtractor working in parallel
// ("SM-U-I/-II/-III", chosen by ARCH).
//
// Both possible magnitudes are computed at once: a = |X| + |Y| by an
// unsigned adder and ss = ||X| - |Y|| by sub_sm, which also reports
// cc = 1 when |X| < |Y|. The effective operation ope = sx ^ sy ^ op picks
// r = ope ? ss : a, and the sign is sr = (ope & cc) ^ sx. A sum that
// overflows N digits is returned modulo 10^N, and X - Y with |X| = |Y|
// gives a zero magnitude carrying the sign of X. This follows the published
// SM-U scheme; there the subtractor's last correction step is merged with
// the output multiplexer into one lookup per bit, which here is left to
// synthesis (sub_sm's corrected output feeds a plain 2:1 selection).
//
// ARCH selects the adder: ARCH_I = add_i, ARCH_II = add_ii,
// ARCH_III = add_iii (the default: the smallest, with the same delay as the
// other two, since the subtractor path dominates).
//
// Interface as sm_c10. Combinational: the critical path is the two borrow
// chains of sub_sm in series.
module sm_u
  import dec_pkg::*;
#(
  parameter int unsigned N    = N_DIGITS,
  parameter arch_e       ARCH = ARCH_III
) (
  input  logic           sx,
  input  logic [4*N-1:0] x_mag,
  input  logic           sy,
  input  logic [4*N-1:0] y_mag,
  input  logic           op,
  output logic           sr,
  output logic [4*N-1:0] r
);

  logic           ope, cc, add_cout;
  logic [4*N-1:0] a, ss;

  assign ope = sx ^ sy ^ op;

  // The adder's carry out is an overflow of |X| + |Y| beyond N digits; the
  // scheme drops it (results are modulo 10^N), so add_cout is left unread.
  generate
    if (ARCH == ARCH_I) begin : g_add
      add_i #(.N(N)) u_add (.x(x_mag), .y(y_mag), .cin(1'b0), .a(a), .cout(add_cout));
    end else if (ARCH == ARCH_II) begin : g_add
      add_ii #(.N(N)) u_add (.x(x_mag), .y(y_mag), .cin(1'b0), .a(a), .cout(add_cout));
    end else begin : g_add
      add_iii #(.N(N)) u_add (.x(x_mag), .y(y_mag), .cin(1'b0), .a(a), .cout(add_cout));
    end
  endgenerate

  sub_sm #(.N(N)) u_sub (
    .x   (x_mag),
    .y   (y_mag),
    .ss  (ss),
    .sign(cc)
  );

  assign r  = ope ? ss : a;
  assign sr = (ope & cc) ^ sx;

endmodule

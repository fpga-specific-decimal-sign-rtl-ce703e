// dec_sm_addsub_top: the six sign-magnitude BCD adder/subtractors side by
// side, each with its own operands and result.
//
// All six compute the same function, (sx,|X|) +/- (sy,|Y|) in sign-magnitude
// BCD, and differ in their area/delay trade-off on a LUT-6 FPGA with a fast
// carry chain:
//   V_SM_C10_I, _II, _III  ten's complement adder/subtractor + conditional
//                          re-complement (sm_c10 with ARCH_I/II/III);
//   V_SM_U_I, _II, _III    unsigned adder and sign-magnitude subtractor in
//                          parallel + select (sm_u with ARCH_I/II/III).
// The ten's complement family is smaller and wins on delay at 34 digits;
// the parallel family is faster at 7 and 16 digits. Keeping all six in one
// top lets them be compared or one of them be picked by the surrounding
// logic.
//
// Interface: every port is an array indexed by dec_pkg::variant_e; entry v
// carries the operands and result of circuit v. Signs are 1 for negative,
// magnitudes are packed BCD, op = 1 subtracts. Purely combinational.
module dec_sm_addsub_top
  import dec_pkg::*;
#(
  parameter int unsigned N = N_DIGITS
) (
  input  logic [NUM_VARIANTS-1:0]          sx,
  input  logic [NUM_VARIANTS-1:0][4*N-1:0] x_mag,
  input  logic [NUM_VARIANTS-1:0]          sy,
  input  logic [NUM_VARIANTS-1:0][4*N-1:0] y_mag,
  input  logic [NUM_VARIANTS-1:0]          op,
  output logic [NUM_VARIANTS-1:0]          sr,
  output logic [NUM_VARIANTS-1:0][4*N-1:0] r
);

  sm_c10 #(.N(N), .ARCH(ARCH_I)) u_sm_c10_i (
    .sx(sx[V_SM_C10_I]), .x_mag(x_mag[V_SM_C10_I]), .sy(sy[V_SM_C10_I]),
    .y_mag(y_mag[V_SM_C10_I]), .op(op[V_SM_C10_I]),
    .sr(sr[V_SM_C10_I]), .r(r[V_SM_C10_I])
  );

  sm_c10 #(.N(N), .ARCH(ARCH_II)) u_sm_c10_ii (
    .sx(sx[V_SM_C10_II]), .x_mag(x_mag[V_SM_C10_II]), .sy(sy[V_SM_C10_II]),
    .y_mag(y_mag[V_SM_C10_II]), .op(op[V_SM_C10_II]),
    .sr(sr[V_SM_C10_II]), .r(r[V_SM_C10_II])
  );

  sm_c10 #(.N(N), .ARCH(ARCH_III)) u_sm_c10_iii (
    .sx(sx[V_SM_C10_III]), .x_mag(x_mag[V_SM_C10_III]), .sy(sy[V_SM_C10_III]),
    .y_mag(y_mag[V_SM_C10_III]), .op(op[V_SM_C10_III]),
    .sr(sr[V_SM_C10_III]), .r(r[V_SM_C10_III])
  );

  sm_u #(.N(N), .ARCH(ARCH_I)) u_sm_u_i (
    .sx(sx[V_SM_U_I]), .x_mag(x_mag[V_SM_U_I]), .sy(sy[V_SM_U_I]),
    .y_mag(y_mag[V_SM_U_I]), .op(op[V_SM_U_I]),
    .sr(sr[V_SM_U_I]), .r(r[V_SM_U_I])
  );

  sm_u #(.N(N), .ARCH(ARCH_II)) u_sm_u_ii (
    .sx(sx[V_SM_U_II]), .x_mag(x_mag[V_SM_U_II]), .sy(sy[V_SM_U_II]),
    .y_mag(y_mag[V_SM_U_II]), .op(op[V_SM_U_II]),
    .sr(sr[V_SM_U_II]), .r(r[V_SM_U_II])
  );

  sm_u #(.N(N), .ARCH(ARCH_III)) u_sm_u_iii (
    .sx(sx[V_SM_U_III]), .x_mag(x_mag[V_SM_U_III]), .sy(sy[V_SM_U_III]),
    .y_mag(y_mag[V_SM_U_III]), .op(op[V_SM_U_III]),
    .sr(sr[V_SM_U_III]), .r(r[V_SM_U_III])
  );

endmodule

// dec_pkg: types, constants and small digit functions shared by the BCD
// adders, subtractors and sign-magnitude adder/subtractors.
//
// Numbers are packed BCD: an N-digit operand is a 4*N-bit vector whose digit
// i occupies bits 4i+3..4i, digit 0 being the least significant. The default
// width of 34 digits is the largest IEEE 754-2008 decimal significand
// (decimal128), the largest size evaluated for these circuits; 7 and 16
// digits are the other evaluated sizes.
//
// The helper functions describe single-digit lookup functions, the ones a
// 6-input LUT holds in an FPGA mapping:
//   c9        nine's complement of a digit, 9 - d, by the bit equations of the
//             C10-III operand stage (bit 2 written as d[2] ^ d[1]);
//   sub_corr  correction of a binary digit subtraction whose inverted
//             difference is nz: 9 - nz after a digit borrow, else ~nz;
//   add_corr  correction of a 4-bit binary digit sum u: add the carry in and
//             six more when the digit produced a decimal carry.
package dec_pkg;

  localparam int unsigned N_DIGITS = 34;

  typedef logic [3:0] bcd_digit_t;

  // Which carry-propagate unit an SM adder/subtractor is built on:
  // I   = P and G from the binary digit sum (Add-I, C10-I)
  // II  = P and G from the operand digits (Add-II, C10-II)
  // III = binary addition with conditional +6 bias (Add-III, C10-III)
  typedef enum logic [1:0] {
    ARCH_I   = 2'd0,
    ARCH_II  = 2'd1,
    ARCH_III = 2'd2
  } arch_e;

  // The six sign-magnitude circuits side by side in the top level.
  typedef enum logic [2:0] {
    V_SM_C10_I   = 3'd0,
    V_SM_C10_II  = 3'd1,
    V_SM_C10_III = 3'd2,
    V_SM_U_I     = 3'd3,
    V_SM_U_II    = 3'd4,
    V_SM_U_III   = 3'd5
  } variant_e;

  localparam int unsigned NUM_VARIANTS = 6;

  function automatic bcd_digit_t c9(input bcd_digit_t d);
    bcd_digit_t q;
    q[0] = ~d[0];
    q[1] = d[1];
    q[2] = d[2] ^ d[1];
    q[3] = ~d[3] & ~d[2] & ~d[1];
    return q;
  endfunction

  function automatic bcd_digit_t sub_corr(input bcd_digit_t nz, input logic borrow);
    return borrow ? bcd_digit_t'(4'd9 - nz) : ~nz;
  endfunction

  function automatic bcd_digit_t add_corr(input bcd_digit_t u, input logic cin,
                                          input logic cout);
    return bcd_digit_t'(u + {3'b000, cin} + (cout ? 4'd6 : 4'd0));
  endfunction

endpackage

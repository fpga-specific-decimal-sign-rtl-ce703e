// sub_u: N-digit unsigned BCD subtractor ("Sub-U"), s = x - y.
//
// The subtraction is done in binary on one borrow chain that runs through
// all 4*N bits, followed by a per-digit correction. Each bit cell has
// ps = XNOR(x, y) as its propagate (equal bits pass the incoming borrow on)
// and y as its generate (x = 0, y = 1 borrows), and produces the inverted
// difference bit nz = ps ^ borrow_in. The borrow out of bit 3 of digit i is
// the decimal borrow c[i+1]: when it is set, 16 rather than 10 was borrowed
// from the next digit, so the digit is fixed by subtracting 6. Working on the
// inverted difference, the corrected digit is s = 9 - nz after a borrow and
// s = ~nz otherwise; this is a function of five signals per digit.
// The bit cell and the correction rule follow the published Sub-U circuit;
// the borrow into digit 0 is tied to 0 by this design.
//
// Interface: x minuend, y subtrahend (packed BCD); s = (x - y) mod 10^N;
// c_n = 1 when x < y (the subtraction wrapped around). Combinational, four
// carry-chain multiplexers per digit.
module sub_u
  import dec_pkg::*;
#(
  parameter int unsigned N = N_DIGITS
) (
  input  logic [4*N-1:0] x,
  input  logic [4*N-1:0] y,
  output logic [4*N-1:0] s,
  output logic           c_n
);

  always_comb begin
    logic             c, ps;
    bcd_digit_t       nz;
    c = 1'b0;
    s = '0;
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < 4; j++) begin
        ps    = ~(x[4*i+j] ^ y[4*i+j]);
        nz[j] = ps ^ c;
        c     = ps ? c : y[4*i+j];
      end
      s[4*i +: 4] = sub_corr(nz, c);
    end
    c_n = c;
  end

endmodule

// dec_neg: conditional ten's complement of an N-digit BCD value ("Neg" with
// its output multiplexer): r = C9(sa) + 1 (mod 10^N) when ne = 1, r = sa
// when ne = 0.
//
// Adding 1 to the nine's complement only carries through digits whose
// nine's complement is 9, i.e. digits of sa that are 0. So the increment
// needs one multiplexer per digit: Pn[i] = (sa[i] == 0) and
// nc[i+1] = Pn[i] & nc[i], starting from nc[0] = ne. Each output digit is a
// function of sa[i], ne and its incoming carry nc[i]: sa[i] when ne = 0,
// otherwise C9(sa[i]) + nc[i], which wraps to 0 exactly when nc[i+1] is set.
// When ne = 0 the whole chain is 0.
// The propagate function and chain follow the published Neg circuit; the
// per-digit output function (incoming carry nc[i] added to C9(sa[i])) is
// written here from what C9(sa) + 1 requires.
//
// Interface: sa, r packed BCD; ne the complement enable. Combinational,
// one carry multiplexer per digit.
module dec_neg
  import dec_pkg::*;
#(
  parameter int unsigned N = N_DIGITS
) (
  input  logic [4*N-1:0] sa,
  input  logic           ne,
  output logic [4*N-1:0] r
);

  always_comb begin
    logic       nc, pn, ncnext;
    bcd_digit_t sd;
    nc = ne;
    r  = '0;
    for (int i = 0; i < N; i++) begin
      sd     = sa[4*i +: 4];
      pn     = (sd == 4'd0);
      ncnext = pn ? nc : 1'b0;
      if (!ne)
        r[4*i +: 4] = sd;
      else if (ncnext)
        r[4*i +: 4] = 4'd0;
      else
        r[4*i +: 4] = c9(sd) + {3'b000, nc};
      nc = ncnext;
    end
  end

endmodule

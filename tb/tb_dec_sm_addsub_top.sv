// tb_dec_sm_addsub_top: end-to-end testbench of dec_sm_addsub_top at its
// default width (34 digits), all six sign-magnitude circuits at once.
//
// Each clock, every circuit gets its own operands: random signs and
// operation, and magnitude pairs from tb_dec_ref_pkg::gen_pair. Results and
// signs are compared with the digit-by-digit sign-magnitude reference. For
// every circuit the testbench also counts how often each situation the
// circuits handle differently occurred, and counts a failure for any that
// never did:
//   add      effective addition of the magnitudes
//   ovf      an effective addition that overflows N digits (result mod 10^N)
//   sub_pos  effective subtraction with |X| > |Y| (no re-complement)
//   sub_neg  effective subtraction with |X| < |Y| (re-complement / negative
//            difference, sign flipped)
//   equal    effective subtraction of equal magnitudes (zero result)
//   longneg  negative difference whose lower half digits are all zero, so
//            the re-complement carry runs across at least N/2 digits
//   longcy   an addition whose decimal carry crosses every digit
// The circuits are combinational; each vector is checked in its own cycle.
// A watchdog ends the run with a failure if the vectors do not finish.
module tb_dec_sm_addsub_top;
  import tb_dec_ref_pkg::*;
  import dec_pkg::*;

  localparam int N    = dec_pkg::N_DIGITS;
  localparam int NV   = dec_pkg::NUM_VARIANTS;
  localparam int NVEC = 5000;
  localparam int NMECH = 7;
  localparam string MECH_NAME [NMECH] =
    '{"add", "ovf", "sub_pos", "sub_neg", "equal", "longneg", "longcy"};

  localparam string VNAME [NV] =
    '{"SM-C10-I", "SM-C10-II", "SM-C10-III", "SM-U-I", "SM-U-II", "SM-U-III"};

  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  int   mech [NV][NMECH];
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NVEC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [NV-1:0]          sx, sy, op, sr;
  logic [NV-1:0][4*N-1:0] x_mag, y_mag, r;

  dec_sm_addsub_top dut (
    .sx(sx), .x_mag(x_mag), .sy(sy), .y_mag(y_mag), .op(op), .sr(sr), .r(r)
  );

  // Classify one vector; returns a bit per mechanism.
  function automatic logic [NMECH-1:0] classify(bit sxv, bcd_t xb, bit syv, bcd_t yb,
                                                bit opv);
    logic [NMECH-1:0] m = '0;
    logic [4*MAXD:0]  t;
    bit               lowzero = 1'b1;
    if (!(sxv ^ syv ^ opv)) begin
      m[0] = 1'b1;
      t = ref_add(xb, yb, 1'b0, N);
      m[1] = t[4*MAXD];
      // carry crosses every digit: digit 0 carries and each higher digit
      // sums to exactly 9
      if (dig(xb, 0) + dig(yb, 0) >= 10) begin
        m[6] = 1'b1;
        for (int i = 1; i < N; i++) if (dig(xb, i) + dig(yb, i) != 9) m[6] = 1'b0;
      end
    end else if (xb == yb) begin
      m[4] = 1'b1;
    end else if (ref_ge(xb, yb, N)) begin
      m[2] = 1'b1;
    end else begin
      m[3] = 1'b1;
      t = ref_sub(yb, xb, N);
      for (int i = 0; i < N / 2; i++) if (dig(t[4*MAXD-1:0], i) != 0) lowzero = 1'b0;
      m[5] = lowzero;
    end
    return m;
  endfunction

  initial begin
    bcd_t             xb, yb;
    logic [4*MAXD:0]  e;
    logic [NMECH-1:0] m;
    int               kind;
    string            line;
    foreach (mech[v, k]) mech[v][k] = 0;
    for (int t = 0; t < NVEC; t++) begin
      for (int v = 0; v < NV; v++) begin
        kind = $urandom_range(7);
        if (kind == 7) begin
          // operands equal except for one high digit: long zero run in the
          // difference
          xb = rand_bcd(N);
          yb = xb;
          yb[4*(N-1) +: 4] = 4'($urandom_range(9));
        end else begin
          gen_pair(N, kind, xb, yb);
        end
        x_mag[v] = xb[4*N-1:0];
        y_mag[v] = yb[4*N-1:0];
        sx[v] = 1'($urandom_range(1));
        sy[v] = 1'($urandom_range(1));
        op[v] = 1'($urandom_range(1));
      end
      @(posedge clk);
      #1;
      for (int v = 0; v < NV; v++) begin
        e = ref_sm(sx[v], bcd_t'(x_mag[v]), sy[v], bcd_t'(y_mag[v]), op[v], N);
        checks++;
        if ({sr[v], bcd_t'(r[v])} !== e) begin
          failures++;
          if (failures < 10)
            $display("FAIL %s: got %b %h expected %b %h", VNAME[v],
                     sr[v], r[v], e[4*MAXD], e[4*N-1:0]);
        end
        m = classify(sx[v], bcd_t'(x_mag[v]), sy[v], bcd_t'(y_mag[v]), op[v]);
        for (int k = 0; k < NMECH; k++) if (m[k]) mech[v][k]++;
      end
    end
    for (int v = 0; v < NV; v++) begin
      line = $sformatf("%-13s", VNAME[v]);
      for (int k = 0; k < NMECH; k++) begin
        line = {line, $sformatf(" %s=%0d", MECH_NAME[k], mech[v][k])};
        checks++;
        if (mech[v][k] == 0) begin
          failures++;
          $display("FAIL %s: %s never happened", VNAME[v], MECH_NAME[k]);
        end
      end
      $display("%s", line);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

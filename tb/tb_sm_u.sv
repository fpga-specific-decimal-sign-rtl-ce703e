// tb_sm_u: self-checking testbench for sm_u.
//
// Checks all three sm_u variants (ARCH_I, II, III) on independent random
// signs, operations and magnitudes against the sign-magnitude reference.
// Operand pairs come from tb_dec_ref_pkg::gen_pair, which mixes random
// values with the corner cases (equal operands, all nines, zeros, digit
// pairs summing to 9 so a carry crosses every digit, short operands). The
// expected values come from the digit-by-digit reference in the same
// package. The block is combinational: one vector is applied per clock and
// checked in the same cycle. A watchdog ends the run with a failure if the
// vectors do not finish in time. Runs at the block's default width.
module tb_sm_u;
  import tb_dec_ref_pkg::*;

  localparam int N    = dec_pkg::N_DIGITS;
  localparam int NVEC = 4000;

  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NVEC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [4*MAXD:0] got, logic [4*MAXD:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  localparam int NA = 3;
  logic [NA-1:0]          sx, sy, op, sr;
  logic [NA-1:0][4*N-1:0] xm, ym, r;
  bcd_t           xb, yb;
  logic [4*MAXD:0] e;

  sm_u #(.ARCH(dec_pkg::ARCH_I))   dut_i   (.sx(sx[0]), .x_mag(xm[0]), .sy(sy[0]), .y_mag(ym[0]), .op(op[0]), .sr(sr[0]), .r(r[0]));
  sm_u #(.ARCH(dec_pkg::ARCH_II))  dut_ii  (.sx(sx[1]), .x_mag(xm[1]), .sy(sy[1]), .y_mag(ym[1]), .op(op[1]), .sr(sr[1]), .r(r[1]));
  sm_u #(.ARCH(dec_pkg::ARCH_III)) dut_iii (.sx(sx[2]), .x_mag(xm[2]), .sy(sy[2]), .y_mag(ym[2]), .op(op[2]), .sr(sr[2]), .r(r[2]));

  initial begin
    for (int t = 0; t < NVEC; t++) begin
      for (int v = 0; v < NA; v++) begin
        gen_pair(N, $urandom_range(6), xb, yb);
        xm[v] = xb[4*N-1:0];
        ym[v] = yb[4*N-1:0];
        sx[v] = 1'($urandom_range(1));
        sy[v] = 1'($urandom_range(1));
        op[v] = 1'($urandom_range(1));
      end
      @(posedge clk);
      #1;
      for (int v = 0; v < NA; v++) begin
        e = ref_sm(sx[v], bcd_t'(xm[v]), sy[v], bcd_t'(ym[v]), op[v], N);
        check($sformatf("ARCH %0d", v), {sr[v], bcd_t'(r[v])}, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_sub_sm: self-checking testbench for sub_sm.
//
// Checks sub_sm's magnitude |x - y| and its sign (x < y).
// Operand pairs come from tb_dec_ref_pkg::gen_pair, which mixes random
// values with the corner cases (equal operands, all nines, zeros, digit
// pairs summing to 9 so a carry crosses every digit, short operands). The
// expected values come from the digit-by-digit reference in the same
// package. The block is combinational: one vector is applied per clock and
// checked in the same cycle. A watchdog ends the run with a failure if the
// vectors do not finish in time. Runs at the block's default width.
module tb_sub_sm;
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

  logic [4*N-1:0] x, y, ss;
  logic           sign;
  bcd_t           xb, yb;
  logic [4*MAXD:0] e;

  sub_sm dut (.x(x), .y(y), .ss(ss), .sign(sign));

  initial begin
    for (int t = 0; t < NVEC; t++) begin
      gen_pair(N, t % 7, xb, yb);
      x = xb[4*N-1:0];
      y = yb[4*N-1:0];
      @(posedge clk);
      #1;
      e = ref_ge(xb, yb, N) ? ref_sub(xb, yb, N) : ref_sub(yb, xb, N);
      e[4*MAXD] = ~ref_ge(xb, yb, N);
      check("magnitude and sign", {sign, bcd_t'(ss)}, e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

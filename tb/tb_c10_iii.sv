// tb_c10_iii: self-checking testbench for c10_iii.
//
// Checks c10_iii for both operations: x + y with its carry, and x - y
// (mod 10^N) with carry out 1 exactly when x >= y.
// Operand pairs come from tb_dec_ref_pkg::gen_pair, which mixes random
// values with the corner cases (equal operands, all nines, zeros, digit
// pairs summing to 9 so a carry crosses every digit, short operands). The
// expected values come from the digit-by-digit reference in the same
// package. The block is combinational: one vector is applied per clock and
// checked in the same cycle. A watchdog ends the run with a failure if the
// vectors do not finish in time. Runs at the block's default width.
module tb_c10_iii;
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

  logic [4*N-1:0] x, y, sa;
  logic           sub, c;
  bcd_t           xb, yb;
  logic [4*MAXD:0] e;
  int             nadd = 0, nsub_pos = 0, nsub_neg = 0;

  c10_iii dut (.x(x), .y(y), .sub(sub), .sa(sa), .c(c));

  initial begin
    for (int t = 0; t < NVEC; t++) begin
      gen_pair(N, t % 7, xb, yb);
      x   = xb[4*N-1:0];
      y   = yb[4*N-1:0];
      sub = 1'($urandom_range(1));
      @(posedge clk);
      #1;
      if (sub) begin
        e = ref_sub(xb, yb, N);
        e[4*MAXD] = ~e[4*MAXD];   // carry out = no borrow
        if (e[4*MAXD]) nsub_pos++; else nsub_neg++;
      end else begin
        e = ref_add(xb, yb, 1'b0, N);
        nadd++;
      end
      check("result", {c, bcd_t'(sa)}, e);
    end
    // every operation and both outcomes of a subtraction must have occurred
    checks++;
    if (nadd == 0 || nsub_pos == 0 || nsub_neg == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

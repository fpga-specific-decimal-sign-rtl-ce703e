// tb_dec_neg: self-checking testbench for dec_neg.
//
// Checks dec_neg: the input unchanged when ne = 0, its ten's complement
// (0 - sa mod 10^N) when ne = 1; many inputs end in runs of zeros.
// Operand pairs come from tb_dec_ref_pkg::gen_pair, which mixes random
// values with the corner cases (equal operands, all nines, zeros, digit
// pairs summing to 9 so a carry crosses every digit, short operands). The
// expected values come from the digit-by-digit reference in the same
// package. The block is combinational: one vector is applied per clock and
// checked in the same cycle. A watchdog ends the run with a failure if the
// vectors do not finish in time. Runs at the block's default width.
module tb_dec_neg;
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

  logic [4*N-1:0] sa, r;
  logic           ne;
  bcd_t           sb, e;
  logic [4*MAXD:0] d;
  int             z;

  dec_neg dut (.sa(sa), .ne(ne), .r(r));

  initial begin
    for (int t = 0; t < NVEC; t++) begin
      sb = rand_bcd(N);
      // values ending in runs of zeros make the increment carry far
      case (t % 4)
        1: begin
          z = $urandom_range(N - 1);
          for (int i = 0; i < z; i++) sb[4*i +: 4] = 4'd0;
        end
        2: sb = '0;
        default: ;
      endcase
      sa = sb[4*N-1:0];
      ne = 1'($urandom_range(1));
      @(posedge clk);
      #1;
      d = ref_sub(bcd_t'(0), sb, N);
      e = ne ? d[4*MAXD-1:0] : sb;
      check("result", {1'b0, bcd_t'(r)}, {1'b0, e});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

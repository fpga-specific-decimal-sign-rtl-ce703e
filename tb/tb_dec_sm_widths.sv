// tb_dec_sm_widths: all six sign-magnitude circuits at the operand widths
// of the IEEE 754-2008 decimal formats (7 digits for decimal32, 16 for
// decimal64; 34, decimal128, is the default width exercised by
// tb_dec_sm_addsub_top) and exhaustively at 2 digits.
//
// Phase 1 walks every pair of 2-digit magnitudes with every combination of
// the two signs and the operation (10^4 * 8 vectors), so each digit-level
// function, and the carry and borrow between two digits, is seen in every
// case. Phase 2 drives random and corner-case operands into the 7- and
// 16-digit instances. The six circuits of an instance get the same operands
// and each result is compared with the digit-by-digit reference. One vector
// per clock; a watchdog ends the run with a failure if it does not finish.
module tb_dec_sm_widths;
  import tb_dec_ref_pkg::*;

  localparam int NV    = dec_pkg::NUM_VARIANTS;
  localparam int NEXH  = 100 * 100 * 8;
  localparam int NRAND = 4000;

  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NEXH + NRAND + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One sign-magnitude operand set per width, shared by the six circuits.
  logic sx, sy, op;
  bcd_t xb, yb;

  logic [NV-1:0]         sr2, sr7, sr16;
  logic [NV-1:0][7:0]    r2;
  logic [NV-1:0][27:0]   r7;
  logic [NV-1:0][63:0]   r16;

  dec_sm_addsub_top #(.N(2)) dut2 (
    .sx({NV{sx}}), .x_mag({NV{xb[7:0]}}), .sy({NV{sy}}), .y_mag({NV{yb[7:0]}}),
    .op({NV{op}}), .sr(sr2), .r(r2)
  );
  dec_sm_addsub_top #(.N(7)) dut7 (
    .sx({NV{sx}}), .x_mag({NV{xb[27:0]}}), .sy({NV{sy}}), .y_mag({NV{yb[27:0]}}),
    .op({NV{op}}), .sr(sr7), .r(r7)
  );
  dec_sm_addsub_top #(.N(16)) dut16 (
    .sx({NV{sx}}), .x_mag({NV{xb[63:0]}}), .sy({NV{sy}}), .y_mag({NV{yb[63:0]}}),
    .op({NV{op}}), .sr(sr16), .r(r16)
  );

  task automatic check(int n, int v, logic s, bcd_t m);
    logic [4*MAXD:0] e = ref_sm(sx, xb, sy, yb, op, n);
    checks++;
    if ({s, m} !== e) begin
      failures++;
      if (failures < 10)
        $display("FAIL N=%0d variant %0d: %b %h - %b %h op %b: got %b %h expected %b %h",
                 n, v, sx, xb, sy, yb, op, s, m, e[4*MAXD], e[4*MAXD-1:0]);
    end
  endtask

  initial begin
    // Phase 1: exhaustive at 2 digits.
    for (int a = 0; a < 100; a++) begin
      for (int b = 0; b < 100; b++) begin
        for (int k = 0; k < 8; k++) begin
          xb = '0;
          yb = '0;
          xb[7:0] = {4'(a / 10), 4'(a % 10)};
          yb[7:0] = {4'(b / 10), 4'(b % 10)};
          {sx, sy, op} = 3'(k);
          @(posedge clk);
          #1;
          for (int v = 0; v < NV; v++) check(2, v, sr2[v], bcd_t'(r2[v]));
        end
      end
    end
    // Phase 2: random and corner cases at 7 and 16 digits.
    for (int t = 0; t < NRAND; t++) begin
      int n;
      n = (t % 2 != 0) ? 16 : 7;
      gen_pair(n, $urandom_range(6), xb, yb);
      sx = 1'($urandom_range(1));
      sy = 1'($urandom_range(1));
      op = 1'($urandom_range(1));
      @(posedge clk);
      #1;
      for (int v = 0; v < NV; v++) begin
        if (n == 7) check(7, v, sr7[v], bcd_t'(r7[v]));
        else        check(16, v, sr16[v], bcd_t'(r16[v]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// Self-checking testbench of cluster_sb. Three configurations run side by
// side against a reference model of the wiring rule: the default level-1
// switch box (16 inputs, 4 outputs, four 5-input DMSBs, one 4x4 UMSB), a
// level-1 box depopulated with Rent exponent 0.79 (12 inputs, 3 outputs,
// four 4-input DMSBs) and a level-2 box at P = 0.79 (36 inputs, 9 outputs,
// twelve DMSBs, three UMSBs). The sizes are also checked against the values
// worked out by hand from Rent's rule.
module tb_cluster_sb;
  import mfpga_pkg::*;
  logic start = 0, clk = 0;
  int c0, f0, c1, f1, c2, f2;
  logic d0, d1, d2;
  int checks = 0, failures = 0;

  cluster_sb_bench #(.P(1.0),  .LEVEL(1)) b0 (.start, .checks(c0), .failures(f0), .done(d0));
  cluster_sb_bench #(.P(0.79), .LEVEL(1)) b1 (.start, .checks(c1), .failures(f1), .done(d1));
  cluster_sb_bench #(.P(0.79), .LEVEL(2)) b2 (.start, .checks(c2), .failures(f2), .done(d2));

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_int(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d, expected %0d", what, got, exp);
    end
  endtask

  initial begin
    check_int($bits(b0.cin), 16, "P=1 level-1 inputs");
    check_int($bits(b0.cout), 4, "P=1 level-1 outputs");
    check_int($bits(b1.cin), 12, "P=0.79 level-1 inputs");
    check_int($bits(b1.cout), 3, "P=0.79 level-1 outputs");
    check_int($bits(b2.child_in), 48, "P=0.79 level-2 DMSB outputs");
    check_int($bits(b2.child_out), 12, "P=0.79 level-2 UMSB inputs");
    // 4 DMSBs x 4 outputs x 3 select bits + 1 UMSB x 4 outputs x 2 bits
    check_int($bits(b0.cfg), 56, "P=1 level-1 configuration bits");
    @(posedge clk);  // the benches clear done at time 0
    start = 1;
    wait (d0 && d1 && d2);
    checks += c0 + c1 + c2;
    failures += f0 + f1 + f2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

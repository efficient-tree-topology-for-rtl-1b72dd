// End-to-end testbench of a fabric whose root has arity 2 while the lower
// levels have arity 4: a 4x4x2 tree (three levels, 32 logic blocks), Rent
// exponent 0.72, 4 input and 6 output pads. This is the shape of the
// benchmark trees that end in a two-way root, at reduced depth. A small
// netlist is routed between logic blocks at opposite ends of the tree
// (through the arity-2 root), inside a level-1 cluster and across a level-2
// cluster, and checked at the pads.
module tb_mfpga_kr2;
  logic clk = 0;
  int checks, failures, m_root, m_mid, m_local, m_reg, m_pad;
  logic done;

  fabric_bench #(.K(4), .KR(2), .LEVELS(3), .P(0.72), .N_IPAD(4), .N_OPAD(6)) bench (
    .clk, .checks, .failures, .mech_root(m_root), .mech_mid(m_mid),
    .mech_local(m_local), .mech_reg(m_reg), .mech_pad(m_pad), .done
  );

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int extra;
    extra = 0;
    @(posedge clk);  // the bench clears done at time 0
    wait (done);
    $display("mechanisms: root=%0d level2_join=%0d local=%0d registered=%0d pad_to_pad=%0d",
             m_root, m_mid, m_local, m_reg, m_pad);
    if (m_root == 0 || m_mid == 0 || m_local == 0 || m_reg == 0 || m_pad == 0) begin
      extra++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + extra);
    $finish;
  end
endmodule

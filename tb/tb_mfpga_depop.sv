// End-to-end testbench of the depopulated two-level fabric: arity 4, Rent
// exponent 0.79, so level-1 clusters have 12 inputs and 3 outputs and the
// root has 12 DMSBs and 3 UMSBs (the 416-switch example). A small netlist is
// routed across the root and inside a cluster and checked at the pads.
module tb_mfpga_depop;
  logic clk = 0;
  int checks, failures, m_root, m_mid, m_local, m_reg, m_pad;
  logic done;

  fabric_bench #(.K(4), .LEVELS(2), .P(0.79)) bench (
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
    $display("mechanisms: root=%0d join=%0d local=%0d registered=%0d pad_to_pad=%0d",
             m_root, m_mid, m_local, m_reg, m_pad);
    if (m_root == 0 || m_mid == 0 || m_local == 0 || m_reg == 0 || m_pad == 0) begin
      extra++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + extra);
    $finish;
  end
endmodule

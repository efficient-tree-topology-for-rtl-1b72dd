// End-to-end testbench of an arity-16 fabric: a 16x8 tree (two levels, 128
// logic blocks, an eight-way root), Rent exponent 0.8, 4 input and 4 output
// pads. It is the shape of the largest-arity trees used to study how arity
// trades switches against levels, at reduced depth. Level-1 clusters have 16
// logic blocks, so their UMSBs are 16x16 crossbars. A small netlist is routed
// between logic blocks in different level-1 clusters (through the root) and
// inside a level-1 cluster, and checked at the pads.
module tb_mfpga_arity16;
  logic clk = 0;
  int checks, failures, m_root, m_mid, m_local, m_reg, m_pad;
  logic done;

  fabric_bench #(.K(16), .KR(8), .LEVELS(2), .P(0.8), .N_IPAD(4), .N_OPAD(4)) bench (
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

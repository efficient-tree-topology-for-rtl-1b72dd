// Self-checking testbench of opad_cluster: 16 root DMSB columns, 4 output
// pads. Random selects and DMSB values; every pad must show the selected
// column.
module tb_opad_cluster;
  localparam int ND = 16, NP = 4, SW = 4;
  logic [NP*SW-1:0] cfg;
  logic [ND-1:0] from_dmsb;
  logic [NP-1:0] opad;
  int checks = 0, failures = 0;
  logic clk = 0;

  opad_cluster #(.ND(ND), .N_OPAD(NP)) dut (.cfg, .from_dmsb, .opad);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      cfg = (NP*SW)'($urandom);
      from_dmsb = ND'($urandom);
      #1;
      for (int p = 0; p < NP; p++) begin
        checks++;
        if (opad[p] !== from_dmsb[cfg[p*SW +: SW]]) begin
          failures++;
          $display("FAIL pad %0d sel=%0d", p, cfg[p*SW +: SW]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

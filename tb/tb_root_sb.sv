// Self-checking testbench of root_sb at the default size: arity 4, two
// levels, 16 root DMSBs with one input each and five outputs, four root UMSBs
// with 4 child inputs plus 4 input pads. Random configuration and stimulus
// are compared with a reference model of the wiring rule: UMSB j input c is
// output j of child c, inputs 4..7 are the pads, UMSB output o is feedback
// signal j*4+o; root DMSB d has the single input feedback d (select 0 = on,
// 1 = off), outputs 0..3 drive pin d of children 0..3, output 4 goes to the
// output pads.
module tb_root_sb;
  localparam int K = 4, ND = 16, NU = 4, NP = 4, UI = K + NP, USW = 3;
  localparam int W = ND*(K+1)*1 + NU*K*USW;
  logic [W-1:0]    cfg;
  logic [NP-1:0]   ipad;
  logic [ND-1:0]   to_opad;
  logic [K*ND-1:0] child_in;
  logic [K*NU-1:0] child_out;
  int checks = 0, failures = 0;
  logic clk = 0;

  root_sb dut (.cfg, .ipad, .to_opad, .child_in, .child_out);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic [NU*K-1:0] fb;
    logic [UI-1:0]   uin;
    logic            on;
    checks += ($bits(cfg) == W) ? 1 : 0;
    for (int t = 0; t < 500; t++) begin
      for (int b = 0; b < W; b++) cfg[b] = 1'($urandom);
      ipad = NP'($urandom);
      child_out = (K*NU)'($urandom);
      #1;
      for (int j = 0; j < NU; j++) begin
        for (int c = 0; c < K; c++) uin[c] = child_out[c*NU + j];
        uin[UI-1:K] = ipad;
        for (int o = 0; o < K; o++)
          fb[j*K + o] = uin[cfg[ND*(K+1) + (j*K + o)*USW +: USW]];
      end
      for (int d = 0; d < ND; d++)
        for (int o = 0; o <= K; o++) begin
          on = (cfg[d*(K+1) + o] == 1'b0);
          if (o < K) check(child_in[o*ND + d], on ? fb[d] : 1'b0, $sformatf("DMSB %0d out %0d", d, o));
          else       check(to_opad[d], on ? fb[d] : 1'b0, $sformatf("DMSB %0d pad column", d));
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

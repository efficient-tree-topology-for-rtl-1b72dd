// Random stimulus and reference model for one cluster_sb configuration, used
// by tb_cluster_sb. The reference follows the documented wiring rule:
// DMSB d, port q < A carries cluster input q*ND+d, port q >= A carries
// feedback signal (q-A)*ND+d, DMSB d output o drives child_in[o*ND+d]; UMSB j
// input c is child_out[c*NU+j] and its output o is feedback signal j*K+o;
// cluster output i is feedback signal (i mod NU)*K + i div NU.
module cluster_sb_bench
  import mfpga_pkg::*;
#(
  parameter int  K     = 4,
  parameter real P     = 1.0,
  parameter int  LEVEL = 1,
  parameter int  ROUNDS = 300
) (
  input  logic start,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int C_IN = 4, C_OUT = 1;
  localparam int NI  = rent(C_IN, K, P, LEVEL);
  localparam int NO  = rent(C_OUT, K, P, LEVEL);
  localparam int ND  = rent(C_IN, K, P, LEVEL - 1);
  localparam int NU  = rent(C_OUT, K, P, LEVEL - 1);
  localparam int NF  = K * NU;
  localparam int A   = (NI + ND - 1) / ND;
  localparam int DI  = A + (NF + ND - 1) / ND;
  localparam int DSW = (DI <= 1) ? 1 : $clog2(DI);
  localparam int USW = $clog2(K);
  localparam int W   = ND*K*DSW + NU*K*USW;

  logic [W-1:0]      cfg;
  logic [NI-1:0]     cin;
  logic [NO-1:0]     cout;
  logic [K*ND-1:0]   child_in;
  logic [K*NU-1:0]   child_out;

  cluster_sb #(.K(K), .C_IN(C_IN), .C_OUT(C_OUT), .P(P), .LEVEL(LEVEL)) dut (
    .cfg, .cin, .cout, .child_in, .child_out
  );

  initial begin
    logic [NF-1:0] fb;
    logic exp;
    checks = 0; failures = 0; done = 0;
    cfg = '0; cin = '0; child_out = '0;
    wait (start);
    for (int t = 0; t < ROUNDS; t++) begin
      for (int b = 0; b < W; b++) cfg[b] = 1'($urandom);
      for (int b = 0; b < NI; b++) cin[b] = 1'($urandom);
      for (int b = 0; b < K*NU; b++) child_out[b] = 1'($urandom);
      #1;
      for (int j = 0; j < NU; j++)
        for (int o = 0; o < K; o++) begin
          int s;
          s = int'(cfg[ND*K*DSW + (j*K + o)*USW +: USW]);
          fb[j*K + o] = child_out[s*NU + j];
        end
      for (int i = 0; i < NO; i++) begin
        checks++;
        if (cout[i] !== fb[(i % NU)*K + i / NU]) begin
          failures++;
          $display("FAIL L%0d P%0.2f cout[%0d]", LEVEL, P, i);
        end
      end
      for (int d = 0; d < ND; d++)
        for (int o = 0; o < K; o++) begin
          int q;
          q = 0;
          for (int b = 0; b < DSW; b++) q[b] = cfg[(d*K + o)*DSW + b];
          if (q < A)        exp = (q*ND + d < NI) ? cin[q*ND + d] : 1'b0;
          else if (q < DI)  exp = ((q-A)*ND + d < NF) ? fb[(q-A)*ND + d] : 1'b0;
          else              exp = 1'b0;
          checks++;
          if (child_in[o*ND + d] !== exp) begin
            failures++;
            $display("FAIL L%0d P%0.2f DMSB %0d out %0d port %0d", LEVEL, P, d, o, q);
          end
        end
    end
    done = 1;
  end
endmodule

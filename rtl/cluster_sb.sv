// Switch box of one cluster at level LEVEL (1 <= LEVEL < the root level).
//
// A level-l cluster groups K clusters of level l-1 (logic blocks at l = 1).
// Its switch box holds two layers of full-crossbar mini switch boxes:
//  * Nin(l-1) downward mini switch boxes (DMSB). DMSB d drives input pin d of
//    every child (its output o goes to child o). Its inputs are the cluster's
//    outside inputs s with s mod Nin(l-1) == d, at port s div Nin(l-1),
//    followed by the UMSB feedback signals f with f mod Nin(l-1) == d, at port
//    ceil(Nin(l)/Nin(l-1)) + f div Nin(l-1). Unused DMSB ports are 0.
//  * Nout(l-1) upward mini switch boxes (UMSB). UMSB j takes output pin j of
//    each child and has K outputs, the feedback signals j*K .. j*K+K-1.
//    Cluster output i (i < Nout(l)) is output i div Nout(l-1) of UMSB
//    i mod Nout(l-1): when Rent's rule gives the cluster fewer outputs than
//    its UMSBs have, every UMSB still keeps a way up, so a logic block can
//    climb to the root whichever UMSB it enters.
// Nin(l) = C_IN*K^(l*P) and Nout(l) = C_OUT*K^(l*P) (Rent's rule, rounded).
// Because the children of a cluster share the UMSBs, every logic block of a
// cluster reaches the same DMSBs at every level above it.
//
// Interface: cin/cout are the cluster's own pins; child_in[c*Nin(l-1) + d] is
// input pin d of child c, child_out[c*Nout(l-1) + j] output pin j of child c;
// cfg is the switch box configuration (layout in mfpga_pkg). Combinational.
//
// The DMSB and UMSB counts and sizes and the UMSB-to-DMSB feedback follow the
// source architecture; the modulo distribution of signals over DMSB ports and
// which feedback signals become cluster outputs are this design's choices.
module cluster_sb
  import mfpga_pkg::*;
#(
  parameter int  K     = 4,
  parameter int  C_IN  = 4,
  parameter int  C_OUT = 1,
  parameter real P     = 1.0,
  parameter int  LEVEL = 1,
  localparam int NI    = rent(C_IN, K, P, LEVEL),
  localparam int NO    = rent(C_OUT, K, P, LEVEL),
  localparam int ND    = rent(C_IN, K, P, LEVEL - 1),   // DMSBs = child inputs
  localparam int NU    = rent(C_OUT, K, P, LEVEL - 1),  // UMSBs = child outputs
  localparam int CFG_W = sb_bits(K, C_IN, C_OUT, P, LEVEL)
) (
  input  logic [CFG_W-1:0] cfg,
  input  logic [NI-1:0]    cin,
  output logic [NO-1:0]    cout,
  output logic [K*ND-1:0]  child_in,
  input  logic [K*NU-1:0]  child_out
);
  localparam int NF    = K * NU;              // UMSB outputs
  localparam int A     = ceil_div(NI, ND);    // outside-input ports per DMSB
  localparam int DI    = dmsb_ni(NI, ND, NF);
  localparam int DSW   = sel_w(DI);
  localparam int USW   = sel_w(K);
  localparam int UBASE = ND * K * DSW;

  logic [NF-1:0] fb;

  for (genvar d = 0; d < ND; d++) begin : g_dmsb
    logic [DI-1:0] din;
    logic [K-1:0]  dout;
    for (genvar q = 0; q < DI; q++) begin : g_port
      if (q < A && q*ND + d < NI) begin : g_ext
        assign din[q] = cin[q*ND + d];
      end else if (q >= A && (q-A)*ND + d < NF) begin : g_fb
        assign din[q] = fb[(q-A)*ND + d];
      end else begin : g_none
        assign din[q] = 1'b0;
      end
    end
    dmsb #(.NI(DI), .NO(K)) u_dmsb (
      .cfg(cfg[d*K*DSW +: K*DSW]), .in(din), .out(dout)
    );
    for (genvar o = 0; o < K; o++) begin : g_drv
      assign child_in[o*ND + d] = dout[o];
    end
  end

  for (genvar j = 0; j < NU; j++) begin : g_umsb
    logic [K-1:0] uin;
    for (genvar c = 0; c < K; c++) begin : g_in
      assign uin[c] = child_out[c*NU + j];
    end
    umsb #(.NI(K), .NO(K)) u_umsb (
      .cfg(cfg[UBASE + j*K*USW +: K*USW]), .in(uin), .out(fb[j*K +: K])
    );
  end

  // Cluster output i is output i div NU of UMSB i mod NU, so that every UMSB
  // contributes to the cluster's outputs when Rent's rule trims them.
  for (genvar i = 0; i < NO; i++) begin : g_cout
    assign cout[i] = fb[(i % NU)*K + i / NU];
  end
endmodule

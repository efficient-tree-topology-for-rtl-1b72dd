// Switch box of the root cluster (level LEVELS), with the pad connections.
//
// The root groups K_ROOT clusters of level LEVELS-1 (K_ROOT defaults to the
// arity K of the other levels) like cluster_sb does, with three differences:
//  * it has no outside inputs, so each of its Nin(LEVELS-1) DMSBs is fed only
//    by UMSB feedback (signal f reaches DMSB f mod Nin(LEVELS-1), port
//    f div Nin(LEVELS-1));
//  * every input pad enters every root UMSB (UMSB inputs K_ROOT ..
//    K_ROOT+N_IPAD-1),
//    so a pad reaches all logic blocks through many paths;
//  * every root DMSB has one more output, column K_ROOT, that goes to the output
//    pad cluster (to_opad[d] comes from DMSB d).
//
// Interface: child_in/child_out as in cluster_sb, ipad in, to_opad out, cfg
// the configuration (layout in mfpga_pkg). Combinational.
//
// Pads entering all UMSBs and leaving from all DMSBs of the level above them
// follow the source architecture; placing both pad clusters at the root is
// this design's choice (the architecture lets the pad level vary).
module root_sb
  import mfpga_pkg::*;
#(
  parameter int  K      = 4,
  parameter int  K_ROOT = K,
  parameter int  C_IN   = 4,
  parameter int  C_OUT  = 1,
  parameter real P      = 1.0,
  parameter int  LEVELS = 2,
  parameter int  N_IPAD = 4,
  localparam int ND     = rent(C_IN, K, P, LEVELS - 1),
  localparam int NU     = rent(C_OUT, K, P, LEVELS - 1),
  localparam int CFG_W  = root_bits(K, K_ROOT, C_IN, C_OUT, P, LEVELS, N_IPAD)
) (
  input  logic [CFG_W-1:0]  cfg,
  input  logic [N_IPAD-1:0] ipad,
  output logic [ND-1:0]     to_opad,
  output logic [K_ROOT*ND-1:0]   child_in,
  input  logic [K_ROOT*NU-1:0]   child_out
);
  localparam int NF    = K_ROOT * NU;
  localparam int DI    = dmsb_ni(0, ND, NF);
  localparam int DSW   = sel_w(DI);
  localparam int UI    = K_ROOT + N_IPAD;
  localparam int USW   = sel_w(UI);
  localparam int UBASE = ND * (K_ROOT + 1) * DSW;

  logic [NF-1:0] fb;

  for (genvar d = 0; d < ND; d++) begin : g_dmsb
    logic [DI-1:0] din;
    logic [K_ROOT:0] dout;
    for (genvar q = 0; q < DI; q++) begin : g_port
      if (q*ND + d < NF) begin : g_fb
        assign din[q] = fb[q*ND + d];
      end else begin : g_none
        assign din[q] = 1'b0;
      end
    end
    dmsb #(.NI(DI), .NO(K_ROOT + 1)) u_dmsb (
      .cfg(cfg[d*(K_ROOT+1)*DSW +: (K_ROOT+1)*DSW]), .in(din), .out(dout)
    );
    for (genvar o = 0; o < K_ROOT; o++) begin : g_drv
      assign child_in[o*ND + d] = dout[o];
    end
    assign to_opad[d] = dout[K_ROOT];
  end

  for (genvar j = 0; j < NU; j++) begin : g_umsb
    logic [UI-1:0] uin;
    for (genvar c = 0; c < K_ROOT; c++) begin : g_in
      assign uin[c] = child_out[c*NU + j];
    end
    assign uin[UI-1:K_ROOT] = ipad;
    umsb #(.NI(UI), .NO(K_ROOT)) u_umsb (
      .cfg(cfg[UBASE + j*K_ROOT*USW +: K_ROOT*USW]), .in(uin), .out(fb[j*K_ROOT +: K_ROOT])
    );
  end
endmodule

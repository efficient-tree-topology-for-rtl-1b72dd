// Output pad cluster.
//
// The output pads are grouped into a cluster hung from the root. Each root
// DMSB has one extra output column dedicated to this cluster, so the cluster
// receives ND signals, one from every root DMSB. Each output pad is an ND:1
// multiplexer over all of them, which makes every pad reachable from every
// logic block through several paths.
//
// Interface: cfg holds N_OPAD selects of sel_w(ND) bits, pad p at
// p*sel_w(ND); a select of ND or more drives 0. Purely combinational; the
// pad drivers themselves are outside this module.
//
// That output pads connect to all DMSBs of the level above follows the
// source architecture; the single extra DMSB column and the pad multiplexer
// are this design's choices.
module opad_cluster
  import mfpga_pkg::*;
#(
  parameter int ND     = 16,
  parameter int N_OPAD = 4,
  localparam int SW = sel_w(ND)
) (
  input  logic [N_OPAD*SW-1:0] cfg,
  input  logic [ND-1:0]        from_dmsb,
  output logic [N_OPAD-1:0]    opad
);
  for (genvar p = 0; p < N_OPAD; p++) begin : g_pad
    logic [SW-1:0] sel;
    assign sel = cfg[p*SW +: SW];
    assign opad[p] = (int'(sel) < ND) ? from_dmsb[sel] : 1'b0;
  end
endmodule

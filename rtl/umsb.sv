// Upward mini switch box (UMSB).
//
// A full crossbar of NI inputs and NO outputs. UMSB j of a level-l cluster
// receives output j of each of its K children (in the root cluster also
// every input pad), and its outputs feed the cluster's DMSBs and form the
// cluster's outputs. Because all children meet in the same crossbar, every
// logic block of a cluster reaches exactly the same set of DMSBs, so the
// position of a block inside its cluster does not matter.
//
// Interface: cfg holds NO selects of sel_w(NI) bits, output o at
// o*sel_w(NI); a select of NI or more drives 0. Purely combinational.
//
// K inputs and K outputs per UMSB follow the source architecture; the
// encoded multiplexers and the "off" code are this design's choices.
//
// Inside the fabric a UMSB closes the structural loop logic block -> UMSB ->
// DMSB -> logic block, which lint and synthesis report as combinational
// logic loops. The loop is what makes the interconnect programmable; it is
// only closed electrically by a configuration that routes a block's output
// back into its own cone through combinational LUTs, and the fabric holds all
// logic block outputs low while the configuration is loaded.
module umsb
  import mfpga_pkg::*;
#(
  parameter int NI = 4,
  parameter int NO = 4,
  localparam int SW = sel_w(NI)
) (
  input  logic [NO*SW-1:0] cfg,
  input  logic [NI-1:0]    in,
  output logic [NO-1:0]    out
);
  for (genvar o = 0; o < NO; o++) begin : g_out
    logic [SW-1:0] sel;
    assign sel = cfg[o*SW +: SW];
    assign out[o] = (int'(sel) < NI) ? in[sel] : 1'b0;
  end
endmodule

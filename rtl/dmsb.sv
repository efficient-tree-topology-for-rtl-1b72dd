// Downward mini switch box (DMSB).
//
// A full crossbar of NI inputs and NO outputs. In a level-l cluster each DMSB
// takes a share of the cluster's inputs plus a share of the outputs of the
// cluster's UMSBs (the feedback that lets a logic block reach its siblings),
// and its output o drives one input pin of child o. Every output is an
// NI:1 multiplexer whose select comes from configuration memory; a select
// value of NI or more drives 0 (the connection is off).
//
// Interface: cfg holds NO selects of sel_w(NI) bits, output o at
// o*sel_w(NI). Purely combinational.
//
// The crossbar and its size follow the source architecture; using an
// encoded multiplexer per output (rather than one bit per crosspoint) and the
// "off" code are this design's choices.
module dmsb
  import mfpga_pkg::*;
#(
  parameter int NI = 5,
  parameter int NO = 4,
  localparam int SW = sel_w(NI)
) (
  input  logic [NO*SW-1:0] cfg,
  input  logic [NI-1:0]    in,
  output logic [NO-1:0]    out
);
  always_comb begin
    for (int o = 0; o < NO; o++) begin
      logic [SW-1:0] sel;
      sel = cfg[o*SW +: SW];
      out[o] = 1'b0;
      for (int i = 0; i < NI; i++)
        if (int'(sel) == i) out[o] = in[i];
    end
  end
endmodule

// Logic block (LB): the leaf of the interconnect tree.
//
// Each of the C_OUT outputs is a C_IN-input look-up table followed by an
// optional D flip-flop. The LUT output is lut[in] (input bit 0 is the least
// significant address bit). A per-output select bit chooses between the
// combinational LUT output (0) and the registered one (1).
//
// Interface: in/out are the block's pins, reached through the downward and
// upward networks; cfg holds, per output o, 2^C_IN LUT bits at
// o*(2^C_IN+1) followed by the register-select bit. The flip-flop loads on
// every rising clk edge and clears on rst_n low. While en is low the outputs
// are held at 0: the fabric holds en low during reset and while the
// configuration is being loaded, so that a half-written configuration cannot
// close an oscillating loop through the interconnect.
//
// The source architecture fixes only the pin counts (c_in = 4 inputs,
// c_out = 1 output, a 4-LUT); the register and its bypass are this design's
// own choice, the usual form of an FPGA basic logic element, and so is the
// output enable.
module logic_block
  import mfpga_pkg::*;
#(
  parameter int C_IN  = 4,
  parameter int C_OUT = 1,
  localparam int CFG_W = lb_bits(C_IN, C_OUT)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic [CFG_W-1:0]  cfg,
  input  logic [C_IN-1:0]   in,
  output logic [C_OUT-1:0]  out
);
  localparam int LUT_N = 1 << C_IN;
  localparam int STRIDE = LUT_N + 1;

  logic [C_OUT-1:0] lut_out, ff_q;

  for (genvar o = 0; o < C_OUT; o++) begin : g_out
    logic [LUT_N-1:0] table_bits;
    logic             use_ff;
    assign table_bits = cfg[o*STRIDE +: LUT_N];
    assign use_ff     = cfg[o*STRIDE + LUT_N];

    always_comb lut_out[o] = table_bits[in];

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) ff_q[o] <= 1'b0;
      else        ff_q[o] <= lut_out[o];

    assign out[o] = en & (use_ff ? ff_q[o] : lut_out[o]);
  end
endmodule

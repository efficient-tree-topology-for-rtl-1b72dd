// Tree-based multilevel FPGA: logic blocks, interconnect tree, pad clusters
// and configuration memory.
//
// The logic blocks (LB) are the leaves of a tree of arity K with LEVELS
// levels; the root may have a different arity K_ROOT, so there are
// K_ROOT*K^(LEVELS-1) blocks in all. Two unidirectional networks join them: a
// downward butterfly fat tree of DMSBs that carries signals from the root
// towards LB inputs, and an upward network of UMSBs that carries LB outputs
// towards the root and feeds them into the DMSBs of every level on the way.
// Cluster pin counts follow Rent's rule with exponent P (P = 1 keeps full
// bandwidth, a smaller P depopulates the upper levels). Input pads enter the
// root UMSBs, output pads leave from the root DMSBs. Every multiplexer select
// and LUT bit sits in one serial configuration chain.
//
// Structure: level 0 holds the LBs, level l (1 <= l < LEVELS) the switch
// boxes (cluster_sb) of the K_ROOT*K^(LEVELS-1-l) clusters of that level, and the root
// switch box (root_sb) closes the tree. pin_in[l] / pin_out[l] hold the input
// and output pins of all level-l clusters side by side, cluster i at
// i*Nin(l) / i*Nout(l); a level-l switch box i drives the input pins of its
// children, clusters i*K .. i*K+K-1 of level l-1.
//
// Interface:
//   cfg_en, cfg_in, cfg_out : serial configuration port (see cfg_chain);
//                             CFG_BITS cycles with cfg_en high load the fabric
//   ipad[N_IPAD]            : input pads
//   opad[N_OPAD]            : output pads
//   clk, rst_n              : clock of the chain and of the LB registers;
//                             rst_n clears the LB registers only
// While rst_n is low or cfg_en is high every LB output is held at 0, so a
// partly loaded configuration cannot close an oscillating loop.
// Pad-to-pad paths are combinational unless they pass a registered LB.
//
// The default parameters are the source architecture's worked example
// (arity 4, two levels, 16 LBs with 4 inputs and 1 output, P = 1). K_ROOT
// covers the benchmark trees whose top level has arity 2. The pad counts, the
// serial chain and the register in each LB are this design's choices.
//
// A configuration can close a combinational loop from an LB output back to an
// LB input; lint tools report the possible loops through the fabric. They are
// inherent in any programmable interconnect, and a configuration that routes
// every loop through a registered LB closes none.
module mfpga_top
  import mfpga_pkg::*;
#(
  parameter int  K      = 4,
  parameter int  K_ROOT = K,
  parameter int  LEVELS = 2,
  parameter int  C_IN   = 4,
  parameter int  C_OUT  = 1,
  parameter real P      = 1.0,
  parameter int  N_IPAD = 4,
  parameter int  N_OPAD = 4,
  localparam int ND       = rent(C_IN, K, P, LEVELS - 1),
  localparam int NU       = rent(C_OUT, K, P, LEVELS - 1),
  localparam int ROOT_B   = level_base(K, K_ROOT, C_IN, C_OUT, P, LEVELS, LEVELS),
  localparam int ROOT_W   = root_bits(K, K_ROOT, C_IN, C_OUT, P, LEVELS, N_IPAD),
  localparam int OPAD_W   = N_OPAD * sel_w(ND),
  localparam int CFG_BITS = ROOT_B + ROOT_W + OPAD_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_en,
  input  logic              cfg_in,
  output logic              cfg_out,
  input  logic [N_IPAD-1:0] ipad,
  output logic [N_OPAD-1:0] opad
);
  localparam int PW_IN  = max_level_pins(K, K_ROOT, C_IN, P, LEVELS);
  localparam int PW_OUT = max_level_pins(K, K_ROOT, C_OUT, P, LEVELS);

  logic [CFG_BITS-1:0]            cfg;
  logic [LEVELS-1:0][PW_IN-1:0]   pin_in;
  logic [LEVELS-1:0][PW_OUT-1:0]  pin_out;
  logic [ND-1:0]                  to_opad;
  logic                           lb_en;

  assign lb_en = rst_n & ~cfg_en;

  cfg_chain #(.W(CFG_BITS)) u_cfg (
    .clk, .cfg_en, .cfg_in, .cfg_out, .bits(cfg)
  );

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int NCL  = level_count(K, K_ROOT, LEVELS, l);
    localparam int NI   = rent(C_IN, K, P, l);
    localparam int NO   = rent(C_OUT, K, P, l);
    localparam int NB   = node_bits(K, C_IN, C_OUT, P, l);
    localparam int BASE = level_base(K, K_ROOT, C_IN, C_OUT, P, LEVELS, l);

    // Pin slots of narrower levels are unused; tie them off.
    if (NCL*NI < PW_IN) begin : g_tie_in
      assign pin_in[l][PW_IN-1:NCL*NI] = '0;
    end
    if (NCL*NO < PW_OUT) begin : g_tie_out
      assign pin_out[l][PW_OUT-1:NCL*NO] = '0;
    end

    for (genvar i = 0; i < NCL; i++) begin : g_node
      if (l == 0) begin : g_lb
        logic_block #(.C_IN(C_IN), .C_OUT(C_OUT)) u_lb (
          .clk, .rst_n, .en(lb_en),
          .cfg(cfg[BASE + i*NB +: NB]),
          .in (pin_in[0][i*C_IN +: C_IN]),
          .out(pin_out[0][i*C_OUT +: C_OUT])
        );
      end else begin : g_sb
        localparam int NDC = rent(C_IN, K, P, l - 1);
        localparam int NUC = rent(C_OUT, K, P, l - 1);
        cluster_sb #(.K(K), .C_IN(C_IN), .C_OUT(C_OUT), .P(P), .LEVEL(l)) u_sb (
          .cfg      (cfg[BASE + i*NB +: NB]),
          .cin      (pin_in[l][i*NI +: NI]),
          .cout     (pin_out[l][i*NO +: NO]),
          .child_in (pin_in[l-1][i*K*NDC +: K*NDC]),
          .child_out(pin_out[l-1][i*K*NUC +: K*NUC])
        );
      end
    end
  end

  root_sb #(
    .K(K), .K_ROOT(K_ROOT), .C_IN(C_IN), .C_OUT(C_OUT), .P(P), .LEVELS(LEVELS),
    .N_IPAD(N_IPAD)
  ) u_root (
    .cfg      (cfg[ROOT_B +: ROOT_W]),
    .ipad,
    .to_opad,
    .child_in (pin_in[LEVELS-1][K_ROOT*ND-1:0]),
    .child_out(pin_out[LEVELS-1][K_ROOT*NU-1:0])
  );

  opad_cluster #(.ND(ND), .N_OPAD(N_OPAD)) u_opad (
    .cfg(cfg[ROOT_B + ROOT_W +: OPAD_W]),
    .from_dmsb(to_opad),
    .opad
  );
endmodule

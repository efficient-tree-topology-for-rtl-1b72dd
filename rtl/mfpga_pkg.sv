// Shared sizing rules of the tree-based FPGA interconnect.
//
// The fabric is a tree of clusters of arity K. A cluster at level l has
// Nin(l) inputs and Nout(l) outputs, given by Rent's rule
//     IO = c * K^(l*p)
// with c = C_IN for inputs and C_OUT for outputs (level 0 is one logic
// block). Inside a level-l cluster sit Nin(l-1) downward mini switch boxes
// (DMSB) and Nout(l-1) upward mini switch boxes (UMSB). Every DMSB and UMSB is
// a full crossbar built from configuration-driven multiplexers.
//
// Rent's rule, the DMSB/UMSB counts and the crossbar sizes follow the
// source architecture. Rounding Rent's rule to the nearest integer, the
// distribution of signals over DMSB inputs and the layout of the
// configuration bits are this design's own choices.
//
// Configuration layout: level by level from the logic blocks up (see
// level_base), block i of a level at level_base + i*node_bits. Inside the
// switch box of a level-l cluster: Nin(l-1) DMSBs, select of DMSB d output o
// at (d*K + o)*sel_w(DMSB inputs), then Nout(l-1) UMSBs, select of UMSB j
// output o at (j*K + o)*sel_w(UMSB inputs). A logic block holds, per output,
// 2^C_IN LUT bits then one register-select bit. The root switch box has K+1
// outputs per DMSB (the extra one feeds the output pads) and K+N_IPAD inputs
// per UMSB (the extra ones are the input pads); its arity may differ (K_ROOT
// children, so K_ROOT is used in place of K there). The output pad selects
// follow the root.
package mfpga_pkg;

  // Rent's rule, rounded to the nearest integer.
  function automatic int rent(int c, int k, real p, int l);
    return $rtoi(real'(c) * (real'(k) ** (real'(l) * p)) + 0.5);
  endfunction

  // Select width of an n-input multiplexer; a single-input one keeps one
  // bit that switches the connection on (0) or off (1).
  function automatic int sel_w(int n);
    return (n <= 1) ? 1 : $clog2(n);
  endfunction

  function automatic int ceil_div(int a, int b);
    return (a + b - 1) / b;
  endfunction

  // Number of inputs of each DMSB of a cluster with ni outside inputs,
  // nd DMSBs and nf UMSB feedback signals.
  function automatic int dmsb_ni(int ni, int nd, int nf);
    return ceil_div(ni, nd) + ceil_div(nf, nd);
  endfunction

  function automatic int lb_bits(int c_in, int c_out);
    return c_out * ((1 << c_in) + 1);
  endfunction

  // Configuration bits of the switch box of one non-root cluster at level l.
  function automatic int sb_bits(int k, int c_in, int c_out, real p, int l);
    int nd, nu;
    nd = rent(c_in, k, p, l - 1);
    nu = rent(c_out, k, p, l - 1);
    return nd * k * sel_w(dmsb_ni(rent(c_in, k, p, l), nd, k * nu))
         + nu * k * sel_w(k);
  endfunction

  // Configuration bits of the root switch box (level `levels`, arity kr).
  function automatic int root_bits(int k, int kr, int c_in, int c_out, real p,
                                   int levels, int n_ipad);
    int nd, nu;
    nd = rent(c_in, k, p, levels - 1);
    nu = rent(c_out, k, p, levels - 1);
    return nd * (kr + 1) * sel_w(dmsb_ni(0, nd, kr * nu))
         + nu * kr * sel_w(kr + n_ipad);
  endfunction

  // Number of blocks at level l: kr * k^(levels-1-l) below the root, 1 root.
  function automatic int level_count(int k, int kr, int levels, int l);
    return (l >= levels) ? 1 : kr * (k ** (levels - 1 - l));
  endfunction

  // Configuration bits of one block at level l: a logic block (l = 0) or
  // the switch box of a non-root cluster.
  function automatic int node_bits(int k, int c_in, int c_out, real p, int l);
    return (l == 0) ? lb_bits(c_in, c_out) : sb_bits(k, c_in, c_out, p, l);
  endfunction

  // First configuration bit of level l. Levels are stored bottom-up: all
  // logic blocks, then the level-1 switch boxes, and so on, the root switch
  // box (l = levels) last.
  function automatic int level_base(int k, int kr, int c_in, int c_out, real p,
                                    int levels, int l);
    int b;
    b = 0;
    for (int i = 0; i < l; i++)
      b += level_count(k, kr, levels, i) * node_bits(k, c_in, c_out, p, i);
    return b;
  endfunction

  // Widest level of the tree, counted in input pins (inputs != 0) or output
  // pins of all clusters of a level below the root.
  function automatic int max_level_pins(int k, int kr, int c, real p, int levels);
    int m;
    m = 0;
    for (int l = 0; l < levels; l++)
      if (level_count(k, kr, levels, l) * rent(c, k, p, l) > m)
        m = level_count(k, kr, levels, l) * rent(c, k, p, l);
    return m;
  endfunction

  // Interconnect switch count of the whole tree under the crossbar model
  // (a crossbar of i inputs and o outputs counts i*o switches). Pads and
  // their connections are not counted, and the root has no outside inputs.
  function automatic int tree_switches(int k, int kr, int c_in, int c_out,
                                       real p, int levels);
    int sw, nd, nu, ni, ar;
    sw = 0;
    for (int l = 1; l <= levels; l++) begin
      nd = rent(c_in, k, p, l - 1);
      nu = rent(c_out, k, p, l - 1);
      ni = (l == levels) ? 0 : rent(c_in, k, p, l);
      ar = (l == levels) ? kr : k;
      sw += level_count(k, kr, levels, l) * (nd * ar * dmsb_ni(ni, nd, ar * nu) + nu * ar * ar);
    end
    return sw;
  endfunction

endpackage

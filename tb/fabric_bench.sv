// Generic end-to-end bench of mfpga_top at any size, used by the testbenches
// that run the fabric at the sizes of the worked examples and benchmarks.
//
// It maps a fixed five-node netlist onto the tree, routes it with a small
// greedy router that follows the fabric's wiring rule, loads the resulting
// image through the configuration chain and checks the pads cycle by cycle:
//   A = ipad0 ^ ipad1            on LB 0
//   B = A ^ ipad2                on LB N-1 (A crosses the root)
//   C = reg(B & ipad3)           on LB N-2, a sibling of B (level-1 feedback)
//   D = B ^ C                    on LB N-1-K (B and C meet at level 2, or at
//                                the root in a two-level tree)
//   opad0 = B, opad1 = C, opad2 = D, opad3 = ipad[N_IPAD-1]
// The router: an LB output enters UMSB 0 of its level-1 cluster; to climb from
// level m to m+1 it takes a free output o of the UMSB j it entered such that
// i = o*Nout(m-1) + j < Nout(m); that is cluster output i, which enters UMSB i
// one level up. At the level where source and sink
// meet it takes any free output of the UMSB it entered, and goes down: a
// signal on feedback f of a level-l cluster reaches DMSB f mod Nin(l-1) at
// port A(l) + f div Nin(l-1), lands on child pin f mod Nin(l-1), and so on
// down to an LB pin. Outputs are tried until the path lands on the wanted pin
// over free switch box outputs.
module fabric_bench
  import mfpga_pkg::*;
#(
  parameter int  K      = 4,
  parameter int  KR     = K,
  parameter int  LEVELS = 2,
  parameter real P      = 1.0,
  parameter int  N_IPAD = 4,
  parameter int  N_OPAD = 4,
  parameter int  CYCLES = 300
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   mech_root,     // cycles where a value crossing the root was seen as 1
  output int   mech_mid,      // ... crossing the level where B and C meet D
  output int   mech_local,    // ... going through level-1 UMSB feedback
  output int   mech_reg,      // register updates seen
  output int   mech_pad,      // pad-to-pad values seen as 1
  output logic done
);
  localparam int C_IN = 4, C_OUT = 1;
  localparam int N      = KR * (K ** (LEVELS - 1));
  localparam int LB_W   = lb_bits(C_IN, C_OUT);
  localparam int ROOT_B = level_base(K, KR, C_IN, C_OUT, P, LEVELS, LEVELS);
  localparam int ROOT_W = root_bits(K, KR, C_IN, C_OUT, P, LEVELS, N_IPAD);
  localparam int NDR    = rent(C_IN, K, P, LEVELS - 1);
  localparam int TOTAL  = ROOT_B + ROOT_W + N_OPAD * sel_w(NDR);

  logic rst_n = 0, cfg_en = 0, cfg_in = 0, cfg_out;
  logic [N_IPAD-1:0] ipad = '0;
  logic [N_OPAD-1:0] opad;
  logic [TOTAL-1:0]  img;
  bit route_ok = 1;

  mfpga_top #(.K(K), .K_ROOT(KR), .LEVELS(LEVELS), .C_IN(C_IN), .C_OUT(C_OUT), .P(P),
              .N_IPAD(N_IPAD), .N_OPAD(N_OPAD)) dut (
    .clk, .rst_n, .cfg_en, .cfg_in, .cfg_out, .ipad, .opad
  );

  // ---- fabric geometry, independent of the RTL's internals ----
  function automatic int nd(int l);  return rent(C_IN, K, P, l - 1);  endfunction
  function automatic int nu(int l);  return rent(C_OUT, K, P, l - 1); endfunction
  function automatic int ni(int l);  return (l == LEVELS) ? 0 : rent(C_IN, K, P, l);  endfunction
  function automatic int no(int l);  return (l == LEVELS) ? 0 : rent(C_OUT, K, P, l); endfunction
  function automatic int ar(int l); return (l == LEVELS) ? KR : K; endfunction
  function automatic int aports(int l); return (ni(l) + nd(l) - 1) / nd(l); endfunction
  function automatic int dsw(int l);
    return sel_w(aports(l) + (ar(l) * nu(l) + nd(l) - 1) / nd(l));
  endfunction
  function automatic int usw(int l); return sel_w((l == LEVELS) ? KR + N_IPAD : K); endfunction
  function automatic int dcols(int l); return (l == LEVELS) ? KR + 1 : K; endfunction
  // level-m ancestor of LB t, and the child position of its level-(m-1)
  // ancestor inside it
  function automatic int anc(int t, int m); return (m == LEVELS) ? 0 : t / (K ** m); endfunction
  function automatic int pos(int t, int m);
    return (m == LEVELS) ? t / (K ** (m - 1)) : (t / (K ** (m - 1))) % K;
  endfunction
  function automatic int sb_base(int l, int x);
    return (l == LEVELS) ? ROOT_B : level_base(K, KR, C_IN, C_OUT, P, LEVELS, l) + x * sb_bits(K, C_IN, C_OUT, P, l);
  endfunction
  function automatic int dmsb_bit(int l, int x, int d, int c);
    return sb_base(l, x) + (d * dcols(l) + c) * dsw(l);
  endfunction
  function automatic int umsb_bit(int l, int x, int j, int o);
    return sb_base(l, x) + nd(l) * dcols(l) * dsw(l) + (j * ar(l) + o) * usw(l);
  endfunction

  task automatic setf(input int base, input int w, input int v);
    for (int b = 0; b < w; b++) img[base + b] = v[b];
  endtask

  // ---- resource ownership: signal id per switch box output ----
  int own_u[longint];
  int own_d[longint];
  function automatic longint key(int l, int x, int a, int b);
    return ((longint'(l) * 64'd16777216 + longint'(x)) * 64'd65536 + longint'(a)) * 64'd256 + longint'(b);
  endfunction
  function automatic bit free_u(int l, int x, int f, int sig);
    longint k = key(l, x, f, 0);
    return !own_u.exists(k) || own_u[k] == sig;
  endfunction
  function automatic bit free_d(int l, int x, int d, int c, int sig);
    longint k = key(l, x, d, c);
    return !own_d.exists(k) || own_d[k] == sig;
  endfunction

  // where an LB output enters the UMSB of each level: entry_j[sig][l]
  int entry_j [16][16];
  int entry_c [16][16];
  bit root_busy [int];

  // climb from LB t to the root
  task automatic route_up(input int sig, input int t);
    int j, f;
    bit found;
    j = 0;
    for (int l = 1; l <= LEVELS; l++) begin
      entry_j[sig][l] = j;
      entry_c[sig][l] = pos(t, l);
      if (l == LEVELS) begin
        root_busy[j] = 1;
        break;
      end
      found = 0;
      for (int o = 0; o < K && !found; o++) begin
        f = j * K + o;
        if (o * nu(l) + j < no(l) && free_u(l, anc(t, l), f, sig)) begin
          own_u[key(l, anc(t, l), f, 0)] = sig;
          setf(umsb_bit(l, anc(t, l), j, o), usw(l), entry_c[sig][l]);
          found = 1;
          j = o * nu(l) + j;
        end
      end
      if (!found) begin route_ok = 0; $display("ROUTE: no way up for signal %0d at level %0d", sig, l); end
    end
  endtask

  // down path check/commit from feedback f of level-l cluster x to pin q of LB t
  function automatic bit down_ok(int sig, int l, int f, int t, int q);
    int s, d, x;
    s = f;
    for (int m = l; m >= 1; m--) begin
      x = anc(t, m);
      d = s % nd(m);
      if (!free_d(m, x, d, pos(t, m), sig)) return 0;
      s = d;
    end
    return s == q;
  endfunction
  task automatic down_commit(input int sig, input int l, input int f, input int t);
    int s, d, x, c, port;
    s = f;
    for (int m = l; m >= 1; m--) begin
      x = anc(t, m);
      d = s % nd(m);
      c = pos(t, m);
      port = (m == l) ? aports(m) + s / nd(m) : s / nd(m);
      if (m == LEVELS) port = s / nd(m);
      own_d[key(m, x, d, c)] = sig;
      setf(dmsb_bit(m, x, d, c), dsw(m), port);
      s = d;
    end
  endtask

  // connect LB source `src` (signal sig) to pin q of LB t
  task automatic route_lb(input int sig, input int src, input int t, input int q);
    int l, x, j, f;
    bit found;
    l = 1;
    while (anc(src, l) != anc(t, l)) l++;
    x = anc(t, l);
    j = entry_j[sig][l];
    found = 0;
    for (int o = 0; o < ar(l) && !found; o++) begin
      f = j * ar(l) + o;
      if (free_u(l, x, f, sig) && down_ok(sig, l, f, t, q)) begin
        own_u[key(l, x, f, 0)] = sig;
        setf(umsb_bit(l, x, j, o), usw(l), entry_c[sig][l]);
        down_commit(sig, l, f, t);
        found = 1;
      end
    end
    if (!found) begin route_ok = 0; $display("ROUTE: signal %0d to LB %0d pin %0d failed", sig, t, q); end
  endtask

  // connect input pad i (signal sig) to pin q of LB t through the root
  task automatic route_pad(input int sig, input int i, input int t, input int q);
    int f;
    bit found;
    found = 0;
    // first avoid the root UMSBs that logic block signals enter
    for (int pass = 0; pass < 2; pass++)
    for (int j = 0; j < nu(LEVELS) && !found; j++)
      for (int o = 0; o < KR && !found; o++) begin
        f = j * KR + o;
        if (pass == 0 && root_busy.exists(j)) continue;
        if (free_u(LEVELS, 0, f, sig) && down_ok(sig, LEVELS, f, t, q)) begin
          own_u[key(LEVELS, 0, f, 0)] = sig;
          setf(umsb_bit(LEVELS, 0, j, o), usw(LEVELS), KR + i);
          down_commit(sig, LEVELS, f, t);
          found = 1;
        end
      end
    if (!found) begin route_ok = 0; $display("ROUTE: pad %0d to LB %0d pin %0d failed", i, t, q); end
  endtask

  // connect a root UMSB input (LB signal entering at j/c, or pad with c = KR+i)
  // to output pad p
  task automatic route_opad(input int sig, input int j0, input int c, input int p);
    int f, d;
    bit found;
    found = 0;
    for (int j = 0; j < nu(LEVELS) && !found; j++) begin
      if (j0 >= 0 && j != j0) continue;
      for (int o = 0; o < KR && !found; o++) begin
        f = j * KR + o;
        d = f % nd(LEVELS);
        if (free_u(LEVELS, 0, f, sig) && free_d(LEVELS, 0, d, KR, sig)) begin
          own_u[key(LEVELS, 0, f, 0)] = sig;
          own_d[key(LEVELS, 0, d, KR)] = sig;
          setf(umsb_bit(LEVELS, 0, j, o), usw(LEVELS), c);
          setf(dmsb_bit(LEVELS, 0, d, KR), dsw(LEVELS), f / nd(LEVELS));
          setf(ROOT_B + ROOT_W + p * sel_w(nd(LEVELS)), sel_w(nd(LEVELS)), d);
          found = 1;
        end
      end
    end
    if (!found) begin route_ok = 0; $display("ROUTE: signal %0d to output pad %0d failed", sig, p); end
  endtask

  task automatic set_lb(input int t, input int lut, input int ff);
    setf(t * LB_W, 16, lut);
    setf(t * LB_W + 16, 1, ff);
  endtask

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    localparam int LA = 0, LB = N - 1, LC = N - 2, LD = N - 1 - K;
    localparam int S_A = 4, S_B = 5, S_C = 6, S_D = 7, S_P = 8;
    logic a, b, c_q, c_d, dd;
    checks = 0; failures = 0; done = 0;
    mech_root = 0; mech_mid = 0; mech_local = 0; mech_reg = 0; mech_pad = 0;
    for (int i = 0; i < TOTAL; i++) img[i] = 1'b0;
    // root DMSB pad columns start off where they have an off code
    for (int d = 0; d < nd(LEVELS); d++)
      setf(dmsb_bit(LEVELS, 0, d, KR), dsw(LEVELS), (1 << dsw(LEVELS)) - 1);
    set_lb(LA, 32'h6666, 0);   // in0 ^ in1
    set_lb(LB, 32'h6666, 0);   // in0 ^ in1
    set_lb(LC, 32'h8888, 1);   // reg(in0 & in1)
    set_lb(LD, 32'h0FF0, 0);   // in2 ^ in3
    route_up(S_A, LA); route_up(S_B, LB); route_up(S_C, LC); route_up(S_D, LD);
    // logic block sources first: their entry UMSBs are fixed, pads may use any;
    // output pads last, they accept any root DMSB
    route_lb(S_A, LA, LB, 0);
    route_lb(S_B, LB, LC, 0);
    route_lb(S_B, LB, LD, 2);
    route_lb(S_C, LC, LD, 3);
    route_pad(0, 0, LA, 0);
    route_pad(1, 1, LA, 1);
    route_pad(2, 2, LB, 1);
    route_pad(3, 3, LC, 1);
    route_opad(S_B, entry_j[S_B][LEVELS], entry_c[S_B][LEVELS], 0);
    route_opad(S_C, entry_j[S_C][LEVELS], entry_c[S_C][LEVELS], 1);
    route_opad(S_D, entry_j[S_D][LEVELS], entry_c[S_D][LEVELS], 2);
    route_opad(S_P, -1, KR + N_IPAD - 1, 3);
    checks++;
    if (!route_ok) failures++;

    @(negedge clk);
    for (int i = 0; i < TOTAL; i++) begin
      cfg_en = 1; cfg_in = img[i];
      @(negedge clk);
    end
    cfg_en = 0;
    checks++;
    if (dut.cfg !== img) begin failures++; $display("FAIL configuration image"); end
    rst_n = 1;
    c_q = 0;
    for (int t = 0; t < CYCLES; t++) begin
      ipad = N_IPAD'($urandom);
      #1;
      a  = ipad[0] ^ ipad[1];
      b  = a ^ ipad[2];
      dd = b ^ c_q;
      chk(opad[0], b, "opad0 = B");
      chk(opad[1], c_q, "opad1 = C");
      chk(opad[2], dd, "opad2 = D");
      chk(opad[3], ipad[N_IPAD-1], "opad3 = last input pad");
      if (opad[0] === b && a) mech_root++;
      if (opad[2] === dd && b) mech_mid++;
      if (opad[3] === ipad[N_IPAD-1] && ipad[N_IPAD-1]) mech_pad++;
      c_d = b & ipad[3];
      @(negedge clk);
      if (opad[1] === c_d && c_d) mech_local++;
      if (opad[1] === c_d && c_d != c_q) mech_reg++;
      chk(opad[1], c_d, "C registered");
      c_q = c_d;
    end
    done = 1;
  end
endmodule

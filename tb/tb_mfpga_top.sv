// End-to-end testbench of mfpga_top at its default size (arity 4, two
// levels, 16 logic blocks in four level-1 clusters, 4 input and 4 output
// pads, P = 1).
//
// The testbench builds a configuration image by hand-routing a small netlist,
// shifts it in through the serial chain and then checks the pads cycle by
// cycle against a software model of the netlist:
//   A = ipad0 ^ ipad1          LB 0 of cluster 0, combinational
//   B = reg(A & ipad2)         LB 1 of cluster 0, registered; A arrives
//                              through the level-1 UMSB feedback (local path)
//   C = A ^ B                  LB 3 of cluster 2, combinational; A and B
//                              arrive through the root UMSBs and DMSBs
//   opad0 = A, opad1 = B, opad2 = C, opad3 = ipad3 (pad to pad through root)
// Every mechanism is counted and must occur: pad inputs entering root UMSBs,
// local feedback inside a cluster, a signal crossing clusters through the
// root, a registered LB, pad-to-pad routing, configuration read-back, and the
// configuration load taking exactly CFG_BITS cycles. The switch-count model
// is checked against the worked example: 416 switches for the depopulated
// two-level tree with P = 0.79.
//
// A final sweep checks the property the UMSBs exist for: every LB reaches
// every root DMSB. For each LB it loads four configurations in which that LB
// is a constant 1, fans it out through its cluster's UMSB and all root UMSBs,
// and brings four of the 16 root DMSBs out on the output pads. The pads must
// read 0 while reset holds the LB outputs off and 1 once it is released.
module tb_mfpga_top;
  import mfpga_pkg::*;
  localparam int  K = 4, LEVELS = 2, C_IN = 4, C_OUT = 1, NIP = 4, NOP = 4;
  localparam real P = 1.0;
  localparam int LB_W   = lb_bits(C_IN, C_OUT);
  localparam int L1_B   = level_base(K, K, C_IN, C_OUT, P, LEVELS, 1);
  localparam int L1_W   = sb_bits(K, C_IN, C_OUT, P, 1);
  localparam int ROOT_B = level_base(K, K, C_IN, C_OUT, P, LEVELS, LEVELS);
  localparam int ROOT_W = root_bits(K, K, C_IN, C_OUT, P, LEVELS, NIP);
  localparam int TOTAL  = ROOT_B + ROOT_W + NOP * 4;
  localparam int L1_DSW = 3, L1_USW = 2, R_USW = 3;

  logic clk = 0, rst_n = 0, cfg_en = 0, cfg_in = 0, cfg_out;
  logic [NIP-1:0] ipad;
  logic [NOP-1:0] opad;
  logic [TOTAL-1:0] img;
  int checks = 0, failures = 0;
  int n_pad_in = 0, n_local = 0, n_cross = 0, n_reg = 0, n_pad2pad = 0, n_readback = 0, n_load = 0,
      n_reach = 0;

  mfpga_top dut (.clk, .rst_n, .cfg_en, .cfg_in, .cfg_out, .ipad, .opad);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  task automatic setf(input int base, input int w, input int v);
    for (int b = 0; b < w; b++) img[base + b] = v[b];
  endtask
  // LB b of level-1 cluster c
  task automatic set_lb(input int c, input int b, input int lut, input int ff);
    setf((c*K + b)*LB_W, 16, lut);
    setf((c*K + b)*LB_W + 16, 1, ff);
  endtask
  // level-1 cluster c: DMSB d output o selects port q
  task automatic set_l1_dmsb(input int c, input int d, input int o, input int q);
    setf(L1_B + c*L1_W + (d*K + o)*L1_DSW, L1_DSW, q);
  endtask
  // level-1 cluster c: UMSB output o selects child b
  task automatic set_l1_umsb(input int c, input int o, input int b);
    setf(L1_B + c*L1_W + 4*K*L1_DSW + o*L1_USW, L1_USW, b);
  endtask
  // root DMSB d output o (o = 4: output pads) on or off
  task automatic set_root_dmsb(input int d, input int o, input logic on);
    setf(ROOT_B + d*(K+1) + o, 1, on ? 0 : 1);
  endtask
  // root UMSB j output o selects input s (0..3 children, 4..7 pads)
  task automatic set_root_umsb(input int j, input int o, input int s);
    setf(ROOT_B + 16*(K+1) + (j*K + o)*R_USW, R_USW, s);
  endtask
  task automatic set_opad(input int p, input int d);
    setf(ROOT_B + ROOT_W + p*4, 4, d);
  endtask

  task automatic load_image();
    for (int i = 0; i < TOTAL; i++) begin
      cfg_en = 1; cfg_in = img[i];
      @(negedge clk);
    end
    cfg_en = 0;
  endtask

  initial begin
    logic a, b_q, b_d, c, a_prev;
    int cyc;
    // switch-count model against the worked example
    checks++;
    if (tree_switches(4, 4, 4, 1, 0.79, 2) != 416) begin
      failures++;
      $display("FAIL switch count P=0.79: %0d", tree_switches(4, 4, 4, 1, 0.79, 2));
    end
    checks++;
    if ($bits(dut.cfg) != TOTAL) begin
      failures++;
      $display("FAIL configuration size %0d, expected %0d", $bits(dut.cfg), TOTAL);
    end

    // ---- routing of the netlist ----
    img = '0;
    for (int d = 0; d < 16; d++) for (int o = 0; o <= K; o++) set_root_dmsb(d, o, 0);
    // ipad0 -> LB(0,0) pin 0: root UMSB 0 out 0, feedback 0, root DMSB 0 -> cluster 0 pin 0
    set_root_umsb(0, 0, 4 + 0); set_root_dmsb(0, 0, 1); set_l1_dmsb(0, 0, 0, 0);
    // ipad1 -> LB(0,0) pin 1: root UMSB 1 out 1, feedback 5 -> cluster 0 pin 5 = DMSB 1 port 1
    set_root_umsb(1, 1, 4 + 1); set_root_dmsb(5, 0, 1); set_l1_dmsb(0, 1, 0, 1);
    set_lb(0, 0, 32'h6666, 0);                     // A = in0 ^ in1
    // A -> LB(0,1) pin 0 locally: cluster 0 UMSB out 0 <- child 0, DMSB 0 port 4 (feedback 0)
    set_l1_umsb(0, 0, 0); set_l1_dmsb(0, 0, 1, 4);
    // ipad2 -> LB(0,1) pin 1: root UMSB 2 out 1, feedback 9 -> cluster 0 pin 9 = DMSB 1 port 2
    set_root_umsb(2, 1, 4 + 2); set_root_dmsb(9, 0, 1); set_l1_dmsb(0, 1, 1, 2);
    set_lb(0, 1, 32'h8888, 1);                     // B = reg(in0 & in1)
    // A -> LB(2,3) pin 2: cluster 0 output 0 -> root UMSB 0 out 2 (child 0), feedback 2,
    // root DMSB 2 -> cluster 2 pin 2 = DMSB 2 port 0
    set_root_umsb(0, 2, 0); set_root_dmsb(2, 2, 1); set_l1_dmsb(2, 2, 3, 0);
    // B -> LB(2,3) pin 3: cluster 0 UMSB out 1 <- child 1 = cluster 0 output 1,
    // root UMSB 1 out 3 (child 0), feedback 7, root DMSB 7 -> cluster 2 pin 7 = DMSB 3 port 1
    set_l1_umsb(0, 1, 1); set_root_umsb(1, 3, 0); set_root_dmsb(7, 2, 1); set_l1_dmsb(2, 3, 3, 1);
    set_lb(2, 3, 32'h0FF0, 0);                     // C = in2 ^ in3
    // C -> opad2: cluster 2 UMSB out 0 <- child 3, root UMSB 0 out 3 (child 2), feedback 3
    set_l1_umsb(2, 0, 3); set_root_umsb(0, 3, 2); set_root_dmsb(3, 4, 1); set_opad(2, 3);
    // A -> opad0 (feedback 2), B -> opad1 (feedback 7)
    set_root_dmsb(2, 4, 1); set_opad(0, 2);
    set_root_dmsb(7, 4, 1); set_opad(1, 7);
    // ipad3 -> opad3: root UMSB 3 out 0, feedback 12
    set_root_umsb(3, 0, 4 + 3); set_root_dmsb(12, 4, 1); set_opad(3, 12);

    // ---- configuration load ----
    ipad = '0;
    @(negedge clk);
    cyc = 0;
    for (int i = 0; i < TOTAL; i++) begin
      cfg_en = 1; cfg_in = img[i];
      @(negedge clk);
      cyc++;
    end
    cfg_en = 0;
    checks++;
    if (dut.cfg !== img || cyc != TOTAL) begin
      failures++;
      $display("FAIL configuration load");
    end else n_load++;
    // read back while reloading the same image
    for (int i = 0; i < TOTAL; i++) begin
      check(cfg_out, img[i], "configuration read-back");
      n_readback++;
      cfg_en = 1; cfg_in = img[i];
      @(negedge clk);
    end
    cfg_en = 0;

    // ---- operation ----
    rst_n = 1;
    b_q = 0;
    for (int t = 0; t < 400; t++) begin
      ipad = NIP'($urandom);
      #1;
      a = ipad[0] ^ ipad[1];
      c = a ^ b_q;
      check(opad[0], a, "opad0 = A");
      check(opad[1], b_q, "opad1 = B");
      check(opad[2], c, "opad2 = C");
      check(opad[3], ipad[3], "opad3 = ipad3");
      if (opad[0] === a && (ipad[0] | ipad[1])) n_pad_in++;
      if (opad[3] === ipad[3] && ipad[3]) n_pad2pad++;
      if (opad[2] === c && a) n_cross++;
      b_d = a & ipad[2];
      @(negedge clk);
      if (b_d) n_local++;
      check(opad[1], b_d, "B registered");
      if (opad[1] === b_d && b_d != b_q) n_reg++;
      b_q = b_d;
    end

    // ---- reachability: LB t to root DMSBs 4*g .. 4*g+3 ----
    for (int t = 0; t < 16; t++)
      for (int g = 0; g < 4; g++) begin
        logic ok;
        img = '0;
        for (int d = 0; d < 16; d++) for (int o = 0; o <= K; o++) set_root_dmsb(d, o, 0);
        set_lb(t / K, t % K, 32'hFFFF, 0);
        // cluster output j is UMSB output j; root UMSB j output o is feedback 4*j + o
        for (int o = 0; o < K; o++) set_l1_umsb(t / K, o, t % K);
        for (int j = 0; j < 4; j++) for (int o = 0; o < K; o++) set_root_umsb(j, o, t / K);
        for (int p = 0; p < NOP; p++) begin
          set_root_dmsb(4*g + p, K, 1);
          set_opad(p, 4*g + p);
        end
        rst_n = 0;
        load_image();
        #1;
        for (int p = 0; p < NOP; p++) check(opad[p], 1'b0, "reach: LB held off");
        rst_n = 1;
        #1;
        ok = 1;
        for (int p = 0; p < NOP; p++) begin
          check(opad[p], 1'b1, $sformatf("reach: LB %0d to root DMSB %0d", t, 4*g + p));
          if (opad[p] !== 1'b1) ok = 0;
        end
        if (ok) n_reach += NOP;
        @(negedge clk);
      end

    $display("mechanisms: pad_in=%0d local_feedback=%0d root_crossing=%0d registered=%0d pad_to_pad=%0d readback=%0d load=%0d lb_to_root_dmsb=%0d",
             n_pad_in, n_local, n_cross, n_reg, n_pad2pad, n_readback, n_load, n_reach);
    checks++;
    if (n_pad_in == 0 || n_local == 0 || n_cross == 0 || n_reg == 0 || n_pad2pad == 0 ||
        n_readback == 0 || n_load == 0 || n_reach != 256) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

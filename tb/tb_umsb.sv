// Self-checking testbench of umsb: a 6-input 4-output crossbar (the size of a
// root UMSB with 2 input pads). Random selects, including the "off" codes
// 6 and 7, and random inputs; each output is compared with the selected
// input or 0.
module tb_umsb;
  localparam int NI = 6, NO = 4, SW = 3;
  logic [NO*SW-1:0] cfg;
  logic [NI-1:0] in;
  logic [NO-1:0] out;
  int checks = 0, failures = 0;
  logic clk = 0;

  umsb #(.NI(NI), .NO(NO)) dut (.cfg, .in, .out);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      cfg = (NO*SW)'($urandom);
      in  = NI'($urandom);
      #1;
      for (int o = 0; o < NO; o++) begin
        int s;
        logic exp;
        s = int'(cfg[o*SW +: SW]);
        exp = (s < NI) ? in[s] : 1'b0;
        checks++;
        if (out[o] !== exp) begin
          failures++;
          $display("FAIL out[%0d] sel=%0d in=%b got %b", o, s, in, out[o]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

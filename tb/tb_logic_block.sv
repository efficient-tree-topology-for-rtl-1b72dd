// Self-checking testbench of logic_block: loads random 4-input LUT contents,
// applies random inputs and compares the combinational output with a direct
// table look-up, then switches to the registered output and checks that it
// shows the previous cycle's LUT value and clears on reset, and that the
// output enable forces the output low.
module tb_logic_block;
  localparam int C_IN = 4, C_OUT = 1;
  localparam int W = C_OUT * ((1 << C_IN) + 1);
  logic clk = 0, rst_n = 0, en = 1;
  logic [W-1:0] cfg;
  logic [C_IN-1:0] in;
  logic [C_OUT-1:0] out;
  int checks = 0, failures = 0;

  logic_block #(.C_IN(C_IN), .C_OUT(C_OUT)) dut (.clk, .rst_n, .en, .cfg, .in, .out);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    logic [15:0] lut;
    logic prev;
    cfg = '0; in = '0;
    #1;
    check(out[0], 1'b0, "reset register");
    // combinational mode
    for (int t = 0; t < 200; t++) begin
      lut = 16'($urandom);
      cfg = {1'b0, lut};
      in = 4'($urandom);
      #1;
      check(out[0], lut[in], "lut comb");
    end
    // registered mode
    @(negedge clk) rst_n = 1;
    lut = 16'hA5C3;
    cfg = {1'b1, lut};
    in = 0;
    @(negedge clk);
    for (int t = 0; t < 100; t++) begin
      prev = lut[in];
      in = 4'($urandom);
      #1;
      check(out[0], prev, "lut registered, before edge");
      @(negedge clk);
      check(out[0], lut[in], "lut registered, after edge");
    end
    // output enable: held low whatever the LUT says
    cfg = {1'b0, 16'hFFFF};
    en = 0;
    #1;
    check(out[0], 1'b0, "output disabled");
    en = 1;
    #1;
    check(out[0], 1'b1, "output enabled");
    cfg = {1'b1, lut};
    rst_n = 0;
    #1;
    check(out[0], 1'b0, "asynchronous clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench of cfg_chain: shifts a random 37-bit image in,
// bit 0 first, and checks that it lands in place after exactly 37 enabled
// cycles, that it holds while cfg_en is low, and that cfg_out returns the
// image bit by bit while a second image is shifted in.
module tb_cfg_chain;
  localparam int W = 37;
  logic clk = 0, cfg_en = 0, cfg_in = 0, cfg_out;
  logic [W-1:0] bits, img, img2;
  int checks = 0, failures = 0;

  cfg_chain #(.W(W)) dut (.clk, .cfg_en, .cfg_in, .cfg_out, .bits);

  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    img  = W'({$urandom, $urandom});
    img2 = W'({$urandom, $urandom});
    @(negedge clk);
    for (int i = 0; i < W; i++) begin
      cfg_en = 1; cfg_in = img[i];
      @(negedge clk);
    end
    cfg_en = 0;
    check(bits, img, "image after W shifts");
    repeat (5) @(negedge clk);
    check(bits, img, "hold while disabled");
    for (int i = 0; i < W; i++) begin
      check(W'(cfg_out), W'(img[i]), "read back");
      cfg_en = 1; cfg_in = img2[i];
      @(negedge clk);
    end
    cfg_en = 0;
    check(bits, img2, "second image");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cdiv_multiplier: checks numerator and denominator after multiplication
// by the conjugate (ac+bd, bc-ad, c^2+d^2) on all sign corners and random
// operands, the quiet checker, and detection of a flipped numerator bit.
module tb_cdiv_multiplier;
  localparam int unsigned W = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic signed [W-1:0] a, b, c, d;
  logic [2*W:0] flip;
  logic signed [2*W:0] n_re, n_im;
  logic [2*W-1:0] den;
  logic err;
  int checks = 0, failures = 0;

  cdiv_multiplier #(.W(W), .CHECK(1'b1)) dut (.a, .b, .c, .d, .flip_re(flip), .n_re, .n_im, .den, .err);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s a=%0d b=%0d c=%0d d=%0d", what, a, b, c, d); end
  endtask

  initial begin
    for (int i = 0; i < 4000; i++) begin
      if (i < 81) begin
        a = (i % 3 == 0) ? -128 : (i % 3 == 1) ? 127 : 0;
        b = ((i/3) % 3 == 0) ? -128 : ((i/3) % 3 == 1) ? 127 : 0;
        c = ((i/9) % 3 == 0) ? -128 : ((i/9) % 3 == 1) ? 127 : 0;
        d = ((i/27) % 3 == 0) ? -128 : ((i/27) % 3 == 1) ? 127 : 0;
      end else begin
        a = W'($urandom); b = W'($urandom); c = W'($urandom); d = W'($urandom);
      end
      flip = '0;
      @(posedge clk); #1;
      check(int'(n_re) == int'(a)*int'(c) + int'(b)*int'(d), "n_re");
      check(int'(n_im) == int'(b)*int'(c) - int'(a)*int'(d), "n_im");
      check(int'(den) == int'(c)*int'(c) + int'(d)*int'(d), "den");
      check(err == 1'b0, "false alarm");
      flip = (2*W+1)'(1) << $urandom_range(0, 2*W);
      @(posedge clk); #1;
      check(err == 1'b1, "flip not detected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

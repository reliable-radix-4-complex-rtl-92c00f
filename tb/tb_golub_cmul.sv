// tb_golub_cmul: checks the Golub complex multiplier against the direct
// four-multiplication formula on corner and random operands, checks that
// the checker stays quiet, and that a flipped bit of the real part is
// caught by the checker.
module tb_golub_cmul;
  localparam int unsigned W = 9;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic signed [W-1:0] yr, yi, zr, zi;
  logic [2*W+1:0] flip;
  logic signed [2*W+1:0] xr, xi;
  logic err;
  int checks = 0, failures = 0;

  golub_cmul #(.W(W), .CHECK(1'b1)) dut (.yr, .yi, .zr, .zi, .flip_re(flip), .x_re(xr), .x_im(xi), .err);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    flip = '0;
    for (int i = 0; i < 3000; i++) begin
      if (i < 16) begin
        yr = (i & 1) ? -256 : 255; yi = (i & 2) ? -256 : 255;
        zr = (i & 4) ? -256 : 255; zi = (i & 8) ? -256 : 255;
      end else begin
        yr = W'($urandom); yi = W'($urandom); zr = W'($urandom); zi = W'($urandom);
      end
      flip = '0;
      @(posedge clk); #1;
      check(int'(xr) == int'(yr)*int'(zr) - int'(yi)*int'(zi), $sformatf("x_re %0d", xr));
      check(int'(xi) == int'(yr)*int'(zi) + int'(yi)*int'(zr), $sformatf("x_im %0d", xi));
      check(err == 1'b0, "false alarm");
      flip = (2*W+2)'(1) << $urandom_range(0, 2*W+1);
      @(posedge clk); #1;
      check(err == 1'b1, "flipped real part not detected");
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

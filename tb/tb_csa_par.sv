// tb_csa_par: checks sum + 2*carry = x + y + z (modulo 2^(W+1)) for random
// words, the quiet checker, and that a flipped sum bit is detected.
module tb_csa_par;
  localparam int unsigned W = 19;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [W-1:0] x, y, z, flip, s, co;
  logic err;
  int checks = 0, failures = 0;

  csa_par #(.W(W), .CHECK(1'b1)) dut (.x, .y, .z, .flip_sum(flip), .sum(s), .cout(co), .err);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 3000; i++) begin
      x = W'($urandom); y = W'($urandom); z = W'($urandom); flip = '0;
      if (i == 0) begin x = '1; y = '1; z = '1; end
      @(posedge clk); #1;
      check((W+1)'(s) + ((W+1)'(co) << 1) == (W+1)'(x) + (W+1)'(y) + (W+1)'(z), "sum and carry");
      check(err == 1'b0, "false alarm");
      flip = W'(1) << $urandom_range(0, W-1);
      @(posedge clk); #1;
      check(err == 1'b1, "sum fault not detected");
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

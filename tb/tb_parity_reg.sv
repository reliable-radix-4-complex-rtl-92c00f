// tb_parity_reg: writes random words, checks they are held (also while
// we = 0) without an alarm, that any single flipped bit raises err and that
// two flipped bits do not (a single parity bit cannot see them).
module tb_parity_reg;
  localparam int unsigned W = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic we;
  logic [W-1:0] d, flip, q, model;
  logic err;
  int checks = 0, failures = 0;

  parity_reg #(.W(W), .PARITY(1'b1)) dut (.clk, .rst_n, .we, .d, .flip, .q, .err);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s q=%h model=%h", what, q, model); end
  endtask

  initial begin
    we = 0; d = '0; flip = '0; model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(q == '0 && err == 1'b0, "reset state");
    for (int i = 0; i < 2000; i++) begin
      int b1, b2;
      we = ($urandom_range(0, 3) != 0); d = W'($urandom); flip = '0;
      if (we) model = d;
      @(negedge clk);
      we = 1'b0;
      check(q == model, "stored word");
      check(err == 1'b0, "false alarm");
      b1 = $urandom_range(0, W-1);
      b2 = (b1 + $urandom_range(1, W-1)) % W;
      flip = W'(1) << b1;
      #1 check(err == 1'b1, "single flip not detected");
      flip = (W'(1) << b1) | (W'(1) << b2);
      #1 check(err == 1'b0, "double flip changed the parity");
      flip = '0;
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

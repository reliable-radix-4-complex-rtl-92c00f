// tb_qsel_fold: drives every rounded remainder estimate and divisor pattern
// through the fold logic and the shared ROM and checks the signed digit
// against a reference selection written here from the selection rule
// (digit sign = estimate sign, magnitude from |estimate| saturated at 3.75),
// the ROM address, and that a flipped ROM bit raises the parity error.
module tb_qsel_fold;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic signed [5:0] est;
  logic [3:0] dtop, data, flip, unused;
  logic [7:0] addr;
  logic signed [2:0] q;
  logic err;
  int checks = 0, failures = 0;

  qsel_fold #(.CHECK(1'b1)) dut (.est, .dtop, .rom_addr(addr), .rom_data(data), .flip_rom(flip), .q, .err);
  qsel_rom  rom (.addr_re(addr), .addr_im(8'd0), .data_re(data), .data_im(unused));

  function automatic int ref_digit(input int e4, input int dj);
    int m, k;
    m = (e4 < 0) ? -e4 : e4;
    if (m > 15) m = 15;
    if (6*m >= 4*dj + 7)    k = 2;
    else if (6*m >= dj + 4) k = 1;
    else                    k = 0;
    return (e4 < 0) ? -k : k;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s est=%0d d=%0d q=%0d", what, est, dtop, q); end
  endtask

  initial begin
    for (int e = -32; e < 32; e++) begin
      for (int dj = 8; dj < 16; dj++) begin
        est = 6'(e); dtop = 4'(dj); flip = '0;
        @(posedge clk); #1;
        check(int'(q) == ref_digit(e, dj), "digit");
        check(addr[3:0] == 4'(dj), "divisor bits of address");
        check(err == 1'b0, "false parity alarm");
        flip = 4'(1) << $urandom_range(0, 3);
        @(posedge clk); #1;
        check(err == 1'b1, "ROM bit flip not detected");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

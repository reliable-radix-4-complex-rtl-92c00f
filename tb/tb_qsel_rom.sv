// tb_qsel_rom: proves the quotient-selection table correct. For every word
// with a normalised divisor bit pattern it checks, at the extreme divisor
// values of the column and the extreme remainders the rounded address can
// stand for (+-1/8), that the stored digit k keeps the next remainder in
// bounds: (k - 2/3) D <= |R| <= (k + 2/3) D, for all reachable |R| <= 8/3 D.
// It also checks the parity bit of every word and that both ports agree.
module tb_qsel_rom;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [7:0] ar, ai;
  logic [3:0] dr, di;
  int checks = 0, failures = 0;

  qsel_rom dut (.addr_re(ar), .addr_im(ai), .data_re(dr), .data_im(di));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s addr=%h word=%h", what, ar, dr); end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      ar = 8'(i); ai = 8'(255 - i);
      @(posedge clk); #1;
      check(^dr == 1'b0, "parity");
      check(dr[2:0] <= 3'd2, "digit range");
      if (i[3]) begin
        int k;
        real y_lo, y_hi, dd;
        k = int'(dr[2:0]);
        for (int e = 0; e < 2; e++) begin
          // D at the ends of the column [dj/8, (dj+1)/8)
          dd = real'(i % 16) / 8.0 + (e ? (1.0/8.0 - 1.0e-9) : 0.0);
          y_lo = real'(i / 16) / 4.0 - 1.0/8.0;
          y_hi = real'(i / 16) / 4.0 + 1.0/8.0;
          if (i / 16 == 15) y_hi = 8.0/3.0 * dd;          // saturated word
          if (y_lo < 0.0) y_lo = 0.0;
          if (y_hi > 8.0/3.0 * dd) y_hi = 8.0/3.0 * dd;
          if (y_lo <= y_hi) begin
            check(y_lo + 1.0e-9 >= (real'(k) - 2.0/3.0) * dd, $sformatf("digit %0d too large", k));
            check(y_hi - 1.0e-9 <= (real'(k) + 2.0/3.0) * dd, $sformatf("digit %0d too small", k));
          end
        end
      end
      @(posedge clk); #1;
      ar = 8'(255 - i); ai = 8'(255 - i);
      #1;
      check(dr == di, "ports disagree");
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

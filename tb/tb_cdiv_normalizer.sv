// tb_cdiv_normalizer: checks that the mantissas lie in [1,2) (or are 0),
// that the divisor mantissa has its leading one at the top, and that
// mant_n / mant_d * 2^exp reproduces n / den exactly, on corners and random
// values; also the zero-divisor flag.
module tb_cdiv_normalizer;
  localparam int unsigned W = 8, FRAC = 15, EW = 6;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic signed [2*W:0] n_re, n_im;
  logic [2*W-1:0] den;
  logic signed [FRAC+1:0] m_re, m_im;
  logic [FRAC:0] m_d;
  logic signed [EW-1:0] e_re, e_im;
  logic dz;
  int checks = 0, failures = 0;

  cdiv_normalizer #(.W(W), .FRAC(FRAC), .EW(EW)) dut (.n_re, .n_im, .den, .mant_re(m_re), .mant_im(m_im),
    .mant_d(m_d), .exp_re(e_re), .exp_im(e_im), .den_zero(dz));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s n=%0d/%0d den=%0d", what, n_re, n_im, den); end
  endtask

  task automatic check_part(input logic signed [2*W:0] n, input logic signed [FRAC+1:0] m,
                            input logic signed [EW-1:0] e, input string nm);
    real mv, dv, lhs, rhs;
    mv = real'(m) / 2.0**FRAC;
    dv = real'(m_d) / 2.0**FRAC;
    if (n == 0) begin
      check(m == 0 && e == 0, {nm, " zero"});
      return;
    end
    check((mv >= 1.0 && mv < 2.0) || (mv <= -1.0 && mv > -2.0), {nm, " mantissa range"});
    lhs = mv / dv * 2.0**real'(e);
    rhs = real'(n) / real'(den);
    check(lhs == rhs, $sformatf("%s ratio %f vs %f", nm, lhs, rhs));
  endtask

  initial begin
    for (int i = 0; i < 4000; i++) begin
      case (i)
        0: begin n_re = 32768; n_im = -32768; den = 32768; end
        1: begin n_re = 1;     n_im = -1;     den = 1;     end
        2: begin n_re = 0;     n_im = 5;      den = 0;     end
        3: begin n_re = -3;    n_im = 3;      den = 65535; end
        default: begin
          n_re = (2*W+1)'($urandom_range(0, 65536)) - (2*W+1)'(32768);
          n_im = (2*W+1)'($urandom_range(0, 65536)) - (2*W+1)'(32768);
          den  = (2*W)'($urandom) >> $urandom_range(0, 15);
        end
      endcase
      @(posedge clk); #1;
      check(dz == (den == 0), "den_zero");
      check(m_d[FRAC] == 1'b1, "divisor leading one");
      if (den != 0) begin
        check_part(n_re, m_re, e_re, "re");
        check_part(n_im, m_im, e_im, "im");
      end
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

// tb_otf_conv: shifts random digit strings from {-2..2} into two
// interleaved runs of the converter and checks Q_pos - Q_neg against
// sum_j q_j 4^(NDIG-j) for each run, the quiet checker, and detection of a
// flipped Q_pos bit and of a flipped adder output bit.
module tb_otf_conv;
  localparam int unsigned NDIG = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic clr, clr_run, step, step_run, rd_run;
  logic signed [2:0] digit;
  logic [2*NDIG-1:0] fp;
  logic [2*NDIG:0] fq;
  logic signed [2*NDIG:0] q;
  logic err;
  int checks = 0, failures = 0;

  otf_conv #(.NDIG(NDIG), .NRUN(2), .CHECK(1'b1)) dut (.clk, .rst_n, .clr, .clr_run, .step, .step_run,
    .digit, .rd_run, .flip_qpos(fp), .flip_q(fq), .q_out(q), .err);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s q=%0d", what, q); end
  endtask

  initial begin
    clr = 0; clr_run = 0; step = 0; step_run = 0; rd_run = 0; digit = '0; fp = '0; fq = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      int ref0, ref1;
      ref0 = 0; ref1 = 0;
      @(negedge clk);
      clr = 1; clr_run = 0;
      @(negedge clk);
      clr_run = 1;
      for (int j = 0; j < 2*NDIG; j++) begin
        int dg;
        dg = $urandom_range(0, 4) - 2;
        @(negedge clk);
        clr = 0;
        step = 1; step_run = j[0]; digit = 3'(dg);
        if (j[0]) ref1 = ref1 * 4 + dg; else ref0 = ref0 * 4 + dg;
      end
      @(negedge clk);
      step = 0;
      rd_run = 0; #1 check(int'(q) == ref0, $sformatf("run 0 want %0d", ref0));
      check(err == 1'b0, "false alarm");
      rd_run = 1; #1 check(int'(q) == ref1, $sformatf("run 1 want %0d", ref1));
      rd_run = 0; fp = (2*NDIG)'(1) << $urandom_range(0, 2*NDIG-1);
      #1 check(err == 1'b1, "Q_pos flip not detected");
      fp = '0; fq = (2*NDIG+1)'(1) << $urandom_range(0, 2*NDIG);
      #1 check(err == 1'b1, "adder output flip not detected");
      fq = '0;
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

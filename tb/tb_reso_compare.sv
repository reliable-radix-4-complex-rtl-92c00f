// tb_reso_compare: stores a first-run and a second-run quotient (in either
// order) and checks the stored values, the `both` flag and the error flag:
// raised exactly when the two quotients differ; cleared by clr.
module tb_reso_compare;
  localparam int unsigned QW = 17;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic clr, rv, rr;
  logic [QW-1:0] rq, fq, q, qr;
  logic both, err;
  int checks = 0, failures = 0;

  reso_compare #(.QW(QW)) dut (.clk, .rst_n, .clr, .res_valid(rv), .res_run(rr), .res_q(rq),
    .flip_q(fq), .q, .q_reso(qr), .both, .err);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    clr = 0; rv = 0; rr = 0; rq = '0; fq = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      logic [QW-1:0] v0, v1;
      bit first;
      v0 = QW'($urandom);
      v1 = ($urandom_range(0, 1) != 0) ? v0 : v0 ^ (QW'(1) << $urandom_range(0, QW-1));
      first = $urandom_range(0, 1);
      @(negedge clk); clr = 1;
      @(negedge clk); clr = 0;
      check(!both && !err, "cleared");
      rv = 1; rr = first; rq = first ? v1 : v0;
      @(negedge clk);
      check(!both && !err, "one result only");
      rr = !first; rq = first ? v0 : v1;
      @(negedge clk); rv = 0;
      check(both, "both present");
      check(q == v0 && qr == v1, "stored values");
      check(err == (v0 != v1), "comparison");
      fq = QW'(1) << $urandom_range(0, QW-1);
      #1 check(err == ((v0 ^ fq) != v1), "flipped Q register");
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

// tb_srt_lane: checks the radix-4 SRT lane on its own. A plain lane with
// the Scheme I checks and a RESO lane each get their own quotient ROM.
// Random normalised dividends (both signs, and zero) and divisors are
// divided; the quotient must be within one unit of the last place of N/D,
// res_valid must come 2*NDIG cycles after the load (two cycles per
// iteration), no check may fire, and the RESO lane must return the same
// quotient for its original run and, one cycle later, for the interleaved
// shifted run. Digits of both signs and of magnitude 2 must occur.
module tb_srt_lane;
  import cdiv_pkg::*;
  localparam int unsigned NDIG = 8, FRAC = 15;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic load, load_run;
  logic signed [FRAC+1:0] n;
  logic [FRAC:0] dv;
  logic [7:0] addr0, addr1;
  logic [3:0] data0, data1, nc0, nc1;
  logic rv0, rr0, busy0, err0, erom0, rv1, rr1, busy1, err1, erom1;
  logic signed [2*NDIG:0] q0, q1;

  srt_lane #(.NDIG(NDIG), .FRAC(FRAC), .RESO(1'b0), .CHECK(1'b1)) u_plain (
    .clk, .rst_n, .load(load && !load_run), .load_run(1'b0), .load_n(n), .load_d(dv),
    .rom_addr(addr0), .rom_data(data0), .inj(NO_FAULT),
    .res_valid(rv0), .res_run(rr0), .res_q(q0), .busy(busy0), .err(err0), .err_rom(erom0));
  srt_lane #(.NDIG(NDIG), .FRAC(FRAC), .RESO(1'b1), .CHECK(1'b0)) u_reso (
    .clk, .rst_n, .load, .load_run, .load_n(n), .load_d(dv),
    .rom_addr(addr1), .rom_data(data1), .inj(NO_FAULT),
    .res_valid(rv1), .res_run(rr1), .res_q(q1), .busy(busy1), .err(err1), .err_rom(erom1));
  qsel_rom u_rom0 (.addr_re(addr0), .addr_im(8'd0), .data_re(data0), .data_im(nc0));
  qsel_rom u_rom1 (.addr_re(addr1), .addr_im(8'd0), .data_re(data1), .data_im(nc1));

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_neg2 = 0, n_pos2 = 0, n_neg1 = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (u_plain.a_valid) begin
      if (u_plain.q_sel == -3'sd2) n_neg2++;
      if (u_plain.q_sel == 3'sd2)  n_pos2++;
      if (u_plain.q_sel == -3'sd1) n_neg1++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s n=%0d d=%0d", what, n, dv); end
  endtask

  initial begin
    load = 0; load_run = 0; n = '0; dv = {1'b1, FRAC'(0)};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      int t0, t_plain, t_r0, t_r1;
      logic signed [2*NDIG:0] res0, res_r0, res_r1;
      real want, got, ulp;
      logic [FRAC:0] mag;
      mag = {1'b1, FRAC'($urandom)};
      if (i == 0) mag = {1'b1, FRAC'(0)};
      if (i == 1) mag = '1;
      n  = (i % 11 == 5) ? '0 : ($urandom_range(0, 1) ? -(FRAC+2)'(mag) : (FRAC+2)'(mag));
      dv = {1'b1, FRAC'($urandom)};
      if (i == 1) dv = {1'b1, FRAC'(0)};
      @(negedge clk);
      load = 1; load_run = 0; t0 = cyc;
      @(negedge clk);
      load_run = 1;
      @(negedge clk);
      load = 0; load_run = 0;
      t_plain = -1; t_r0 = -1; t_r1 = -1;
      while (t_plain < 0 || t_r1 < 0) begin
        @(posedge clk); #1;
        if (rv0) begin t_plain = cyc - t0; res0 = q0; end
        if (rv1 && !rr1) begin t_r0 = cyc - t0; res_r0 = q1; end
        if (rv1 && rr1)  begin t_r1 = cyc - t0; res_r1 = q1; end
        check(!err0 && !erom0, "false alarm");
        if (cyc - t0 > 40) break;
      end
      ulp  = 2.0 ** -(2.0*(NDIG-1));
      want = real'(n) / real'(dv);
      got  = real'(res0) * ulp;
      check(got - want < ulp && want - got < ulp, $sformatf("quotient %f want %f", got, want));
      check(t_plain == 2*NDIG, $sformatf("latency %0d", t_plain));
      check(t_r0 == 2*NDIG && t_r1 == 2*NDIG + 1, $sformatf("RESO timing %0d %0d", t_r0, t_r1));
      check(res_r0 == res0 && res_r1 == res0, "RESO runs differ");
    end
    check(n_neg2 > 0 && n_pos2 > 0 && n_neg1 > 0, "digit set not covered");
    $display("digits seen: -2 x%0d, -1 x%0d, +2 x%0d", n_neg2, n_neg1, n_pos2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

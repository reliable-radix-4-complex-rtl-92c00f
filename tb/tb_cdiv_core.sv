// tb_cdiv_core: self-checking test of the complex divider core in all three
// schemes (none, Scheme I parity, Scheme II RESO) run side by side.
//
// Random and corner operands are divided; each quotient part is compared
// with the exact value computed in real arithmetic, to within one unit of
// the last place, and the start-to-done latency is checked (done is high
// 19 cycles after the clock edge that samples start, 20 with RESO; the
// count below includes the sampling edge). Without faults no error flag may rise. Then single faults are
// injected into U, V, D, the ROM word, the estimate adder, the CSA, Q_pos,
// the converter output and the multiplier, and the checking schemes must
// flag them: Scheme I in every case, RESO whenever the fault changed the
// quotient, except for faults in the multiplier, which RESO does not repeat.
module tb_cdiv_core;
  import cdiv_pkg::*;

  localparam int unsigned W = 8, NDIG = 8, EW = 6;
  localparam int unsigned QW = 2*NDIG + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start;
  logic signed [W-1:0] a, b, c, d;
  fault_t inj_n, inj_p, inj_r;

  logic [2:0] busy, done, dz, errs;
  logic signed [QW-1:0] qre [3], qim [3];
  logic signed [EW-1:0] ere [3], eim [3];
  logic [3:0] flags [3];

  cdiv_core #(.SCHEME(SCHEME_NONE)) u_n (.clk, .rst_n, .start, .a, .b, .c, .d, .inj(inj_n),
    .busy(busy[0]), .done(done[0]), .q_re(qre[0]), .q_im(qim[0]), .exp_re(ere[0]), .exp_im(eim[0]),
    .den_zero(dz[0]), .err_mul(flags[0][0]), .err_re(flags[0][1]), .err_im(flags[0][2]),
    .err_rom(flags[0][3]), .err(errs[0]));
  cdiv_core #(.SCHEME(SCHEME_PARITY)) u_p (.clk, .rst_n, .start, .a, .b, .c, .d, .inj(inj_p),
    .busy(busy[1]), .done(done[1]), .q_re(qre[1]), .q_im(qim[1]), .exp_re(ere[1]), .exp_im(eim[1]),
    .den_zero(dz[1]), .err_mul(flags[1][0]), .err_re(flags[1][1]), .err_im(flags[1][2]),
    .err_rom(flags[1][3]), .err(errs[1]));
  cdiv_core #(.SCHEME(SCHEME_RESO)) u_r (.clk, .rst_n, .start, .a, .b, .c, .d, .inj(inj_r),
    .busy(busy[2]), .done(done[2]), .q_re(qre[2]), .q_im(qim[2]), .exp_re(ere[2]), .exp_im(eim[2]),
    .den_zero(dz[2]), .err_mul(flags[2][0]), .err_re(flags[2][1]), .err_im(flags[2][2]),
    .err_rom(flags[2][3]), .err(errs[2]));

  int checks = 0, failures = 0;
  int lat [3];
  int cyc;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (a=%0d b=%0d c=%0d d=%0d)", what, a, b, c, d);
    end
  endtask

  // Fault-free result of every scheme, checked against real arithmetic.
  task automatic check_value(input int s);
    real den, nre, nim, ulp_re, ulp_im, got_re, got_im;
    den = real'(c)*real'(c) + real'(d)*real'(d);
    nre = real'(a)*real'(c) + real'(b)*real'(d);
    nim = real'(b)*real'(c) - real'(a)*real'(d);
    if (den == 0.0) begin
      check(dz[s] && qre[s] == 0 && qim[s] == 0, $sformatf("scheme %0d zero divisor", s));
      return;
    end
    ulp_re = 2.0 ** (real'(ere[s]) - 2.0*(NDIG-1));
    ulp_im = 2.0 ** (real'(eim[s]) - 2.0*(NDIG-1));
    got_re = real'(qre[s]) * ulp_re;
    got_im = real'(qim[s]) * ulp_im;
    check(!dz[s], $sformatf("scheme %0d den_zero", s));
    check((got_re - nre/den) < ulp_re && (nre/den - got_re) < ulp_re,
          $sformatf("scheme %0d real: got %f want %f", s, got_re, nre/den));
    check((got_im - nim/den) < ulp_im && (nim/den - got_im) < ulp_im,
          $sformatf("scheme %0d imag: got %f want %f", s, got_im, nim/den));
  endtask

  // Runs one division on all three cores; returns when all are done.
  task automatic run_op(input logic signed [W-1:0] ia, ib, ic, id);
    int t0;
    bit [2:0] seen;
    @(negedge clk);
    a = ia; b = ib; c = ic; d = id;
    start = 1'b1;
    t0 = cyc;
    @(negedge clk);
    start = 1'b0;
    seen = '0;
    while (seen != 3'b111) begin
      @(posedge clk); #1;
      for (int s = 0; s < 3; s++)
        if (done[s] && !seen[s]) begin seen[s] = 1'b1; lat[s] = cyc - t0; end
    end
  endtask

  int detected_p, detected_r, changed_r;

  initial begin
    start = 1'b0; a = '0; b = '0; c = '0; d = '0;
    inj_n = NO_FAULT; inj_p = NO_FAULT; inj_r = NO_FAULT;
    cyc = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // --- fault-free: corners and random ---
    for (int i = 0; i < 400; i++) begin
      logic signed [W-1:0] ra, rb, rc, rd;
      case (i)
        0: begin ra = 1;    rb = 0;    rc = 1;    rd = 0;    end
        1: begin ra = -128; rb = -128; rc = -128; rd = -128; end
        2: begin ra = 127;  rb = -128; rc = 1;    rd = 0;    end
        3: begin ra = 5;    rb = 7;    rc = 0;    rd = 0;    end
        4: begin ra = 0;    rb = 0;    rc = 3;    rd = -4;   end
        5: begin ra = -128; rb = 127;  rc = 0;    rd = 1;    end
        6: begin ra = 100;  rb = -50;  rc = -128; rd = 127;  end
        default: begin
          ra = W'($urandom); rb = W'($urandom); rc = W'($urandom); rd = W'($urandom);
          if (i % 7 == 0) rc = W'($urandom_range(0, 3));
        end
      endcase
      run_op(ra, rb, rc, rd);
      for (int s = 0; s < 3; s++) begin
        check_value(s);
        check(errs[s] == 1'b0, $sformatf("scheme %0d false alarm", s));
      end
      check(lat[0] == 20 && lat[1] == 20 && lat[2] == 21,
            $sformatf("latency %0d %0d %0d", lat[0], lat[1], lat[2]));
      check(qre[0] == qre[1] && qre[0] == qre[2] && qim[0] == qim[1] && qim[0] == qim[2],
            "schemes disagree");
    end

    // --- injected single-cycle faults ---
    detected_p = 0; detected_r = 0; changed_r = 0;
    for (int k = 0; k < 180; k++) begin
      site_e site;
      int    when, dur;
      logic [MASK_W-1:0] mask;
      logic signed [QW-1:0] ref_re, ref_im;
      case (k % 9)
        0: site = SITE_U;   1: site = SITE_V;   2: site = SITE_D;
        3: site = SITE_ROM; 4: site = SITE_EST; 5: site = SITE_CSA;
        6: site = SITE_QPN; 7: site = SITE_QOUT; default: site = SITE_MUL;
      endcase
      mask = MASK_W'(1) << $urandom_range(0, (site == SITE_ROM) ? 3 : 14);
      // a fault on the converter output matters only while a result is read
      when = (site == SITE_MUL) ? 1 : (site == SITE_QOUT) ? $urandom_range(16, 19) : $urandom_range(3, 16);
      dur  = 1;
      a = W'($urandom); b = W'($urandom);
      c = W'($urandom_range(20, 120)); d = W'($urandom);
      // reference without fault
      run_op(a, b, c, d);
      ref_re = qre[0]; ref_im = qim[0];
      fork
        run_op(a, b, c, d);
        begin
          repeat (when) @(posedge clk);
          #1;
          inj_p = '{en: 1'b1, lane_im: k[0], site: site, mask: mask};
          inj_r = '{en: 1'b1, lane_im: k[0], site: site, mask: mask};
          repeat (dur) @(posedge clk);
          #1;
          inj_p = NO_FAULT; inj_r = NO_FAULT;
        end
      join
      check(errs[1] == 1'b1, $sformatf("scheme I missed fault at site %s cycle %0d", site.name(), when));
      if (errs[1]) detected_p++;
      if (qre[2] != ref_re || qim[2] != ref_im || errs[2]) begin
        changed_r++;
        if (errs[2]) detected_r++;
        // RESO repeats the division, not the multiplication before it
        if (site != SITE_MUL) check(errs[2] == 1'b1, $sformatf("RESO missed a fault at site %s that changed its result", site.name()));
      end
      check(errs[0] == 1'b0, "unchecked core raised an error");
    end
    $display("faults: scheme I detected %0d/180, RESO detected %0d of %0d that changed its result",
             detected_p, detected_r, changed_r);
    check(detected_p > 0 && detected_r > 0, "no fault detected at all");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cdiv_top: end-to-end test of the complete design at its default size
// (8-bit operands, 16-bit quotients, eight radix-4 iterations).
//
// Phase 1 divides corner and random complex operands with fault injection
// off: both dividers must return quotients within one unit of the last
// place of the exact complex quotient, with no error flag and the expected
// latency. Phase 2 turns the LFSR fault injector on, at one fault every 8,
// 4 and 2 cycles, aimed at every injection site of both lanes of both
// dividers, and counts which detectors fired; a faulty result that no flag
// reports is counted as an escape. Every mechanism the design has (zero
// divisor, negative quotient digits, the interleaved second RESO run, each
// injection rate, the Scheme I multiplier, lane and ROM detectors and the
// RESO comparison) must have occurred at least once. Phase 3 holds the
// injected pattern for whole divisions (permanent faults) and counts how
// many wrong results each scheme flags.
module tb_cdiv_top;
  import cdiv_pkg::*;
  localparam int unsigned W = 8, NDIG = 8, EW = 6, QW = 2*NDIG + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start;
  logic signed [W-1:0] a, b, c, d;
  logic inj_enable, inj_target, inj_lane_im, inj_load, inj_permanent;
  logic [1:0] inj_rate;
  site_e inj_site;
  logic [15:0] inj_seed;
  logic busy_p, done_p, dz_p, err_p, busy_r, done_r, dz_r, err_r;
  logic signed [QW-1:0] qre_p, qim_p, qre_r, qim_r;
  logic signed [EW-1:0] ere_p, eim_p, ere_r, eim_r;
  logic [3:0] fl_p, fl_r;

  cdiv_top dut (
    .clk, .rst_n, .start, .a, .b, .c, .d,
    .inj_enable, .inj_rate, .inj_target, .inj_lane_im, .inj_site, .inj_permanent, .inj_load, .inj_seed,
    .busy_p, .done_p, .q_re_p(qre_p), .q_im_p(qim_p), .exp_re_p(ere_p), .exp_im_p(eim_p),
    .den_zero_p(dz_p), .err_flags_p(fl_p), .err_p,
    .busy_r, .done_r, .q_re_r(qre_r), .q_im_r(qim_r), .exp_re_r(ere_r), .exp_im_r(eim_r),
    .den_zero_r(dz_r), .err_flags_r(fl_r), .err_r
  );

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int m_zero = 0, m_negdig = 0, m_reso2 = 0, m_mul = 0, m_lane = 0, m_rom = 0, m_reso = 0;
  int m_rate [3] = '{0, 0, 0};
  int escapes_p = 0, escapes_r = 0, faulty_p = 0, faulty_r = 0;
  int perm_faulty [2] = '{0, 0}, perm_caught [2] = '{0, 0};
  always @(posedge clk) begin
    if (dut.u_scheme1.u_lane_re.a_valid && dut.u_scheme1.u_lane_re.q_sel[2]) m_negdig++;
    if (dut.u_scheme2.u_lane_re.res_valid && dut.u_scheme2.u_lane_re.res_run) m_reso2++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s (a=%0d b=%0d c=%0d d=%0d)", what, a, b, c, d); end
  endtask

  function automatic bit close(input logic signed [QW-1:0] q, input logic signed [EW-1:0] e, input real want);
    real ulp, got;
    ulp = 2.0 ** (real'(e) - 2.0*(NDIG-1));
    got = real'(q) * ulp;
    return (got - want < ulp) && (want - got < ulp);
  endfunction

  task automatic divide(input logic signed [W-1:0] ia, ib, ic, id, output int lat_p, output int lat_r);
    int t0;
    @(negedge clk);
    a = ia; b = ib; c = ic; d = id; start = 1'b1; t0 = cyc;
    @(negedge clk);
    start = 1'b0;
    lat_p = -1; lat_r = -1;
    while (lat_p < 0 || lat_r < 0) begin
      @(posedge clk); #1;
      if (done_p) lat_p = cyc - t0;
      if (done_r) lat_r = cyc - t0;
      if (cyc - t0 > 100) break;
    end
  endtask

  initial begin
    int lp, lr;
    real den, wre, wim;
    start = 0; a = '0; b = '0; c = '0; d = '0;
    inj_enable = 0; inj_rate = 0; inj_target = 0; inj_lane_im = 0; inj_load = 0; inj_permanent = 0;
    inj_site = SITE_NONE; inj_seed = 16'h1D2B;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    inj_load = 1; @(negedge clk); inj_load = 0;

    // ---- phase 1: fault-free ----
    for (int i = 0; i < 300; i++) begin
      logic signed [W-1:0] ra, rb, rc, rd;
      ra = W'($urandom); rb = W'($urandom); rc = W'($urandom); rd = W'($urandom);
      if (i == 0) begin rc = 0; rd = 0; end
      if (i == 1) begin ra = -128; rb = -128; rc = -128; rd = 127; end
      if (i == 2) begin ra = 0; rb = 0; end
      divide(ra, rb, rc, rd, lp, lr);
      den = real'(rc)*real'(rc) + real'(rd)*real'(rd);
      check(lp == 20 && lr == 21, $sformatf("latency %0d %0d", lp, lr));
      check(!err_p && !err_r, "false alarm");
      if (den == 0.0) begin
        m_zero++;
        check(dz_p && dz_r && qre_p == 0 && qim_r == 0, "zero divisor");
      end else begin
        wre = (real'(ra)*real'(rc) + real'(rb)*real'(rd)) / den;
        wim = (real'(rb)*real'(rc) - real'(ra)*real'(rd)) / den;
        check(close(qre_p, ere_p, wre) && close(qim_p, eim_p, wim), "Scheme I quotient");
        check(close(qre_r, ere_r, wre) && close(qim_r, eim_r, wim), "Scheme II quotient");
      end
    end

    // ---- phase 2: LFSR fault injection ----
    for (int i = 0; i < 540; i++) begin
      logic signed [W-1:0] ra, rb, rc, rd;
      logic signed [QW-1:0] gre, gim;
      logic signed [EW-1:0] gere, geim;
      bit bad, flagged;
      site_e s;
      s = site_e'(1 + (i / 6) % 9);
      inj_rate    = 2'((i / 2) % 3);
      inj_target  = i[0];
      inj_lane_im = (i / 54) % 2 == 1;
      inj_site    = s;
      ra = W'($urandom); rb = W'($urandom); rc = W'($urandom_range(10, 127)); rd = W'($urandom);
      inj_enable = 1'b1;
      divide(ra, rb, rc, rd, lp, lr);
      inj_enable = 1'b0;
      m_rate[inj_rate]++;
      den = real'(rc)*real'(rc) + real'(rd)*real'(rd);
      wre = (real'(ra)*real'(rc) + real'(rb)*real'(rd)) / den;
      wim = (real'(rb)*real'(rc) - real'(ra)*real'(rd)) / den;
      check(lp == 20 && lr == 21, "latency under faults");
      if (!inj_target) begin
        bad = !close(qre_p, ere_p, wre) || !close(qim_p, eim_p, wim);
        flagged = err_p;
        if (fl_p[0]) m_mul++;
        if (fl_p[1] || fl_p[2]) m_lane++;
        if (fl_p[3]) m_rom++;
        if (bad) begin faulty_p++; if (!flagged) escapes_p++; end
        check(!err_r, "fault leaked into the other divider");
      end else begin
        bad = !close(qre_r, ere_r, wre) || !close(qim_r, eim_r, wim);
        flagged = err_r;
        if (fl_r[1] || fl_r[2]) m_reso++;
        if (bad) begin faulty_r++; if (!flagged) escapes_r++; end
        check(!err_p, "fault leaked into the other divider");
      end
    end

    // ---- phase 3: permanent faults (pattern held for a whole division) ----
    inj_permanent = 1'b1;
    for (int i = 0; i < 140; i++) begin
      logic signed [W-1:0] ra, rb, rc, rd;
      bit bad;
      site_e s;
      s = site_e'(1 + (i / 2) % 7);        // U, V, D, ROM, EST, CSA, QPN
      inj_target  = i[0];
      inj_lane_im = (i / 14) % 2 == 1;
      inj_site    = s;
      ra = W'($urandom); rb = W'($urandom); rc = W'($urandom_range(10, 127)); rd = W'($urandom);
      inj_enable = 1'b1;
      divide(ra, rb, rc, rd, lp, lr);
      inj_enable = 1'b0;
      den = real'(rc)*real'(rc) + real'(rd)*real'(rd);
      wre = (real'(ra)*real'(rc) + real'(rb)*real'(rd)) / den;
      wim = (real'(rb)*real'(rc) - real'(ra)*real'(rd)) / den;
      check(lp == 20 && lr == 21, "latency under permanent faults");
      if (!inj_target) begin
        bad = !close(qre_p, ere_p, wre) || !close(qim_p, eim_p, wim);
        if (bad) begin perm_faulty[0]++; if (err_p) perm_caught[0]++; end
        check(!err_r, "permanent fault leaked into the other divider");
      end else begin
        bad = !close(qre_r, ere_r, wre) || !close(qim_r, eim_r, wim);
        if (bad) begin perm_faulty[1]++; if (err_r) perm_caught[1]++; end
        check(!err_p, "permanent fault leaked into the other divider");
      end
    end
    inj_permanent = 1'b0;
    $display("permanent faults: Scheme I %0d of %0d faulty results flagged, Scheme II %0d of %0d",
             perm_caught[0], perm_faulty[0], perm_caught[1], perm_faulty[1]);
    check(perm_caught[0] > 0 && perm_caught[1] > 0, "no permanent fault detected");

    $display("Scheme I : %0d faulty results, %0d escaped; flags mul %0d lane %0d rom %0d",
             faulty_p, escapes_p, m_mul, m_lane, m_rom);
    $display("Scheme II: %0d faulty results, %0d escaped; RESO mismatches %0d", faulty_r, escapes_r, m_reso);
    $display("mechanisms: zero divisor %0d, negative digits %0d, second RESO runs %0d, rates %0d/%0d/%0d",
             m_zero, m_negdig, m_reso2, m_rate[0], m_rate[1], m_rate[2]);
    check(m_zero > 0, "zero divisor never seen");
    check(m_negdig > 0, "negative digit never selected");
    check(m_reso2 > 0, "second RESO run never completed");
    check(m_rate[0] > 0 && m_rate[1] > 0 && m_rate[2] > 0, "an injection rate was never used");
    check(m_mul > 0, "multiplier checker never fired");
    check(m_lane > 0, "lane checks never fired");
    check(m_rom > 0, "ROM parity never fired");
    check(m_reso > 0, "RESO comparison never fired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fault_campaign: fault-coverage campaign over both error-detection
// schemes, at the default size (8-bit operands, eight radix-4 iterations).
//
// Three divider cores receive the same operands: an unchecked one that gives
// the fault-free reference, a Scheme I core (parity and duplication) and a
// Scheme II core (RESO). The same fault is injected into both checked
// cores through their fault ports. A result counts as faulty when its
// quotient differs from the reference. Faults that leave the result unchanged
// are aliasing cases; they are counted apart, and the coverage figures
// exclude them. The campaign has four parts:
//   A  single-bit faults, exhaustively over every bit of every injection
//      site (U, V, D, ROM word, estimate adder, CSA sum, Q_pos, converter
//      output) in both lanes and the multiplier, one cycle each, at a random
//      cycle of the division. Scheme I must flag every one. RESO must flag
//      every one that changed its result, except in the multiplier, which
//      RESO does not recompute.
//   B  multi-bit faults from a 16-bit LFSR, one every 8, 4 or 2 cycles of
//      each division, each at a random site, over 1000 random operand sets
//      per rate. Coverage is reported; RESO must reach 98% on divisions with
//      no multiplier fault (when several faults hit both runs, the two wrong
//      quotients can coincide) and Scheme I 80% (a single parity bit misses
//      an even number of flipped bits in one register).
//   C  permanent faults: one bit of U, V or D inverted for the whole
//      division. Scheme I must flag every changed result; RESO must reach
//      85%. An inverted bit adds +-2^k units to the remainder in every
//      iteration, with a sign set by the bit's value, in the first run and
//      +-2^(k-1) in the shifted one. Both runs are wrong, and now and then the
//      sums round to the same wrong quotient, most often for the lowest bits.
//   D  double faults in the parity-protected registers (two distinct bits,
//      one cycle). Reported for Scheme I; RESO must flag changed results.
// Every division is also checked for its latency and for the fault-free
// agreement of the reference with exact arithmetic (within one unit of the
// last place).
module tb_fault_campaign;
  import cdiv_pkg::*;

  localparam int unsigned W = 8, NDIG = 8, QW = 2*NDIG + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start;
  logic signed [W-1:0] a, b, c, d;
  fault_t inj;

  logic [2:0] busy, done, dz, errs;
  logic signed [QW-1:0] qre [3], qim [3];
  logic signed [5:0]    ere [3], eim [3];
  logic [3:0] flags [3];

  cdiv_core #(.SCHEME(SCHEME_NONE)) u_ref (.clk, .rst_n, .start, .a, .b, .c, .d, .inj(NO_FAULT),
    .busy(busy[0]), .done(done[0]), .q_re(qre[0]), .q_im(qim[0]), .exp_re(ere[0]), .exp_im(eim[0]),
    .den_zero(dz[0]), .err_mul(flags[0][0]), .err_re(flags[0][1]), .err_im(flags[0][2]),
    .err_rom(flags[0][3]), .err(errs[0]));
  cdiv_core #(.SCHEME(SCHEME_PARITY)) u_p (.clk, .rst_n, .start, .a, .b, .c, .d, .inj,
    .busy(busy[1]), .done(done[1]), .q_re(qre[1]), .q_im(qim[1]), .exp_re(ere[1]), .exp_im(eim[1]),
    .den_zero(dz[1]), .err_mul(flags[1][0]), .err_re(flags[1][1]), .err_im(flags[1][2]),
    .err_rom(flags[1][3]), .err(errs[1]));
  cdiv_core #(.SCHEME(SCHEME_RESO)) u_r (.clk, .rst_n, .start, .a, .b, .c, .d, .inj,
    .busy(busy[2]), .done(done[2]), .q_re(qre[2]), .q_im(qim[2]), .exp_re(ere[2]), .exp_im(eim[2]),
    .den_zero(dz[2]), .err_mul(flags[2][0]), .err_re(flags[2][1]), .err_im(flags[2][2]),
    .err_rom(flags[2][3]), .err(errs[2]));

  int checks = 0, failures = 0;
  int cyc;
  always @(posedge clk) if (!rst_n) cyc <= 0; else cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (a=%0d b=%0d c=%0d d=%0d)", what, a, b, c, d);
    end
  endtask

  // Width of each injection site in the Scheme I core.
  function automatic int site_bits(input site_e s);
    case (s)
      SITE_U, SITE_V, SITE_EST, SITE_CSA: return 19;
      SITE_D, SITE_QPN:                   return 16;
      SITE_ROM:                           return 4;
      SITE_QOUT, SITE_MUL:                return 17;
      default:                            return 0;
    endcase
  endfunction

  // Fault schedule of one division: per cycle offset from start, the fault
  // to apply (offsets 0..23).
  fault_t sched [24];
  bit     mul_hit;

  task automatic clear_sched();
    for (int i = 0; i < 24; i++) sched[i] = NO_FAULT;
    mul_hit = 1'b0;
  endtask

  // Runs one division on all three cores while applying the schedule.
  task automatic run_op(output int lat_p, output int lat_r);
    int t0, k;
    bit [2:0] seen;
    @(negedge clk);
    start = 1'b1;
    t0 = cyc;
    seen = '0;
    lat_p = 0; lat_r = 0;
    k = 0;
    while (seen != 3'b111) begin
      inj = (k < 24) ? sched[k] : NO_FAULT;
      @(posedge clk); #1;
      start = 1'b0;
      k++;
      for (int s = 0; s < 3; s++)
        if (done[s] && !seen[s]) begin
          seen[s] = 1'b1;
          if (s == 1) lat_p = cyc - t0;
          if (s == 2) lat_r = cyc - t0;
        end
      @(negedge clk);
    end
    inj = NO_FAULT;
  endtask

  function automatic bit ref_exact();
    real den, nre, nim, u_re, u_im, g_re, g_im;
    den = real'(c)*real'(c) + real'(d)*real'(d);
    if (den == 0.0) return dz[0] && qre[0] == 0 && qim[0] == 0;
    nre = real'(a)*real'(c) + real'(b)*real'(d);
    nim = real'(b)*real'(c) - real'(a)*real'(d);
    u_re = 2.0 ** (real'(ere[0]) - 2.0*(NDIG-1));
    u_im = 2.0 ** (real'(eim[0]) - 2.0*(NDIG-1));
    g_re = real'(qre[0]) * u_re;
    g_im = real'(qim[0]) * u_im;
    return (g_re - nre/den) < u_re && (nre/den - g_re) < u_re &&
           (g_im - nim/den) < u_im && (nim/den - g_im) < u_im;
  endfunction

  // Tallies of one part: [scheme] faulty results, detected among them,
  // flagged results that were not changed.
  int faulty [2], caught [2], flagged_clean [2], aliased [2];

  task automatic tally_reset();
    for (int s = 0; s < 2; s++) begin
      faulty[s] = 0; caught[s] = 0; flagged_clean[s] = 0; aliased[s] = 0;
    end
  endtask

  // Evaluates one faulty division; must_p / must_r demand detection of a
  // changed result by Scheme I / RESO.
  task automatic evaluate(input bit must_p, input bit must_r, input string what);
    int lat_p, lat_r;
    bit changed;
    run_op(lat_p, lat_r);
    check(lat_p == 20 && lat_r == 21, $sformatf("%s: latency %0d %0d", what, lat_p, lat_r));
    check(ref_exact(), $sformatf("%s: reference quotient inexact", what));
    check(errs[0] == 1'b0, $sformatf("%s: unchecked core flagged", what));
    for (int s = 0; s < 2; s++) begin
      changed = (qre[s+1] != qre[0]) || (qim[s+1] != qim[0]);
      if (changed) begin
        faulty[s]++;
        if (errs[s+1]) caught[s]++;
        else if ((s == 0) ? must_p : must_r)
          check(1'b0, $sformatf("%s: scheme %s missed a changed result", what, (s == 0) ? "I" : "II"));
      end else if (errs[s+1]) flagged_clean[s]++;
      else aliased[s]++;
    end
  endtask

  task automatic report(input string part);
    $display("%s: Scheme I  faulty %0d detected %0d (%0.1f%%), flagged unchanged %0d, aliased %0d",
             part, faulty[0], caught[0], (faulty[0] != 0) ? 100.0*caught[0]/faulty[0] : 100.0,
             flagged_clean[0], aliased[0]);
    $display("%s: Scheme II faulty %0d detected %0d (%0.1f%%), flagged unchanged %0d, aliased %0d",
             part, faulty[1], caught[1], (faulty[1] != 0) ? 100.0*caught[1]/faulty[1] : 100.0,
             flagged_clean[1], aliased[1]);
  endtask

  task automatic random_operands();
    a = W'($urandom); b = W'($urandom);
    c = W'($urandom); d = W'($urandom);
    if (c == 0 && d == 0) c = 1;
  endtask

  logic [15:0] lfsr;
  function automatic logic [15:0] lfsr_next(input logic [15:0] s);
    return {s[14:0], s[15] ^ s[13] ^ s[12] ^ s[10]};
  endfunction

  int single_total, single_p, nm_faulty, nm_caught;
  localparam site_e SITES [9] = '{SITE_U, SITE_V, SITE_D, SITE_ROM, SITE_EST,
                                  SITE_CSA, SITE_QPN, SITE_QOUT, SITE_MUL};

  initial begin
    start = 1'b0; a = '0; b = '0; c = '0; d = '0;
    inj = NO_FAULT;
    clear_sched();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---- A: exhaustive single-bit faults --------------------------------
    tally_reset();
    single_total = 0; single_p = 0;
    foreach (SITES[i]) begin
      for (int lane = 0; lane < ((SITES[i] == SITE_MUL) ? 1 : 2); lane++) begin
        for (int bitpos = 0; bitpos < site_bits(SITES[i]); bitpos++) begin
          int when;
          random_operands();
          clear_sched();
          when = (SITES[i] == SITE_MUL) ? 1 : $urandom_range(3, 19);
          sched[when] = '{en: 1'b1, lane_im: lane[0], site: SITES[i],
                          mask: MASK_W'(1) << bitpos};
          evaluate(1'b1, SITES[i] != SITE_MUL, $sformatf("A %s bit %0d", SITES[i].name(), bitpos));
          single_total++;
          if (errs[1]) single_p++;
          check(errs[1] == 1'b1, $sformatf("A: Scheme I missed single fault %s lane %0d bit %0d",
                                           SITES[i].name(), lane, bitpos));
        end
      end
    end
    $display("A single-bit faults: %0d injected, Scheme I flagged %0d", single_total, single_p);
    report("A");

    // ---- B: LFSR multi-bit faults at 1 per 8, 4, 2 cycles ----------------
    lfsr = 16'hACE1;
    for (int rate = 0; rate < 3; rate++) begin
      int period;
      period = 8 >> rate;
      tally_reset();
      nm_faulty = 0; nm_caught = 0;
      for (int op = 0; op < 1000; op++) begin
        int phase;
        random_operands();
        clear_sched();
        phase = $urandom_range(0, period - 1);
        for (int k = phase; k < 22; k += period) begin
          site_e s;
          s = SITES[$urandom_range(0, 8)];
          lfsr = lfsr_next(lfsr);
          sched[k] = '{en: 1'b1, lane_im: 1'($urandom), site: s, mask: MASK_W'(lfsr)};
          if (s == SITE_MUL && k == 1) mul_hit = 1'b1;
        end
        evaluate(1'b0, 1'b0, $sformatf("B rate 1/%0d", period));
        if (!mul_hit && (qre[2] != qre[0] || qim[2] != qim[0])) begin
          nm_faulty++;
          if (errs[2]) nm_caught++;
        end
      end
      report($sformatf("B one fault per %0d cycles", period));
      $display("B one fault per %0d cycles: Scheme II without multiplier faults: faulty %0d detected %0d",
               period, nm_faulty, nm_caught);
      check(100*caught[0] >= 80*faulty[0], "B: Scheme I coverage below 80%");
      check(100*nm_caught >= 98*nm_faulty, "B: Scheme II coverage below 98% without multiplier faults");
    end

    // ---- C: permanent single-bit faults in U, V, D -----------------------
    tally_reset();
    for (int i = 0; i < 300; i++) begin
      site_e s;
      int bitpos;
      random_operands();
      clear_sched();
      s = (i % 3 == 0) ? SITE_U : (i % 3 == 1) ? SITE_V : SITE_D;
      bitpos = $urandom_range(0, site_bits(s) - 1);
      for (int k = 3; k < 24; k++)
        sched[k] = '{en: 1'b1, lane_im: i[0], site: s, mask: MASK_W'(1) << bitpos};
      evaluate(1'b1, 1'b0, $sformatf("C %s bit %0d", s.name(), bitpos));
    end
    report("C permanent");
    check(100*caught[1] >= 85*faulty[1], "C: Scheme II coverage of permanent faults below 85%");
    check(faulty[0] > 0 && faulty[1] > 0, "C: no permanent fault changed a result");

    // ---- D: double faults in parity-protected registers ------------------
    tally_reset();
    for (int i = 0; i < 400; i++) begin
      site_e s;
      int b1, b2;
      random_operands();
      clear_sched();
      case (i % 4)
        0: s = SITE_U; 1: s = SITE_V; 2: s = SITE_D; default: s = SITE_QPN;
      endcase
      b1 = $urandom_range(0, site_bits(s) - 1);
      b2 = (b1 + $urandom_range(1, site_bits(s) - 1)) % site_bits(s);
      sched[$urandom_range(3, 17)] = '{en: 1'b1, lane_im: i[1], site: s,
                                       mask: (MASK_W'(1) << b1) | (MASK_W'(1) << b2)};
      evaluate(1'b0, 1'b1, $sformatf("D %s bits %0d,%0d", s.name(), b1, b2));
    end
    report("D double");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

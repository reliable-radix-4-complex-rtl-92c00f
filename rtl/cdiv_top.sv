// cdiv_top: the two fault-detecting complex dividers side by side, with the
// LFSR fault injector used to evaluate them.
//
// Both dividers take the same operands and the same start pulse:
//   Scheme I  (suffix _p): unified parity and hardware redundancy.
//   Scheme II (suffix _r): recomputation with shifted operands (RESO),
//                          sub-pipelined so that both runs share the lanes.
// Each brings out its own quotient, exponents, done pulse and error flags;
// quotient part = q * 2^(exp - 2*(NDIG-1)) as described in cdiv_core.
//
// Fault injection: three LFSR generators (fault_lfsr) run while inj_enable
// is high: a 16-bit one for the registers and the multiplier output (U, V,
// D, Q_pos, converter output, numerator product), a 5-bit one for the adders
// (estimate adder and CSA, applied to their five leading bits) and a 3-bit
// one for the ROM (the three digit bits of the word). They fire together
// once every 8, 4 or 2 cycles (inj_rate = 0, 1, 2); in a firing cycle the
// generator that belongs to inj_site XORs its state onto that signal of lane
// inj_lane_im in the divider chosen by inj_target (0: Scheme I, 1: Scheme
// II). inj_load loads inj_seed into the 16-bit generator and seeds folded
// from it into the other two, so each starts from its own value. With
// inj_permanent high the fault is permanent instead: the pattern present
// when `start` is taken is held and applied in every cycle of that division
// (a constant pattern per division). Keep inj_enable low in normal
// operation.
//
// err_flags_r[0] (multiplier check) is always 0: Scheme II recomputes the
// division only and has no checker on the conjugate multiplier.
module cdiv_top
  import cdiv_pkg::*;
#(
  parameter int unsigned W    = 8,
  parameter int unsigned FRAC = 2*W - 1,
  parameter int unsigned NDIG = 8,
  parameter int unsigned EW   = 6
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic signed [W-1:0]    a,
  input  logic signed [W-1:0]    b,
  input  logic signed [W-1:0]    c,
  input  logic signed [W-1:0]    d,
  // fault injection
  input  logic                   inj_enable,
  input  logic [1:0]             inj_rate,
  input  logic                   inj_target,
  input  logic                   inj_lane_im,
  input  site_e                  inj_site,
  input  logic                   inj_permanent,
  input  logic                   inj_load,
  input  logic [15:0]            inj_seed,
  // Scheme I divider
  output logic                   busy_p,
  output logic                   done_p,
  output logic signed [2*NDIG:0] q_re_p,
  output logic signed [2*NDIG:0] q_im_p,
  output logic signed [EW-1:0]   exp_re_p,
  output logic signed [EW-1:0]   exp_im_p,
  output logic                   den_zero_p,
  output logic [3:0]             err_flags_p,   // {rom, im, re, mul}
  output logic                   err_p,
  // Scheme II divider
  output logic                   busy_r,
  output logic                   done_r,
  output logic signed [2*NDIG:0] q_re_r,
  output logic signed [2*NDIG:0] q_im_r,
  output logic signed [EW-1:0]   exp_re_r,
  output logic signed [EW-1:0]   exp_im_r,
  output logic                   den_zero_r,
  output logic [3:0]             err_flags_r,   // {rom, im, re, mul}
  output logic                   err_r
);
  logic              fire16, fire5, fire3, fire;
  logic [15:0]       pat16;
  logic [4:0]        pat5;
  logic [2:0]        pat3;
  logic [MASK_W-1:0] mask;
  fault_t            f_p, f_r;

  fault_lfsr #(.WIDTH(16)) u_lfsr_reg (
    .clk, .rst_n, .en(inj_enable), .rate(inj_rate),
    .load(inj_load), .seed(inj_seed), .fire(fire16), .pattern(pat16)
  );
  fault_lfsr #(.WIDTH(5)) u_lfsr_add (
    .clk, .rst_n, .en(inj_enable), .rate(inj_rate),
    .load(inj_load), .seed(inj_seed[4:0] ^ inj_seed[15:11]), .fire(fire5), .pattern(pat5)
  );
  fault_lfsr #(.WIDTH(3)) u_lfsr_rom (
    .clk, .rst_n, .en(inj_enable), .rate(inj_rate),
    .load(inj_load), .seed(inj_seed[2:0] ^ inj_seed[10:8]), .fire(fire3), .pattern(pat3)
  );

  always_comb begin
    unique case (inj_site)
      SITE_EST, SITE_CSA: begin fire = fire5;  mask = MASK_W'(pat5) << (FRAC - 1); end
      SITE_ROM:           begin fire = fire3;  mask = MASK_W'(pat3);               end
      default:            begin fire = fire16; mask = MASK_W'(pat16);              end
    endcase
  end

  // pattern frozen at the start of a division for permanent faults
  logic [MASK_W-1:0] mask_held, mask_eff;
  logic              fire_eff;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     mask_held <= '0;
    else if (start) mask_held <= mask;
  end

  always_comb begin
    fire_eff = inj_permanent ? inj_enable : fire;
    mask_eff = inj_permanent ? mask_held  : mask;
    f_p = NO_FAULT;
    f_r = NO_FAULT;
    if (fire_eff && inj_site != SITE_NONE) begin
      if (!inj_target) f_p = '{en: 1'b1, lane_im: inj_lane_im, site: inj_site, mask: mask_eff};
      else             f_r = '{en: 1'b1, lane_im: inj_lane_im, site: inj_site, mask: mask_eff};
    end
  end

  cdiv_core #(.W(W), .FRAC(FRAC), .NDIG(NDIG), .EW(EW), .SCHEME(SCHEME_PARITY)) u_scheme1 (
    .clk, .rst_n, .start, .a, .b, .c, .d, .inj(f_p),
    .busy(busy_p), .done(done_p), .q_re(q_re_p), .q_im(q_im_p),
    .exp_re(exp_re_p), .exp_im(exp_im_p), .den_zero(den_zero_p),
    .err_mul(err_flags_p[0]), .err_re(err_flags_p[1]), .err_im(err_flags_p[2]),
    .err_rom(err_flags_p[3]), .err(err_p)
  );

  cdiv_core #(.W(W), .FRAC(FRAC), .NDIG(NDIG), .EW(EW), .SCHEME(SCHEME_RESO)) u_scheme2 (
    .clk, .rst_n, .start, .a, .b, .c, .d, .inj(f_r),
    .busy(busy_r), .done(done_r), .q_re(q_re_r), .q_im(q_im_r),
    .exp_re(exp_re_r), .exp_im(exp_im_r), .den_zero(den_zero_r),
    .err_mul(err_flags_r[0]), .err_re(err_flags_r[1]), .err_im(err_flags_r[2]),
    .err_rom(err_flags_r[3]), .err(err_r)
  );
endmodule

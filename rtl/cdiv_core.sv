// cdiv_core: radix-4 SRT complex divider with concurrent error detection.
//
// Computes (a + jb) / (c + jd) for W-bit two's complement operands. The
// operands are first multiplied by the conjugate of the divisor (Golub
// multipliers), giving a real denominator c^2 + d^2 and the numerator parts
// n_re = ac + bd and n_im = bc - ad. The normalizer shifts all three into
// [1, 2); then two SRT lanes, real and imaginary, divide in parallel while
// sharing one dual-port quotient-selection ROM. Each result is a mantissa
// q (two's complement, 2*NDIG-2 fractional bits) and an exponent:
//   quotient part = q * 2^(exp - 2*(NDIG-1)).
// The quotient is within one unit of its last place of the exact value.
//
// SCHEME selects the error detection:
//   SCHEME_NONE   the original divider.
//   SCHEME_PARITY Scheme I: Golub checker, parity on the data-path registers
//                 and on the ROM words, duplicated estimate and converter
//                 adders, checked carry-save adders.
//   SCHEME_RESO   Scheme II: the lanes are widened by one bit and run the
//                 division twice, the second time with dividend and divisor
//                 shifted left by one bit; the two runs are interleaved in
//                 the lanes' two pipeline halves and their quotients are
//                 compared.
//
// Timing: `start` is taken when busy is low. One cycle registers the
// operands, one the products, one loads the lanes (a second one loads the
// shifted run for RESO), 2*NDIG cycles divide, and `done` pulses in the
// cycle after the last quotient, together with valid outputs: 19 cycles
// from start to done for NDIG = 8 (20 with RESO). The error flags are sticky
// over one operation and valid with done; they are cleared by the next
// start. A zero divisor sets den_zero and gives zero quotients.
//
// `inj` is a fault-injection port (see cdiv_pkg::fault_t): the selected
// signal is XORed with the mask in the cycles where inj.en is set. Tie it
// to cdiv_pkg::NO_FAULT in normal use.
module cdiv_core
  import cdiv_pkg::*;
#(
  parameter int unsigned W      = 8,
  parameter int unsigned FRAC   = 2*W - 1,
  parameter int unsigned NDIG   = 8,
  parameter int unsigned EW     = 6,
  parameter scheme_e     SCHEME = SCHEME_PARITY
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic signed [W-1:0]    a,
  input  logic signed [W-1:0]    b,
  input  logic signed [W-1:0]    c,
  input  logic signed [W-1:0]    d,
  input  fault_t                 inj,
  output logic                   busy,
  output logic                   done,
  output logic signed [2*NDIG:0] q_re,
  output logic signed [2*NDIG:0] q_im,
  output logic signed [EW-1:0]   exp_re,
  output logic signed [EW-1:0]   exp_im,
  output logic                   den_zero,
  output logic                   err_mul,
  output logic                   err_re,
  output logic                   err_im,
  output logic                   err_rom,
  output logic                   err
);
  localparam bit CHECK = (SCHEME == SCHEME_PARITY);
  localparam bit RESO  = (SCHEME == SCHEME_RESO);
  localparam int unsigned QW = 2*NDIG + 1;

  typedef enum logic [2:0] {S_IDLE, S_MUL, S_LOAD, S_LOAD2, S_RUN} state_e;
  state_e state;

  // ---- operand and product registers ---------------------------------------
  logic signed [W-1:0]   a_r, b_r, c_r, d_r;
  logic signed [2*W:0]   n_re, n_im, n_re_r, n_im_r;
  logic        [2*W-1:0] den, den_r;
  logic                  mul_err;

  cdiv_multiplier #(.W(W), .CHECK(CHECK)) u_mul (
    .a(a_r), .b(b_r), .c(c_r), .d(d_r),
    .flip_re((inj.en && inj.site == SITE_MUL) ? (2*W+1)'(inj.mask) : '0),
    .n_re, .n_im, .den, .err(mul_err)
  );

  logic signed [FRAC+1:0] mant_re, mant_im;
  logic        [FRAC:0]   mant_d;
  logic signed [EW-1:0]   e_re, e_im;
  logic                   dz;

  cdiv_normalizer #(.W(W), .FRAC(FRAC), .EW(EW)) u_norm (
    .n_re(n_re_r), .n_im(n_im_r), .den(den_r),
    .mant_re, .mant_im, .mant_d, .exp_re(e_re), .exp_im(e_im), .den_zero(dz)
  );

  // ---- lanes and shared ROM ---------------------------------------------------
  logic                 load, load_run;
  logic [7:0]           addr_re, addr_im;
  logic [3:0]           data_re, data_im;
  logic                 rv_re, rv_im, rr_re, rr_im, busy_re, busy_im;
  logic signed [QW-1:0] rq_re, rq_im;
  logic                 le_re, le_im, lr_re, lr_im;

  srt_lane #(.NDIG(NDIG), .FRAC(FRAC), .RESO(RESO), .CHECK(CHECK), .IM(1'b0)) u_lane_re (
    .clk, .rst_n, .load, .load_run, .load_n(mant_re), .load_d(mant_d),
    .rom_addr(addr_re), .rom_data(data_re), .inj,
    .res_valid(rv_re), .res_run(rr_re), .res_q(rq_re), .busy(busy_re),
    .err(le_re), .err_rom(lr_re)
  );

  srt_lane #(.NDIG(NDIG), .FRAC(FRAC), .RESO(RESO), .CHECK(CHECK), .IM(1'b1)) u_lane_im (
    .clk, .rst_n, .load, .load_run, .load_n(mant_im), .load_d(mant_d),
    .rom_addr(addr_im), .rom_data(data_im), .inj,
    .res_valid(rv_im), .res_run(rr_im), .res_q(rq_im), .busy(busy_im),
    .err(le_im), .err_rom(lr_im)
  );

  qsel_rom u_rom (.addr_re, .addr_im, .data_re, .data_im);

  // ---- result registers -------------------------------------------------------
  logic                 clr;
  logic [QW-1:0]        qr_re, qr_im;
  logic                 got_re, got_im, cmp_err_re, cmp_err_im, qerr_re, qerr_im;

  assign clr = (state == S_IDLE) && start;

  if (RESO) begin : g_reso
    logic both_re, both_im;
    logic [QW-1:0] qx_re, qx_im;
    reso_compare #(.QW(QW)) u_cmp_re (
      .clk, .rst_n, .clr, .res_valid(rv_re), .res_run(rr_re), .res_q(rq_re),
      .flip_q('0), .q(qr_re), .q_reso(qx_re), .both(both_re), .err(cmp_err_re)
    );
    reso_compare #(.QW(QW)) u_cmp_im (
      .clk, .rst_n, .clr, .res_valid(rv_im), .res_run(rr_im), .res_q(rq_im),
      .flip_q('0), .q(qr_im), .q_reso(qx_im), .both(both_im), .err(cmp_err_im)
    );
    assign got_re = both_re;
    assign got_im = both_im;
    assign qerr_re = 1'b0;
    assign qerr_im = 1'b0;
  end else begin : g_single
    logic have_re, have_im;
    parity_reg #(.W(QW), .PARITY(CHECK)) u_q_re (.clk, .rst_n,
      .we(rv_re), .d(rq_re), .flip('0), .q(qr_re), .err(qerr_re));
    parity_reg #(.W(QW), .PARITY(CHECK)) u_q_im (.clk, .rst_n,
      .we(rv_im), .d(rq_im), .flip('0), .q(qr_im), .err(qerr_im));
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        have_re <= 1'b0; have_im <= 1'b0;
      end else if (clr) begin
        have_re <= 1'b0; have_im <= 1'b0;
      end else begin
        if (rv_re) have_re <= 1'b1;
        if (rv_im) have_im <= 1'b1;
      end
    end
    assign got_re = have_re;
    assign got_im = have_im;
    assign cmp_err_re = 1'b0;
    assign cmp_err_im = 1'b0;
  end

  // ---- control ------------------------------------------------------------------
  logic fin;
  assign fin = (state == S_RUN) && got_re && got_im && !busy_re && !busy_im;

  always_comb begin
    load     = 1'b0;
    load_run = 1'b0;
    if (state == S_LOAD)  load = 1'b1;
    if (state == S_LOAD2) begin load = 1'b1; load_run = 1'b1; end
  end

  logic sticky_mul, sticky_re, sticky_im, sticky_rom;
  logic dz_r;
  logic signed [EW-1:0] e_re_r, e_im_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      a_r <= '0; b_r <= '0; c_r <= '0; d_r <= '0;
      n_re_r <= '0; n_im_r <= '0; den_r <= '0;
      e_re_r <= '0; e_im_r <= '0; dz_r <= 1'b0;
      sticky_mul <= 1'b0; sticky_re <= 1'b0; sticky_im <= 1'b0; sticky_rom <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          a_r <= a; b_r <= b; c_r <= c; d_r <= d;
          sticky_mul <= 1'b0; sticky_re <= 1'b0; sticky_im <= 1'b0; sticky_rom <= 1'b0;
          state <= S_MUL;
        end
        S_MUL: begin
          n_re_r <= n_re; n_im_r <= n_im; den_r <= den;
          sticky_mul <= mul_err;
          state <= S_LOAD;
        end
        S_LOAD: begin
          e_re_r <= e_re; e_im_r <= e_im; dz_r <= dz;
          state <= RESO ? S_LOAD2 : S_RUN;
        end
        S_LOAD2: state <= S_RUN;
        S_RUN: if (fin) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
      if (state != S_IDLE) begin
        sticky_re  <= sticky_re  | le_re | qerr_re;
        sticky_im  <= sticky_im  | le_im | qerr_im;
        sticky_rom <= sticky_rom | lr_re | lr_im;
      end
    end
  end

  assign busy     = (state != S_IDLE);
  assign q_re     = dz_r ? '0 : qr_re;
  assign q_im     = dz_r ? '0 : qr_im;
  assign exp_re   = dz_r ? '0 : e_re_r;
  assign exp_im   = dz_r ? '0 : e_im_r;
  assign den_zero = dz_r;
  assign err_mul  = sticky_mul;
  assign err_re   = sticky_re | cmp_err_re;
  assign err_im   = sticky_im | cmp_err_im;
  assign err_rom  = sticky_rom;
  assign err      = err_mul | err_re | err_im | err_rom;
endmodule

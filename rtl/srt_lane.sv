// srt_lane: one radix-4 SRT division lane (the real or the imaginary
// iteration module of the complex divider).
//
// Divides a normalised dividend N (two's complement, |N| in [1,2) or 0) by a
// normalised divisor D in [1,2), producing NDIG radix-4 digits q_j in
// {-2..2} with the recurrence R[j+1] = 4 * (R[j] - q[j] * D), R[0] = N. The
// partial remainder is kept in carry-save form in U (sum) and V (carry).
// Every iteration has two halves, each one clock cycle:
//   P1 (select):  the estimate adder forms U + V, which is rounded to
//                 quarters, folded on its sign and, with the four leading
//                 divisor bits, addresses the shared quotient ROM
//                 (qsel_fold, ROM outside the lane); the digit is shifted
//                 into the on-the-fly converter (otf_conv).
//   P2 (update):  a multiplexer forms 0, +-D or +-2D, a carry-save adder
//                 adds it to U and V, and both are shifted left by two.
// A pipeline register (slot B) separates the halves, in front of P1 sits
// slot A. One division thus takes 2*NDIG cycles. Because the two halves use
// disjoint registers, a second, independent run can occupy the other slot:
// the RESO scheme loads its shifted run one cycle after the original one and
// both finish within 2*NDIG+1 cycles (sub-pipelining).
//
// RESO = 1 widens U, V and D by one bit. A run with load_run = 1 is stored
// shifted left by one bit (dividend and divisor doubled), and the estimate
// and the divisor bits for the ROM are taken one position higher, so the
// digits, and hence the quotient, are those of the original run unless a
// fault hits the lane. Realigning the window this way keeps the ROM at 256
// words (a window at a fixed position would need a larger table for the
// doubled values); the price is that both runs read the same ROM words, so
// a permanent fault in a word corrupts both alike.
//
// CHECK = 1 adds the Scheme I detectors: parity on U, V, D and the digit
// register, parity on the ROM word, a duplicated estimate adder, the
// per-full-adder CSA checks and the converter's duplicated adder. err is the
// OR of all but the ROM check, which is reported on err_rom.
//
// Interface: pulse `load` with the operands to start a run (slot A must be
// free, see the assertion). res_valid pulses for one cycle with the
// quotient res_q = sum_j q_j 4^(NDIG-j) (that is Q * 4^(NDIG-1)) of run
// res_run. The estimate adder spans the whole remainder width rather than a
// few leading bits; this keeps the estimate within 1/8 of the remainder,
// which the 5-bit rounded ROM address needs to be exact.
module srt_lane
  import cdiv_pkg::*;
#(
  parameter int unsigned NDIG  = 8,
  parameter int unsigned FRAC  = 15,
  parameter bit          RESO  = 1'b0,
  parameter bit          CHECK = 1'b0,
  parameter bit          IM    = 1'b0   // lane identity for fault injection
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   load,
  input  logic                   load_run,
  input  logic signed [FRAC+1:0] load_n,
  input  logic        [FRAC:0]   load_d,
  output logic        [7:0]      rom_addr,
  input  logic        [3:0]      rom_data,
  input  fault_t                 inj,
  output logic                   res_valid,
  output logic                   res_run,
  output logic signed [2*NDIG:0] res_q,
  output logic                   busy,
  output logic                   err,
  output logic                   err_rom
);
  localparam int unsigned RW = FRAC + 4 + RESO;  // remainder width
  localparam int unsigned DW = FRAC + 1 + RESO;  // divisor width
  localparam int unsigned CW = $clog2(NDIG + 1);

  // ---- fault-injection masks for this lane --------------------------------
  logic   hit;
  logic [MASK_W-1:0] fm;
  assign hit = inj.en && (inj.lane_im == IM);
  assign fm  = inj.mask;
  function automatic logic [MASK_W-1:0] at(input site_e s);
    return (hit && inj.site == s) ? fm : '0;
  endfunction

  // ---- slot A (in front of P1) and slot B (between P1 and P2) -------------
  logic            a_valid, a_run, b_valid, b_run;
  logic [CW-1:0]   a_cnt, b_cnt;
  logic [RW-1:0]   a_u, a_v, b_u, b_v;
  logic [DW-1:0]   a_d, b_d;
  logic [2:0]      b_q;

  logic            a_we, b_we, finish;
  logic [RW-1:0]   a_u_n, a_v_n;
  logic [DW-1:0]   a_d_n;
  logic [CW-1:0]   cnt_inc;
  logic [6:0]      perr;

  // ---- P1: estimate, digit selection --------------------------------------
  logic [RW-1:0]   est_sum, est_sum2, est_win;
  logic [6:0]      est7;
  logic signed [5:0] est6;
  logic [DW-1:0]   d_win;
  logic signed [2:0] q_sel;
  logic            err_fold;

  always_comb begin
    est_sum  = (a_u + a_v) ^ RW'(at(SITE_EST));
    est_sum2 = a_u - ~a_v - RW'(1);          // duplicate adder, other form
    est_win  = (RESO && a_run) ? (est_sum >> 1) : est_sum;
    est7     = est_win[FRAC+3 -: 7];         // sign, 3 integer, 3 fraction
    est6     = 6'((est7 + 7'd1) >> 1);       // round to quarters
    d_win    = (RESO && a_run) ? (a_d >> 1) : a_d;
  end

  qsel_fold #(.CHECK(CHECK)) u_fold (
    .est(est6), .dtop(d_win[FRAC -: 4]),
    .rom_addr, .rom_data, .flip_rom(at(SITE_ROM)[3:0]),
    .q(q_sel), .err(err_fold)
  );

  // ---- P2: q*D multiplexer and carry-save adder ---------------------------
  logic          q_neg, q_sub;
  logic [RW-1:0] qd_mag, qd_z, csa_s, csa_c;
  logic          err_csa;

  always_comb begin
    q_neg = b_q[2];
    unique case (q_neg ? 3'(-b_q) : b_q)
      3'd1:    qd_mag = RW'(b_d);
      3'd2:    qd_mag = RW'(b_d) << 1;
      default: qd_mag = '0;
    endcase
    q_sub = !q_neg && (b_q != 3'd0);     // R - qD for q > 0, R + |q|D for q < 0
    qd_z  = q_sub ? ~qd_mag : qd_mag;
  end

  csa_par #(.W(RW), .CHECK(CHECK)) u_csa (
    .x(b_u), .y(b_v), .z(qd_z), .flip_sum(RW'(at(SITE_CSA))),
    .sum(csa_s), .cout(csa_c), .err(err_csa)
  );

  // ---- slot control --------------------------------------------------------
  assign cnt_inc = b_cnt + CW'(1);
  assign finish  = b_valid && (cnt_inc == CW'(NDIG));
  assign a_we    = load || (b_valid && !finish);
  assign b_we    = a_valid;

  always_comb begin
    if (load) begin
      a_u_n = RW'(load_n) << (RESO && load_run);
      a_v_n = '0;
      a_d_n = DW'(load_d) << (RESO && load_run);
    end else begin
      a_u_n = csa_s << 2;
      a_v_n = {csa_c[RW-2:0], q_sub} << 2;
      a_d_n = b_d;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_valid <= 1'b0; a_run <= 1'b0; a_cnt <= '0;
      b_valid <= 1'b0; b_run <= 1'b0; b_cnt <= '0;
    end else begin
      a_valid <= a_we;
      if (load)        begin a_run <= load_run; a_cnt <= '0;      end
      else if (a_we)   begin a_run <= b_run;    a_cnt <= cnt_inc; end
      b_valid <= b_we;
      if (b_we)        begin b_run <= a_run;    b_cnt <= a_cnt;   end
    end
  end

  parity_reg #(.W(RW), .PARITY(CHECK)) u_a_u (.clk, .rst_n, .we(a_we), .d(a_u_n),
    .flip(RW'(at(SITE_U))), .q(a_u), .err(perr[0]));
  parity_reg #(.W(RW), .PARITY(CHECK)) u_a_v (.clk, .rst_n, .we(a_we), .d(a_v_n),
    .flip(RW'(at(SITE_V))), .q(a_v), .err(perr[1]));
  parity_reg #(.W(DW), .PARITY(CHECK)) u_a_d (.clk, .rst_n, .we(a_we), .d(a_d_n),
    .flip(DW'(at(SITE_D))), .q(a_d), .err(perr[2]));
  parity_reg #(.W(RW), .PARITY(CHECK)) u_b_u (.clk, .rst_n, .we(b_we), .d(a_u),
    .flip('0), .q(b_u), .err(perr[3]));
  parity_reg #(.W(RW), .PARITY(CHECK)) u_b_v (.clk, .rst_n, .we(b_we), .d(a_v),
    .flip('0), .q(b_v), .err(perr[4]));
  parity_reg #(.W(DW), .PARITY(CHECK)) u_b_d (.clk, .rst_n, .we(b_we), .d(a_d),
    .flip('0), .q(b_d), .err(perr[5]));
  parity_reg #(.W(3), .PARITY(CHECK)) u_b_q (.clk, .rst_n, .we(b_we), .d(q_sel),
    .flip('0), .q(b_q), .err(perr[6]));

  // ---- on-the-fly converter -----------------------------------------------
  logic err_otf;

  otf_conv #(.NDIG(NDIG), .NRUN(RESO ? 2 : 1), .CHECK(CHECK)) u_otf (
    .clk, .rst_n,
    .clr(load), .clr_run(load_run),
    .step(a_valid), .step_run(a_run), .digit(q_sel),
    .rd_run(b_run),
    .flip_qpos((2*NDIG)'(at(SITE_QPN))), .flip_q((2*NDIG+1)'(at(SITE_QOUT))),
    .q_out(res_q), .err(err_otf)
  );

  assign res_valid = finish;
  assign res_run   = b_run;
  assign busy      = a_valid | b_valid;
  assign err       = CHECK ? ((|perr) | (est_sum != est_sum2) | err_csa | err_otf) : 1'b0;
  assign err_rom   = err_fold;

  // A run may only be loaded while slot A is not being refilled from slot B.
  a_load_free: assert property (@(posedge clk) disable iff (!rst_n)
                                load |-> !(b_valid && !finish));
endmodule

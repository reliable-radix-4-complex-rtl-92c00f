// otf_conv: the on-the-fly converter of one SRT lane.
//
// Each quotient digit q in {-2..2} is shifted, two bits at a time, into one
// of two registers: |q| into Q_pos when q > 0 and "00" into Q_neg, or |q|
// into Q_neg when q < 0 and "00" into Q_pos. After NDIG digits the quotient
// in two's complement is Q_pos - Q_neg, formed by the converter's adder. The
// integer value q_out equals sum_j q_j * 4^(NDIG-j), that is the quotient
// times 4^(NDIG-1).
//
// NRUN register pairs are kept so that two interleaved runs (the RESO
// scheme) each have their own; `clr` zeroes the pair of run clr_run and
// `step` shifts a digit into the pair of run step_run (both may act in one
// cycle on different runs). q_out shows the pair selected by rd_run. With
// CHECK = 1 the registers carry parity and the adder is duplicated (the
// copy computes Q_pos + ~Q_neg + 1) and compared; err is raised on any
// mismatch. flip_qpos and flip_q are fault-injection inputs (tie to zero):
// they flip bits of run 0's Q_pos and of the adder output.
module otf_conv #(
  parameter int unsigned NDIG  = 8,
  parameter int unsigned NRUN  = 1,
  parameter bit          CHECK = 1'b1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  logic                 clr_run,
  input  logic                 step,
  input  logic                 step_run,
  input  logic signed [2:0]    digit,
  input  logic                 rd_run,
  input  logic [2*NDIG-1:0]    flip_qpos,
  input  logic [2*NDIG:0]      flip_q,
  output logic signed [2*NDIG:0] q_out,
  output logic                 err
);
  localparam int unsigned QW = 2*NDIG;

  logic [QW-1:0] qpos [NRUN];
  logic [QW-1:0] qneg [NRUN];
  logic [NRUN-1:0] perr_p, perr_n;
  logic [1:0] mag;
  logic       neg;
  logic [QW:0] q_main, q_copy;
  logic [QW-1:0] pos_sel, neg_sel;

  assign neg = digit[2];
  assign mag = neg ? 2'(-digit) : digit[1:0];

  for (genvar r = 0; r < int'(NRUN); r++) begin : g_run
    logic          hit_clr, hit_step, we;
    logic [QW-1:0] dpos, dneg;
    assign hit_clr  = clr  && (NRUN == 1 || clr_run  == 1'(r));
    assign hit_step = step && (NRUN == 1 || step_run == 1'(r));
    assign we   = hit_clr | hit_step;
    assign dpos = hit_clr ? '0 : {qpos[r][QW-3:0], (neg ? 2'b00 : mag)};
    assign dneg = hit_clr ? '0 : {qneg[r][QW-3:0], (neg ? mag : 2'b00)};

    parity_reg #(.W(QW), .PARITY(CHECK)) u_qpos (
      .clk, .rst_n, .we, .d(dpos), .flip(r == 0 ? flip_qpos : '0),
      .q(qpos[r]), .err(perr_p[r])
    );
    parity_reg #(.W(QW), .PARITY(CHECK)) u_qneg (
      .clk, .rst_n, .we, .d(dneg), .flip('0),
      .q(qneg[r]), .err(perr_n[r])
    );
  end

  always_comb begin
    pos_sel = qpos[0];
    neg_sel = qneg[0];
    if (NRUN > 1 && rd_run) begin
      pos_sel = qpos[NRUN-1];
      neg_sel = qneg[NRUN-1];
    end
    q_main = ({1'b0, pos_sel} - {1'b0, neg_sel}) ^ flip_q;
    q_copy = {1'b0, pos_sel} + {1'b1, ~neg_sel} + (QW+1)'(1);
  end

  assign q_out = q_main;
  assign err   = CHECK ? ((|perr_p) | (|perr_n) | (q_main != q_copy)) : 1'b0;
endmodule

// reso_compare: result registers and comparator of the RESO scheme.
//
// The quotient of the first run (original operands) is stored in Q, the
// quotient of the second run (shifted operands) in Q_RESO; a demultiplexer
// driven by the run tag chooses the register. Because shifting dividend and
// divisor by the same amount leaves the quotient unchanged, no decoding is
// needed: once both are present (`both`), err is the OR of the bitwise XOR
// of the two registers. `clr` empties both at the start of an operation.
//
// flip_q is a fault-injection input (tie to zero) XORed into Q on its read
// side. Latency: err and both are valid the cycle after the second result.
module reso_compare #(
  parameter int unsigned QW = 17
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          res_valid,
  input  logic          res_run,
  input  logic [QW-1:0] res_q,
  input  logic [QW-1:0] flip_q,
  output logic [QW-1:0] q,
  output logic [QW-1:0] q_reso,
  output logic          both,
  output logic          err
);
  logic [QW-1:0] q_r, q_reso_r;
  logic          have_q, have_reso;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_r <= '0; q_reso_r <= '0; have_q <= 1'b0; have_reso <= 1'b0;
    end else if (clr) begin
      have_q <= 1'b0; have_reso <= 1'b0;
    end else if (res_valid) begin
      if (!res_run) begin q_r      <= res_q; have_q    <= 1'b1; end
      else          begin q_reso_r <= res_q; have_reso <= 1'b1; end
    end
  end

  assign q      = q_r ^ flip_q;
  assign q_reso = q_reso_r;
  assign both   = have_q & have_reso;
  assign err    = both & (|(q ^ q_reso));
endmodule

// cdiv_multiplier: the multiplication module of the complex divider.
//
// To divide (a + jb) by (c + jd) the numerator and the denominator are both
// multiplied by the conjugate c - jd, which turns the denominator real:
//   n_re = a*c + b*d,  n_im = b*c - a*d,  den = c*c + d*d.
// Both products use the Golub multiplier (golub_cmul). Operands are widened
// by one bit so that -d is representable for d = -2^(W-1). err is the OR of
// the two Golub checkers and of a check that the imaginary part of the
// denominator product is zero.
//
// flip_re (fault injection, tie to zero) is XORed into n_re inside the
// numerator multiplier. Combinational; the core registers the outputs.
module cdiv_multiplier #(
  parameter int unsigned W     = 8,
  parameter bit          CHECK = 1'b1
) (
  input  logic signed [W-1:0]   a,
  input  logic signed [W-1:0]   b,
  input  logic signed [W-1:0]   c,
  input  logic signed [W-1:0]   d,
  input  logic        [2*W:0]   flip_re,
  output logic signed [2*W:0]   n_re,
  output logic signed [2*W:0]   n_im,
  output logic        [2*W-1:0] den,
  output logic                  err
);
  localparam int unsigned GW = W + 1;      // Golub operand width
  localparam int unsigned PW = 2*GW + 2;   // Golub product width

  logic signed [GW-1:0] ax, bx, cx, dx, ndx;
  logic signed [PW-1:0] nre_w, nim_w, dre_w, dim_w;
  logic                 err_n, err_d;

  assign ax  = GW'(a);
  assign bx  = GW'(b);
  assign cx  = GW'(c);
  assign dx  = GW'(d);
  assign ndx = -dx;

  golub_cmul #(.W(GW), .CHECK(CHECK)) u_num (
    .yr(ax), .yi(bx), .zr(cx), .zi(ndx),
    .flip_re(PW'(flip_re)),
    .x_re(nre_w), .x_im(nim_w), .err(err_n)
  );

  golub_cmul #(.W(GW), .CHECK(CHECK)) u_den (
    .yr(cx), .yi(dx), .zr(cx), .zi(ndx),
    .flip_re('0),
    .x_re(dre_w), .x_im(dim_w), .err(err_d)
  );

  // |a*c + b*d| <= 2^(2W-1) fits 2W+1 signed bits; c*c + d*d <= 2^(2W-1)
  // fits 2W unsigned bits.
  assign n_re = nre_w[2*W:0];
  assign n_im = nim_w[2*W:0];
  assign den  = dre_w[2*W-1:0];
  assign err  = CHECK ? (err_n | err_d | (dim_w != '0)) : 1'b0;
endmodule

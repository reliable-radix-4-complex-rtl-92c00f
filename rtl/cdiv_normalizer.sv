// cdiv_normalizer: the normalizing module of the complex divider.
//
// Shifts the real and imaginary numerator and the real denominator so that
// each magnitude lies in [1, 2), and reports the shifts. A value v with its
// leading one at bit p becomes v / 2^p, so
//   n / den = (mant_n / mant_d) * 2^(p_n - p_d)
// and the exponent outputs carry p_n - p_d. The numerator mantissas are
// two's complement with one sign, one integer and FRAC fractional bits (the
// magnitude is normalised, then negated if needed); the divisor mantissa is
// unsigned 1.FRAC. A zero numerator gives mantissa 0 and exponent 0; a zero
// denominator raises den_zero and gives mantissa 1.0.
//
// Bits below 2^-FRAC are truncated; with the default FRAC = 2W - 1 no bit is
// lost. Combinational.
module cdiv_normalizer #(
  parameter int unsigned W    = 8,
  parameter int unsigned FRAC = 15,
  parameter int unsigned EW   = 6
) (
  input  logic signed [2*W:0]   n_re,
  input  logic signed [2*W:0]   n_im,
  input  logic        [2*W-1:0] den,
  output logic signed [FRAC+1:0] mant_re,
  output logic signed [FRAC+1:0] mant_im,
  output logic        [FRAC:0]   mant_d,
  output logic signed [EW-1:0]   exp_re,
  output logic signed [EW-1:0]   exp_im,
  output logic                   den_zero
);
  localparam int unsigned MW = 2*W + 1;   // magnitude width

  // Leading-one position of a magnitude (0 for zero).
  function automatic int unsigned lead_one(input logic [MW-1:0] v);
    int unsigned p;
    p = 0;
    for (int i = 0; i < int'(MW); i++) if (v[i]) p = i;
    return p;
  endfunction

  // Magnitude aligned so that bit p lands on bit FRAC.
  function automatic logic [FRAC:0] align(input logic [MW-1:0] v, input int unsigned p);
    logic [MW+FRAC:0] wide;
    wide = (MW+FRAC+1)'(v) << FRAC;
    return (FRAC+1)'(wide >> p);
  endfunction

  logic [MW-1:0]  mag_re, mag_im, mag_d;
  int unsigned    p_re, p_im, p_d;
  logic [FRAC:0]  al_re, al_im;

  always_comb begin
    mag_re = n_re[MW-1] ? MW'(-n_re) : MW'(n_re);
    mag_im = n_im[MW-1] ? MW'(-n_im) : MW'(n_im);
    mag_d  = MW'(den);
    p_re   = lead_one(mag_re);
    p_im   = lead_one(mag_im);
    p_d    = lead_one(mag_d);
    al_re  = align(mag_re, p_re);
    al_im  = align(mag_im, p_im);
    mant_re = n_re[MW-1] ? -(FRAC+2)'(al_re) : (FRAC+2)'(al_re);
    mant_im = n_im[MW-1] ? -(FRAC+2)'(al_im) : (FRAC+2)'(al_im);
    den_zero = (den == '0);
    mant_d = den_zero ? {1'b1, FRAC'(0)} : align(mag_d, p_d);
    exp_re = (mag_re == '0) ? '0 : EW'(int'(p_re) - int'(p_d));
    exp_im = (mag_im == '0) ? '0 : EW'(int'(p_im) - int'(p_d));
  end
endmodule

// golub_cmul: complex multiplier x = y * z after Golub, with the Scheme I
// checker.
//
// For y = yr + j*yi and z = zr + j*zi it forms three real products
//   t1 = (yr + yi) * (zr + zi),  t2 = yr * zr,  t3 = yi * zi
// and x_re = t2 - t3, x_im = t1 - t2 - t3: three multiplications and five
// additions instead of four and two. The real and the imaginary part are
// computed separately (no shared t2 + t3 term), so that a fault in one
// cannot reach the other.
//
// Checker: x_re + x_im + 2*yi*zi must equal t1. The product yi*zi used by the
// checker comes from its own multiplier, so a faulty t3 is also caught. With
// CHECK = 0 the checker is removed. `flip_re` is a fault-injection input
// XORed into x_re; tie it to zero in normal use. Combinational.
module golub_cmul #(
  parameter int unsigned W     = 9,   // operand width, two's complement
  parameter bit          CHECK = 1'b1
) (
  input  logic signed [W-1:0]   yr,
  input  logic signed [W-1:0]   yi,
  input  logic signed [W-1:0]   zr,
  input  logic signed [W-1:0]   zi,
  input  logic        [2*W+1:0] flip_re,
  output logic signed [2*W+1:0] x_re,
  output logic signed [2*W+1:0] x_im,
  output logic                  err
);
  localparam int unsigned PW = 2*W + 2;

  logic signed [W:0]    sy, sz;
  logic signed [PW-1:0] t1, t2, t3, t3_chk, lhs;

  always_comb begin
    sy   = {yr[W-1], yr} + {yi[W-1], yi};
    sz   = {zr[W-1], zr} + {zi[W-1], zi};
    t1   = PW'(sy) * PW'(sz);
    t2   = PW'(yr) * PW'(zr);
    t3   = PW'(yi) * PW'(zi);
    x_re = (t2 - t3) ^ flip_re;
    x_im = (t1 - t2) - t3;
    t3_chk = PW'(yi) * PW'(zi);
    lhs  = x_re + x_im + (t3_chk <<< 1);
  end

  assign err = CHECK ? (lhs != t1) : 1'b0;
endmodule

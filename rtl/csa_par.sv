// csa_par: one row of full adders forming a 3:2 carry-save adder, with a
// per-adder check of the sum and the carry (Scheme I).
//
// For every bit i the adder produces sum[i] = x^y^z and cout[i] =
// majority(x,y,z). The checks recompute both from the adder inputs:
//   Sum_e = x ^ y ^ z ^ sum          (must be 0)
//   C_e   = cout ^ (x&y) ^ ((x^y)&z) (must be 0)
// and err is the OR over all bits. The carry check is the standard
// carry-out identity cout = xy + z(x^y); the two product terms are disjoint,
// so it is written with XOR.
//
// `flip_sum` is a fault-injection input XORed into the sum outputs before the
// check; tie it to zero in normal use. CHECK = 0 removes the checker.
// Purely combinational.
module csa_par #(
  parameter int unsigned W     = 19,
  parameter bit          CHECK = 1'b1
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  input  logic [W-1:0] flip_sum,
  output logic [W-1:0] sum,
  output logic [W-1:0] cout,
  output logic         err
);
  logic [W-1:0] sum_e, c_e;

  always_comb begin
    sum  = (x ^ y ^ z) ^ flip_sum;
    cout = (x & y) | (x & z) | (y & z);
    sum_e = x ^ y ^ z ^ sum;
    c_e   = cout ^ (x & y) ^ ((x ^ y) & z);
  end

  assign err = CHECK ? (|sum_e | |c_e) : 1'b0;
endmodule

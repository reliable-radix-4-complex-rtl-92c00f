// qsel_fold: the logic around the minimised quotient ROM for one lane.
//
// Input is the rounded estimate of the shifted partial remainder,
// round(R) = r2 r1 r0 r-1 . r-2 r-3 ... in two's complement quarters: 6 bits,
// sign r_s, three integer bits and two fractional bits. The sign bit selects
// between the estimate and its two's complement (not(.)+1) to form the
// magnitude, which is concatenated with the four leading divisor bits to
// address the ROM. The same sign bit selects between the fetched digit and
// its two's complement, giving q in {-2..2} as a 3-bit two's complement
// number. The fetched word's parity is checked and a mismatch raises err.
//
// The document rounds the remainder to five bits (sign, two integer bits,
// two fractional bits). Shifted remainders reach 16/3 when D is close to 2,
// so this design carries one more integer bit and saturates magnitudes of 4
// and above to 3.75, where every column of the table already selects 2. The
// ROM stays at 256 words.
//
// flip_rom is a fault-injection input XORed into the fetched word; tie it to
// zero in normal use. CHECK = 0 removes the parity check. Combinational.
module qsel_fold #(
  parameter bit CHECK = 1'b1
) (
  input  logic signed [5:0] est,       // round(R), LSB = 1/4
  input  logic        [3:0] dtop,      // d0 d-1 d-2 d-3
  output logic        [7:0] rom_addr,
  input  logic        [3:0] rom_data,  // {parity, q[2:0]}
  input  logic        [3:0] flip_rom,
  output logic signed [2:0] q,
  output logic              err
);
  logic       neg;
  logic [5:0] mag;
  logic [3:0] mag_sat, word;

  always_comb begin
    neg      = est[5];
    mag      = neg ? (~est + 6'd1) : est;
    mag_sat  = (mag[5:4] != 2'b00) ? 4'hF : mag[3:0];
    rom_addr = {mag_sat, dtop};
    word     = rom_data ^ flip_rom;
    q        = neg ? (~word[2:0] + 3'd1) : word[2:0];
  end

  assign err = CHECK ? (^word) : 1'b0;
endmodule

// qsel_rom: the minimised quotient-selection ROM shared by the real and the
// imaginary SRT lane.
//
// Because digit selection is symmetric in the sign of the remainder, only
// the non-negative half of the table is stored: 256 words addressed by
// {|round(R)| (4 bits, two fractional), D (4 bits, d0.d-1 d-2 d-3)}. Each
// word is a 3-bit digit (0, 1 or 2 in two's complement) extended by one
// parity bit, so the lane can check the word it reads. The table is built by
// cdiv_pkg::qsel_word; the document gives its size and organisation but not
// its contents, so the selection constants are this design's own.
//
// Two independent asynchronous read ports (dual-port ROM), one per lane.
module qsel_rom (
  input  logic [7:0] addr_re,
  input  logic [7:0] addr_im,
  output logic [3:0] data_re,
  output logic [3:0] data_im
);
  localparam logic [1023:0] TABLE = cdiv_pkg::qsel_table();

  assign data_re = TABLE[{addr_re, 2'b00} +: 4];
  assign data_im = TABLE[{addr_im, 2'b00} +: 4];
endmodule

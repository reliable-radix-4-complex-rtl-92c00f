// parity_reg: data-path register with a parity bit (Scheme I).
//
// The parity of the incoming word is computed and stored together with it
// on every write (we = 1). The stored word is read out continuously and its
// parity recomputed; a mismatch with the stored parity raises err in the
// same cycle. err is combinational, so the owner ORs the flags of all its
// registers into one error signal, as the document describes.
//
// `flip` is a fault-injection input: it is XORed into the word on the read
// side, which is how a corrupted register bit shows up to the checker. Tie
// it to zero in normal use. With PARITY = 0 the parity bit and checker are
// left out and the block is a plain register with enable. Reset clears the
// word and the parity bit (a consistent pair). Latency: one clock.
module parity_reg #(
  parameter int unsigned W      = 16,
  parameter bit          PARITY = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         we,
  input  logic [W-1:0] d,
  input  logic [W-1:0] flip,
  output logic [W-1:0] q,
  output logic         err
);
  logic [W-1:0] word;
  logic         par;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word <= '0;
      par  <= 1'b0;
    end else if (we) begin
      word <= d;
      par  <= ^d;
    end
  end

  assign q   = word ^ flip;
  assign err = PARITY ? ((^q) ^ par) : 1'b0;
endmodule

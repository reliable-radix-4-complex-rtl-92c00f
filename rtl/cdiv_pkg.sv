// cdiv_pkg: shared types, constants and functions of the fault-detecting
// radix-4 SRT complex divider.
//
// Holds the scheme selector, the fault-injection bundle used to exercise the
// error detectors, the parity helper and the function that builds the
// minimised quotient-selection ROM.
//
// The ROM contents are this design's own: the selection rule follows the
// minimally redundant digit set {-2..2} with h = 2/3 and the interval bounds
// of the selection scale (digit k is valid for (k-2/3)D <= R <= (k+2/3)D),
// with comparison constants chosen so that a remainder estimate rounded to
// 1/4 and a divisor truncated to 1/8 always pick a valid digit.
package cdiv_pkg;

  // Error-detection scheme of a divider core.
  typedef enum logic [1:0] {
    SCHEME_NONE   = 2'd0,  // original divider, no detection
    SCHEME_PARITY = 2'd1,  // Scheme I: unified parity and hardware redundancy
    SCHEME_RESO   = 2'd2   // Scheme II: recomputing with shifted operands
  } scheme_e;

  // Fault-injection site inside one SRT lane (or the multiplier).
  typedef enum logic [3:0] {
    SITE_NONE = 4'd0,
    SITE_U    = 4'd1,   // sum register of the partial remainder (slot A)
    SITE_V    = 4'd2,   // carry register of the partial remainder (slot A)
    SITE_D    = 4'd3,   // divisor register (slot A)
    SITE_ROM  = 4'd4,   // ROM word (digit and parity bit) of the lane's port
    SITE_EST  = 4'd5,   // estimate adder output
    SITE_CSA  = 4'd6,   // CSA sum output
    SITE_QPN  = 4'd7,   // Q_pos register of slot B
    SITE_QOUT = 4'd8,   // converter adder output
    SITE_MUL  = 4'd9    // real part of the numerator product
  } site_e;

  localparam int unsigned MASK_W = 32;

  // One fault: when en is set the value at `site` of the chosen lane is
  // XORed with `mask` for that clock cycle.
  typedef struct packed {
    logic              en;
    logic              lane_im;   // 0: real lane, 1: imaginary lane
    site_e             site;
    logic [MASK_W-1:0] mask;
  } fault_t;

  localparam fault_t NO_FAULT = '{en: 1'b0, lane_im: 1'b0, site: SITE_NONE, mask: '0};

  // Quotient-selection table, indexed by {|R| in quarters (4 bits), D in
  // eighths (4 bits, d0.d-1 d-2 d-3)}. Each word is {parity, q[2:0]} with q
  // the non-negative digit (0, 1 or 2) in 3-bit two's complement and parity
  // the XOR of the three digit bits. With dj = D*8 and m = |R|*4:
  //   q = 2 if 6m >= 4dj + 7, else q = 1 if 6m >= dj + 4, else q = 0.
  // Words with d0 = 0 are never addressed (D is normalised) and hold 0.
  function automatic logic [3:0] qsel_word(input logic [7:0] addr);
    int unsigned m, dj;
    logic [2:0] q;
    m  = int'(addr[7:4]);
    dj = int'(addr[3:0]);
    if (dj < 8)                 q = 3'd0;
    else if (6*m >= 4*dj + 7)   q = 3'd2;
    else if (6*m >= dj + 4)     q = 3'd1;
    else                        q = 3'd0;
    return {^q, q};
  endfunction

  function automatic logic [1023:0] qsel_table();
    logic [1023:0] t;
    for (int i = 0; i < 256; i++) t[4*i +: 4] = qsel_word(8'(i));
    return t;
  endfunction

endpackage

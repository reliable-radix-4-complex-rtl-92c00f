// fault_lfsr: pseudo-random fault-pattern generator for fault-injection
// runs.
//
// A WIDTH-bit Fibonacci LFSR (maximal-length feedback polynomial for the
// widths 3, 5, 8 and 16; x^W + x^(W-1) + 1 otherwise) advances every cycle
// while enabled. A cycle counter raises `fire` once every 8, 4 or 2 cycles
// (rate = 0, 1, 2; rate = 3 fires every cycle), and `pattern` is the LFSR
// state, to be ORed, ANDed or XORed onto a selected signal in that cycle.
// `load` sets the LFSR to `seed` (a zero seed is replaced by 1) so that
// each generator can start from its own value.
module fault_lfsr #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [1:0]       rate,
  input  logic             load,
  input  logic [WIDTH-1:0] seed,
  output logic             fire,
  output logic [WIDTH-1:0] pattern
);
  localparam logic [WIDTH-1:0] TAPS =
      (WIDTH == 3)  ? WIDTH'(3'b110) :
      (WIDTH == 5)  ? WIDTH'(5'b10100) :
      (WIDTH == 8)  ? WIDTH'(8'b10111000) :
      (WIDTH == 16) ? WIDTH'(16'b1011010000000000) :
                      WIDTH'(3) << (WIDTH - 2);

  logic [WIDTH-1:0] state;
  logic [2:0]       cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= WIDTH'(1);
      cnt   <= '0;
    end else if (load) begin
      state <= (seed == '0) ? WIDTH'(1) : seed;
      cnt   <= '0;
    end else if (en) begin
      state <= {state[WIDTH-2:0], ^(state & TAPS)};
      cnt   <= cnt + 3'd1;
    end
  end

  always_comb begin
    unique case (rate)
      2'd0:    fire = en && (cnt == 3'd7);
      2'd1:    fire = en && (cnt[1:0] == 2'd3);
      2'd2:    fire = en && cnt[0];
      default: fire = en;
    endcase
  end

  assign pattern = state;
endmodule

// tb_fault_lfsr: checks the fault-pattern generator at the three widths the
// injector uses (16 bits for registers, 5 for adders, 3 for the ROM).
//
// For each width the generator is loaded with a seed and stepped through a
// full cycle: every state must be non-zero and new until the seed comes
// back after exactly 2^W - 1 steps (maximal length). `fire` is then checked
// in every cycle against its expected position for each rate (once per 8,
// 4, 2 and 1 cycles after a load), a zero seed must be replaced by 1, and
// nothing may move while the generator is disabled.
module tb_fault_lfsr;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        en, load;
  logic [1:0]  rate;
  logic [15:0] seed;
  logic        fire16, fire5, fire3;
  logic [15:0] pat16;
  logic [4:0]  pat5;
  logic [2:0]  pat3;

  fault_lfsr #(.WIDTH(16)) u16 (.clk, .rst_n, .en, .rate, .load, .seed(seed),
                                .fire(fire16), .pattern(pat16));
  fault_lfsr #(.WIDTH(5))  u5  (.clk, .rst_n, .en, .rate, .load, .seed(seed[4:0]),
                                .fire(fire5), .pattern(pat5));
  fault_lfsr #(.WIDTH(3))  u3  (.clk, .rst_n, .en, .rate, .load, .seed(seed[2:0]),
                                .fire(fire3), .pattern(pat3));

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic logic [15:0] state_of(input int w);
    case (w)
      16:      return pat16;
      5:       return 16'(pat5);
      default: return 16'(pat3);
    endcase
  endfunction

  bit seen [65536];

  // Steps the generator of width w through one full period from `s`.
  task automatic full_period(input int w, input logic [15:0] s);
    int steps;
    logic [15:0] st;
    foreach (seen[i]) seen[i] = 1'b0;
    seed = s;
    load = 1'b1; @(negedge clk); load = 1'b0;
    check(state_of(w) == s, $sformatf("width %0d seed loaded", w));
    seen[s] = 1'b1;
    en = 1'b1;
    steps = 0;
    forever begin
      @(negedge clk);
      steps++;
      st = state_of(w);
      if (st == s) break;
      check(st != '0 && !seen[st], $sformatf("width %0d state %0h zero or repeated at step %0d", w, st, steps));
      seen[st] = 1'b1;
      if (steps > 70000) break;
    end
    en = 1'b0;
    check(steps == (1 << w) - 1, $sformatf("width %0d period %0d", w, steps));
  endtask

  initial begin
    en = 0; load = 0; rate = 0; seed = 16'hACE1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    full_period(16, 16'hACE1);
    full_period(5, 16'h0013);
    full_period(3, 16'h0005);

    // fire position for every rate, cycle by cycle
    for (int r = 0; r < 4; r++) begin
      int per;
      per = 8 >> r;
      rate = 2'(r);
      seed = 16'h1234;
      load = 1'b1; @(negedge clk); load = 1'b0;
      en = 1'b1;
      #1;
      for (int i = 0; i < 64; i++) begin
        bit want;
        want = (r == 3) ? 1'b1 : ((i % per) == per - 1);
        check(fire16 == want && fire5 == want && fire3 == want,
              $sformatf("rate %0d cycle %0d fire %0b%0b%0b", r, i, fire16, fire5, fire3));
        @(negedge clk);
      end
      en = 1'b0;
    end

    // zero seed
    seed = '0;
    load = 1'b1; @(negedge clk); load = 1'b0;
    check(pat16 == 16'd1 && pat5 == 5'd1 && pat3 == 3'd1, "zero seed replaced by 1");

    // disabled: nothing moves and nothing fires
    en = 1'b1; repeat (3) @(negedge clk); en = 1'b0;
    seed = pat16;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      check(pat16 == seed && !fire16 && !fire5 && !fire3, "held while disabled");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

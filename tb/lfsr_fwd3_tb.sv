// lfsr_fwd3_tb: self-checking testbench for lfsr_fwd3.
//
// For every one of the 256 possible states it loads that state as the seed,
// takes one enabled clock and checks that the new state equals three steps
// of the reference single-step model. It then runs a random mix of enable,
// load and data and checks mout = state ^ min every cycle, and checks that
// from seed 8'h34 the register reproduces every third byte of the
// single-step keystream, including the keys behind the "Goodbye" cipher
// text. Inputs change on the falling edge, outputs are sampled before the
// rising edge.
module lfsr_fwd3_tb;
  import lfsr_ref_pkg::*;

  logic clk = 1'b0;
  logic en = 1'b0, load = 1'b0;
  byte_t seed = '0, min = '0;
  byte_t mout;
  int checks = 0, failures = 0;
  byte_t model;

  lfsr_fwd3 dut (.clk, .en, .load, .seed, .min, .mout);

  always #5 clk = ~clk;

  task automatic check(input byte_t got, input byte_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h (t=%0t)", what, got, exp, $time);
    end
  endtask

  task automatic cycle(input logic e, input logic l, input byte_t s, input byte_t m,
                       input string what);
    @(negedge clk);
    en = e; load = l; seed = s; min = m;
    #3;
    check(mout, model ^ m, what);
    @(posedge clk);
    if (e) model = l ? s : ref_advance(model, 3);
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte_t ks;
    model = SEED;
    #1;
    check(mout, SEED, "power-up state");

    // exhaustive: every state, one jump
    for (int s = 0; s < 256; s++) begin
      cycle(1'b1, 1'b1, byte_t'(s), 8'h00, "load");
      cycle(1'b1, 1'b0, 8'h00, 8'h00, "loaded state");
      cycle(1'b0, 1'b0, 8'h00, 8'h00, "jumped state");
    end

    // every third keystream byte from the lab seed
    cycle(1'b1, 1'b1, SEED, 8'h00, "load seed");
    ks = SEED;
    for (int k = 0; k < 20; k++) begin
      cycle(1'b1, 1'b0, 8'h00, 8'h00, "decimated keystream (model)");
      check(model, ref_advance(SEED, 3 * (k + 1)), "model");
      ks = ref_step(ref_step(ref_step(ks)));
    end
    #4;
    check(mout, ks, "decimated keystream");

    // "Goodbye" keys sit at offsets 36, 39 (multiples of 3): G and d
    cycle(1'b1, 1'b1, SEED, 8'h00, "load seed");
    repeat (GOODBYE_OFFSET / 3) cycle(1'b1, 1'b0, 8'h00, 8'h00, "advance");
    @(negedge clk); en = 1'b1; load = 1'b0; min = GOODBYE_PT[0]; #3;
    check(mout, GOODBYE_CT[0], "Goodbye byte 0");
    @(posedge clk); model = ref_advance(model, 3);
    @(negedge clk); min = GOODBYE_PT[3]; #3;
    check(mout, GOODBYE_CT[3], "Goodbye byte 3");
    @(posedge clk); model = ref_advance(model, 3);

    repeat (1000)
      cycle(($urandom % 4) != 0, ($urandom % 16) == 0, byte_t'($urandom), byte_t'($urandom),
            "random");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

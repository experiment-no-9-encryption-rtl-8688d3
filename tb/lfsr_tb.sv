// lfsr_tb: self-checking testbench for lfsr.
//
// Checks, against lfsr_ref_pkg: the power-up state, seed loading, the
// stepped sequence under random enable/load/data, that en = 0 holds the
// state, the 255-state period from seed 8'h34, and the published cipher
// text of "Goodbye" (5B 59 4C F5 AA 25 73) 36 steps after the seed.
// Inputs change on the falling edge; outputs are checked just before the
// rising edge. Also confirms that mout reacts to min with no clock.
module lfsr_tb;
  import lfsr_ref_pkg::*;

  logic clk = 1'b0;
  logic en = 1'b0, load = 1'b0;
  byte_t seed = '0, min = '0;
  byte_t mout;
  int checks = 0, failures = 0;
  int cycles = 0;
  byte_t model;
  byte_t sampled;  // mout as seen in the last cycle() call

  lfsr dut (.clk, .en, .load, .seed, .min, .mout);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(input byte_t got, input byte_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h (t=%0t)", what, got, exp, $time);
    end
  endtask

  // Apply inputs for one clock, check mout first, then update the model.
  task automatic cycle(input logic e, input logic l, input byte_t s, input byte_t m,
                       input string what);
    @(negedge clk);
    en = e; load = l; seed = s; min = m;
    #3;
    sampled = mout;
    check(mout, model ^ m, what);
    @(posedge clk);
    if (e) model = l ? s : ref_step(model);
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte_t seen [256];
    int period;
    byte_t s;
    // power-up value
    model = SEED;
    #1;
    check(mout, SEED, "power-up state");
    min = 8'hA5; #1;
    check(mout, SEED ^ 8'hA5, "combinational data path");

    // load with en = 0 must not take effect
    cycle(1'b0, 1'b1, 8'hFF, 8'h00, "load while disabled");
    check(mout, model, "state kept with en = 0");

    // lab stimulus: load 34, then three bytes
    cycle(1'b1, 1'b1, SEED, 8'h00, "load");
    foreach (STIM_MIN[i]) begin
      cycle(1'b1, 1'b0, SEED, STIM_MIN[i], "lab stimulus");
      check(sampled, STIM_CT[i], "lab stimulus cipher byte");
    end
    check(model, ref_advance(SEED, 3), "model after stimulus");

    // period from the seed: 255 distinct states, then back to 8'h34
    cycle(1'b1, 1'b1, SEED, 8'h00, "reload");
    period = 0;
    do begin
      cycle(1'b1, 1'b0, 8'h00, 8'h00, "period walk");
      period++;
    end while (model != SEED && period < 300);
    checks++;
    if (period != 255) begin failures++; $display("FAIL period %0d", period); end

    // Goodbye: 36 steps after the seed
    cycle(1'b1, 1'b1, SEED, 8'h00, "reload");
    repeat (GOODBYE_OFFSET) cycle(1'b1, 1'b0, 8'h00, 8'h00, "advance");
    foreach (GOODBYE_PT[i]) begin
      @(negedge clk);
      en = 1'b1; load = 1'b0; min = GOODBYE_PT[i];
      #3;
      check(mout, GOODBYE_CT[i], "Goodbye cipher text");
      @(posedge clk);
      model = ref_step(model);
    end

    // random enable, load and data
    repeat (1000) begin
      cycle(($urandom % 4) != 0, ($urandom % 16) == 0, byte_t'($urandom), byte_t'($urandom),
            "random");
    end

    $display("lfsr_tb: %0d cycles", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// encryptor_tb: self-checking testbench for encryptor.
//
// Part 1 replays the lab's stimulus on the same 10 ns clock (rising edges
// at 5, 15, ... ns): seed 8'hFF with en = 0 (ignored), then en = 1 with
// seed 8'h34 and load = 1, then message bytes 67, 6A, D1, then en = 0.
// It checks crypt against the hand-worked cipher bytes 53, 48, F8 and, after
// en drops, that the state holds. Part 2 sends "Hello from the ECE
// department." with random idle (en = 0) cycles, checking every byte on the
// channel against the reference model, that mout returns the message in
// the same cycle, and that the message takes exactly one enabled clock per
// byte. Part 3 checks the published cipher text of "Goodbye" 36 steps after
// the seed.
module encryptor_tb;
  import lfsr_ref_pkg::*;

  logic clk = 1'b0;
  logic en = 1'b0, load = 1'b1;
  byte_t seed = SEED, min = '0;
  byte_t crypt, mout;
  int checks = 0, failures = 0;
  byte_t key;

  encryptor dut (.clk, .en, .load, .seed, .min, .crypt, .mout);

  always #5 clk = ~clk;

  task automatic check(input byte_t got, input byte_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h (t=%0t)", what, got, exp, $time);
    end
  endtask

  initial begin : watchdog
    #100us;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sent, enabled_clocks;
    // ---- part 1: the lab stimulus ----
    #1;
    check(crypt, SEED ^ 8'h00, "power-up key");
    check(mout, 8'h00, "power-up loopback");
    #199;                       // t = 200
    seed = 8'hFF;
    #10;                        // t = 210
    en = 1'b1; seed = SEED;
    #10;                        // t = 220, seed 34 was loaded at 215
    load = 1'b0;
    foreach (STIM_MIN[i]) begin
      min = STIM_MIN[i];
      #4;
      check(crypt, STIM_CT[i], "lab stimulus cipher byte");
      check(mout, STIM_MIN[i], "lab stimulus decrypted byte");
      #6;
    end
    en = 1'b0;                  // t = 250, key is now step 3 = 8'h94
    repeat (5) begin
      #10;
      check(crypt, STIM_MIN[STIM_LEN-1] ^ ref_advance(SEED, 3), "hold with en = 0");
    end

    // ---- part 2: a sentence with idle gaps ----
    @(negedge clk);
    en = 1'b1; load = 1'b1; seed = 8'hC7;
    @(negedge clk);
    load = 1'b0;
    key = 8'hC7;
    sent = 0; enabled_clocks = 0;
    while (sent < HELLO.len()) begin
      en = ($urandom % 3) != 0;
      min = en ? HELLO[sent] : byte_t'($urandom);
      #3;
      check(crypt, min ^ key, "channel byte");
      check(mout, min, "decrypted byte");
      @(negedge clk);
      if (en) begin
        key = ref_step(key);
        sent++;
        enabled_clocks++;
      end
    end
    checks++;
    if (enabled_clocks != HELLO.len()) begin
      failures++;
      $display("FAIL %0d enabled clocks for %0d bytes", enabled_clocks, HELLO.len());
    end

    // ---- part 3: Goodbye ----
    en = 1'b1; load = 1'b1; seed = SEED; min = 8'h00;
    @(negedge clk);
    load = 1'b0;
    repeat (GOODBYE_OFFSET) @(negedge clk);
    foreach (GOODBYE_PT[i]) begin
      min = GOODBYE_PT[i];
      #3;
      check(crypt, GOODBYE_CT[i], "Goodbye cipher text");
      check(mout, GOODBYE_PT[i], "Goodbye decrypted");
      @(negedge clk);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// lfsr_lab_top_tb: end-to-end testbench for lfsr_lab_top at its default
// parameters.
//
// It runs the stream cipher and the three-step LFSR together on one clock.
// The cipher carries "Hello from the ECE department." followed by
// "Goodbye" from seed 8'h34 with random idle cycles; the channel byte is
// checked against the reference model every cycle, the decrypted byte
// against the message, and the bytes of "Goodbye" against the published
// cipher text (its key stream starts 36 steps after the seed, and the
// first message plus six idle-free padding steps put it there). Alongside,
// the three-step LFSR, loaded with the same seed, is enabled on every third
// enabled cipher clock, so its key must always equal the cipher's key at
// those points. Each mechanism is counted: seed load, single step, hold
// with en = 0, decryption, three-step jump, three-step hold. A mechanism
// that never happens counts as a failure.
module lfsr_lab_top_tb;
  import lfsr_ref_pkg::*;

  logic clk = 1'b0;
  logic en = 1'b0, load = 1'b0;
  byte_t seed = '0, min = '0;
  byte_t crypt, mout;
  logic fwd3_en = 1'b0, fwd3_load = 1'b0;
  byte_t fwd3_seed = '0, fwd3_min = '0;
  byte_t fwd3_mout;

  int checks = 0, failures = 0;
  int n_load = 0, n_step = 0, n_hold = 0, n_decrypt = 0, n_jump = 0, n_jump_hold = 0;
  byte_t key, key3;
  int phase;  // enabled single steps since the seed, modulo 3

  lfsr_lab_top dut (
    .clk, .en, .load, .seed, .min, .crypt, .mout,
    .fwd3_en, .fwd3_load, .fwd3_seed, .fwd3_min, .fwd3_mout
  );

  always #5 clk = ~clk;

  task automatic check(input byte_t got, input byte_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h (t=%0t)", what, got, exp, $time);
    end
  endtask

  // One clock. The cipher is enabled or idle as asked; the three-step
  // register is enabled only when the cipher steps from a state that is a
  // multiple of three past the seed, so both land on the same key.
  task automatic clock(input logic e, input byte_t m, input int goodbye_idx);
    @(negedge clk);
    en = e; load = 1'b0; min = m;
    fwd3_load = 1'b0; fwd3_min = m;
    fwd3_en = e && (phase == 0);
    #3;
    check(crypt, m ^ key, "channel byte");
    check(mout, m, "decrypted byte");
    if (mout == m && crypt != m) n_decrypt++;
    check(fwd3_mout, m ^ key3, "three-step key");
    if (phase == 0) check(fwd3_mout, crypt, "three-step key equals cipher key");
    if (goodbye_idx >= 0) check(crypt, GOODBYE_CT[goodbye_idx], "Goodbye cipher text");
    @(posedge clk);
    if (e) begin
      key = ref_step(key);
      n_step++;
      if (phase == 0) begin
        key3 = ref_advance(key3, 3);
        n_jump++;
      end
      phase = (phase + 1) % 3;
    end else begin
      n_hold++;
      n_jump_hold++;
    end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sent;
    key = SEED; key3 = SEED;
    // load both designs with the lab seed
    @(negedge clk);
    en = 1'b1; load = 1'b1; seed = SEED;
    fwd3_en = 1'b1; fwd3_load = 1'b1; fwd3_seed = SEED;
    @(posedge clk);
    n_load++;
    phase = 0;

    // first message, with idle cycles
    sent = 0;
    while (sent < HELLO.len()) begin
      if (($urandom % 4) == 0) clock(1'b0, byte_t'($urandom), -1);
      else begin
        clock(1'b1, HELLO[sent], -1);
        sent++;
      end
    end
    // pad to 36 steps past the seed
    repeat (GOODBYE_OFFSET - HELLO.len()) clock(1'b1, 8'h20, -1);
    foreach (GOODBYE_PT[i]) clock(1'b1, GOODBYE_PT[i], i);

    $display("mechanisms: load=%0d step=%0d hold=%0d decrypt=%0d jump3=%0d jump3_hold=%0d",
             n_load, n_step, n_hold, n_decrypt, n_jump, n_jump_hold);
    checks++;
    if (n_load == 0 || n_step == 0 || n_hold == 0 || n_decrypt == 0 || n_jump == 0 ||
        n_jump_hold == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// lfsr_ref_pkg: reference model for the LFSR testbenches.
//
// It computes the keystream in a form independent of the RTL's bit loop:
// the state is rotated right by one, and when the bit shifted out was 0 the
// mask 8'h38 (bits 3, 4, 5) is XORed in, which is the same as XNORing the
// feedback bit into those positions. It also holds the byte strings used as
// test messages and the published cipher text of "Goodbye".
package lfsr_ref_pkg;

  typedef logic [7:0] byte_t;

  localparam byte_t SEED = 8'h34;
  localparam byte_t TAP_MASK = 8'h38;

  function automatic byte_t ref_step(input byte_t q);
    byte_t r;
    r = {q[0], q[7:1]};
    if (q[0] == 1'b0) r = r ^ TAP_MASK;
    return r;
  endfunction

  function automatic byte_t ref_advance(input byte_t q, input int n);
    byte_t s = q;
    repeat (n) s = ref_step(s);
    return s;
  endfunction

  // "Goodbye" encrypts to these bytes when the keystream is 36 steps past
  // the seed 8'h34 (state 8'h1C).
  localparam int GOODBYE_LEN = 7;
  localparam int GOODBYE_OFFSET = 36;
  localparam byte_t GOODBYE_PT [GOODBYE_LEN] = '{"G", "o", "o", "d", "b", "y", "e"};
  localparam byte_t GOODBYE_CT [GOODBYE_LEN] = '{8'h5B, 8'h59, 8'h4C, 8'hF5, 8'hAA, 8'h25, 8'h73};

  localparam string HELLO = "Hello from the ECE department.";

  // Message bytes of the lab's short stimulus, sent right after the load.
  localparam int STIM_LEN = 3;
  localparam byte_t STIM_MIN [STIM_LEN] = '{8'h67, 8'h6A, 8'hD1};
  // Their cipher bytes, worked out by hand from the tap rule: the keys are
  // 34, 22, 29.
  localparam byte_t STIM_CT [STIM_LEN] = '{8'h53, 8'h48, 8'hF8};

endpackage

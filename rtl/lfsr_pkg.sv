// lfsr_pkg: shared constants and the next-state rule of the 8-bit LFSR.
//
// The register shifts right by one place. The bit that falls out of
// position 0 is fed back into position 7 and is XNORed into positions
// 3, 4 and 5 on the way (d(i) = q(0) xnor q(i+1) for i = 3..5). From the
// seed 8'h34 this rule walks through 255 distinct states before repeating.
// lfsr_step applies the rule once; lfsr_advance applies it n times and is
// used to check multi-step next-state logic.
package lfsr_pkg;

  parameter int unsigned LFSR_WIDTH = 8;
  parameter logic [LFSR_WIDTH-1:0] LFSR_INIT = 8'h34;  // power-up state and lab seed

  typedef logic [LFSR_WIDTH-1:0] lfsr_state_t;

  // One step of the LFSR: shift right, q[0] re-enters at the top and is
  // XNORed into bits 3..5.
  function automatic lfsr_state_t lfsr_step(input lfsr_state_t q);
    lfsr_state_t d;
    for (int i = 0; i < LFSR_WIDTH; i++) begin
      if (i == LFSR_WIDTH - 1)
        d[i] = q[0];
      else if (i > 2 && i < 6)
        d[i] = ~(q[0] ^ q[i+1]);
      else
        d[i] = q[i+1];
    end
    return d;
  endfunction

  // n steps of the LFSR.
  function automatic lfsr_state_t lfsr_advance(input lfsr_state_t q, input int unsigned n);
    lfsr_state_t s;
    s = q;
    for (int unsigned k = 0; k < n; k++)
      s = lfsr_step(s);
    return s;
  endfunction

endpackage

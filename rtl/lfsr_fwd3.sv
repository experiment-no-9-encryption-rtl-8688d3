// lfsr_fwd3: the 8-bit LFSR with next-state logic that jumps three states
// per enabled clock.
//
// It produces every third byte of the single-step lfsr sequence, so a
// keystream that the single-step register makes in three clocks comes out
// here in one. The jump is written out as flat equations, obtained by
// composing the single-step rule (shift right, q[0] into bit 7 and XNORed
// into bits 3..5) three times:
//   d7 = q2            d3 = ~(q6 ^ q0 ^ q1 ^ q2)
//   d6 = q1            d2 =   q5 ^ q0 ^ q1
//   d5 = ~(q2 ^ q0)    d1 = ~(q4 ^ q0)
//   d4 =   q7 ^ q1 ^ q2  d0 = q3
// Each bit depends on at most four state bits, so the jump costs one level
// of XOR logic.
//
// Interface and timing are those of lfsr: en is a synchronous clock enable,
// load = 1 loads seed on an enabled edge, mout = q ^ min is combinational,
// and the register powers up at INIT.
//
// Following the lab: the purpose (advance three states at once) and the
// equations for bits 7, 6, 3 and 2. The equations for bits 5, 4, 1 and 0
// are derived here from the single-step rule; the port list, enable and
// load are carried over from the single-step register.
module lfsr_fwd3
  import lfsr_pkg::*;
#(
  parameter int unsigned     WIDTH = LFSR_WIDTH,
  parameter logic [WIDTH-1:0] INIT = LFSR_INIT
) (
  input  logic             clk,
  input  logic             en,
  input  logic             load,
  input  logic [WIDTH-1:0] seed,
  input  logic [WIDTH-1:0] min,
  output logic [WIDTH-1:0] mout
);

  initial assert (WIDTH == 8)
    else $error("lfsr_fwd3: equations are written for WIDTH = 8 only");

  logic [WIDTH-1:0] q = INIT;
  logic [WIDTH-1:0] jump3;
  logic [WIDTH-1:0] d;

  always_comb begin
    jump3    = '0;
    jump3[7] = q[2];
    jump3[6] = q[1];
    jump3[5] = ~(q[2] ^ q[0]);
    jump3[4] = q[7] ^ q[1] ^ q[2];
    jump3[3] = ~(q[6] ^ q[0] ^ q[1] ^ q[2]);
    jump3[2] = q[5] ^ q[0] ^ q[1];
    jump3[1] = ~(q[4] ^ q[0]);
    jump3[0] = q[3];
    d = load ? seed : jump3;
  end

  always_ff @(posedge clk) begin
    if (en) q <= d;
  end

  assign mout = q ^ min;

endmodule

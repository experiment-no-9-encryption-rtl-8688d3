// lfsr: 8-bit keystream generator with an XOR data path (encrypt/decrypt).
//
// The state register q holds the current keystream byte. On a rising clock
// edge with en = 1 it either loads seed (load = 1) or advances one state
// (load = 0) by the rule in lfsr_pkg::lfsr_step: shift right, q[0] fed back
// into bit 7 and XNORed into bits 3, 4 and 5. With en = 0 the state holds.
// The data output is combinational: mout = q ^ min. Because XOR is its own
// inverse, the same block encrypts plain text and decrypts cipher text when
// its state sequence matches the sender's.
//
// Timing: mout follows min in the same cycle; the key used for a byte is the
// state present during that cycle, and the next enabled edge moves to the
// next key. A load on cycle t makes mout = seed ^ min in cycle t+1.
//
// Following the lab: the tap rule, the port list, load priority and the
// power-up state 8'h34. Design choices: the lab gates the clock with en;
// here en is a synchronous clock enable, which is equivalent when en only
// changes while clk is low and keeps a single clean clock on an FPGA. There
// is no reset port; the register powers up at INIT (an FPGA
// configuration value) and load restarts the sequence. WIDTH is fixed at 8
// by the tap positions and is a parameter only for the port widths.
module lfsr
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

  initial assert (WIDTH == LFSR_WIDTH)
    else $error("lfsr: taps are defined for WIDTH = %0d only", LFSR_WIDTH);

  logic [WIDTH-1:0] q = INIT;
  logic [WIDTH-1:0] d;

  always_comb begin
    if (load) d = seed;
    else      d = lfsr_step(q);
  end

  always_ff @(posedge clk) begin
    if (en) q <= d;
  end

  assign mout = q ^ min;

endmodule

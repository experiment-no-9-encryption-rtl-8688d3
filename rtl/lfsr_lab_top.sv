// lfsr_lab_top: top level of the LFSR encryption lab.
//
// It holds two independent designs on one clock:
//   * encryptor  - the loopback stream cipher (two single-step LFSRs); its
//                  ports keep their names: en, load, seed, min, crypt, mout.
//   * lfsr_fwd3  - the three-states-per-clock LFSR, with ports prefixed
//                  fwd3_.
// Nothing is shared between them but clk. Both power up at INIT and need
// one enabled clock with load = 1 to take a seed. Outputs are combinational
// in the data inputs (see encryptor and lfsr_fwd3 for timing).
//
// Placing the three-step register beside the cipher, rather than inside it,
// is a choice made here: it is a separate exercise result with no stated
// place in the cipher.
module lfsr_lab_top
  import lfsr_pkg::*;
#(
  parameter int unsigned     WIDTH = LFSR_WIDTH,
  parameter logic [WIDTH-1:0] INIT = LFSR_INIT
) (
  input  logic             clk,
  // stream cipher
  input  logic             en,
  input  logic             load,
  input  logic [WIDTH-1:0] seed,
  input  logic [WIDTH-1:0] min,
  output logic [WIDTH-1:0] crypt,
  output logic [WIDTH-1:0] mout,
  // three-step LFSR
  input  logic             fwd3_en,
  input  logic             fwd3_load,
  input  logic [WIDTH-1:0] fwd3_seed,
  input  logic [WIDTH-1:0] fwd3_min,
  output logic [WIDTH-1:0] fwd3_mout
);

  encryptor #(.WIDTH(WIDTH), .INIT(INIT)) u_encryptor (
    .clk   (clk),
    .en    (en),
    .load  (load),
    .seed  (seed),
    .min   (min),
    .crypt (crypt),
    .mout  (mout)
  );

  lfsr_fwd3 #(.WIDTH(WIDTH), .INIT(INIT)) u_fwd3 (
    .clk  (clk),
    .en   (fwd3_en),
    .load (fwd3_load),
    .seed (fwd3_seed),
    .min  (fwd3_min),
    .mout (fwd3_mout)
  );

endmodule

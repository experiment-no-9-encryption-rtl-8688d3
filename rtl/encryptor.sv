// encryptor: loopback LFSR stream cipher, sender and receiver in one block.
//
// Two identical lfsr instances share seed, load, en and clk, so their states
// stay equal cycle by cycle. The sender (u_tx) XORs the message byte min with
// its keystream and puts the result on the channel, which is brought out as
// crypt. The receiver (u_rx) XORs the channel byte with the same keystream
// and gives back the message on mout. crypt shows what an eavesdropper on
// the link would see; mout equals min whenever both registers hold the same
// state.
//
// Use: hold load = 1 with en = 1 for one clock to load the shared seed into
// both registers, then drop load. Each clock with en = 1 after that moves
// both to the next key. Both outputs are combinational in min: in a given
// cycle crypt = min ^ key and mout = crypt ^ key.
//
// Following the lab: the structure, the port set and the shared seed/load/
// enable wiring. Design choice: lower-case port names and a synchronous
// clock enable in place of the lab's gated clock (see lfsr).
module encryptor
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
  output logic [WIDTH-1:0] crypt,
  output logic [WIDTH-1:0] mout
);

  logic [WIDTH-1:0] channel;

  lfsr #(.WIDTH(WIDTH), .INIT(INIT)) u_tx (
    .clk  (clk),
    .en   (en),
    .load (load),
    .seed (seed),
    .min  (min),
    .mout (channel)
  );

  lfsr #(.WIDTH(WIDTH), .INIT(INIT)) u_rx (
    .clk  (clk),
    .en   (en),
    .load (load),
    .seed (seed),
    .min  (channel),
    .mout (mout)
  );

  assign crypt = channel;

endmodule

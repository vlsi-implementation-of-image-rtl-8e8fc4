// rlgcd: reversible-logic-gate image cipher, top level.
//
// An image ROM plays out one 8-bit pixel per clock (inn). The encryption
// block turns it into the cipher pixel en using reversible gates and a key
// from its own 4-bit LFSR; the decryption block, fed with en and running an
// identical LFSR in lock-step, recovers de, which equals inn in every cycle.
// Encrypted and decrypted pixels are brought out so that a host or testbench
// can collect the encrypted and the recovered image.
//
// Interface: clk, synchronous active-high rst (address 0, both LFSRs to
// SEED); outputs inn (plain pixel), pix_addr (its raster index), key_en and
// key_de (the two LFSR keys, always equal), en and de.
//
// Timing: all outputs change after each rising clk edge; en and de are
// combinational in the pixel and key registers, so a pixel is encrypted and
// decrypted in the same cycle it is read; the throughput is one pixel per
// clock and a 128x128 image takes 16,384 cycles.
//
// The three-instance structure (ROM, encryption, decryption, each clocked)
// follows the source design's RTL view; reset, pix_addr and the key outputs'
// names are this design's choices.
module rlgcd
  import rlgcd_pkg::*;
#(
  parameter int unsigned DEPTH     = IMG_PIXELS,
  parameter string       INIT_FILE = "",
  parameter key_t        SEED      = 4'b0001,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst,
  output pixel_t        inn,
  output logic [AW-1:0] pix_addr,
  output key_t          key_en,
  output key_t          key_de,
  output pixel_t        en,
  output pixel_t        de
);
  image_rom  #(.DEPTH(DEPTH), .INIT_FILE(INIT_FILE))
             u_rom (.clk, .rst, .out(inn), .addr(pix_addr));

  encryption #(.SEED(SEED)) u_enc (.clk, .rst, .inn, .en, .key(key_en));

  decryption #(.SEED(SEED)) u_dec (.clk, .rst, .en, .de, .key(key_de));

  // The two key generators must never drift apart.
  a_keys_in_step: assert property (@(posedge clk) disable iff (rst) key_en == key_de);
endmodule

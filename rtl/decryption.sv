// decryption: inverse of the encryption block, one 8-bit pixel per clock.
//
// The encrypted pixel e[7:0] is first XORed, nibble by nibble, with the
// 4-bit LFSR key. Then each gate of the encryption chain is applied again in
// reverse order; every gate is its own inverse:
//   upper: e[7:5] -> Fredkin -> Toffoli -> SCL inputs A,B,C
//   lower: e[2:0] -> Fredkin -> Toffoli -> SCL inputs B,C,D
//   Feynman(A = e[4], B = e[3]) gives the upper SCL its D input (P) and the
//   lower SCL its A input (Q).
// The two SCL gates deliver the plain pixel d[7:4] and d[3:0].
//
// This block owns its own LFSR with the same seed as the encryption block.
// Both are clocked and reset together, so the key here always equals the key
// used to encrypt the pixel in the same cycle; no key travels between them.
// The gate order and wiring follow the source design's decryption block
// diagram and the two-LFSR arrangement its RTL view shows; the reset and the
// exact bit wiring are this design's readings, mirrored from the encryption.
//
// Timing: de is combinational in en and in key; key advances on every
// rising clk edge.
module decryption
  import rlgcd_pkg::*;
#(
  parameter key_t SEED = 4'b0001
) (
  input  logic   clk,
  input  logic   rst,
  input  pixel_t en,
  output pixel_t de,
  output key_t   key
);
  nibble_t x_hi, x_lo;             // key removed
  logic uf_p, uf_q, uf_r;          // upper Fredkin
  logic ut_p, ut_q, ut_r;          // upper Toffoli
  logic lf_p, lf_q, lf_r;          // lower Fredkin
  logic lt_p, lt_q, lt_r;          // lower Toffoli
  logic fy_p, fy_q;                // Feynman

  lfsr_key #(.SEED(SEED)) u_lfsr (.clk, .rst, .key);

  key_xor #(.WIDTH(NIB_W)) u_xor_hi (.din(en[7:4]), .key, .dout(x_hi));
  key_xor #(.WIDTH(NIB_W)) u_xor_lo (.din(en[3:0]), .key, .dout(x_lo));

  fredkin_gate u_fre_hi (.a(x_hi[3]), .b(x_hi[2]), .c(x_hi[1]), .p(uf_p), .q(uf_q), .r(uf_r));
  toffoli_gate u_tof_hi (.a(uf_p), .b(uf_q), .c(uf_r), .p(ut_p), .q(ut_q), .r(ut_r));

  fredkin_gate u_fre_lo (.a(x_lo[2]), .b(x_lo[1]), .c(x_lo[0]), .p(lf_p), .q(lf_q), .r(lf_r));
  toffoli_gate u_tof_lo (.a(lf_p), .b(lf_q), .c(lf_r), .p(lt_p), .q(lt_q), .r(lt_r));

  feynman_gate u_fey    (.a(x_hi[0]), .b(x_lo[3]), .p(fy_p), .q(fy_q));

  scl_gate     u_scl_hi (.a(ut_p), .b(ut_q), .c(ut_r), .d(fy_p),
                         .p(de[7]), .q(de[6]), .r(de[5]), .s(de[4]));
  scl_gate     u_scl_lo (.a(fy_q), .b(lt_p), .c(lt_q), .d(lt_r),
                         .p(de[3]), .q(de[2]), .r(de[1]), .s(de[0]));
endmodule

// encryption: reversible-gate pixel cipher, one 8-bit pixel per clock.
//
// The pixel i[7:0] is split into nibbles. Each nibble enters an SCL gate
// (A,B,C,D = i[7..4] above, i[3..0] below). Three SCL outputs of each half
// go on through a Toffoli gate and then a Fredkin gate: P,Q,R of the upper
// gate and Q,R,S of the lower one. The remaining two lines, S of the upper
// SCL gate and P of the lower one, meet in a Feynman gate (A = upper S,
// B = lower P), whose P output becomes bit 4 and Q output bit 3 before the
// key is added. Finally both nibbles are XORed with the 4-bit LFSR key:
//   e[7:5] = Fredkin(Toffoli(upper P,Q,R)) ^ key[3:1]
//   e[4]   = upper S                        ^ key[0]
//   e[3]   = upper S ^ i[3]                 ^ key[3]
//   e[2:0] = Fredkin(Toffoli(lower Q,R,S)) ^ key[2:0]
// Every gate is reversible, so the decryption block undoes the chain in
// reverse order with the same key.
//
// The gate chain and its wiring follow the source design's encryption block
// diagram. The port names inn/en follow its simulation signals. Which key
// bit meets which pixel bit, the Feynman input order, and the reset are this
// design's readings; together they reproduce the published simulation values.
//
// Timing: en is combinational in inn and in key; key is the output of the
// internal LFSR and advances on every rising clk edge, so a new pixel is
// encrypted with a new key each cycle.
module encryption
  import rlgcd_pkg::*;
#(
  parameter key_t SEED = 4'b0001
) (
  input  logic   clk,
  input  logic   rst,
  input  pixel_t inn,
  output pixel_t en,
  output key_t   key
);
  // upper half
  logic us_p, us_q, us_r, us_s;   // SCL
  logic ut_p, ut_q, ut_r;         // Toffoli
  logic uf_p, uf_q, uf_r;         // Fredkin
  // lower half
  logic ls_p, ls_q, ls_r, ls_s;
  logic lt_p, lt_q, lt_r;
  logic lf_p, lf_q, lf_r;
  // Feynman between the halves
  logic fy_p, fy_q;

  lfsr_key #(.SEED(SEED)) u_lfsr (.clk, .rst, .key);

  scl_gate     u_scl_hi (.a(inn[7]), .b(inn[6]), .c(inn[5]), .d(inn[4]),
                         .p(us_p), .q(us_q), .r(us_r), .s(us_s));
  toffoli_gate u_tof_hi (.a(us_p), .b(us_q), .c(us_r), .p(ut_p), .q(ut_q), .r(ut_r));
  fredkin_gate u_fre_hi (.a(ut_p), .b(ut_q), .c(ut_r), .p(uf_p), .q(uf_q), .r(uf_r));

  scl_gate     u_scl_lo (.a(inn[3]), .b(inn[2]), .c(inn[1]), .d(inn[0]),
                         .p(ls_p), .q(ls_q), .r(ls_r), .s(ls_s));
  toffoli_gate u_tof_lo (.a(ls_q), .b(ls_r), .c(ls_s), .p(lt_p), .q(lt_q), .r(lt_r));
  fredkin_gate u_fre_lo (.a(lt_p), .b(lt_q), .c(lt_r), .p(lf_p), .q(lf_q), .r(lf_r));

  feynman_gate u_fey    (.a(us_s), .b(ls_p), .p(fy_p), .q(fy_q));

  key_xor #(.WIDTH(NIB_W)) u_xor_hi (.din({uf_p, uf_q, uf_r, fy_p}), .key, .dout(en[7:4]));
  key_xor #(.WIDTH(NIB_W)) u_xor_lo (.din({fy_q, lf_p, lf_q, lf_r}), .key, .dout(en[3:0]));
endmodule

// key_xor: bitwise XOR of a data word with the key, purely combinational.
//
// dout[k] = din[k] xor key[k]. In the cipher one instance whitens each nibble
// of the pixel with the same 4-bit LFSR key; being an XOR it undoes itself
// when the same key is applied again. The source design draws it as a bank of
// two-input XOR gates; which key bit meets which data bit is this design's
// reading, chosen because it reproduces the published simulation values.
module key_xor #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] din,
  input  logic [WIDTH-1:0] key,
  output logic [WIDTH-1:0] dout
);
  always_comb dout = din ^ key;
endmodule

// image_rom: read-only store of one 128x128 image of 8-bit pixels, played
// out one pixel per clock in raster order.
//
// An address counter runs from 0 to DEPTH-1 and wraps; out is the pixel at
// the current address (combinational read of the array, like a LUT ROM), so
// it changes together with the key registers of the cipher blocks. After a
// synchronous reset the address is 0 and out is pixel 0.
//
// Contents: when INIT_FILE names a text file of binary words (one pixel per
// line, as produced by an image-to-text converter) it is loaded with
// $readmemb. Otherwise the array is filled with a synthetic test image,
//   pixel(r, c) = (2r + 3c) xor (r*c)   modulo 256,  r = row, c = column,
// so the design has a picture to work on without an external file.
//
// The 16,384-word depth and the $readmemb loading follow the source design;
// the address counter, its wrap-around, the reset and the synthetic image
// are this design's choices.
module image_rom
  import rlgcd_pkg::*;
#(
  parameter int unsigned DEPTH     = IMG_PIXELS,
  parameter string       INIT_FILE = "",
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst,
  output pixel_t        out,
  output logic [AW-1:0] addr
);
  pixel_t mem [DEPTH];

  initial begin
    if (INIT_FILE != "") begin
      $readmemb(INIT_FILE, mem);
    end else begin
      for (int unsigned i = 0; i < DEPTH; i++) begin
        int unsigned r, c;
        r = i / IMG_COLS;
        c = i % IMG_COLS;
        mem[i] = pixel_t'((2 * r + 3 * c) ^ (r * c));
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst)                      addr <= '0;
    else if (addr == AW'(DEPTH - 1)) addr <= '0;
    else                          addr <= addr + 1'b1;
  end

  assign out = mem[addr];
endmodule

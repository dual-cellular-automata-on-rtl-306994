// pixel_cipher: encrypts one secret pixel with the key byte from the 8-bit
// cellular automaton in two ways at once. enc_xor = pixel ^ key goes to the
// first encrypted image, enc_xnor = ~(pixel ^ key) to the second. Both are
// their own inverse, so applying the same key byte again recovers the pixel.
//
// Purely combinational; the controller samples the result in the third clock
// of each pixel, when it writes both encrypted-image RAMs.
module pixel_cipher
  import dca_pkg::*;
#(
  parameter int PIXEL_W_P = PIXEL_W
) (
  input  logic [PIXEL_W_P-1:0] pixel,
  input  logic [PIXEL_W_P-1:0] key,
  output logic [PIXEL_W_P-1:0] enc_xor,
  output logic [PIXEL_W_P-1:0] enc_xnor
);

  always_comb begin
    enc_xor  = pixel ^ key;
    enc_xnor = pixel ~^ key;
  end

endmodule

// dca_pkg: constants and types shared by the dual cellular-automaton image
// encryptor. The image is 128 x 128 pixels of 8-bit grey, handled as a row
// vector of 16384 pixels, so every pixel index and RAM address is 14 bits.
//
// The two cellular automata (CA) are null-boundary rule 90 / rule 150 arrays.
// A rule mask has bit i set when cell i+1 (cells numbered from 1, left to
// right as drawn) uses rule 150 (s_i <= s_{i-1} ^ s_i ^ s_{i+1}); a clear bit
// means rule 90 (s_i <= s_{i-1} ^ s_{i+1}). Both masks below give
// maximal-length sequences: 2^14-1 states for the shuffler and 2^8-1 states
// for the key generator. The rule sequences are the published ones; the bit
// order (cell 1 in bit 0) is this design's choice.
package dca_pkg;

  localparam int IMG_SIDE = 128;
  localparam int NPIX     = IMG_SIDE * IMG_SIDE;   // 16384 pixels
  localparam int ADDR_W   = 14;                    // log2(NPIX)
  localparam int PIXEL_W  = 8;                     // grey level

  // 14-cell shuffler: R90-R150-R150-R150-R150-R150-R90-R150-R150-R150-R150-R150-R150-R90
  localparam logic [13:0] CA14_RULE150 = 14'b01_1111_1011_1110;
  // 8-cell key generator: R90-R90-R150-R90-R150-R90-R150-R90
  localparam logic [7:0]  CA8_RULE150  = 8'b0101_0100;

  // Pixel sequencer states. Each pixel takes GEN -> ADDR -> ENC, one clock each.
  typedef enum logic [2:0] {
    S_IDLE = 3'd0,   // seeds held in the CAs, waiting for the encrypt switch
    S_GEN  = 3'd1,   // cycle 1: both CAs step
    S_ADDR = 3'd2,   // cycle 2: 14-bit CA value latched as RAM address, pixel read
    S_ENC  = 3'd3,   // cycle 3: XOR / XNOR and write to both RAMs
    S_DONE = 3'd4    // all pixels written, waiting for the switch to return to 0
  } ctrl_state_t;

endpackage

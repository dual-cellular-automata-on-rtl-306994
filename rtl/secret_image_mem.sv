// secret_image_mem: the 128 x 128 grey-level image to be encrypted, stored as
// a row vector (pixel index = row * 128 + column) of 16384 bytes.
//
// One write port loads the image; one read port, used by the controller,
// returns the pixel at raddr one clock later (registered output, as an
// on-chip block RAM would). Keeping the image in a loadable RAM rather than
// compiling it into logic as a constant is this design's choice.
module secret_image_mem
  import dca_pkg::*;
#(
  parameter int DEPTH     = NPIX,
  parameter int PIXEL_W_P = PIXEL_W,
  localparam int AW       = $clog2(DEPTH)
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [AW-1:0]        waddr,
  input  logic [PIXEL_W_P-1:0] wdata,
  input  logic [AW-1:0]        raddr,
  output logic [PIXEL_W_P-1:0] rdata
);

  logic [PIXEL_W_P-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule

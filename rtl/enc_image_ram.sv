// enc_image_ram: 16384 x 8 on-chip RAM that receives one encrypted image. The
// encryptor has two of them, one for the XOR-encrypted and one for the
// XNOR-encrypted copy of the secret image.
//
// The write port (clock, wren, address, data, the names of the RAM symbols in
// the published schematic) is driven by the encryptor: address is the 14-bit
// cellular-automaton value, so consecutive pixels land at scrambled places.
// A second, independent read port returns mem[rd_addr] one clock later; it
// lets the encrypted image be read out, a job done on the original board by a
// JTAG memory editor. Read-during-write to the same address returns the old
// byte.
module enc_image_ram
  import dca_pkg::*;
#(
  parameter int DEPTH  = NPIX,
  parameter int DATA_W = PIXEL_W,
  localparam int AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              wren,
  input  logic [AW-1:0]     address,
  input  logic [DATA_W-1:0] data,
  input  logic [AW-1:0]     rd_addr,
  output logic [DATA_W-1:0] rd_data
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wren) mem[address] <= data;
    rd_data <= mem[rd_addr];
  end

endmodule

// dual_ca_encryptor: image encryptor built from two cellular automata.
//
// A 128 x 128 grey-level secret image is read pixel by pixel in row order.
// For each pixel a 14-bit rule 90/150 cellular automaton (ca14) supplies the
// address at which the encrypted pixel is stored, which scrambles pixel
// positions, and an 8-bit one (ca8) supplies a key byte that is combined with
// the pixel value. Two encrypted copies are written side by side: image 1
// holds pixel XOR key, image 2 holds pixel XNOR key, both at the same
// scrambled address. The 14-bit seed selects one of 2^14-1 scrambling orders.
// Each pixel takes three clocks (CA step, address latch, encrypt and write),
// so one image takes 3 * 16384 = 49152 clocks, about 0.98 ms at 50 MHz.
//
// Interface: the secret image is loaded through img_we/img_waddr/img_wdata;
// seed14 and seed8 are sampled while the encryptor is idle; setting the
// 'encrypt' switch to 1 starts a run; busy is high during it and done after
// it until the switch returns to 0. Both encrypted images are read back at
// rd_addr, with the bytes on rd_data_xor / rd_data_xnor one clock later.
// The load, seed and read-back ports are this design's way of doing what the
// original board did with a JTAG memory editor.
module dual_ca_encryptor
  import dca_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               encrypt,
  input  logic [ADDR_W-1:0]  seed14,
  input  logic [PIXEL_W-1:0] seed8,
  input  logic               img_we,
  input  logic [ADDR_W-1:0]  img_waddr,
  input  logic [PIXEL_W-1:0] img_wdata,
  input  logic [ADDR_W-1:0]  rd_addr,
  output logic [PIXEL_W-1:0] rd_data_xor,
  output logic [PIXEL_W-1:0] rd_data_xnor,
  output logic               busy,
  output logic               done
);

  logic               ca_load, ca_step, ram_we;
  logic [ADDR_W-1:0]  ca14_state, pix_raddr, ram_addr, ram_addr1;
  logic [PIXEL_W-1:0] ca8_state, secret_pixel, enc_xor, enc_xnor;

  encrypt_ctrl u_ctrl (
    .clk, .rst_n, .encrypt,
    .ca_load, .ca_step, .ca14_state,
    .pix_raddr, .ram_we, .ram_addr, .ram_addr1,
    .busy, .done
  );

  ca14 u_ca14 (
    .clk, .rst_n, .load(ca_load), .seed(seed14), .step(ca_step), .state(ca14_state)
  );

  ca8 u_ca8 (
    .clk, .rst_n, .load(ca_load), .seed(seed8), .step(ca_step), .state(ca8_state)
  );

  secret_image_mem u_secret (
    .clk, .we(img_we), .waddr(img_waddr), .wdata(img_wdata),
    .raddr(pix_raddr), .rdata(secret_pixel)
  );

  pixel_cipher u_cipher (
    .pixel(secret_pixel), .key(ca8_state), .enc_xor, .enc_xnor
  );

  // ram1 holds the XOR image, ram2 the XNOR image.
  enc_image_ram u_ram1 (
    .clk, .wren(ram_we), .address(ram_addr), .data(enc_xor),
    .rd_addr, .rd_data(rd_data_xor)
  );

  enc_image_ram u_ram2 (
    .clk, .wren(ram_we), .address(ram_addr1), .data(enc_xnor),
    .rd_addr, .rd_data(rd_data_xnor)
  );

endmodule

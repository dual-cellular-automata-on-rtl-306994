// tb_image_workloads: encrypts five different 128 x 128 grey images with the
// full-size encryptor and measures the encryption the way image ciphers are
// usually judged: mean squared error and PSNR between the original and each
// encrypted image (XOR and XNOR), and the grey-level histogram of the
// encrypted images. The five images are generated here with different
// statistics (dark, bright, high-contrast, smooth, textured) in place of
// photographs. Each result is also checked byte for byte against a reference
// model of the two automata, and the run time against 3 clocks per pixel.
//
// Pass criteria: exact match with the model; PSNR below 12 dB for both
// images (a strongly altered image; published measurements of this cipher
// on 128 x 128 photographs lie between about 7.8 and 9.3 dB); the encrypted histogram uses at least 240
// of the 256 grey levels and no level holds more than 4 times its fair
// share (64 pixels).
module tb_image_workloads;
  localparam int NPIX = 16384;
  localparam int R14 [14] = '{90,150,150,150,150,150,90,150,150,150,150,150,150,90};
  localparam int R8  [8]  = '{90,90,150,90,150,90,150,90};

  logic        clk = 1'b0, rst_n = 1'b0, encrypt = 1'b0;
  logic [13:0] seed14 = 14'h2C91, img_waddr = '0, rd_addr = '0;
  logic [7:0]  seed8 = 8'h3B, img_wdata = '0, rd_data_xor, rd_data_xnor;
  logic        img_we = 1'b0, busy, done;
  int checks = 0, failures = 0;

  dual_ca_encryptor dut (.*);

  always #10 clk = ~clk;

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [13:0] next14(logic [13:0] s);
    logic [13:0] r;
    for (int i = 0; i < 14; i++)
      r[i] = ((i == 0) ? 1'b0 : s[i-1]) ^ ((i == 13) ? 1'b0 : s[i+1]) ^ ((R14[i] == 150) & s[i]);
    return r;
  endfunction

  function automatic logic [7:0] next8(logic [7:0] s);
    logic [7:0] r;
    for (int i = 0; i < 8; i++)
      r[i] = ((i == 0) ? 1'b0 : s[i-1]) ^ ((i == 7) ? 1'b0 : s[i+1]) ^ ((R8[i] == 150) & s[i]);
    return r;
  endfunction

  logic [7:0] img [NPIX];
  logic [7:0] got1 [NPIX];
  logic [7:0] got2 [NPIX];

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic int clip(int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  task automatic make_image(int kind);
    for (int r = 0; r < 128; r++)
      for (int c = 0; c < 128; c++) begin
        int v;
        case (kind)
          0: v = 30 + (r / 4) + $urandom_range(0, 15);                        // dark portrait-like
          1: v = 200 + (c / 8) + $urandom_range(0, 20);                       // bright
          2: v = (((r / 16) + (c / 16)) % 2) ? 230 : 25;                      // high contrast
          3: v = (r * 2 + c) / 2;                                             // smooth gradient
          default: v = 128 + ((r * 7 + c * 13) % 64) - 32 + $urandom_range(0, 40); // texture
        endcase
        img[r * 128 + c] = 8'(clip(v));
      end
  endtask

  task automatic encrypt_image();
    for (int k = 0; k < NPIX; k++) begin
      @(negedge clk); img_we = 1'b1; img_waddr = 14'(k); img_wdata = img[k];
    end
    @(negedge clk); img_we = 1'b0;
    encrypt = 1'b1;
    while (!busy) @(negedge clk);
    begin
      int cyc = 0;
      while (busy) begin @(negedge clk); cyc++; end
      expect_true(cyc == 3 * NPIX, $sformatf("run took %0d clocks", cyc));
    end
    encrypt = 1'b0;
    while (done) @(negedge clk);
    for (int a = 0; a <= NPIX; a++) begin
      @(negedge clk);
      if (a > 0) begin got1[a-1] = rd_data_xor; got2[a-1] = rd_data_xnor; end
      if (a < NPIX) rd_addr = 14'(a);
    end
  endtask

  task automatic evaluate(string name);
    logic [13:0] s14 = seed14;
    logic [7:0]  s8  = seed8;
    int   bad = 0, used1 = 0, max1 = 0;
    int   hist1 [256];
    real  se1 = 0.0, se2 = 0.0, mse1, mse2, psnr1, psnr2;
    foreach (hist1[i]) hist1[i] = 0;
    for (int k = 0; k < NPIX; k++) begin
      logic [13:0] a;
      s14 = next14(s14);
      s8  = next8(s8);
      a = (k == NPIX - 1) ? 14'd0 : s14;
      if (got1[a] !== (img[k] ^ s8) || got2[a] !== ~(img[k] ^ s8)) bad++;
    end
    expect_true(bad == 0, $sformatf("%s: %0d pixels differ from the model", name, bad));
    // position-by-position comparison of original and encrypted image
    for (int p = 0; p < NPIX; p++) begin
      se1 += (real'(img[p]) - real'(got1[p])) ** 2;
      se2 += (real'(img[p]) - real'(got2[p])) ** 2;
      hist1[got1[p]]++;
    end
    mse1 = se1 / NPIX;  mse2 = se2 / NPIX;
    psnr1 = 10.0 * $log10(255.0 * 255.0 / mse1);
    psnr2 = 10.0 * $log10(255.0 * 255.0 / mse2);
    foreach (hist1[i]) begin
      if (hist1[i] > 0) used1++;
      if (hist1[i] > max1) max1 = hist1[i];
    end
    $display("%-14s MSE xor %8.2f xnor %8.2f  PSNR xor %6.3f dB xnor %6.3f dB  levels used %0d, fullest level %0d",
             name, mse1, mse2, psnr1, psnr2, used1, max1);
    expect_true(psnr1 < 12.0 && psnr2 < 12.0, $sformatf("%s: PSNR too high", name));
    expect_true(used1 >= 240, $sformatf("%s: only %0d grey levels used", name, used1));
    expect_true(max1 <= 4 * 64, $sformatf("%s: histogram peak %0d", name, max1));
  endtask

  initial begin
    string names [5] = '{"dark", "bright", "checkerboard", "gradient", "texture"};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < 5; w++) begin
      make_image(w);
      encrypt_image();
      evaluate(names[w]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pixel_cipher: exhaustive check of the XOR / XNOR pixel encryptor over
// all 65536 (pixel, key) pairs. Expected values are built bit by bit, and the
// test also checks that encrypting twice with the same key gives the pixel
// back.
module tb_pixel_cipher;
  logic [7:0] pixel, key, enc_xor, enc_xnor;
  logic [7:0] back_xor, back_xnor, dummy0, dummy1;
  int checks = 0, failures = 0;

  pixel_cipher dut (.*);
  pixel_cipher dut_back_x (.pixel(enc_xor),  .key, .enc_xor(back_xor), .enc_xnor(dummy0));
  pixel_cipher dut_back_n (.pixel(enc_xnor), .key, .enc_xor(dummy1), .enc_xnor(back_xnor));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] ex, en;
    for (int p = 0; p < 256; p++) begin
      for (int k = 0; k < 256; k++) begin
        pixel = 8'(p); key = 8'(k);
        #1;
        for (int b = 0; b < 8; b++) begin
          ex[b] = (pixel[b] != key[b]);
          en[b] = (pixel[b] == key[b]);
        end
        checks++;
        if (enc_xor !== ex || enc_xnor !== en || back_xor !== pixel || back_xnor !== pixel) begin
          failures++;
          if (failures < 10)
            $display("FAIL p=%h k=%h xor=%h/%h xnor=%h/%h", pixel, key, enc_xor, ex, enc_xnor, en);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

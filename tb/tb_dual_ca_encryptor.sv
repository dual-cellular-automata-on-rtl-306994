// tb_dual_ca_encryptor: end-to-end test of the dual cellular-automaton image
// encryptor at its full size (128 x 128 pixels, no parameter overrides).
//
// A synthetic 128 x 128 grey image (smooth gradients plus a few bright
// shapes and noise) is generated and loaded. The test then runs complete
// encryptions and, for each, reads both encrypted images back and compares
// every byte with a reference computed here: independent cell-by-cell models
// of the two automata give, for pixel k, the address (the 14-bit state after
// k+1 steps, or 0 for the last pixel) and the key byte (the 8-bit state after
// k+1 steps). It also decrypts both images with the same models and checks
// that the original comes back, that busy lasts 3 clocks per pixel, and that
// every address was written once. Mechanisms exercised and counted: start by
// the switch, the three-clock pixel step, the last pixel at address 0, the
// zero-seed guard, the switch opened during a run, return to idle and
// restart, and that a different 14-bit seed gives a different scrambling.
module tb_dual_ca_encryptor;
  localparam int NPIX = 16384;
  localparam int R14 [14] = '{90,150,150,150,150,150,90,150,150,150,150,150,150,90};
  localparam int R8  [8]  = '{90,90,150,90,150,90,150,90};

  logic        clk = 1'b0, rst_n = 1'b0, encrypt = 1'b0;
  logic [13:0] seed14 = '0, img_waddr = '0, rd_addr = '0;
  logic [7:0]  seed8 = '0, img_wdata = '0, rd_data_xor, rd_data_xnor;
  logic        img_we = 1'b0, busy, done;
  int checks = 0, failures = 0;

  dual_ca_encryptor dut (.*);

  always #10 clk = ~clk;   // 50 MHz

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [13:0] next14(logic [13:0] s);
    logic [13:0] r;
    for (int i = 0; i < 14; i++) begin
      logic l, rt;
      l  = (i == 0)  ? 1'b0 : s[i-1];
      rt = (i == 13) ? 1'b0 : s[i+1];
      r[i] = l ^ rt ^ ((R14[i] == 150) ? s[i] : 1'b0);
    end
    return r;
  endfunction

  function automatic logic [7:0] next8(logic [7:0] s);
    logic [7:0] r;
    for (int i = 0; i < 8; i++) begin
      logic l, rt;
      l  = (i == 0) ? 1'b0 : s[i-1];
      rt = (i == 7) ? 1'b0 : s[i+1];
      r[i] = l ^ rt ^ ((R8[i] == 150) ? s[i] : 1'b0);
    end
    return r;
  endfunction

  logic [7:0]  img   [NPIX];
  logic [7:0]  got1  [NPIX];
  logic [7:0]  got2  [NPIX];
  logic [13:0] addr_of [NPIX];
  logic [7:0]  key_of  [NPIX];

  // mechanism counters
  int n_start = 0, n_pixels = 0, n_addr0 = 0, n_zero_seed = 0;
  int n_switch_open_midrun = 0, n_restart = 0, n_seed_differs = 0;

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t %s", $time, what);
    end
  endtask

  task automatic make_image();
    for (int r = 0; r < 128; r++)
      for (int c = 0; c < 128; c++) begin
        int v;
        v = r + c;                                            // diagonal gradient
        if ((r - 64) * (r - 64) + (c - 40) * (c - 40) < 400) v = 230;  // bright disc
        if (r > 90 && r < 110 && c > 70 && c < 120) v = 20;    // dark bar
        v += $urandom_range(0, 7);                             // sensor noise
        img[r * 128 + c] = 8'(v > 255 ? 255 : v);
      end
  endtask

  task automatic load_image();
    for (int k = 0; k < NPIX; k++) begin
      @(negedge clk); img_we = 1'b1; img_waddr = 14'(k); img_wdata = img[k];
    end
    @(negedge clk); img_we = 1'b0;
  endtask

  task automatic run(logic [13:0] s14, logic [7:0] s8, bit open_midrun);
    int cyc;
    seed14 = s14; seed8 = s8;
    @(negedge clk);
    encrypt = 1'b1;
    n_start++;
    cyc = 0;
    while (!busy) @(negedge clk);
    while (busy) begin
      @(negedge clk);
      cyc++;
      if (open_midrun && cyc == 500) begin encrypt = 1'b0; n_switch_open_midrun++; end
    end
    expect_true(cyc == 3 * NPIX, $sformatf("encryption took %0d clocks, expected %0d", cyc, 3 * NPIX));
    if (!open_midrun) begin
      expect_true(done, "done after the run");
      repeat (20) @(negedge clk);
      expect_true(done && !busy, "done holds while switch closed");
      encrypt = 1'b0;
    end
    repeat (5) @(negedge clk);
    expect_true(!done && !busy, "idle after switch opens");
  endtask

  task automatic read_back();
    for (int a = 0; a <= NPIX; a++) begin
      @(negedge clk);
      if (a > 0) begin
        got1[a-1] = rd_data_xor;
        got2[a-1] = rd_data_xnor;
      end
      if (a < NPIX) rd_addr = 14'(a);
    end
  endtask

  task automatic check_run(logic [13:0] s14, logic [7:0] s8);
    logic [13:0] c14;
    logic [7:0]  c8;
    bit          hit [NPIX];
    int          bad1 = 0, bad2 = 0, badd = 0;
    c14 = (s14 == 0) ? 14'd1 : s14;
    c8  = (s8 == 0)  ? 8'd1  : s8;
    foreach (hit[i]) hit[i] = 1'b0;
    for (int k = 0; k < NPIX; k++) begin
      c14 = next14(c14);
      c8  = next8(c8);
      addr_of[k] = (k == NPIX - 1) ? 14'd0 : c14;
      key_of[k]  = c8;
      if (hit[addr_of[k]]) badd++;
      hit[addr_of[k]] = 1'b1;
    end
    expect_true(badd == 0, "reference addresses form a permutation");
    for (int k = 0; k < NPIX; k++) begin
      logic [7:0] e1, e2;
      e1 = img[k] ^ key_of[k];
      e2 = ~(img[k] ^ key_of[k]);
      checks += 2;
      if (got1[addr_of[k]] !== e1) begin
        bad1++;
        if (bad1 < 5) $display("FAIL XOR image pixel %0d at %h: got %h expected %h", k, addr_of[k], got1[addr_of[k]], e1);
      end
      if (got2[addr_of[k]] !== e2) begin
        bad2++;
        if (bad2 < 5) $display("FAIL XNOR image pixel %0d at %h: got %h expected %h", k, addr_of[k], got2[addr_of[k]], e2);
      end
      // decryption with the same key streams recovers the pixel
      checks++;
      if (((got1[addr_of[k]] ^ key_of[k]) !== img[k]) || ((~got2[addr_of[k]] ^ key_of[k]) !== img[k]))
        failures++;
      if (addr_of[k] == 14'd0) n_addr0++;
    end
    failures += bad1 + bad2;
    n_pixels += NPIX;
  endtask

  logic [7:0] first_xor [NPIX];
  int same;

  initial begin
    make_image();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load_image();

    // run 1: a chosen key pair
    run(14'h1B3D, 8'h5A, 1'b0);
    read_back();
    check_run(14'h1B3D, 8'h5A);
    first_xor = got1;

    // run 2: different 14-bit seed, switch opened during the run
    n_restart++;
    run(14'h0777, 8'h5A, 1'b1);
    read_back();
    check_run(14'h0777, 8'h5A);
    same = 0;
    for (int a = 0; a < NPIX; a++) if (got1[a] == first_xor[a]) same++;
    if (same < NPIX / 16) n_seed_differs++;

    // run 3: zero seeds, replaced by 1 in the automata
    n_restart++;
    run(14'h0000, 8'h00, 1'b0);
    n_zero_seed++;
    read_back();
    check_run(14'h0000, 8'h00);

    $display("mechanisms: starts=%0d pixels=%0d last_pixel_at_0=%0d zero_seed=%0d switch_open_midrun=%0d restarts=%0d seed_changes_order=%0d",
             n_start, n_pixels, n_addr0, n_zero_seed, n_switch_open_midrun, n_restart, n_seed_differs);
    expect_true(n_start > 0, "switch start exercised");
    expect_true(n_pixels > 0, "three-clock pixel step exercised");
    expect_true(n_addr0 > 0, "last pixel at address 0 exercised");
    expect_true(n_zero_seed > 0, "zero-seed guard exercised");
    expect_true(n_switch_open_midrun > 0, "switch opened during a run exercised");
    expect_true(n_restart > 0, "restart exercised");
    expect_true(n_seed_differs > 0, "a new 14-bit seed changes the scrambling");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

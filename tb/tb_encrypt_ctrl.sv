// tb_encrypt_ctrl: checks the three-clock-per-pixel sequence of the
// controller over a full 16384-pixel run. The CA is replaced by a register
// that takes a fresh random non-zero value on every ca_step. A monitor
// checks that, for every pixel, ca_step, the address latch and ram_we follow
// on consecutive clocks; that both RAM addresses equal the CA value after the
// step (address 0 for the last pixel); that the pixel index runs 0..16383 in
// order; that busy lasts exactly 3*16384 clocks; that done holds until the
// switch opens; and that the seeds are reloaded while idle.
module tb_encrypt_ctrl;
  localparam int NPIX = 16384;

  logic clk = 1'b0, rst_n = 1'b0, encrypt = 1'b0;
  logic ca_load, ca_step, ram_we, busy, done;
  logic [13:0] ca14_state, pix_raddr, ram_addr, ram_addr1;
  int checks = 0, failures = 0;

  encrypt_ctrl dut (.*);

  always #10 clk = ~clk;   // 50 MHz

  initial begin : watchdog
    repeat (150000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stand-in for the 14-bit CA
  logic [13:0] fake_ca;
  always_ff @(posedge clk) begin
    if (ca_load)      fake_ca <= 14'h0001;
    else if (ca_step) fake_ca <= 14'($urandom_range(1, 16383));
  end
  assign ca14_state = fake_ca;

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t %s", $time, what);
    end
  endtask

  // cycle monitor
  int busy_cycles = 0, writes = 0, steps = 0, since_step = 99;
  logic [13:0] addr_after_step;
  bit in_run = 0;
  always @(negedge clk) if (rst_n) begin
    if (busy) busy_cycles++;
    since_step++;
    if (ca_step) begin
      since_step = 0;
      steps++;
    end
    if (since_step == 1) begin
      addr_after_step = ca14_state;
      expect_true(!ca_step && !ram_we, "address cycle idle of step/write");
      expect_true(pix_raddr == 14'(writes), "sequential pixel index");
    end
    if (ram_we) begin
      expect_true(since_step == 2, "write two clocks after CA step");
      expect_true(ram_addr == ram_addr1, "both RAM addresses equal");
      if (writes == NPIX - 1)
        expect_true(ram_addr == 14'h0, "last pixel stored at address 0");
      else
        expect_true(ram_addr == addr_after_step, "address is new CA value");
      writes++;
    end
    expect_true(!(busy && ca_load), "no seed load while busy");
  end

  initial begin
    int t_switch, t_done;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (10) @(negedge clk);
    expect_true(ca_load && !busy && !done, "idle before switch");

    encrypt = 1'b1;
    t_switch = 0;
    while (!busy) begin @(negedge clk); t_switch++; end
    expect_true(t_switch <= 3, "start within synchroniser delay");
    while (!done) @(negedge clk);
    expect_true(busy_cycles == 3 * NPIX, $sformatf("busy cycles %0d != %0d", busy_cycles, 3 * NPIX));
    expect_true(writes == NPIX && steps == NPIX, "one step and one write per pixel");
    repeat (50) @(negedge clk);
    expect_true(done && !busy && writes == NPIX, "done holds while switch closed");

    encrypt = 1'b0;
    t_done = 0;
    while (done) begin @(negedge clk); t_done++; end
    expect_true(t_done <= 3, "return to idle after switch opens");
    @(negedge clk);
    expect_true(ca_load && !busy, "seeds reloaded in idle");

    // a second run, with the switch opened during it: the run completes
    busy_cycles = 0; writes = 0; steps = 0;
    encrypt = 1'b1;
    repeat (1000) @(negedge clk);
    encrypt = 1'b0;
    while (busy) @(negedge clk);
    expect_true(writes == NPIX && busy_cycles == 3 * NPIX, "run completes after switch opens");
    repeat (5) @(negedge clk);
    expect_true(ca_load && !done, "back to idle");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

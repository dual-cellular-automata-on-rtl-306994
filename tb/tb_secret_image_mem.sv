// tb_secret_image_mem: fills the whole 16384-pixel image memory with a known
// pattern, reads every location back with the one-clock read latency, then
// overwrites random locations and checks them against a shadow copy.
module tb_secret_image_mem;
  logic clk = 1'b0, we = 1'b0;
  logic [13:0] waddr = '0, raddr = '0;
  logic [7:0]  wdata = '0, rdata;
  logic [7:0]  shadow [16384];
  int checks = 0, failures = 0;

  secret_image_mem dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] pattern(int a);
    return 8'((a * 37 + (a >> 7) * 11) ^ (a >> 3));
  endfunction

  task automatic read_check(int a);
    @(negedge clk); raddr = 14'(a);
    @(negedge clk);
    checks++;
    if (rdata !== shadow[a]) begin
      failures++;
      if (failures < 10) $display("FAIL addr %0d got %h expected %h", a, rdata, shadow[a]);
    end
  endtask

  initial begin
    for (int a = 0; a < 16384; a++) begin
      @(negedge clk); we = 1'b1; waddr = 14'(a); wdata = pattern(a); shadow[a] = pattern(a);
    end
    @(negedge clk); we = 1'b0;
    for (int a = 0; a < 16384; a++) read_check(a);
    for (int t = 0; t < 2000; t++) begin
      int a;
      a = $urandom_range(0, 16383);
      @(negedge clk); we = 1'b1; waddr = 14'(a); wdata = 8'($urandom); shadow[a] = wdata;
      @(negedge clk); we = 1'b0;
      read_check($urandom_range(0, 16383));
      read_check(a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

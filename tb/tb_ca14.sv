// tb_ca14: self-checking test of the 14-cell rule 90/150 shuffler.
// A reference model steps a cell array cell by cell from the published rule
// list (90 or 150 per cell, null boundary). The test checks the reset value,
// seed loading (including the zero-seed guard), that step=0 holds the state,
// every state against the model, and that the sequence has the full period
// 2^14-1 with every non-zero state visited exactly once.
module tb_ca14;
  localparam int N = 14;
  localparam int RULES [N] = '{90,150,150,150,150,150,90,150,150,150,150,150,150,90};

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, step = 1'b0;
  logic [N-1:0] seed = '0, state;
  int checks = 0, failures = 0;

  ca14 dut (.*);

  always #5 clk = ~clk;

  function automatic logic [N-1:0] ref_next(logic [N-1:0] s);
    logic [N-1:0] r;
    for (int i = 0; i < N; i++) begin
      logic l, c, rt;
      l  = (i == 0)     ? 1'b0 : s[i-1];
      rt = (i == N - 1) ? 1'b0 : s[i+1];
      c  = s[i];
      r[i] = (RULES[i] == 150) ? (l ^ c ^ rt) : (l ^ rt);
    end
    return r;
  endfunction

  task automatic check(logic [N-1:0] got, logic [N-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit visited [1 << N];
  logic [N-1:0] model, start;
  int period;

  initial begin
    repeat (2) @(posedge clk);
    #1 check(state, N'(1), "reset value");
    rst_n = 1'b1;

    // zero seed is replaced by 1
    @(negedge clk); load = 1'b1; seed = '0;
    @(negedge clk); load = 1'b0;
    check(state, N'(1), "zero seed");

    // random seeds, random step pattern, compare with the model
    for (int t = 0; t < 20; t++) begin
      @(negedge clk);
      seed = N'($urandom_range(1, (1 << N) - 1));
      load = 1'b1; step = 1'b1;   // load has priority
      @(negedge clk);
      load = 1'b0;
      check(state, seed, "load");
      model = seed;
      for (int k = 0; k < 300; k++) begin
        step = 1'($urandom_range(0, 1));
        @(negedge clk);
        if (step) model = ref_next(model);
        check(state, model, "step");
      end
      step = 1'b0;
    end

    // full period from one seed
    @(negedge clk); load = 1'b1; seed = 14'h2A5C; start = 14'h2A5C;
    @(negedge clk); load = 1'b0; step = 1'b1;
    foreach (visited[i]) visited[i] = 1'b0;
    period = 0;
    do begin
      @(negedge clk);
      period++;
      if (visited[state]) begin
        failures++;
        $display("FAIL state %h repeated after %0d steps", state, period);
        break;
      end
      visited[state] = 1'b1;
    end while (state != start && period < (1 << N));
    step = 1'b0;
    checks++;
    if (period != (1 << N) - 1) begin
      failures++;
      $display("FAIL period %0d, expected %0d", period, (1 << N) - 1);
    end
    checks++;
    if (visited[0]) begin
      failures++;
      $display("FAIL all-zero state reached");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

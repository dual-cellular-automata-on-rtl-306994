// ca8: 8-cell rule 90/150 cellular automaton, the pixel key generator.
//
// Each clock with step=1 every cell takes the XOR of its two neighbours
// (rule 90), and also of itself where the rule mask selects rule 150, with a
// constant 0 beyond both ends (null boundary). The published rule sequence
// R90-R90-R150-R90-R150-R90-R150-R90 gives all 255 non-zero bytes before the
// sequence repeats; the current state is the key byte that is XORed (image 1)
// or XNORed (image 2) with the secret pixel.
//
// Interface: load has priority over step and copies seed into the cells; a
// zero seed is replaced by 1. The seed port, that replacement and the reset
// value 1 are choices of this design. state is the registered cell vector,
// cell 1 in bit 0, and changes one clock after load or step.
module ca8
  import dca_pkg::*;
#(
  parameter int          N       = 8,
  parameter logic [N-1:0] RULE150 = CA8_RULE150
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [N-1:0] seed,
  input  logic         step,
  output logic [N-1:0] state
);

  logic [N-1:0] next_state;

  // Left neighbour of cell i is bit i-1, right neighbour bit i+1; the shifts
  // bring in zeros at the two ends, which is the null boundary.
  always_comb next_state = (state << 1) ^ (state >> 1) ^ (state & RULE150);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      state <= N'(1);
    else if (load)   state <= (seed == '0) ? N'(1) : seed;
    else if (step)   state <= next_state;
  end

  // A maximal-length 90/150 automaton never reaches the all-zero state.
  a_nonzero: assert property (@(posedge clk) disable iff (!rst_n) state != '0);

endmodule

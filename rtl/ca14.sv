// ca14: 14-cell rule 90/150 cellular automaton, the pixel-position shuffler.
//
// Each clock with step=1 every cell takes the XOR of its two neighbours
// (rule 90), and also of itself where the rule mask selects rule 150. The
// cells at both ends see a constant 0 beyond the edge (null boundary). With
// the published rule sequence R90-R150x5-R90-R150x6-R90 the automaton runs
// through all 16383 non-zero states before repeating, so the state can serve
// as a scrambled write address that never repeats within one image.
//
// Interface: load has priority over step and copies seed into the cells; a
// zero seed, which would lock the automaton at zero, is replaced by 1 (a
// choice of this design, as are the reset value 1 and the load port). state
// is the registered cell vector, cell 1 in bit 0, and changes one clock
// after load or step.
module ca14
  import dca_pkg::*;
#(
  parameter int          N       = 14,
  parameter logic [N-1:0] RULE150 = CA14_RULE150
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

// encrypt_ctrl: sequencer of the dual cellular-automaton image encryptor.
//
// While idle it keeps the seeds loaded into both cellular automata (CA). When
// the 'encrypt' switch reads 1 it walks through the pixels in order, index 0
// to NPIX-1, spending three clocks on each, as published:
//   cycle 1 (S_GEN)  both CAs step, giving a new 14-bit address and key byte;
//   cycle 2 (S_ADDR) the new 14-bit CA value is latched into the two RAM
//                    address registers (addr for RAM 1, addr1 for RAM 2) and
//                    the secret pixel at the current index is read;
//   cycle 3 (S_ENC)  ram_we is high: the XOR / XNOR of pixel and key byte is
//                    written to both RAMs at the latched address.
// The 14-bit CA produces each of its 16383 non-zero values once, so the
// first 16383 pixels land at distinct non-zero addresses; the last pixel of a
// full 2^14-pixel image is stored at address 0, the one the CA never makes
// (this design's choice: the placement of that pixel is not published).
//
// Timing: busy is high for exactly 3*NPIX clocks; done rises on the clock
// after the last write and stays high until the switch returns to 0, which
// sends the sequencer back to idle (and reloads the seeds) for a new run.
// The switch is an asynchronous input and passes through a two-flip-flop
// synchroniser first, so a run starts three clocks after the switch closes.
// Reset is asynchronous, active low. The synchroniser, the return-to-idle
// rule and the reset are choices of this design.
module encrypt_ctrl
  import dca_pkg::*;
#(
  parameter int NPIX_P   = NPIX,
  parameter int ADDR_W_P = ADDR_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                encrypt,
  output logic                ca_load,
  output logic                ca_step,
  input  logic [ADDR_W_P-1:0] ca14_state,
  output logic [ADDR_W_P-1:0] pix_raddr,
  output logic                ram_we,
  output logic [ADDR_W_P-1:0] ram_addr,
  output logic [ADDR_W_P-1:0] ram_addr1,
  output logic                busy,
  output logic                done
);

  ctrl_state_t         state_q;
  logic                enc_q1, enc_q2;     // switch synchroniser
  logic [ADDR_W_P-1:0] pix_idx;
  logic                last_pix;
  logic [ADDR_W_P-1:0] next_addr;

  always_comb begin
    last_pix  = (32'(pix_idx) == NPIX_P - 1);
    // The CA never produces 0; a full image puts its last pixel there.
    next_addr = (last_pix && NPIX_P == (1 << ADDR_W_P)) ? '0 : ca14_state;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enc_q1    <= 1'b0;
      enc_q2    <= 1'b0;
      state_q   <= S_IDLE;
      pix_idx   <= '0;
      ram_addr  <= '0;
      ram_addr1 <= '0;
    end else begin
      enc_q1 <= encrypt;
      enc_q2 <= enc_q1;
      unique case (state_q)
        S_IDLE: begin
          pix_idx <= '0;
          if (enc_q2) state_q <= S_GEN;
        end
        S_GEN:  state_q <= S_ADDR;
        S_ADDR: begin
          ram_addr  <= next_addr;
          ram_addr1 <= next_addr;
          state_q   <= S_ENC;
        end
        S_ENC: begin
          if (last_pix) begin
            state_q <= S_DONE;
          end else begin
            pix_idx <= pix_idx + 1'b1;
            state_q <= S_GEN;
          end
        end
        S_DONE: if (!enc_q2) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    ca_load   = (state_q == S_IDLE);
    ca_step   = (state_q == S_GEN);
    ram_we    = (state_q == S_ENC);
    busy      = (state_q == S_GEN) || (state_q == S_ADDR) || (state_q == S_ENC);
    done      = (state_q == S_DONE);
    pix_raddr = pix_idx;
  end

  // The three phases of a pixel follow each other in a fixed order.
  a_gen_then_addr: assert property (@(posedge clk) disable iff (!rst_n)
                                    state_q == S_GEN |=> state_q == S_ADDR);
  a_addr_then_enc: assert property (@(posedge clk) disable iff (!rst_n)
                                    state_q == S_ADDR |=> state_q == S_ENC);
  a_one_action:    assert property (@(posedge clk) disable iff (!rst_n)
                                    $onehot0({ca_load, ca_step, ram_we}));

endmodule

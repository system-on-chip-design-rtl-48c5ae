// keccak_controller: sequences absorb, rounds and output of the Keccak core.
//
// ST_WAIT: when the input buffer offers a block (blk_valid_i) the controller
// acknowledges it and runs round 0 with absorb set, so the block is XORed
// into the state in the same cycle; for the first block of a message init is
// set too, so the old state is discarded. ST_ROUND: rounds 1..23, one per
// cycle. After round 23 a non-final block returns to ST_WAIT; a final block
// goes to ST_OUT, where the state is handed to the output buffer (capture_o)
// as soon as that buffer is free (out_full_i low). While it is not, the
// controller stalls and accepts no new block.
//
// Timing: 24 cycles per block when blocks are ready back to back, plus one
// ST_OUT cycle per message. The architecture names the controller and its
// links only; the states and handshakes are this design's choice.
module keccak_controller
  import keccak_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // Sig_IC: input buffer handshake
  input  logic       blk_valid_i,
  input  logic       blk_last_i,
  output logic       blk_ack_o,
  // Keccak round control
  output logic       run_o,
  output logic       absorb_o,
  output logic       init_o,
  output round_idx_t round_o,
  // output buffer handshake
  input  logic       out_full_i,
  output logic       capture_o,
  output logic       busy_o
);
  ctrl_state_e state_q;
  round_idx_t  rnd_q;
  logic        first_q;  // next block starts a new message
  logic        last_q;   // block being permuted is the final one

  always_comb begin
    blk_ack_o = 1'b0;
    run_o     = 1'b0;
    absorb_o  = 1'b0;
    init_o    = 1'b0;
    round_o   = rnd_q;
    capture_o = 1'b0;
    unique case (state_q)
      ST_WAIT: begin
        round_o = '0;
        if (blk_valid_i) begin
          blk_ack_o = 1'b1;
          run_o     = 1'b1;
          absorb_o  = 1'b1;
          init_o    = first_q;
        end
      end
      ST_ROUND: run_o = 1'b1;
      ST_OUT:   capture_o = !out_full_i;
      default: ;
    endcase
  end

  assign busy_o = (state_q != ST_WAIT);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= ST_WAIT;
      rnd_q   <= '0;
      first_q <= 1'b1;
      last_q  <= 1'b0;
    end else begin
      unique case (state_q)
        ST_WAIT: if (blk_valid_i) begin
          state_q <= ST_ROUND;
          rnd_q   <= round_idx_t'(1);
          first_q <= 1'b0;
          last_q  <= blk_last_i;
        end
        ST_ROUND: begin
          if (int'(rnd_q) == NROUNDS - 1) begin
            rnd_q   <= '0;
            state_q <= last_q ? ST_OUT : ST_WAIT;
          end else begin
            rnd_q <= rnd_q + round_idx_t'(1);
          end
        end
        ST_OUT: if (!out_full_i) begin
          state_q <= ST_WAIT;
          first_q <= 1'b1;
        end
        default: state_q <= ST_WAIT;
      endcase
    end
  end

  a_ack_valid: assert property (@(posedge clk) disable iff (!rst_n) blk_ack_o |-> blk_valid_i);
  a_no_capture_full: assert property (@(posedge clk) disable iff (!rst_n) capture_o |-> !out_full_i);
endmodule

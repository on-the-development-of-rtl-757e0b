// aes_control_unit: the control unit (CU) of the AES-128 core.
//
// A two-state machine (IDLE, RUN) with a round counter. A start pulse in
// IDLE produces one load cycle (plaintext ^ key into the state, key into the
// key register); the next NR cycles are rounds 1..NR with round_en high and
// last_round high in round NR. After the last round the machine returns to
// IDLE and raises done for one cycle, in the cycle when the data unit's
// register holds the ciphertext. start is ignored while busy.
//
// Timing: start sampled at edge e, rounds at edges e+1..e+NR, done high
// during the cycle after edge e+NR (NR+1 clock edges per block). The
// published method leaves this unit unprotected; its encoding, timing
// and handshake are this design's choices.
module aes_control_unit
  import aes_pkg::*;
#(
  parameter int unsigned ROUNDS = NR
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       load,
  output logic       round_en,
  output logic       last_round,
  output logic [3:0] round,      // current round number, 1..ROUNDS while busy
  output logic       busy,
  output logic       done
);
  typedef enum logic {IDLE, RUN} cu_state_t;

  cu_state_t  st_q;
  logic [3:0] rnd_q;

  assign busy       = (st_q == RUN);
  assign load       = (st_q == IDLE) && start;
  assign round_en   = busy;
  assign last_round = busy && (rnd_q == 4'(ROUNDS));
  assign round      = rnd_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q  <= IDLE;
      rnd_q <= 4'd0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st_q)
        IDLE: if (start) begin
          st_q  <= RUN;
          rnd_q <= 4'd1;
        end
        RUN: begin
          if (rnd_q == 4'(ROUNDS)) begin
            st_q  <= IDLE;
            rnd_q <= 4'd0;
            done  <= 1'b1;
          end else begin
            rnd_q <= rnd_q + 4'd1;
          end
        end
        default: st_q <= IDLE;
      endcase
    end
  end
  // Handshake rules: done is a one-cycle pulse, load only happens in idle,
  // and the last round is always an enabled round.
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n) done |=> !done);
  a_load_idle:  assert property (@(posedge clk) disable iff (!rst_n) load |-> !busy);
  a_last_round: assert property (@(posedge clk) disable iff (!rst_n) last_round |-> round_en);
endmodule

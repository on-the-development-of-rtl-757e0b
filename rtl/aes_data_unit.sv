// aes_data_unit: the AES encryption data path (DU).
//
// A 128-bit state register made of 16 byte cells (four 32-bit rows of four
// cells) and its next-state logic (aes_du_next): load plaintext ^ key, one
// full round per clock when round_en is high, hold otherwise. The register
// is the information protected by the countermeasure; its value is given to
// the parity generator and its inputs to the predictor.
//
// fi_mask is an evaluation hook that models a laser-induced upset: every set
// bit inverts the value captured by the corresponding flip-flop at the next
// clock edge (a transient fault in the cone, or an upset of the flip-flop
// itself). Tie it to zero in a product. It is this design's addition, used
// to run fault-injection tests at the register-transfer level.
//
// Timing: state_q changes on the rising edge of clk; asynchronous active-low
// reset clears it to zero (reset value is this design's choice).
module aes_data_unit
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  block_t din,          // plaintext
  input  block_t key_in,       // cipher key
  input  block_t round_key,    // round key from the key unit (same cycle)
  input  logic   load,
  input  logic   round_en,
  input  logic   last_round,
  input  block_t fi_mask,      // fault-injection mask (0 in normal use)
  output block_t state_q       // state register = ciphertext after round 10
);
  block_t state_d;

  aes_du_next u_next (
    .state_q, .din, .key_in, .round_key, .load, .round_en, .last_round,
    .state_d
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= '0;
    else        state_q <= state_d ^ fi_mask;
  end
endmodule

// aes_key_unit: the AES-128 key unit (KU).
//
// A 128-bit round key register and its next-state logic (aes_ku_next). On
// load it takes the cipher key; in each round it advances to the next round
// key. The next round key (round_key) is also handed combinationally to the
// data unit, so the data unit's round r uses round key r while the register
// moves from key r-1 to key r in the same edge.
//
// fi_mask is the same fault-injection hook as in the data unit: a set bit
// inverts the value captured by that flip-flop at the next edge (0 in normal
// use; this design's addition).
//
// Timing: key_q changes on the rising edge of clk; asynchronous active-low
// reset clears it (this design's choice). Only 128-bit keys are built.
module aes_key_unit
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  block_t     key_in,     // cipher key
  input  logic       load,
  input  logic       round_en,
  input  logic [3:0] round,      // 1..10
  input  block_t     fi_mask,    // fault-injection mask (0 in normal use)
  output block_t     key_q,      // round key register
  output block_t     round_key   // next round key, for the data unit
);
  aes_ku_next u_next (
    .key_q, .key_in, .load, .round_en, .round, .key_d(round_key)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) key_q <= '0;
    else        key_q <= round_key ^ fi_mask;
  end
endmodule

// parity_predictor: the predictor and its parity register.
//
// Duplicates the next-state logic of the data unit and of the key unit
// (aes_du_next, aes_ku_next) and feeds it with the same inputs as the
// original: the original registers' outputs, the primary inputs and the
// control signals. Instead of duplicating the two 128-bit registers, the
// duplicated next values are reduced at once to their group parities and
// only these are stored, one flip-flop per group (64 for the data unit, 64
// for the key unit). After each clock edge ppar_q therefore equals the
// parity the original registers must have if no fault occurred.
//
// ppar_q packs {key-unit groups, data-unit groups}: bits [63:0] belong to
// the data-unit state, bits [127:64] to the key register. fi_mask inverts
// the captured value of the corresponding parity flip-flop (fault-injection
// hook, 0 in normal use; this design's addition). Reset clears the register,
// which matches the parity of the reset value of the original registers.
module parity_predictor
  import aes_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  block_t               state_q,    // data-unit register
  input  block_t               key_q,      // key-unit register
  input  block_t               din,
  input  block_t               key_in,
  input  logic                 load,
  input  logic                 round_en,
  input  logic                 last_round,
  input  logic [3:0]           round,
  input  logic [2*NGROUPS-1:0] fi_mask,
  output logic [2*NGROUPS-1:0] ppar_q      // predicted parities
);
  block_t dup_key_d, dup_state_d;
  gpar_t  pp_du, pp_ku;

  aes_ku_next u_ku_dup (
    .key_q, .key_in, .load, .round_en, .round, .key_d(dup_key_d)
  );

  aes_du_next u_du_dup (
    .state_q, .din, .key_in, .round_key(dup_key_d), .load, .round_en,
    .last_round, .state_d(dup_state_d)
  );

  group_parity u_par_du (.v(dup_state_d), .p(pp_du));
  group_parity u_par_ku (.v(dup_key_d),   .p(pp_ku));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ppar_q <= '0;
    else        ppar_q <= {pp_ku, pp_du} ^ fi_mask;
  end
endmodule

// aes_fm_top: AES-128 encryption core protected by the FM group-parity
// countermeasure against laser fault attacks.
//
// The core is split into a data unit (16 byte cells, one round per clock),
// a key unit (on-the-fly round keys) and a control unit. The countermeasure
// protects the data and key units by
//   (1) parity generators that compute one parity bit per group from the
//       flip-flops of the original design,
//   (2) a predictor that duplicates the next-state logic, keeps only group
//       parities and stores them in one flip-flop per group, and
//   (3) a comparator with one checker per group.
// Each group holds the same bit of two cells whose logic cones do not
// intersect, so a single laser shot disturbs at most one bit of a group and
// is seen as a parity mismatch. The control unit is not protected.
//
// Interface: pulse start for one cycle with plaintext and key valid; done
// rises for one cycle NR+1 edges later with the result on ciphertext (it
// stays there until the next start). error is valid every cycle: bits
// [63:0] are the data-unit checkers, [127:64] the key-unit checkers; any set
// bit reports a detected fault in the cycle after it was captured.
// fi_du, fi_ku and fi_pred are fault-injection hooks that invert the value
// captured by the selected flip-flops at the next edge; tie them to zero in
// normal use. They are this design's addition for evaluation.
module aes_fm_top
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  block_t       plaintext,
  input  block_t       key,
  output block_t       ciphertext,
  output logic         busy,
  output logic         done,
  output logic [127:0] error,       // {key-unit checkers, data-unit checkers}
  input  block_t       fi_du,       // fault hook: data-unit state flip-flops
  input  block_t       fi_ku,       // fault hook: key-unit flip-flops
  input  logic [127:0] fi_pred      // fault hook: predicted-parity flip-flops
);
  logic       load, round_en, last_round;
  logic [3:0] round;
  block_t     state_q, key_q, round_key;
  gpar_t      pc_du, pc_ku;
  logic [127:0] ppar_q;

  aes_control_unit u_cu (
    .clk, .rst_n, .start, .load, .round_en, .last_round, .round, .busy, .done
  );

  aes_key_unit u_ku (
    .clk, .rst_n, .key_in(key), .load, .round_en, .round, .fi_mask(fi_ku),
    .key_q, .round_key
  );

  aes_data_unit u_du (
    .clk, .rst_n, .din(plaintext), .key_in(key), .round_key, .load, .round_en,
    .last_round, .fi_mask(fi_du), .state_q
  );

  // (1) calculated parities from the original flip-flops
  group_parity u_pc_du (.v(state_q), .p(pc_du));
  group_parity u_pc_ku (.v(key_q),   .p(pc_ku));

  // (2) predicted parities
  parity_predictor u_pred (
    .clk, .rst_n, .state_q, .key_q, .din(plaintext), .key_in(key), .load,
    .round_en, .last_round, .round, .fi_mask(fi_pred), .ppar_q
  );

  // (3) checkers
  parity_comparator #(.N(128)) u_cmp (
    .p_calc({pc_ku, pc_du}), .p_pred(ppar_q), .err(error)
  );

  assign ciphertext = state_q;
endmodule

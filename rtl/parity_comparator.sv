// parity_comparator: the comparator of the countermeasure.
//
// One checker per parity pair: err[i] is high when the parity calculated
// from the design's flip-flops differs from the predicted parity held in
// the predictor's register. The vector of checker outputs is the error
// signal. Purely combinational; a checker as a single XOR is the simplest
// realisation of the comparison the published method calls for.
module parity_comparator #(
  parameter int unsigned N = 128    // number of parity pairs
) (
  input  logic [N-1:0] p_calc,   // P_i from the original flip-flops
  input  logic [N-1:0] p_pred,   // predicted parity from the predictor register
  output logic [N-1:0] err       // error signal vector
);
  always_comb
    for (int i = 0; i < N; i++) err[i] = p_calc[i] ^ p_pred[i];
endmodule

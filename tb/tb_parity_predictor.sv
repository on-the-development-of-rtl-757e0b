// tb_parity_predictor: feeds the predictor with the register values of real
// encryptions (from the software reference) and checks after each edge that
// the stored parities equal the group parities of the reference's next data
// state and next round key, for load, every round and hold. Also checks the
// fault hook of the parity flip-flops.
module tb_parity_predictor;
  import aes_ref_pkg::*;
  logic         clk = 1'b0, rst_n;
  logic [127:0] state_q, key_q, din, key_in, fi_mask, ppar_q;
  logic         load, round_en, last_round;
  logic [3:0]   round;
  int checks = 0, failures = 0;

  parity_predictor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [127:0] k, pt;
  int b;

  initial begin
    rst_n = 1'b0; load = 0; round_en = 0; last_round = 0; round = 0;
    state_q = '0; key_q = '0; din = '0; key_in = '0; fi_mask = '0;
    repeat (2) @(negedge clk);
    check(ppar_q === '0, "reset value");
    rst_n = 1'b1;
    for (int t = 0; t < 20; t++) begin
      k  = {$urandom, $urandom, $urandom, $urandom};
      pt = {$urandom, $urandom, $urandom, $urandom};
      state_q = {$urandom, $urandom, $urandom, $urandom};
      key_q   = {$urandom, $urandom, $urandom, $urandom};
      din = pt; key_in = k; load = 1;
      @(negedge clk);
      check(ppar_q === {ref_group_parity(k), ref_group_parity(pt ^ k)}, "load prediction");
      load = 0; din = ~pt; key_in = ~k;          // must not matter during rounds
      for (int r = 1; r <= 10; r++) begin
        state_q = ref_state(k, pt, r - 1);
        key_q   = ref_round_key(k, r - 1);
        round_en = 1; last_round = (r == 10); round = 4'(r);
        @(negedge clk);
        check(ppar_q === {ref_group_parity(ref_round_key(k, r)),
                          ref_group_parity(ref_state(k, pt, r))},
              $sformatf("round %0d prediction", r));
      end
      round_en = 0; last_round = 0; round = 0;
      state_q = ref_state(k, pt, 10);
      key_q   = ref_round_key(k, 10);
      @(negedge clk);
      check(ppar_q === {ref_group_parity(key_q), ref_group_parity(state_q)}, "hold prediction");
      b = $urandom_range(127);
      fi_mask = 128'h1 << b;
      @(negedge clk);
      fi_mask = '0;
      check(ppar_q === ({ref_group_parity(key_q), ref_group_parity(state_q)} ^ (128'h1 << b)),
            "fault mask inverts one parity flip-flop");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_aes_data_unit: drives the data unit through complete encryptions with
// round keys from the software reference and compares the state after the
// load and after every round with the reference. Also checks that the
// state holds when neither load nor round_en is high, and that a set
// fault-mask bit inverts exactly that bit of the captured state.
module tb_aes_data_unit;
  import aes_ref_pkg::*;
  logic         clk = 1'b0, rst_n;
  logic [127:0] din, key_in, round_key, fi_mask, state_q;
  logic         load, round_en, last_round;
  int checks = 0, failures = 0;

  aes_data_unit dut (.*);

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

  logic [127:0] k, pt, hold;
  int b;

  initial begin
    rst_n = 1'b0; load = 0; round_en = 0; last_round = 0;
    din = '0; key_in = '0; round_key = '0; fi_mask = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 30; t++) begin
      k  = {$urandom, $urandom, $urandom, $urandom};
      pt = {$urandom, $urandom, $urandom, $urandom};
      if (t == 0) begin
        k  = 128'h2b7e151628aed2a6abf7158809cf4f3c;
        pt = 128'h3243f6a8885a308d313198a2e0370734;
      end
      din = pt; key_in = k; load = 1;
      @(negedge clk);
      load = 0; din = '0; key_in = '0;
      check(state_q === (pt ^ k), "initial AddRoundKey");
      for (int r = 1; r <= 10; r++) begin
        round_en = 1; last_round = (r == 10); round_key = ref_round_key(k, r);
        @(negedge clk);
        check(state_q === ref_state(k, pt, r), $sformatf("state after round %0d", r));
      end
      if (t == 0) check(state_q === 128'h3925841d02dc09fbdc118597196a0b32, "FIPS-197 ciphertext");
      round_en = 0; last_round = 0;
      hold = state_q;
      round_key = {$urandom, $urandom, $urandom, $urandom};
      repeat (2) @(negedge clk);
      check(state_q === hold, "state held while idle");
      b = $urandom_range(127);
      fi_mask = 128'h1 << b;
      @(negedge clk);
      fi_mask = '0;
      check(state_q === (hold ^ (128'h1 << b)), "fault mask inverts one bit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

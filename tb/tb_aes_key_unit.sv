// tb_aes_key_unit: loads random cipher keys and steps the key unit through
// rounds 1..10, comparing both the register and the same-cycle round_key
// output with a fully expanded reference schedule (FIPS-197 appendix A.1
// included). Checks hold and the fault-mask hook.
module tb_aes_key_unit;
  import aes_ref_pkg::*;
  logic         clk = 1'b0, rst_n;
  logic [127:0] key_in, fi_mask, key_q, round_key;
  logic         load, round_en;
  logic [3:0]   round;
  int checks = 0, failures = 0;

  aes_key_unit dut (.*);

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

  logic [127:0] k, hold;
  int b;

  initial begin
    rst_n = 1'b0; load = 0; round_en = 0; round = 0; key_in = '0; fi_mask = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 30; t++) begin
      k = (t == 0) ? 128'h2b7e151628aed2a6abf7158809cf4f3c
                   : {$urandom, $urandom, $urandom, $urandom};
      key_in = k; load = 1;
      #1 check(round_key === k, "round_key = cipher key on load");
      @(negedge clk);
      load = 0; key_in = '0;
      check(key_q === k, "key loaded");
      for (int r = 1; r <= 10; r++) begin
        round_en = 1; round = 4'(r);
        #1 check(round_key === ref_round_key(k, r), $sformatf("round key %0d", r));
        @(negedge clk);
        check(key_q === ref_round_key(k, r), $sformatf("key register round %0d", r));
      end
      if (t == 0) check(key_q === 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "FIPS-197 w[40..43]");
      round_en = 0; round = 0;
      hold = key_q;
      repeat (2) @(negedge clk);
      check(key_q === hold, "key held while idle");
      b = $urandom_range(127);
      fi_mask = 128'h1 << b;
      @(negedge clk);
      fi_mask = '0;
      check(key_q === (hold ^ (128'h1 << b)), "fault mask inverts one bit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

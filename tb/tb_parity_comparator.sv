// tb_parity_comparator: checks every checker of the 128-bit comparator with
// random calculated/predicted parity vectors and with one mismatch at a
// time.
module tb_parity_comparator;
  logic [127:0] p_calc, p_pred, err;
  int checks = 0, failures = 0;

  parity_comparator dut (.p_calc, .p_pred, .err);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int t = 0; t < 100; t++) begin
      p_calc = {$urandom, $urandom, $urandom, $urandom};
      p_pred = p_calc;
      #1 check(err === '0, "equal parities: no error");
      for (int i = 0; i < 128; i += 1 + t % 7) begin
        p_pred = p_calc;
        p_pred[i] = ~p_calc[i];
        #1 check(err === (128'h1 << i), $sformatf("mismatch in pair %0d", i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

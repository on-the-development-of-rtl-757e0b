// tb_aes_control_unit: checks the control sequence of one encryption: a
// one-cycle load when start arrives in IDLE, rounds 1..10 with round_en,
// last_round only in round 10, a one-cycle done after the last round
// (NR+1 edges after start), busy in between, and start ignored while busy.
module tb_aes_control_unit;
  logic       clk = 1'b0, rst_n, start;
  logic       load, round_en, last_round, busy, done;
  logic [3:0] round;
  int checks = 0, failures = 0;

  aes_control_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int edges;

  initial begin
    rst_n = 1'b0; start = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!busy && !done && !load && !round_en, "idle after reset");
    for (int rep = 0; rep < 3; rep++) begin
      start = 1'b1;
      #1 check(load === 1'b1, "load while start in idle");
      @(negedge clk);
      start = (rep == 1);          // second block: start held high while busy
      edges = 1;
      for (int r = 1; r <= 10; r++) begin
        #1;
        check(busy && round_en && !load, $sformatf("round %0d active", r));
        check(round === 4'(r), $sformatf("round number %0d", r));
        check(last_round === (r == 10), $sformatf("last_round in round %0d", r));
        check(!done, "no done during rounds");
        @(negedge clk);
        edges++;
      end
      start = 1'b0;
      check(done === 1'b1 && edges === 11, "done after 11 edges");
      check(!busy && !round_en, "idle after last round");
      @(negedge clk);
      check(done === 1'b0, "done lasts one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

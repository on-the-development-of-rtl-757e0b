// tb_aes_fm_top: end-to-end test of the protected AES-128 core.
//
// Runs the FIPS-197 example vectors and random blocks against a software
// reference, checks the NR+1-edge latency and that start is ignored while
// busy, and that no checker fires in fault-free operation. It then injects
// faults through the fault hooks and checks the checker vector in the cycle
// after each injection against the parity group computed here from the
// cell/bit position:
//   - single flip in a data-unit cell and in the key register (detected),
//   - a flip of a predicted-parity flip-flop (false positive: alarm, result
//     still correct),
//   - M = 2..10 flips in distinct groups, the laser model the grouping is
//     built for (every group hit must fire),
//   - two flips in the same group (even count: the parity code misses it),
//   - flips of the held registers while idle (reported for one cycle).
// Each mechanism is counted; one that never happened is a failure.
module tb_aes_fm_top;
  import aes_ref_pkg::*;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         start;
  logic [127:0] plaintext, key, ciphertext;
  logic         busy, done;
  logic [127:0] error;
  logic [127:0] fi_du, fi_ku, fi_pred;

  int checks = 0, failures = 0;
  int n_enc = 0, n_single_du = 0, n_single_ku = 0, n_pred = 0, n_multi = 0;
  int n_even = 0, n_ignored_start = 0, n_idle = 0;

  aes_fm_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int group_of(input int b);
    return ref_group_of(b);
  endfunction

  function automatic logic [63:0] groups_hit(input logic [127:0] mask);
    return ref_group_parity(mask);
  endfunction

  // One encryption. In round inj_round (1..10) the masks are applied for one
  // edge; err_inj is the checker vector in the cycle after that edge.
  task automatic encrypt(input logic [127:0] k, input logic [127:0] pt,
                         input int inj_round, input logic [127:0] mdu,
                         input logic [127:0] mku, input logic [127:0] mpred,
                         output logic [127:0] ct, output logic [127:0] err_inj,
                         output logic [127:0] err_any, output int lat);
    err_inj = '0; err_any = '0; lat = 0;
    @(negedge clk);
    key = k; plaintext = pt; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done) begin
      err_any |= error;
      if (busy && dut.u_cu.round == 4'(inj_round)) begin
        fi_du = mdu; fi_ku = mku; fi_pred = mpred;
        @(negedge clk);
        fi_du = '0; fi_ku = '0; fi_pred = '0;
        err_inj = error;
      end else begin
        @(negedge clk);
      end
      lat++;
      if (lat > 50) break;
    end
    err_any |= error;
    ct = ciphertext;
  endtask

  logic [127:0] k, pt, ct, ei, ea, m, m2, exp_ct;
  int lat, b, b2, mult;
  logic [63:0] used;

  initial begin
    rst_n = 1'b0; start = 1'b0; plaintext = '0; key = '0;
    fi_du = '0; fi_ku = '0; fi_pred = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(error === '0, "checkers quiet after reset");

    // FIPS-197 vectors
    encrypt(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
            -1, '0, '0, '0, ct, ei, ea, lat);
    check(ct === 128'h3925841d02dc09fbdc118597196a0b32, "FIPS-197 appendix B");
    check(lat === 11, $sformatf("latency %0d, expected 11 edges", lat));
    check(ea === '0, "no alarm, vector 1");
    n_enc++;
    encrypt(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
            -1, '0, '0, '0, ct, ei, ea, lat);
    check(ct === 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "FIPS-197 appendix C.1");
    check(ea === '0, "no alarm, vector 2");
    n_enc++;

    // random blocks
    for (int t = 0; t < 20; t++) begin
      k  = {$urandom, $urandom, $urandom, $urandom};
      pt = {$urandom, $urandom, $urandom, $urandom};
      encrypt(k, pt, -1, '0, '0, '0, ct, ei, ea, lat);
      check(ct === ref_state(k, pt, 10), "random block");
      check(ea === '0 && lat === 11, "random block: no alarm, latency");
      n_enc++;
    end

    // start while busy is ignored
    k = 128'h1; pt = 128'h2;
    @(negedge clk);
    key = k; plaintext = pt; start = 1'b1;
    @(negedge clk);
    start = 1'b1; key = ~k; plaintext = ~pt;      // ignored
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    check(ciphertext === ref_state(k, pt, 10), "start ignored while busy");
    n_ignored_start++;

    // single flips in the data unit and the key unit
    for (int t = 0; t < 40; t++) begin
      k  = {$urandom, $urandom, $urandom, $urandom};
      pt = {$urandom, $urandom, $urandom, $urandom};
      b  = $urandom_range(127);
      m  = 128'h1 << b;
      if (t % 2 == 0) begin
        encrypt(k, pt, 1 + t % 10, m, '0, '0, ct, ei, ea, lat);
        check(ei === {64'h0, groups_hit(m)}, $sformatf("DU flip bit %0d -> group %0d", b, group_of(b)));
        n_single_du++;
      end else begin
        encrypt(k, pt, 1 + t % 9, '0, m, '0, ct, ei, ea, lat);
        check(ei === {groups_hit(m), 64'h0}, $sformatf("KU flip bit %0d -> group %0d", b, group_of(b)));
        n_single_ku++;
      end
      check(ct !== ref_state(k, pt, 10), "faulty result differs");
    end

    // predicted-parity flip-flop: alarm without a wrong result
    for (int t = 0; t < 10; t++) begin
      k  = {$urandom, $urandom, $urandom, $urandom};
      pt = {$urandom, $urandom, $urandom, $urandom};
      b  = $urandom_range(127);
      encrypt(k, pt, 1 + t, '0, '0, 128'h1 << b, ct, ei, ea, lat);
      check(ei === (128'h1 << b), "predictor flip-flop fault reported");
      check(ct === ref_state(k, pt, 10), "predictor fault leaves result intact");
      n_pred++;
    end

    // multiplicity 2..10, at most one fault per group (data unit)
    for (mult = 2; mult <= 10; mult++) begin
      for (int t = 0; t < 5; t++) begin
        k  = {$urandom, $urandom, $urandom, $urandom};
        pt = {$urandom, $urandom, $urandom, $urandom};
        m = '0; used = '0;
        for (int f = 0; f < mult; f++) begin
          do b = $urandom_range(127); while (used[group_of(b)]);
          used[group_of(b)] = 1'b1;
          m[b] = 1'b1;
        end
        encrypt(k, pt, $urandom_range(1, 10), m, '0, '0, ct, ei, ea, lat);
        check(ei[63:0] === used && $countones(ei) === mult,
              $sformatf("M%0d faults in distinct groups all detected", mult));
        n_multi++;
      end
    end

    // two flips in the same group: even count is not detected by parity
    for (int t = 0; t < 10; t++) begin
      k  = {$urandom, $urandom, $urandom, $urandom};
      pt = {$urandom, $urandom, $urandom, $urandom};
      b = $urandom_range(127);
      do b2 = $urandom_range(127); while (b2 == b || group_of(b2) != group_of(b));
      m = (128'h1 << b) | (128'h1 << b2);
      encrypt(k, pt, $urandom_range(1, 10), m, '0, '0, ct, ei, ea, lat);
      check(ei === '0, "even fault count in one group escapes the checker");
      check(ct !== ref_state(k, pt, 10), "escaped fault corrupts the result");
      n_even++;
    end

    // faults while idle: the held registers are protected too
    for (int t = 0; t < 8; t++) begin
      @(negedge clk);
      check(!busy && error === '0, "idle and quiet");
      b = $urandom_range(127);
      m = 128'h1 << b;
      if (t % 2 == 0) fi_du = m; else fi_ku = m;
      @(negedge clk);
      fi_du = '0; fi_ku = '0;
      check(error === ((t % 2 == 0) ? {64'h0, groups_hit(m)} : {groups_hit(m), 64'h0}),
            "fault in held register reported");
      @(negedge clk);
      check(error === '0, "alarm lasts one cycle");
      n_idle++;
    end

    $display("idle_faults=%0d", n_idle);
    $display("encryptions=%0d du_single=%0d ku_single=%0d pred=%0d multi=%0d even=%0d busy_start=%0d",
             n_enc, n_single_du, n_single_ku, n_pred, n_multi, n_even, n_ignored_start);
    check(n_enc > 0 && n_single_du > 0 && n_single_ku > 0 && n_pred > 0 &&
          n_multi > 0 && n_even > 0 && n_ignored_start > 0 && n_idle > 0, "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fault_campaign: register-transfer-level fault-injection campaign on the
// protected core, multiplicities M = 2..10 as in the evaluation of the
// countermeasure.
//
// Each sample encrypts a random block with a random key and, in a random
// round, inverts M distinct flip-flops drawn from the data-unit state, the
// key register and the predicted-parity register (the control unit has no
// fault hook and is not part of the campaign). Two sampling modes:
//   - cone-confined: the M faults fall in M distinct parity groups, which is
//     what the grouping guarantees for one laser shot;
//   - one column: the M faults fall in the 32 flip-flops of one AES column
//     of the data unit or the key register, cells whose logic cones are
//     shared through MixColumns or the key schedule (a shot into one
//     column's logic); the grouping never puts two of them in one group;
//   - unconstrained: any M flip-flops.
// Every sample is classified as detected (wrong result, alarm), undetected
// (wrong result, no alarm), silent (right result, no alarm) or false
// positive (right result, alarm). Checks: the checker vector in the cycle
// after the injection equals the parity of the faults per group; in the
// cone-confined and one-column modes no sample is undetected or silent. The per-M rates are
// printed.
module tb_fault_campaign;
  import aes_ref_pkg::*;

  localparam int SAMPLES = 300;  // samples per multiplicity and mode

  logic         clk = 1'b0;
  logic         rst_n, start, busy, done;
  logic [127:0] plaintext, key, ciphertext, error;
  logic [127:0] fi_du, fi_ku, fi_pred;

  int checks = 0, failures = 0;

  aes_fm_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic encrypt(input logic [127:0] k, input logic [127:0] pt, input int inj_round,
                         input logic [127:0] mdu, input logic [127:0] mku,
                         input logic [127:0] mpred, output logic [127:0] ct,
                         output logic [127:0] err_inj, output logic alarm);
    int n = 0;
    err_inj = '0; alarm = 1'b0;
    @(negedge clk);
    key = k; plaintext = pt; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done && n < 50) begin
      alarm |= (error != '0);
      if (busy && dut.u_cu.round == 4'(inj_round)) begin
        fi_du = mdu; fi_ku = mku; fi_pred = mpred;
        @(negedge clk);
        fi_du = '0; fi_ku = '0; fi_pred = '0;
        err_inj = error;
      end else @(negedge clk);
      n++;
    end
    alarm |= (error != '0);
    ct = ciphertext;
  endtask

  // flip-flop index f: 0..127 data unit, 128..255 key unit, 256..383 predictor
  function automatic int grp(input int f);
    return f < 256 ? (f / 128) * 64 + ref_group_of(f % 128) : f - 256;
  endfunction

  logic [127:0] k, pt, ct, ei, mdu, mku, mpr, exp_err;
  logic         alarm, wrong;
  logic [383:0] used_ff;
  logic [127:0] used_grp;
  int f, rnd, col, unit;
  int det, undet, sil, fp;

  initial begin
    rst_n = 1'b0; start = 1'b0; plaintext = '0; key = '0;
    fi_du = '0; fi_ku = '0; fi_pred = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int mode = 0; mode < 3; mode++) begin
      for (int m = 2; m <= 10; m++) begin
        det = 0; undet = 0; sil = 0; fp = 0;
        for (int s = 0; s < SAMPLES; s++) begin
          k  = {$urandom, $urandom, $urandom, $urandom};
          pt = {$urandom, $urandom, $urandom, $urandom};
          used_ff = '0; used_grp = '0;
          col = $urandom_range(3); unit = $urandom_range(1);
          for (int i = 0; i < m; i++) begin
            if (mode == 1) begin
              // bits [127-32*col -: 32] of the data unit or the key unit
              do f = 128 * unit + 96 - 32 * col + $urandom_range(31);
              while (used_ff[f]);
              check(!used_grp[grp(f)], "one-column faults fall in distinct groups");
            end else begin
              do f = $urandom_range(383);
              while (used_ff[f] || (mode == 0 && used_grp[grp(f)]));
            end
            used_ff[f] = 1'b1;
            used_grp[grp(f)] = 1'b1;
          end
          mdu = used_ff[127:0]; mku = used_ff[255:128]; mpr = used_ff[383:256];
          rnd = $urandom_range(1, 9);
          encrypt(k, pt, rnd, mdu, mku, mpr, ct, ei, alarm);
          exp_err = {ref_group_parity(mku), ref_group_parity(mdu)} ^ mpr;
          check(ei === exp_err, "checker vector equals per-group fault parity");
          wrong = (ct !== ref_state(k, pt, 10));
          if (wrong && alarm) det++;
          else if (wrong)     undet++;
          else if (alarm)     fp++;
          else                sil++;
          if (mode < 2) check(alarm === 1'b1, $sformatf("mode %0d M%0d sample raises the alarm", mode, m));
        end
        $display("%s M%0d: detected %0d%% undetected %0d%% silent %0d%% false-positive %0d%% (n=%0d)",
                 mode == 0 ? "cone-confined" : mode == 1 ? "one-column   " : "unconstrained", m, 100 * det / SAMPLES,
                 100 * undet / SAMPLES, 100 * sil / SAMPLES, 100 * fp / SAMPLES, SAMPLES);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

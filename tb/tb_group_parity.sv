// tb_group_parity: compares the 64 group parities with the reference
// grouping for random vectors, and flips every single bit of a register to
// check that it lands in exactly the group the cell diagram gives, so that
// each group holds two bits of two different cells on a diagonal.
module tb_group_parity;
  import aes_ref_pkg::*;
  logic [127:0] v;
  logic [63:0]  p, p0;
  int checks = 0, failures = 0;
  int hits [64];

  group_parity dut (.v, .p);

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
    for (int t = 0; t < 200; t++) begin
      v = {$urandom, $urandom, $urandom, $urandom};
      #1 check(p === ref_group_parity(v), "random vector");
    end
    foreach (hits[g]) hits[g] = 0;
    v = '0;
    #1 p0 = p;
    check(p0 === '0, "zero vector");
    for (int b = 0; b < 128; b++) begin
      v = 128'h1 << b;
      #1 check(p === (64'h1 << ref_group_of(b)), $sformatf("bit %0d in group %0d", b, ref_group_of(b)));
      hits[ref_group_of(b)]++;
    end
    foreach (hits[g]) check(hits[g] == 2, $sformatf("group %0d holds two bits", g));
    // A0 bit 0 (bit 120) and B1 bit 0 (byte 5, bit 80) form group 0
    v = (128'h1 << 120) | (128'h1 << 80);
    #1 check(p === '0, "A0/B1 share a group");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

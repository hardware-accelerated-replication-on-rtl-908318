// tb_key_hash: self-checking test of the key hash.
//
// Compares the hash with a reference written independently in the testbench (XOR of the three
// 24-bit slices of the key, times 0x3779B1 modulo 2^24) for chosen and random keys, and checks
// that 4096 consecutive keys land in 4096 distinct buckets.
module tb_key_hash;
  int checks = 0, failures = 0;
  logic [63:0] key;
  logic [23:0] idx;

  key_hash dut (.key, .idx);

  function automatic logic [23:0] ref_hash(input logic [63:0] k);
    logic [23:0] f = k[23:0] ^ k[47:24] ^ {8'h00, k[63:48]};
    logic [47:0] p = 48'(f) * 48'h3779B1;
    return p[23:0];
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  bit seen [logic [23:0]];

  initial begin
    static logic [63:0] fixed[4] = '{64'h0, 64'h1, 64'hFFFF_FFFF_FFFF_FFFF, 64'h0123_4567_89AB_CDEF};
    foreach (fixed[i]) begin
      key = fixed[i];
      #1;
      check(idx == ref_hash(key), $sformatf("key %h: %h vs %h", key, idx, ref_hash(key)));
    end
    for (int i = 0; i < 500; i++) begin
      key = {$urandom, $urandom};
      #1;
      check(idx == ref_hash(key), $sformatf("key %h", key));
    end
    for (int i = 0; i < 4096; i++) begin
      key = 64'h5500_0000_0000_0000 + 64'(i);
      #1;
      seen[idx] = 1;
    end
    check(seen.num() == 4096, $sformatf("distinct buckets %0d", seen.num()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

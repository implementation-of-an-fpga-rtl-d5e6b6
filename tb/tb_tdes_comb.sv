// tb_tdes_comb: checks the Triple-DES cascade: a published three-key
// example, the reduction to single DES when all keys are equal, and random
// keys and blocks in both directions against the reference model.
module tb_tdes_comb;
  import tb_ref_pkg::*;

  logic [63:0] din, k1, k2, k3, dout;
  logic        decrypt;
  int checks = 0, failures = 0;

  tdes_comb dut (.din(din), .key1(k1), .key2(k2), .key3(k3), .decrypt(decrypt), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [63:0] exp, input string what);
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL %s: got %016h expected %016h", what, dout, exp);
    end
  endtask

  initial begin
    // "The qufc" under the three keys of the published example
    k1 = 64'h0123456789ABCDEF; k2 = 64'h23456789ABCDEF01; k3 = 64'h456789ABCDEF0123;
    din = 64'h5468652071756663; decrypt = 0; #1;
    chk(64'hA826FD8CE53B855F, "three-key example");
    din = 64'hA826FD8CE53B855F; decrypt = 1; #1;
    chk(64'h5468652071756663, "three-key example decrypt");
    // all keys equal: single DES
    k1 = 64'h133457799BBCDFF1; k2 = k1; k3 = k1; din = 64'h0123456789ABCDEF; decrypt = 0; #1;
    chk(64'h85E813540F0AB405, "equal keys = DES");
    for (int n = 0; n < 100; n++) begin
      k1 = {$urandom, $urandom}; k2 = {$urandom, $urandom}; k3 = {$urandom, $urandom};
      din = {$urandom, $urandom}; decrypt = n[0]; #1;
      chk(ref_tdes(din, k1, k2, k3, decrypt), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

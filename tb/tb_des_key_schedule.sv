// tb_des_key_schedule: checks the key schedule against the published
// subkeys of the classic worked example (key 133457799BBCDFF1) and against
// the reference schedule for random keys.
module tb_des_key_schedule;
  import des_pkg::*;
  import tb_ref_pkg::*;

  block_t key;
  ks_t    ks;
  logic [47:0] sk [16];
  int checks = 0, failures = 0;

  des_key_schedule dut (.key(key), .ks(ks));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [47:0] got, input logic [47:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %012h expected %012h", what, got, exp);
    end
  endtask

  initial begin
    key = 64'h133457799BBCDFF1; #1;
    chk(ks[0],  48'h1B02EFFC7072, "K1");
    chk(ks[1],  48'h79AED9DBC9E5, "K2");
    chk(ks[15], 48'hCB3D8B0E17F5, "K16");
    for (int n = 0; n < 100; n++) begin
      key = {$urandom, $urandom}; #1;
      ref_ks(key, sk);
      for (int i = 0; i < 16; i++) chk(ks[i], sk[i], $sformatf("random K%0d", i + 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

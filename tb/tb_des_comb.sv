// tb_des_comb: checks the combinational DES core against published
// known-answer vectors, then against the reference model on random keys and
// blocks in both directions.
module tb_des_comb;
  import tb_ref_pkg::*;

  logic [63:0] din, key, dout;
  logic        decrypt;
  int checks = 0, failures = 0;

  des_comb dut (.din(din), .key(key), .decrypt(decrypt), .dout(dout));

  task automatic check(input logic [63:0] exp, input string what);
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL %s: got %016h expected %016h", what, dout, exp);
    end
  endtask

  typedef struct { logic [63:0] k, p, c; } kat_t;
  kat_t kats [3] = '{
    '{64'h133457799BBCDFF1, 64'h0123456789ABCDEF, 64'h85E813540F0AB405},
    '{64'h0E329232EA6D0D73, 64'h8787878787878787, 64'h0000000000000000},
    '{64'h0123456789ABCDEF, 64'h4E6F772069732074, 64'h3FA40E8A984D4815}};

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (kats[i]) begin
      key = kats[i].k; din = kats[i].p; decrypt = 0; #1;
      check(kats[i].c, "KAT encrypt");
      checks++;
      if (ref_des(kats[i].p, kats[i].k, 0) !== kats[i].c) begin
        failures++; $display("FAIL reference model KAT %0d", i);
      end
      din = kats[i].c; decrypt = 1; #1;
      check(kats[i].p, "KAT decrypt");
    end
    for (int n = 0; n < 200; n++) begin
      key = {$urandom, $urandom}; din = {$urandom, $urandom};
      decrypt = n[0]; #1;
      check(ref_des(din, key, decrypt), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

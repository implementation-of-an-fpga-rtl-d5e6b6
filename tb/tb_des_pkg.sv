// tb_des_pkg: checks the DES tables and helpers: IP^-1 undoes IP, every
// S-box row is a permutation of 0..15, E copies the right input bits, the
// key schedule's tables drop exactly the parity bits, and f() matches the
// first round of the classic worked example (R0 = F0AAF0AA,
// K1 = 1B02EFFC7072 gives f = 234AA9BB).
module tb_des_pkg;
  import des_pkg::*;

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [63:0] x;
    logic [15:0] seen;
    logic [55:0] k;
    for (int n = 0; n < 100; n++) begin
      x = {$urandom, $urandom};
      chk(fp(ip(x)) == x, "IP^-1(IP(x)) == x");
      chk(ip(fp(x)) == x, "IP(IP^-1(x)) == x");
    end
    chk(ip(64'h0123456789ABCDEF) == 64'hCC00CCFFF0AAF0AA, "IP of worked example");
    for (int b = 0; b < 8; b++)
      for (int row = 0; row < 4; row++) begin
        seen = '0;
        for (int col = 0; col < 16; col++)
          seen[sbox(b, {row[1], 4'(col), row[0]})] = 1'b1;
        chk(&seen, $sformatf("S%0d row %0d is a permutation", b + 1, row));
      end
    chk(expand(32'h80000001) == 48'hC00000000003, "E wraps the end bits");
    chk(expand(32'hF0AAF0AA) == 48'h7A15557A1555, "E of worked example");
    // PC-1 ignores the parity bits
    k = pc1(64'h0101010101010101);
    chk(k == '0, "PC-1 drops parity bits");
    chk(f_func(32'hF0AAF0AA, 48'h1B02EFFC7072) == 32'h234AA9BB, "f of worked example");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

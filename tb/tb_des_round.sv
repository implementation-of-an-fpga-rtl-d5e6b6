// tb_des_round: checks one DES round (swap and f-function) against the
// reference f-function, including the first round of the classic worked
// example (L0 = CC00CCFF, R0 = F0AAF0AA, K1 = 1B02EFFC7072 gives
// R1 = EF4A6544).
module tb_des_round;
  import tb_ref_pkg::*;

  logic [31:0] l_in, r_in, l_out, r_out;
  logic [47:0] k;
  int checks = 0, failures = 0;

  des_round dut (.l_in(l_in), .r_in(r_in), .k(k), .l_out(l_out), .r_out(r_out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  initial begin
    l_in = 32'hCC00CCFF; r_in = 32'hF0AAF0AA; k = 48'h1B02EFFC7072; #1;
    chk(l_out, 32'hF0AAF0AA, "worked example L1");
    chk(r_out, 32'hEF4A6544, "worked example R1");
    for (int n = 0; n < 300; n++) begin
      l_in = $urandom; r_in = $urandom; k = {16'($urandom), $urandom}; #1;
      chk(l_out, r_in, "swap");
      chk(r_out, l_in ^ ref_f(r_in, k), "f");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

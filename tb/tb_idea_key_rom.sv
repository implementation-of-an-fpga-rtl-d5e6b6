// tb_idea_key_rom: checks the stored encryption schedule of the test key
// 0001 0002 ... 0008 against its published subkeys (the first eight are the
// key words, the next eight the key rotated by 25 bits), and the decryption
// schedule by its defining property: every stored multiplicative subkey
// times its encryption partner is 1 modulo 2^16+1, every additive subkey
// plus its partner is 0, Z5/Z6 are copied, all in reverse round order. The
// ROM stores multiplier keys minus one.
module tb_idea_key_rom;
  import tb_ref_pkg::*;

  logic        dec;
  logic [3:0]  round;
  logic [5:0][15:0] z;
  logic [15:0] e [9][6], d [9][6];
  int checks = 0, failures = 0;

  idea_key_rom dut (.dec(dec), .round(round), .z(z));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++; $display("FAIL %s: got %04h expected %04h", what, got, exp);
    end
  endtask

  function automatic bit is_mul(input int s);
    return s == 0 || s == 3 || s == 4 || s == 5;
  endfunction

  localparam logic [15:0] PUB [16] = '{
    16'h0001, 16'h0002, 16'h0003, 16'h0004, 16'h0005, 16'h0006, 16'h0007, 16'h0008,
    16'h0400, 16'h0600, 16'h0800, 16'h0a00, 16'h0c00, 16'h0e00, 16'h1000, 16'h0200};

  initial begin
    // read both schedules back, undoing the decrement
    for (int r = 0; r < 9; r++) begin
      round = 4'(r);
      dec = 0; #1;
      for (int s = 0; s < 6; s++) e[r][s] = is_mul(s) ? z[s] + 16'd1 : z[s];
      dec = 1; #1;
      for (int s = 0; s < 6; s++) d[r][s] = is_mul(s) ? z[s] + 16'd1 : z[s];
    end
    for (int i = 0; i < 16; i++) chk(e[i / 6][i % 6], PUB[i], $sformatf("enc subkey %0d", i + 1));
    for (int r = 0; r < 9; r++) begin
      int src;
      bit outer;
      src   = 8 - r;
      outer = (r == 0 || r == 8);
      chk(ref_mul(d[r][0], e[src][0]), 16'd1, $sformatf("dec Z1 round %0d", r + 1));
      chk(ref_mul(d[r][3], e[src][3]), 16'd1, $sformatf("dec Z4 round %0d", r + 1));
      chk(d[r][1] + (outer ? e[src][1] : e[src][2]), 16'd0, $sformatf("dec Z2 round %0d", r + 1));
      chk(d[r][2] + (outer ? e[src][2] : e[src][1]), 16'd0, $sformatf("dec Z3 round %0d", r + 1));
      if (r < 8) begin
        chk(d[r][4], e[7 - r][4], $sformatf("dec Z5 round %0d", r + 1));
        chk(d[r][5], e[7 - r][5], $sformatf("dec Z6 round %0d", r + 1));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

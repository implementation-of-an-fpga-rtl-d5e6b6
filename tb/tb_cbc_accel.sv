// tb_cbc_accel: drives the DES and Triple-DES CBC accelerators through the
// host bus exactly as the host software does (keys, control 0, data,
// control 1, poll, read back). Checks the single-DES accelerator against
// the CBC example of FIPS 81 ("Now is the time for all "), the Triple-DES
// one against the reference model in both directions, register read-back,
// and the processing time of 1 + N*WAIT half-rate cycles.
module tb_cbc_accel;
  import tb_ref_pkg::*;
  import accel_pkg::*;

  localparam int N = 16;

  logic  clk = 0, rst_n = 0;
  logic  we [2], re [2];
  host_addr_t addr [2];
  word_t wdata [2], rdata [2];
  logic  busy [2], done [2];
  int checks = 0, failures = 0;

  // [0]: single DES, [1]: Triple-DES
  cbc_accel #(.TRIPLE(1'b0), .N_BLOCKS(N)) dut_des (
    .clk(clk), .rst_n(rst_n), .host_we(we[0]), .host_re(re[0]), .host_addr(addr[0]),
    .host_wdata(wdata[0]), .host_rdata(rdata[0]), .busy(busy[0]), .done(done[0]));
  cbc_accel #(.TRIPLE(1'b1), .N_BLOCKS(N)) dut_tdes (
    .clk(clk), .rst_n(rst_n), .host_we(we[1]), .host_re(re[1]), .host_addr(addr[1]),
    .host_wdata(wdata[1]), .host_rdata(rdata[1]), .busy(busy[1]), .done(done[1]));

  always #5 clk = !clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int u = 0; u < 2; u++) begin we[u] = 0; re[u] = 0; addr[u] = '0; wdata[u] = '0; end
  end

  task automatic wr(input int u, input host_addr_t a, input word_t d);
    @(negedge clk);
    we[u] = 1; addr[u] = a; wdata[u] = d;
    @(negedge clk);
    we[u] = 0;
  endtask

  task automatic rd(input int u, input host_addr_t a, output word_t d);
    @(negedge clk);
    re[u] = 1; addr[u] = a;
    @(negedge clk);
    re[u] = 0;
    d = rdata[u];
  endtask

  // one host call: returns the clocks from the start write to done
  task automatic call(input int u, input word_t blocks [N], input int n, input bit dec,
                      output word_t res [N], output int clks);
    word_t c;
    wr(u, ADDR_CTRL, 64'd0);
    for (int i = 0; i < n; i++) wr(u, host_addr_t'(i), blocks[i]);
    wr(u, ADDR_CTRL, dec ? 64'd3 : 64'd1);
    clks = 0;
    while (!done[u]) begin @(negedge clk); clks++; end
    rd(u, ADDR_CTRL, c);
    checks++;
    if (c !== 64'd1) begin failures++; $display("FAIL control reads %0h when done", c); end
    for (int i = 0; i < n; i++) rd(u, host_addr_t'(i), res[i]);
  endtask

  task automatic chk(input word_t got, input word_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++; $display("FAIL %s: got %016h expected %016h", what, got, exp);
    end
  endtask

  initial begin
    word_t p [N], c [N], res [N], chain, k1, k2, k3, iv, v;
    int clks;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- single DES, FIPS 81 CBC example ----
    wr(0, ADDR_KEY1, 64'h0123456789ABCDEF);
    wr(0, ADDR_IV,   64'h1234567890ABCDEF);
    p[0] = 64'h4E6F772069732074; p[1] = 64'h68652074696D6520; p[2] = 64'h666F7220616C6C20;
    for (int i = 3; i < N; i++) p[i] = {$urandom, $urandom};
    call(0, p, N, 0, res, clks);
    chk(res[0], 64'hE5C7CDDE872BF27C, "FIPS 81 block 1");
    chk(res[1], 64'h43E934008C389C0F, "FIPS 81 block 2");
    chk(res[2], 64'h683788499A7C05F6, "FIPS 81 block 3");
    checks++;
    if (clks < 2*(1 + N*9) - 2 || clks > 2*(1 + N*9) + 2) begin
      failures++; $display("FAIL DES CBC took %0d clocks", clks);
    end
    c = res;
    call(0, c, N, 1, res, clks);
    for (int i = 0; i < N; i++) chk(res[i], p[i], "DES CBC round trip");

    // ---- Triple-DES ----
    k1 = {$urandom, $urandom}; k2 = {$urandom, $urandom}; k3 = {$urandom, $urandom};
    iv = {$urandom, $urandom};
    wr(1, ADDR_KEY1, k1); wr(1, ADDR_KEY2, k2); wr(1, ADDR_KEY3, k3); wr(1, ADDR_IV, iv);
    rd(1, ADDR_KEY2, v); chk(v, k2, "key 2 read-back");
    for (int i = 0; i < N; i++) p[i] = {$urandom, $urandom};
    call(1, p, N, 0, res, clks);
    chain = iv;
    for (int i = 0; i < N; i++) begin
      c[i] = ref_tdes(p[i] ^ chain, k1, k2, k3, 0);
      chain = c[i];
      chk(res[i], c[i], $sformatf("3DES CBC encrypt %0d", i));
    end
    checks++;
    if (clks < 2*(1 + N*32) - 2 || clks > 2*(1 + N*32) + 2) begin
      failures++; $display("FAIL 3DES CBC took %0d clocks, expected %0d", clks, 2*(1 + N*32));
    end
    call(1, c, N, 1, res, clks);
    for (int i = 0; i < N; i++) chk(res[i], p[i], "3DES CBC decrypt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

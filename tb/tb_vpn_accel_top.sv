// tb_vpn_accel_top: end-to-end test of all four accelerators at their full
// sizes, each driven through its own host bus the way the host software
// drives it, all four in parallel:
//   Triple-DES CBC: 248 random blocks encrypted, then decrypted again
//   DES CBC: the FIPS 81 example in the first three of 248 blocks, round trip
//   DES ECB: 32 blocks, core started after the first block, slow host so the
//            feeder stalls; then decryption
//   IDEA ECB: 175 blocks (test vector first), round trip
// Results are checked against the reference models. The mechanisms of the
// design are counted and each must occur: CBC blocks chained (both
// directions), polls that found the accelerator busy, early start of the
// ECB core, ECB feeder stalls, IDEA feedback passes, IDEA half-round
// outputs, and a partial IDEA batch.
module tb_vpn_accel_top;
  import tb_ref_pkg::*;
  import accel_pkg::*;

  localparam logic [127:0] IDEA_KEY = 128'h0001_0002_0003_0004_0005_0006_0007_0008;
  localparam int NT = 248, ND = 248, NE = 32, NI = 175;

  logic clk = 0, rst_n = 0;
  // bus signals of the four accelerators: 0 tdes, 1 des, 2 ecb, 3 idea
  logic       we [4], re [4], busy [4], done [4];
  host_addr_t addr [4];
  word_t      wdata [4], rdata [4];
  int checks = 0, failures = 0;

  vpn_accel_top dut (
    .clk(clk), .rst_n(rst_n),
    .tdes_host_we(we[0]), .tdes_host_re(re[0]), .tdes_host_addr(addr[0]),
    .tdes_host_wdata(wdata[0]), .tdes_host_rdata(rdata[0]), .tdes_busy(busy[0]), .tdes_done(done[0]),
    .des_host_we(we[1]), .des_host_re(re[1]), .des_host_addr(addr[1]),
    .des_host_wdata(wdata[1]), .des_host_rdata(rdata[1]), .des_busy(busy[1]), .des_done(done[1]),
    .ecb_host_we(we[2]), .ecb_host_re(re[2]), .ecb_host_addr(addr[2]),
    .ecb_host_wdata(wdata[2]), .ecb_host_rdata(rdata[2]), .ecb_busy(busy[2]), .ecb_done(done[2]),
    .idea_host_we(we[3]), .idea_host_re(re[3]), .idea_host_addr(addr[3]),
    .idea_host_wdata(wdata[3]), .idea_host_rdata(rdata[3]), .idea_busy(busy[3]), .idea_done(done[3]));

  always #5 clk = !clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial for (int u = 0; u < 4; u++) begin
    we[u] = 0; re[u] = 0; addr[u] = '0; wdata[u] = '0;
  end

  // ---- mechanism counters ----
  int n_cbc_enc = 0, n_cbc_dec = 0, n_busy_polls = 0, n_early_start = 0;
  int n_stall = 0, n_feedback = 0, n_half_round = 0, n_partial = 0;

  always @(posedge clk) begin
    if (dut.u_tdes_cbc.u_ctrl.out_we) begin
      if (dut.u_tdes_cbc.u_ctrl.core_dec) n_cbc_dec++; else n_cbc_enc++;
    end
    if (dut.u_des_cbc.u_ctrl.out_we) begin
      if (dut.u_des_cbc.u_ctrl.core_dec) n_cbc_dec++; else n_cbc_enc++;
    end
    if (dut.u_des_ecb.start && !(&dut.u_des_ecb.written)) n_early_start++;
    if (dut.u_des_ecb.ce && dut.u_des_ecb.running && int'(dut.u_des_ecb.idx) < NE
        && !dut.u_des_ecb.written[dut.u_des_ecb.idx[4:0]]) n_stall++;
    if (!dut.u_idea_ecb.u_core.load && dut.u_idea_ecb.u_core.x_tag.v) n_feedback++;
    if (dut.u_idea_ecb.u_core.out_valid) n_half_round++;
  end

  // a batch that started with fewer than 21 blocks offered
  int batch_fill = 0;
  always @(posedge clk) begin
    if (dut.u_idea_ecb.u_core.in_ready && dut.u_idea_ecb.u_core.in_valid) batch_fill++;
    if (dut.u_idea_ecb.u_core.active && int'(dut.u_idea_ecb.u_core.cnt) == 188) begin
      if (batch_fill < 21) n_partial++;
      batch_fill = 0;
    end
  end

  task automatic wr(input int u, input host_addr_t a, input word_t d, input int gap = 0);
    @(negedge clk); we[u] = 1; addr[u] = a; wdata[u] = d;
    @(negedge clk); we[u] = 0;
    repeat (gap) @(negedge clk);
  endtask

  task automatic rd(input int u, input host_addr_t a, output word_t d);
    @(negedge clk); re[u] = 1; addr[u] = a;
    @(negedge clk); re[u] = 0; d = rdata[u];
  endtask

  task automatic poll(input int u);
    word_t c;
    do begin
      rd(u, ADDR_CTRL, c);
      if (c == 0) n_busy_polls++;
    end while (c == 0);
  endtask

  task automatic chk(input word_t got, input word_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++; $display("FAIL %s: got %016h expected %016h", what, got, exp);
    end
  endtask

  // CBC call through bus u (0 or 1) with n blocks
  task automatic cbc_call(input int u, input int n, input word_t blk [NT], input bit dec,
                          output word_t res [NT]);
    wr(u, ADDR_CTRL, 0);
    for (int i = 0; i < n; i++) wr(u, host_addr_t'(i), blk[i]);
    wr(u, ADDR_CTRL, dec ? 3 : 1);
    poll(u);
    for (int i = 0; i < n; i++) rd(u, host_addr_t'(i), res[i]);
  endtask

  task automatic run_tdes();
    word_t k1, k2, k3, iv, chain, p [NT], c [NT], r [NT];
    k1 = {$urandom, $urandom}; k2 = {$urandom, $urandom}; k3 = {$urandom, $urandom};
    iv = {$urandom, $urandom};
    wr(0, ADDR_KEY1, k1); wr(0, ADDR_KEY2, k2); wr(0, ADDR_KEY3, k3); wr(0, ADDR_IV, iv);
    for (int i = 0; i < NT; i++) p[i] = {$urandom, $urandom};
    cbc_call(0, NT, p, 0, c);
    chain = iv;
    for (int i = 0; i < NT; i++) begin
      chk(c[i], ref_tdes(p[i] ^ chain, k1, k2, k3, 0), $sformatf("3DES block %0d", i));
      chain = c[i];
    end
    cbc_call(0, NT, c, 1, r);
    for (int i = 0; i < NT; i++) chk(r[i], p[i], $sformatf("3DES decrypt block %0d", i));
  endtask

  task automatic run_des();
    word_t p [NT], c [NT], r [NT];
    wr(1, ADDR_KEY1, 64'h0123456789ABCDEF);
    wr(1, ADDR_IV,   64'h1234567890ABCDEF);
    p[0] = 64'h4E6F772069732074; p[1] = 64'h68652074696D6520; p[2] = 64'h666F7220616C6C20;
    for (int i = 3; i < ND; i++) p[i] = {$urandom, $urandom};
    cbc_call(1, ND, p, 0, c);
    chk(c[0], 64'hE5C7CDDE872BF27C, "DES CBC FIPS 81 block 1");
    chk(c[1], 64'h43E934008C389C0F, "DES CBC FIPS 81 block 2");
    chk(c[2], 64'h683788499A7C05F6, "DES CBC FIPS 81 block 3");
    for (int i = 1; i < ND; i++)
      chk(c[i], ref_des(p[i] ^ c[i-1], 64'h0123456789ABCDEF, 0), $sformatf("DES CBC block %0d", i));
    cbc_call(1, ND, c, 1, r);
    for (int i = 0; i < ND; i++) chk(r[i], p[i], $sformatf("DES CBC decrypt block %0d", i));
  endtask

  task automatic run_ecb();
    word_t key, p [NE], r;
    key = {$urandom, $urandom};
    wr(2, ADDR_KEY1, key);
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < NE; i++) p[i] = {$urandom, $urandom};
      wr(2, ADDR_CTRL, 0);
      wr(2, 8'd0, p[0], 6);
      wr(2, ADDR_CTRL, pass == 1 ? 3 : 1);
      for (int i = 1; i < NE; i++) wr(2, host_addr_t'(i), p[i], 6);
      poll(2);
      for (int i = 0; i < NE; i++) begin
        rd(2, host_addr_t'(i), r);
        chk(r, ref_des(p[i], key, pass == 1), $sformatf("ECB pass %0d block %0d", pass, i));
      end
    end
  endtask

  task automatic run_idea();
    word_t p [NI], c [NI], r;
    for (int pass = 0; pass < 2; pass++) begin
      if (pass == 0) begin
        p[0] = 64'h0000000100020003;
        for (int i = 1; i < NI; i++) p[i] = {$urandom, $urandom};
      end
      wr(3, ADDR_CTRL, 0);
      for (int i = 0; i < NI; i++) wr(3, host_addr_t'(i), pass == 0 ? p[i] : c[i]);
      wr(3, ADDR_CTRL, pass == 1 ? 3 : 1);
      poll(3);
      for (int i = 0; i < NI; i++) begin
        rd(3, host_addr_t'(i), r);
        if (pass == 0) begin
          chk(r, ref_idea(p[i], IDEA_KEY), $sformatf("IDEA block %0d", i));
          c[i] = r;
        end else begin
          chk(r, p[i], $sformatf("IDEA decrypt block %0d", i));
        end
      end
    end
    chk(c[0], 64'h11FBED2B01986DE5, "IDEA test vector");
  endtask

  task automatic need(input int n, input string what);
    checks++;
    $display("%-28s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL mechanism never exercised: %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      run_tdes();
      run_des();
      run_ecb();
      run_idea();
    join
    need(n_cbc_enc,     "CBC blocks encrypted");
    need(n_cbc_dec,     "CBC blocks decrypted");
    need(n_busy_polls,  "polls that found it busy");
    need(n_early_start, "ECB early starts");
    need(n_stall,       "ECB feeder stalls");
    need(n_feedback,    "IDEA feedback passes");
    need(n_half_round,  "IDEA half-round outputs");
    need(n_partial,     "IDEA partial batches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

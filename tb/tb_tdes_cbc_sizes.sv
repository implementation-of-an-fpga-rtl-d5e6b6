// tb_tdes_cbc_sizes: Triple-DES CBC messages of growing size through the
// full-size accelerator (default parameters: 248-block buffers, 32 cycles
// per block at half rate).
//
// A message longer than the buffer is sent as several host calls: each
// call writes up to 248 blocks, starts, polls for done and reads back, and
// the next call takes the last ciphertext block of the previous one as its
// IV, so the whole message is one CBC chain. Sizes run from 8 bytes to
// 10240 bytes, including the 2048-byte and 8192-byte buffers of a typical
// network benchmark. Every ciphertext block is checked against the
// reference model over the whole chain, the largest message is decrypted
// back, and every call must take 2*(1 + 248*32) bus clocks from start to
// done. The testbench prints the throughput seen by the bus (transfers
// included) per size, at a 100 MHz bus clock: small messages pay for a
// whole buffer pass and are slow, large ones approach 100 Mb/s.
module tb_tdes_cbc_sizes;
  import tb_ref_pkg::*;
  import accel_pkg::*;

  localparam int N      = DATA_WORDS;   // buffer size of the accelerator
  localparam int NSIZES = 8;
  localparam int SIZES [NSIZES] = '{8, 64, 512, 1024, 2048, 4096, 8192, 10240};
  localparam int MAXB   = 10240 / 8;

  logic  clk = 0, rst_n = 0;
  logic  we = 0, re = 0;
  host_addr_t addr = '0;
  word_t wdata = '0, rdata;
  logic  busy, done;
  int checks = 0, failures = 0;

  cbc_accel dut (
    .clk(clk), .rst_n(rst_n), .host_we(we), .host_re(re), .host_addr(addr),
    .host_wdata(wdata), .host_rdata(rdata), .busy(busy), .done(done));

  always #5 clk = !clk;   // 100 MHz

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input host_addr_t a, input word_t d);
    @(negedge clk);
    we = 1; addr = a; wdata = d;
    @(negedge clk);
    we = 0;
  endtask

  task automatic rd(input host_addr_t a, output word_t d);
    @(negedge clk);
    re = 1; addr = a;
    @(negedge clk);
    re = 0;
    d = rdata;
  endtask

  task automatic chk(input word_t got, input word_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++; $display("FAIL %s: got %016h expected %016h", what, got, exp);
    end
  endtask

  // Sends msg[0..n-1] as consecutive calls of up to N blocks, chaining the
  // IV from call to call; returns the result and the bus clocks spent.
  task automatic send(input word_t msg [MAXB], input int n, input word_t iv, input bit dec,
                      output word_t res [MAXB], output longint clks);
    word_t chain, c;
    int    base, cnt, wait_clks;
    longint t0;
    chain = iv;
    t0 = longint'($time / 10);
    for (base = 0; base < n; base += N) begin
      cnt = (n - base < N) ? n - base : N;
      wr(ADDR_IV, chain);
      wr(ADDR_CTRL, 64'd0);
      for (int i = 0; i < cnt; i++) wr(host_addr_t'(i), msg[base + i]);
      wr(ADDR_CTRL, dec ? 64'd3 : 64'd1);
      wait_clks = 0;
      do begin
        rd(ADDR_CTRL, c);
        wait_clks += 2;
      end while (c[0] == 1'b0);
      checks++;
      // the poll loop has a 2-clock grain
      if (wait_clks < 2*(1 + N*32) || wait_clks > 2*(1 + N*32) + 4) begin
        failures++;
        $display("FAIL call at block %0d took %0d clocks to done, expected %0d",
                 base, wait_clks, 2*(1 + N*32));
      end
      for (int i = 0; i < cnt; i++) rd(host_addr_t'(i), res[base + i]);
      // CBC continues from the last ciphertext block of this call
      chain = dec ? msg[base + cnt - 1] : res[base + cnt - 1];
    end
    clks = longint'($time / 10) - t0;
  endtask

  initial begin
    word_t  msg [MAXB], ct [MAXB], pt [MAXB];
    word_t  k1, k2, k3, iv, chain, exp_c;
    longint clks;
    int     nb;
    repeat (3) @(negedge clk);
    rst_n = 1;
    k1 = {$urandom, $urandom}; k2 = {$urandom, $urandom}; k3 = {$urandom, $urandom};
    wr(ADDR_KEY1, k1); wr(ADDR_KEY2, k2); wr(ADDR_KEY3, k3);

    for (int s = 0; s < NSIZES; s++) begin
      nb = SIZES[s] / 8;
      iv = {$urandom, $urandom};
      for (int i = 0; i < nb; i++) msg[i] = {$urandom, $urandom};
      send(msg, nb, iv, 1'b0, ct, clks);
      chain = iv;
      for (int i = 0; i < nb; i++) begin
        exp_c = ref_tdes(msg[i] ^ chain, k1, k2, k3, 1'b0);
        chk(ct[i], exp_c, $sformatf("%0d-byte message, block %0d", SIZES[s], i));
        chain = exp_c;
      end
      $display("size %0d bytes: %0d calls, %0d bus clocks, %0d kb/s at 100 MHz",
               SIZES[s], (nb + N - 1) / N, clks, longint'(SIZES[s]) * 8 * 100000 / clks);
      if (s == NSIZES - 1) begin
        send(ct, nb, iv, 1'b1, pt, clks);
        for (int i = 0; i < nb; i++)
          chk(pt[i], msg[i], $sformatf("decrypted block %0d", i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_des_ecb_accel: drives the DES ECB accelerator as the host software
// does (key, control 0, first block, control 1 to start the core early,
// remaining blocks, read back). Once with the host writing every clock, once
// with a slow host so the core catches up and must stall on unwritten
// blocks; checks every result against the reference model, decryption, and
// that with all blocks present the run takes N + 17 half-rate cycles.
module tb_des_ecb_accel;
  import tb_ref_pkg::*;
  import accel_pkg::*;

  localparam int N = 32;

  logic  clk = 0, rst_n = 0, we = 0, re = 0, busy, done;
  host_addr_t addr = '0;
  word_t wdata = '0, rdata;
  int checks = 0, failures = 0, stalls = 0;

  des_ecb_accel dut (.clk(clk), .rst_n(rst_n), .host_we(we), .host_re(re), .host_addr(addr),
                     .host_wdata(wdata), .host_rdata(rdata), .busy(busy), .done(done));

  always #5 clk = !clk;

  // a stall: the feeder is running and waiting for a block not yet written
  always @(posedge clk)
    if (dut.ce && dut.running && int'(dut.idx) < N && !dut.written[dut.idx[4:0]]) stalls++;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input host_addr_t a, input word_t d, input int gap);
    @(negedge clk);
    we = 1; addr = a; wdata = d;
    @(negedge clk);
    we = 0;
    repeat (gap) @(negedge clk);
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

  initial begin
    word_t key, p [N], c [N], r;
    int clks;
    repeat (3) @(negedge clk);
    rst_n = 1;
    key = {$urandom, $urandom};
    wr(ADDR_KEY1, key, 0);
    for (int pass = 0; pass < 3; pass++) begin
      bit dec;
      int gap;
      dec = (pass == 2);
      gap = (pass == 1) ? 9 : 0;
      for (int i = 0; i < N; i++) p[i] = dec ? c[i] : {$urandom, $urandom};
      wr(ADDR_CTRL, 64'd0, 0);
      wr(8'd0, p[0], gap);
      wr(ADDR_CTRL, dec ? 64'd3 : 64'd1, 0);
      for (int i = 1; i < N; i++) wr(host_addr_t'(i), p[i], gap);
      clks = 0;
      while (!done) begin @(negedge clk); clks++; end
      for (int i = 0; i < N; i++) begin
        rd(host_addr_t'(i), r);
        chk(r, ref_des(p[i], key, dec), $sformatf("pass %0d block %0d", pass, i));
        if (!dec) c[i] = r;
      end
    end
    // timing with the buffer already full: rewrite control only
    wr(ADDR_CTRL, 64'd0, 0);
    for (int i = 0; i < N; i++) wr(host_addr_t'(i), p[i], 0);
    wr(ADDR_CTRL, 64'd3, 0);
    clks = 0;
    while (!done) begin @(negedge clk); clks++; end
    checks++;
    if (clks < 2*(N + 17) - 3 || clks > 2*(N + 17) + 3) begin
      failures++; $display("FAIL full-buffer run took %0d clocks, expected about %0d", clks, 2*(N+17));
    end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL the slow host never caused a stall"); end
    $display("stalls=%0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

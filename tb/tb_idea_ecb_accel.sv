// tb_idea_ecb_accel: drives the IDEA ECB accelerator as the host software
// does (control 0, 175 blocks, control 1, poll, read back), checks every
// block against the reference model, the test vector in block 0, the run
// time of eight full batches plus a partial one, and decryption by round
// trip.
module tb_idea_ecb_accel;
  import tb_ref_pkg::*;
  import accel_pkg::*;

  localparam int N = 175;
  localparam logic [127:0] KEY = 128'h0001_0002_0003_0004_0005_0006_0007_0008;

  logic  clk = 0, rst_n = 0, we = 0, re = 0, busy, done;
  host_addr_t addr = '0;
  word_t wdata = '0, rdata;
  int checks = 0, failures = 0;

  idea_ecb_accel dut (.clk(clk), .rst_n(rst_n), .host_we(we), .host_re(re), .host_addr(addr),
                      .host_wdata(wdata), .host_rdata(rdata), .busy(busy), .done(done));

  always #5 clk = !clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input host_addr_t a, input word_t d);
    @(negedge clk); we = 1; addr = a; wdata = d;
    @(negedge clk); we = 0;
  endtask

  task automatic rd(input host_addr_t a, output word_t d);
    @(negedge clk); re = 1; addr = a;
    @(negedge clk); re = 0; d = rdata;
  endtask

  task automatic call(input word_t blocks [N], input bit dec, output word_t res [N], output int clks);
    word_t c;
    wr(ADDR_CTRL, 64'd0);
    for (int i = 0; i < N; i++) wr(host_addr_t'(i), blocks[i]);
    wr(ADDR_CTRL, dec ? 64'd3 : 64'd1);
    clks = 0;
    do begin rd(ADDR_CTRL, c); clks += 2; end while (c == 0);
    for (int i = 0; i < N; i++) rd(host_addr_t'(i), res[i]);
  endtask

  initial begin
    word_t p [N], c [N], r [N];
    int clks;
    repeat (3) @(negedge clk);
    rst_n = 1;
    p[0] = 64'h0000000100020003;
    for (int i = 1; i < N; i++) p[i] = {$urandom, $urandom};
    call(p, 0, c, clks);
    checks++;
    if (c[0] !== 64'h11FBED2B01986DE5) begin failures++; $display("FAIL test vector %016h", c[0]); end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (c[i] !== ref_idea(p[i], KEY)) begin failures++; $display("FAIL block %0d", i); end
    end
    // 8 full batches of 21 and a last one of 7 blocks
    checks++;
    if (clks < 8*189 + 175 || clks > 8*189 + 175 + 12) begin
      failures++; $display("FAIL run took %0d clocks, expected about %0d", clks, 8*189 + 175 + 3);
    end
    call(c, 1, r, clks);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (r[i] !== p[i]) begin failures++; $display("FAIL decrypt block %0d", i); end
    end
    $display("run took %0d clocks", clks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

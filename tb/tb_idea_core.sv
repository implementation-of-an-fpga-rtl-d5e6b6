// tb_idea_core: offers a continuous stream of blocks to the IDEA core and
// checks every result against the reference model, the published test
// vector (key 0001..0008, 0000 0001 0002 0003 -> 11FB ED2B 0198 6DE5), the
// latency of 175 cycles, the batch rate of 21 blocks per 189 cycles, the
// output order, a partial last batch, and decryption by round trip.
module tb_idea_core;
  import tb_ref_pkg::*;

  localparam logic [127:0] KEY = 128'h0001_0002_0003_0004_0005_0006_0007_0008;

  logic        clk = 0, rst_n = 0, in_valid = 0, decrypt = 0, in_ready, out_valid;
  logic [63:0] din = '0, dout;
  int checks = 0, failures = 0, cyc = 0;

  idea_core #(.KEY(KEY)) dut (.*);

  always #5 clk = !clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] src [$], exp_q [$], got [$];
  int          t_in [$], t_out [$];

  always @(posedge clk) begin
    if (in_valid && in_ready) t_in.push_back(cyc);
    if (out_valid) begin got.push_back(dout); t_out.push_back(cyc); end
  end

  // offer blocks from src continuously
  task automatic stream(input int n, input bit dec);
    int taken;
    decrypt = dec;
    taken = 0;
    while (taken < n) begin
      @(negedge clk);
      in_valid = 1;
      din = src[taken];
      @(posedge clk);
      if (in_ready) taken++;
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    int n, first;
    logic [63:0] ct [$];
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 2 full batches and a partial one, the first block being the test vector
    n = 21*2 + 7;
    src.push_back(64'h0000000100020003);
    for (int i = 1; i < n; i++) src.push_back({$urandom, $urandom});
    stream(n, 0);
    wait (got.size() == n);
    repeat (200) @(negedge clk);
    checks++;
    if (got.size() != n) begin failures++; $display("FAIL %0d outputs for %0d inputs", got.size(), n); end
    checks++;
    if (got[0] !== 64'h11FBED2B01986DE5) begin failures++; $display("FAIL test vector: %016h", got[0]); end
    for (int i = 0; i < n; i++) begin
      checks++;
      if (got[i] !== ref_idea(src[i], KEY)) begin
        failures++; $display("FAIL block %0d: %016h expected %016h", i, got[i], ref_idea(src[i], KEY));
      end
      checks++;
      if (t_out[i] - t_in[i] != 175) begin
        failures++; $display("FAIL block %0d latency %0d", i, t_out[i] - t_in[i]);
      end
    end
    // batches: block 21 enters 189 cycles after block 0, and 21 are taken back to back
    first = t_in[0];
    checks++;
    if (t_in[21] - first != 189 || t_in[20] - first != 20 || t_in[42] - first != 378) begin
      failures++; $display("FAIL batch timing %0d %0d %0d", t_in[20]-first, t_in[21]-first, t_in[42]-first);
    end
    // decryption round trip
    ct = got;
    got.delete(); t_in.delete(); t_out.delete();
    src = ct;
    stream(n, 1);
    wait (got.size() == n);
    checks++;
    if (got[0] !== 64'h0000000100020003) begin failures++; $display("FAIL test vector decrypt"); end
    for (int i = 0; i < n; i++) begin
      checks++;
      if (ref_idea(got[i], KEY) !== ct[i]) begin
        failures++; $display("FAIL decrypt block %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

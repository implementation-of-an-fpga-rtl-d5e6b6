// tb_des_pipe: streams random blocks through the 16-stage DES pipeline with
// a half-rate clock enable and random gaps, and checks every result, its
// tag, the order, and the latency of exactly 16 enabled cycles. Also checks
// that flush drops blocks in flight.
module tb_des_pipe;
  import tb_ref_pkg::*;

  logic        clk = 0, rst_n = 0, ce = 0, flush = 0;
  logic        in_valid = 0, decrypt = 0, out_valid;
  logic [63:0] din = '0, key = '0, dout;
  logic [4:0]  in_tag = '0, out_tag;
  int checks = 0, failures = 0;
  int en_cycles = 0;

  typedef struct { logic [63:0] exp; logic [4:0] tag; int t_in; } item_t;
  item_t q [$];

  des_pipe #(.TAG_W(5)) dut (.*);

  always #5 clk = !clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // half-rate enable, like the accelerators use
  always @(posedge clk) begin
    ce <= !ce;
    if (ce) en_cycles <= en_cycles + 1;
  end

  // scoreboard
  always @(posedge clk) begin
    if (ce && out_valid && rst_n && !flush) begin
      item_t it;
      checks++;
      if (q.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        it = q.pop_front();
        if (dout !== it.exp || out_tag !== it.tag || en_cycles - it.t_in != 16) begin
          failures++;
          $display("FAIL got %016h tag %0d after %0d, expected %016h tag %0d after 16",
                   dout, out_tag, en_cycles - it.t_in, it.exp, it.tag);
        end
      end
    end
  end

  task automatic run(input int n, input bit dec);
    int sent = 0;
    decrypt = dec;
    while (sent < n) begin
      @(negedge clk);
      if (ce) begin
        in_valid = ($urandom % 4) != 0;
        din = {$urandom, $urandom};
        in_tag = 5'($urandom);
        if (in_valid) begin
          q.push_back('{ref_des(din, key, dec), in_tag, en_cycles});
          sent++;
        end
      end
    end
    @(negedge clk);
    @(negedge clk);
    in_valid = 0;
    repeat (40) @(negedge clk);
  endtask

  initial begin
    key = {$urandom, $urandom};
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(60, 0);
    run(60, 1);
    // flush: blocks in flight are dropped
    @(negedge clk); while (!ce) @(negedge clk);
    in_valid = 1; din = '1; in_tag = 5'd3;
    @(negedge clk); @(negedge clk);
    in_valid = 0;
    repeat (6) @(negedge clk);
    flush = 1; @(negedge clk); flush = 0;
    begin
      int seen = 0;
      repeat (40) begin @(negedge clk); if (out_valid) seen++; end
      checks++;
      if (seen != 0) begin failures++; $display("FAIL flush left a block in flight"); end
    end
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d blocks never came out", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cbc_ctrl: runs the CBC controller against a model cipher core that
// only gives the right answer once its input has been stable for WAIT
// enabled cycles (otherwise it returns garbage), and checks the chaining in
// both directions, the output addresses, the IV, "done", the exact cycle
// count 1 + N*WAIT, that clear aborts a run, and that a run started in
// either phase of the half-rate enable uses only the new buffer contents.
module tb_cbc_ctrl;
  localparam int N = 8, WAIT = 4;

  logic        clk = 0, rst_n = 0, ce;
  logic        start = 0, clear = 0, decrypt = 0;
  logic [63:0] iv = '0, in_data, core_in, core_out, out_data;
  logic [2:0]  in_addr, out_addr;
  logic        core_dec, out_we, busy, done;
  logic [63:0] in_mem [N], out_mem [N];
  int checks = 0, failures = 0;
  int stable = 0;
  logic [63:0] prev_in = '0;

  clk_div2_en u_div (.clk(clk), .rst_n(rst_n), .ce(ce));
  cbc_ctrl #(.N_BLOCKS(N), .WAIT_CYCLES(WAIT)) dut (.*);

  always #5 clk = !clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the model cipher: an invertible scramble, keyed by the direction
  function automatic logic [63:0] enc(input logic [63:0] x);
    return {x[40:0], x[63:41]} ^ 64'h0F1E2D3C4B5A6978;
  endfunction
  function automatic logic [63:0] dec(input logic [63:0] y);
    logic [63:0] x;
    x = y ^ 64'h0F1E2D3C4B5A6978;
    return {x[22:0], x[63:23]};
  endfunction

  always @(negedge clk) begin
    if (core_in != prev_in) stable = 0; else stable++;
    prev_in = core_in;
  end
  assign core_out = (stable >= 2*WAIT - 1) ? (core_dec ? dec(core_in) : enc(core_in))
                                           : 64'hBAD0BAD0BAD0BAD0;

  always @(posedge clk) begin
    in_data <= in_mem[in_addr];
    if (out_we) out_mem[out_addr] <= out_data;
  end

  task automatic run(input bit d, output int clks);
    @(negedge clk);
    start = 1; decrypt = d;
    @(negedge clk);
    start = 0;
    clks = 1;
    while (!done) begin @(negedge clk); clks++; end
  endtask

  initial begin
    logic [63:0] p [N], c [N], chain;
    int clks;
    for (int i = 0; i < N; i++) p[i] = {$urandom, $urandom};
    iv = {$urandom, $urandom};
    repeat (3) @(negedge clk);
    rst_n = 1;
    // encryption
    for (int i = 0; i < N; i++) in_mem[i] = p[i];
    run(0, clks);
    chain = iv;
    for (int i = 0; i < N; i++) begin
      c[i] = enc(p[i] ^ chain);
      chain = c[i];
      checks++;
      if (out_mem[i] !== c[i]) begin
        failures++; $display("FAIL enc block %0d: %016h vs %016h", i, out_mem[i], c[i]);
      end
    end
    checks++;
    if (clks < 2*(1 + N*WAIT) - 1 || clks > 2*(1 + N*WAIT) + 1) begin
      failures++; $display("FAIL took %0d clocks, expected about %0d", clks, 2*(1 + N*WAIT));
    end
    // decryption
    for (int i = 0; i < N; i++) in_mem[i] = c[i];
    run(1, clks);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (out_mem[i] !== p[i]) begin
        failures++; $display("FAIL dec block %0d: %016h vs %016h", i, out_mem[i], p[i]);
      end
    end
    // clear aborts and drops done
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    checks++;
    if (done || busy) begin failures++; $display("FAIL clear did not return to idle"); end
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (!busy) begin failures++; $display("FAIL not busy after start"); end
    clear = 1; @(negedge clk); clear = 0;
    repeat (2*N*WAIT + 10) @(negedge clk);
    checks++;
    if (done || busy) begin failures++; $display("FAIL clear did not abort"); end
    // start in either phase of the half-rate enable, after clear and with
    // fresh data, so nothing of the previous run may leak into block 0
    for (int ph = 0; ph < 2; ph++) begin
      for (int i = 0; i < N; i++) p[i] = {$urandom, $urandom};
      for (int i = 0; i < N; i++) in_mem[i] = p[i];
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      while (ce != ph[0]) @(negedge clk);
      run(0, clks);
      chain = iv;
      for (int i = 0; i < N; i++) begin
        c[i] = enc(p[i] ^ chain);
        chain = c[i];
        checks++;
        if (out_mem[i] !== c[i]) begin
          failures++; $display("FAIL phase %0d block %0d: %016h vs %016h", ph, i, out_mem[i], c[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_dp_ram: writes random words through both ports and reads them back
// through the other port, checking the one-cycle read latency and
// read-before-write on the same port.
module tb_dp_ram;
  logic        clk = 0;
  logic        a_we = 0, b_we = 0;
  logic [7:0]  a_addr = 0, b_addr = 0;
  logic [63:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  logic [63:0] model [248];
  int checks = 0, failures = 0;

  dp_ram #(.WIDTH(64), .DEPTH(248)) dut (.*);

  always #5 clk = !clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill: even addresses through port a, odd through port b
    for (int i = 0; i < 248; i += 2) begin
      @(negedge clk);
      a_we = 1; a_addr = 8'(i);     a_wdata = {$urandom, $urandom}; model[i]   = a_wdata;
      b_we = 1; b_addr = 8'(i + 1); b_wdata = {$urandom, $urandom}; model[i+1] = b_wdata;
    end
    @(negedge clk); a_we = 0; b_we = 0;
    // read everything back through the opposite ports
    for (int i = 0; i < 248; i++) begin
      a_addr = 8'(247 - i); b_addr = 8'(i);
      @(negedge clk);
      checks += 2;
      if (a_rdata !== model[247 - i]) begin failures++; $display("FAIL a read %0d", 247 - i); end
      if (b_rdata !== model[i])       begin failures++; $display("FAIL b read %0d", i); end
    end
    // write and read the same address on port a: old data comes out
    a_addr = 8'd10; a_we = 1; a_wdata = 64'h1234;
    @(negedge clk);
    checks++;
    if (a_rdata !== model[10]) begin failures++; $display("FAIL read-before-write"); end
    a_we = 0;
    @(negedge clk);
    checks++;
    if (a_rdata !== 64'h1234) begin failures++; $display("FAIL write then read"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

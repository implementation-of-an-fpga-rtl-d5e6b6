// tb_idea_mulmod: feeds one operand pair per clock (corner values 0 = 2^16,
// 1, 0xFFFF and random values) and checks each product modulo 2^16+1 against
// plain arithmetic, exactly 7 clocks later.
module tb_idea_mulmod;
  import tb_ref_pkg::*;

  logic        clk = 0;
  logic [15:0] x = '0, yd = '0, z;
  logic [15:0] exp_q [$];
  int checks = 0, failures = 0, sent = 0;

  idea_mulmod dut (.clk(clk), .x(x), .yd(yd), .z(z));

  always #5 clk = !clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [15:0] CORNER [4] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h8000};

  initial begin
    logic [15:0] y;
    for (int n = 0; n < 2000 + 7; n++) begin
      @(negedge clk);
      if (n >= 7) begin
        checks++;
        if (z !== exp_q[n - 7]) begin
          failures++; $display("FAIL pair %0d: got %04h expected %04h", n - 7, z, exp_q[n - 7]);
        end
      end
      if (n < 16) begin
        x = CORNER[n % 4]; y = CORNER[n / 4];
      end else begin
        x = 16'($urandom); y = 16'($urandom);
      end
      yd = y - 16'd1;
      exp_q.push_back(ref_mul(x, y));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// dp_ram: dual-port synchronous RAM used for the input and output buffers.
//
// Models the FPGA's dual-ported block RAM: two independent ports, A and B,
// each able to write or read one WIDTH-bit word per clock. A read returns
// the word on the clock edge after the address is presented (one cycle of
// read latency) and shows the old contents when the same port writes the
// same address. In the accelerators one port faces the host bus and the
// other the cipher core. Both ports share one clock here; the cipher side
// runs at half rate through a clock enable (see clk_div2_en) instead of a
// second clock. The contents are not reset.
//
// Ports: per port p in {a, b}: p_we, p_addr, p_wdata -> p_rdata.
module dp_ram #(
  parameter int WIDTH = 64,
  parameter int DEPTH = 248,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_wdata,
  output logic [WIDTH-1:0] a_rdata,
  input  logic             b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [WIDTH-1:0] b_wdata,
  output logic [WIDTH-1:0] b_rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we && int'(a_addr) < DEPTH) mem[a_addr] <= a_wdata;
    if (b_we && int'(b_addr) < DEPTH) mem[b_addr] <= b_wdata;
    a_rdata <= mem[a_addr];
    b_rdata <= mem[b_addr];
  end

endmodule

// cbc_accel: DES or Triple-DES accelerator in CBC mode, as seen from the
// host through the DIMM-slot bus.
//
// The host writes the key register(s), writes 0 to the control register to
// reset the controller, fills the input block RAM with up to N_BLOCKS
// plaintext (or ciphertext) blocks, writes 1 to the control register and
// then polls it until it reads non-zero; the results are then read back
// from the same data addresses, which map to the output block RAM. Inside,
// cbc_ctrl walks the buffer, xors each block with the chaining value and
// runs it through a combinational cipher core: one des_comb for TRIPLE = 0,
// tdes_comb (three DES cores) for TRIPLE = 1. The cipher side runs at half
// the bus clock through clk_div2_en.
//
// Address map, control bits and the IV register: see accel_pkg. The IV
// register and the decrypt bit are this design's additions, needed for CBC
// in both directions; keys are raw 64-bit DES keys, not key schedules.
//
// Ports: host_we/host_re/host_addr/host_wdata -> host_rdata, a registered
// read: the word addressed with host_re appears on host_rdata on the next
// clock. done mirrors bit 0 of the control register, busy is high while
// blocks are being processed.
// Timing: N_BLOCKS*WAIT_CYCLES + 1 half-rate cycles from start to done:
// 248 blocks in 7937 cycles at 50 MHz for Triple-DES, 32 cycles per block.
module cbc_accel
  import accel_pkg::*;
#(
  parameter bit TRIPLE      = 1'b1,
  parameter int N_BLOCKS    = DATA_WORDS,
  parameter int WAIT_CYCLES = TRIPLE ? 32 : 9,
  localparam int AW = (N_BLOCKS > 1) ? $clog2(N_BLOCKS) : 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       host_we,
  input  logic       host_re,
  input  host_addr_t host_addr,
  input  word_t      host_wdata,
  output word_t      host_rdata,
  output logic       busy,
  output logic       done
);

  logic    ce;
  word_t   key1, key2, key3, iv;
  logic    start, clear;
  logic    data_hit, rd_ram_q;
  word_t   reg_rdata_q;

  logic [AW-1:0] ctl_in_addr, ctl_out_addr;
  word_t         in_rdata, out_rdata, ctl_out_data, unused_rdata;
  word_t         core_in, core_out;
  logic          core_dec, ctl_out_we;

  clk_div2_en u_div (.clk(clk), .rst_n(rst_n), .ce(ce));

  assign data_hit = int'(host_addr) < N_BLOCKS;
  assign start = host_we && host_addr == ADDR_CTRL &&  host_wdata[CTRL_START_BIT];
  assign clear = host_we && host_addr == ADDR_CTRL && !host_wdata[CTRL_START_BIT];

  // ---- host-side registers ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key1     <= '0;
      key2     <= '0;
      key3     <= '0;
      iv       <= '0;
    end else if (host_we) begin
      unique case (host_addr)
        ADDR_KEY1: key1 <= host_wdata;
        ADDR_KEY2: key2 <= host_wdata;
        ADDR_KEY3: key3 <= host_wdata;
        ADDR_IV:   iv   <= host_wdata;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ram_q    <= 1'b0;
      reg_rdata_q <= '0;
    end else if (host_re) begin
      rd_ram_q <= data_hit;
      unique case (host_addr)
        ADDR_CTRL: reg_rdata_q <= word_t'(done);
        ADDR_KEY1: reg_rdata_q <= key1;
        ADDR_KEY2: reg_rdata_q <= key2;
        ADDR_KEY3: reg_rdata_q <= key3;
        ADDR_IV:   reg_rdata_q <= iv;
        default:   reg_rdata_q <= '0;
      endcase
    end
  end

  assign host_rdata = rd_ram_q ? out_rdata : reg_rdata_q;

  // ---- buffers: port a faces the host, port b the controller ----
  dp_ram #(.WIDTH(64), .DEPTH(N_BLOCKS)) u_in_ram (
    .clk(clk),
    .a_we(host_we && data_hit), .a_addr(AW'(host_addr)), .a_wdata(host_wdata),
    .a_rdata(unused_rdata),
    .b_we(1'b0), .b_addr(ctl_in_addr), .b_wdata('0), .b_rdata(in_rdata));

  dp_ram #(.WIDTH(64), .DEPTH(N_BLOCKS)) u_out_ram (
    .clk(clk),
    .a_we(1'b0), .a_addr(AW'(host_addr)), .a_wdata('0), .a_rdata(out_rdata),
    .b_we(ctl_out_we), .b_addr(ctl_out_addr), .b_wdata(ctl_out_data),
    .b_rdata());

  // ---- external FSM ----
  cbc_ctrl #(.N_BLOCKS(N_BLOCKS), .WAIT_CYCLES(WAIT_CYCLES)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .ce(ce),
    .start(start), .clear(clear),
    .decrypt(host_wdata[CTRL_DEC_BIT]), .iv(iv),
    .in_addr(ctl_in_addr), .in_data(in_rdata),
    .core_in(core_in), .core_dec(core_dec), .core_out(core_out),
    .out_we(ctl_out_we), .out_addr(ctl_out_addr), .out_data(ctl_out_data),
    .busy(busy), .done(done));

  // ---- cipher core ----
  if (TRIPLE) begin : g_tdes
    tdes_comb u_core (
      .din(core_in), .key1(key1), .key2(key2), .key3(key3),
      .decrypt(core_dec), .dout(core_out));
  end else begin : g_des
    des_comb u_core (
      .din(core_in), .key(key1), .decrypt(core_dec), .dout(core_out));
  end

endmodule

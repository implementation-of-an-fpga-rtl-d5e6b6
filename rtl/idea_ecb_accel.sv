// idea_ecb_accel: IDEA accelerator in ECB mode, as seen from the host.
//
// The host writes 0 to the control register, writes N_BLOCKS blocks into
// the input block RAM, writes 1 to the control register (bit 1 selects the
// decryption schedule), polls the control register until it reads non-zero
// and reads the results from the same addresses. There is no key register:
// the key schedule is fixed when the design is built (parameter KEY, see
// idea_key_rom). A feeder streams the input buffer into idea_core whenever
// the core can take a block, and results are written to the output buffer
// in arrival order, which is the input order.
//
// Ports: host bus as in cbc_accel (registered reads, map in accel_pkg);
// busy, done.
// Timing: 175 blocks take nine passes of the core, eight full batches of 21
// and one of 7: done rises about 8*189 + 175 + 3 cycles after start.
module idea_ecb_accel
  import accel_pkg::*;
#(
  parameter int           N_BLOCKS = 175,
  parameter logic [127:0] KEY = 128'h0001_0002_0003_0004_0005_0006_0007_0008,
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

  logic    start, clear, data_hit, rd_ram_q;
  word_t   reg_rdata_q;
  logic    running, primed, decrypt;
  logic [AW:0]   idx, n_out;
  logic [AW-1:0] rd_addr;
  logic          feed, accept;
  word_t         in_rdata, out_rdata, unused_rdata, core_out;
  logic          core_ready, core_ov;

  assign data_hit = int'(host_addr) < N_BLOCKS;
  assign start = host_we && host_addr == ADDR_CTRL &&  host_wdata[CTRL_START_BIT];
  assign clear = host_we && host_addr == ADDR_CTRL && !host_wdata[CTRL_START_BIT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ram_q    <= 1'b0;
      reg_rdata_q <= '0;
    end else if (host_re) begin
      rd_ram_q    <= data_hit;
      reg_rdata_q <= (host_addr == ADDR_CTRL) ? word_t'(done) : '0;
    end
  end

  assign host_rdata = rd_ram_q ? out_rdata : reg_rdata_q;

  // ---- feeder: the buffer address runs one ahead when a block is taken,
  // so the read data always belongs to idx
  assign feed    = running && primed && int'(idx) < N_BLOCKS;
  assign accept  = feed && core_ready;
  assign rd_addr = accept ? AW'(idx + 1'b1) : AW'(idx);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      primed  <= 1'b0;
      decrypt <= 1'b0;
      idx     <= '0;
      n_out   <= '0;
    end else if (clear || start) begin
      running <= start;
      primed  <= 1'b0;
      idx     <= '0;
      n_out   <= '0;
      if (start) decrypt <= host_wdata[CTRL_DEC_BIT];
    end else begin
      primed <= running;
      if (accept) idx <= idx + 1'b1;
      if (core_ov && running && int'(n_out) < N_BLOCKS) n_out <= n_out + 1'b1;
    end
  end

  assign done = running && int'(n_out) == N_BLOCKS;
  assign busy = running && !done;

  dp_ram #(.WIDTH(64), .DEPTH(N_BLOCKS)) u_in_ram (
    .clk(clk),
    .a_we(host_we && data_hit), .a_addr(AW'(host_addr)), .a_wdata(host_wdata),
    .a_rdata(unused_rdata),
    .b_we(1'b0), .b_addr(rd_addr), .b_wdata('0), .b_rdata(in_rdata));

  idea_core #(.KEY(KEY)) u_core (
    .clk(clk), .rst_n(rst_n),
    .in_valid(feed), .din(in_rdata), .decrypt(decrypt), .in_ready(core_ready),
    .out_valid(core_ov), .dout(core_out));

  dp_ram #(.WIDTH(64), .DEPTH(N_BLOCKS)) u_out_ram (
    .clk(clk),
    .a_we(1'b0), .a_addr(AW'(host_addr)), .a_wdata('0), .a_rdata(out_rdata),
    .b_we(core_ov && running && int'(n_out) < N_BLOCKS), .b_addr(AW'(n_out)),
    .b_wdata(core_out), .b_rdata());

endmodule

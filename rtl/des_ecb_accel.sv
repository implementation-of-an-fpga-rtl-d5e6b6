// des_ecb_accel: DES accelerator in ECB mode with a 16-stage pipelined core.
//
// The host writes the key, writes 0 to the control register (which resets
// the core), writes the first plaintext block, writes 1 to the control
// register and then writes the remaining blocks: the core starts as soon as
// the first block is in, overlapping the transfer of the rest. A feeder
// reads the input block RAM in address order and pushes one block per
// enabled cycle into des_pipe; each result is written to the output block
// RAM at the address it came from. A block that the host has not written
// yet is not fed: the feeder stalls on it (this per-address "written" check
// is this design's choice; the host software simply assumed the core never
// overtakes it). The core runs at half the bus clock.
//
// Ports: host bus as in cbc_accel (registered reads, map in accel_pkg);
// busy, done (all N_BLOCKS results written; also bit 0 of the control
// register).
// Timing: with all blocks present, done rises N_BLOCKS + 17 half-rate
// cycles after start (one cycle of buffer read, sixteen pipeline stages).
module des_ecb_accel
  import accel_pkg::*;
#(
  parameter int N_BLOCKS = 32,
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
  word_t   key;
  logic    decrypt, running;
  logic    start, clear, data_hit, rd_ram_q;
  word_t   reg_rdata_q;
  logic [N_BLOCKS-1:0] written;

  logic [AW:0]   idx;         // next block to feed
  logic [AW:0]   n_out;       // results written so far
  logic [AW-1:0] rd_addr;
  logic          feed_v;      // buffer data for rd_addr is ready to enter the pipe
  logic          issue;

  word_t         in_rdata, out_rdata, unused_rdata, pipe_out;
  logic          pipe_v;
  logic [AW-1:0] pipe_tag;

  clk_div2_en u_div (.clk(clk), .rst_n(rst_n), .ce(ce));

  assign data_hit = int'(host_addr) < N_BLOCKS;
  assign start = host_we && host_addr == ADDR_CTRL &&  host_wdata[CTRL_START_BIT];
  assign clear = host_we && host_addr == ADDR_CTRL && !host_wdata[CTRL_START_BIT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key     <= '0;
      decrypt <= 1'b0;
      written <= '0;
    end else begin
      if (host_we && host_addr == ADDR_KEY1) key <= host_wdata;
      if (start) decrypt <= host_wdata[CTRL_DEC_BIT];
      if (clear) written <= '0;
      else if (host_we && data_hit) written[AW'(host_addr)] <= 1'b1;
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
        ADDR_KEY1: reg_rdata_q <= key;
        default:   reg_rdata_q <= '0;
      endcase
    end
  end

  assign host_rdata = rd_ram_q ? out_rdata : reg_rdata_q;

  // ---- feeder: one buffer read per enabled cycle, stalls on unwritten words
  assign issue = ce && running && int'(idx) < N_BLOCKS && written[AW'(idx)];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      idx     <= '0;
      n_out   <= '0;
      rd_addr <= '0;
      feed_v  <= 1'b0;
    end else if (clear) begin
      running <= 1'b0;
      idx     <= '0;
      n_out   <= '0;
      feed_v  <= 1'b0;
    end else if (start) begin
      running <= 1'b1;
      idx     <= '0;
      n_out   <= '0;
      feed_v  <= 1'b0;
    end else if (ce) begin
      feed_v <= issue;
      if (issue) begin
        rd_addr <= AW'(idx);
        idx     <= idx + 1'b1;
      end
      if (pipe_v && running) n_out <= n_out + 1'b1;
    end
  end

  assign done = running && int'(n_out) == N_BLOCKS;
  assign busy = running && !done;

  dp_ram #(.WIDTH(64), .DEPTH(N_BLOCKS)) u_in_ram (
    .clk(clk),
    .a_we(host_we && data_hit), .a_addr(AW'(host_addr)), .a_wdata(host_wdata),
    .a_rdata(unused_rdata),
    .b_we(1'b0), .b_addr(rd_addr), .b_wdata('0), .b_rdata(in_rdata));

  des_pipe #(.TAG_W(AW)) u_core (
    .clk(clk), .rst_n(rst_n), .ce(ce), .flush(clear || start),
    .in_valid(feed_v), .din(in_rdata), .in_tag(rd_addr),
    .key(key), .decrypt(decrypt),
    .out_valid(pipe_v), .dout(pipe_out), .out_tag(pipe_tag));

  dp_ram #(.WIDTH(64), .DEPTH(N_BLOCKS)) u_out_ram (
    .clk(clk),
    .a_we(1'b0), .a_addr(AW'(host_addr)), .a_wdata('0), .a_rdata(out_rdata),
    .b_we(ce && pipe_v && running), .b_addr(pipe_tag), .b_wdata(pipe_out),
    .b_rdata());

endmodule

// vpn_accel_top: the cipher accelerators of the VPN offload card, side by
// side.
//
// The card plugs into a PC's SDRAM DIMM slot; the host reaches the FPGA as
// a 256-word window of 64-bit words and moves data with 64-bit loads and
// stores, polling a control register because the slot offers no interrupt.
// Four accelerators were built for this card, each loaded as its own FPGA
// configuration and each using the whole window:
//   tdes_*  Triple-DES in CBC mode (the one the VPN software uses): three
//           combinational DES cores, 248-block buffers
//   des_*   single DES in CBC mode: one combinational DES core
//   ecb_*   DES in ECB mode: 16-stage pipelined DES core, 32-block buffers
//   idea_*  IDEA in ECB mode: one 21-stage round pipeline reused nine
//           times, hard-wired key schedule, 175-block buffers
// Here they share one clock and reset and each keeps its own bus ports.
// The DIMM-side SDRAM controller and clock generator of the card are not
// part of this RTL: each *_host_* port group is the bus those would drive
// (write strobe, read strobe, word address, 64-bit data in and out, read
// data one clock after the read strobe).
module vpn_accel_top
  import accel_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,

  input  logic       tdes_host_we,
  input  logic       tdes_host_re,
  input  host_addr_t tdes_host_addr,
  input  word_t      tdes_host_wdata,
  output word_t      tdes_host_rdata,
  output logic       tdes_busy,
  output logic       tdes_done,

  input  logic       des_host_we,
  input  logic       des_host_re,
  input  host_addr_t des_host_addr,
  input  word_t      des_host_wdata,
  output word_t      des_host_rdata,
  output logic       des_busy,
  output logic       des_done,

  input  logic       ecb_host_we,
  input  logic       ecb_host_re,
  input  host_addr_t ecb_host_addr,
  input  word_t      ecb_host_wdata,
  output word_t      ecb_host_rdata,
  output logic       ecb_busy,
  output logic       ecb_done,

  input  logic       idea_host_we,
  input  logic       idea_host_re,
  input  host_addr_t idea_host_addr,
  input  word_t      idea_host_wdata,
  output word_t      idea_host_rdata,
  output logic       idea_busy,
  output logic       idea_done
);

  cbc_accel #(.TRIPLE(1'b1)) u_tdes_cbc (
    .clk(clk), .rst_n(rst_n),
    .host_we(tdes_host_we), .host_re(tdes_host_re), .host_addr(tdes_host_addr),
    .host_wdata(tdes_host_wdata), .host_rdata(tdes_host_rdata),
    .busy(tdes_busy), .done(tdes_done));

  cbc_accel #(.TRIPLE(1'b0)) u_des_cbc (
    .clk(clk), .rst_n(rst_n),
    .host_we(des_host_we), .host_re(des_host_re), .host_addr(des_host_addr),
    .host_wdata(des_host_wdata), .host_rdata(des_host_rdata),
    .busy(des_busy), .done(des_done));

  des_ecb_accel u_des_ecb (
    .clk(clk), .rst_n(rst_n),
    .host_we(ecb_host_we), .host_re(ecb_host_re), .host_addr(ecb_host_addr),
    .host_wdata(ecb_host_wdata), .host_rdata(ecb_host_rdata),
    .busy(ecb_busy), .done(ecb_done));

  idea_ecb_accel u_idea_ecb (
    .clk(clk), .rst_n(rst_n),
    .host_we(idea_host_we), .host_re(idea_host_re), .host_addr(idea_host_addr),
    .host_wdata(idea_host_wdata), .host_rdata(idea_host_rdata),
    .busy(idea_busy), .done(idea_done));

endmodule

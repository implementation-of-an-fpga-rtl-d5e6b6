// accel_pkg: host-side register map shared by all accelerators.
//
// The card sits in a SDRAM DIMM slot and the host sees it as 256 words of
// 64 bits (an 8-bit word address). The low addresses hold data: a write
// to word i stores plaintext block i in the input block RAM, a read of word
// i returns block i of the output block RAM. The top eight words are
// reserved for registers; the accelerators use the control register and,
// where they take keys, the key registers:
//
//   CTRL  write 0: reset the cipher controller and clear "done"
//         write with bit 0 set: start processing the buffer; bit 1 selects
//         decryption
//         read: bit 0 is "done" (0 while the buffer is being processed)
//   KEY1..KEY3  raw 64-bit DES keys (KEY1 only for single DES)
//   IV          initial chaining value for CBC mode
//
// The placement of these registers inside the reserved range is this
// design's choice.
package accel_pkg;

  localparam int HOST_AW = 8;              // word address bits of the DIMM window

  typedef logic [HOST_AW-1:0] host_addr_t;
  typedef logic [63:0]        word_t;

  localparam host_addr_t ADDR_CTRL = 8'd248;
  localparam host_addr_t ADDR_KEY1 = 8'd249;
  localparam host_addr_t ADDR_KEY2 = 8'd250;
  localparam host_addr_t ADDR_KEY3 = 8'd251;
  localparam host_addr_t ADDR_IV   = 8'd252;

  localparam int CTRL_START_BIT = 0;
  localparam int CTRL_DEC_BIT   = 1;

  localparam int DATA_WORDS = 248;         // words below the register range

endpackage

// cbc_ctrl: the controller that runs a combinational (Triple-)DES core in
// CBC mode over a buffer of N_BLOCKS blocks.
//
// The cipher core has no clock: this FSM decides when its input is ready and
// when its output may be taken. For block j it loads the core input register
// with p_j xor c_{j-1} (encryption) or c_j (decryption), waits WAIT_CYCLES
// enabled cycles for the core to settle, then writes the result to the
// output buffer: c_j = core output (encryption) or p_j = core output xor
// c_{j-1} (decryption). c_0 is the IV. The next block's input is loaded in
// the same cycle the result is taken, so one block completes every
// WAIT_CYCLES enabled cycles. The block that follows is fetched from the
// input buffer while the current one settles. Between runs the read
// address rests on block 0, so the first block is already on in_data when
// a start arrives, whatever the phase of the clock enable.
//
// Ports: ce (half-rate clock enable), start (pulse: begin with the IV and
// the mode given), clear (pulse: abort and drop "done"), decrypt, iv;
// in_addr/in_data (input buffer read port, data one clock after the
// address); core_in/core_dec/core_out (to and from the cipher core);
// out_we/out_addr/out_data (output buffer write port); busy, done.
// Timing: done rises 1 + N_BLOCKS*WAIT_CYCLES enabled cycles after start.
// WAIT_CYCLES = 32 is the figure given for the Triple-DES core at 50 MHz;
// the value for the single-DES core is this design's choice.
module cbc_ctrl #(
  parameter int N_BLOCKS    = 248,
  parameter int WAIT_CYCLES = 32,
  localparam int AW = (N_BLOCKS > 1) ? $clog2(N_BLOCKS) : 1,
  localparam int CW = (WAIT_CYCLES > 1) ? $clog2(WAIT_CYCLES) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ce,
  input  logic          start,
  input  logic          clear,
  input  logic          decrypt,
  input  logic [63:0]   iv,
  output logic [AW-1:0] in_addr,
  input  logic [63:0]   in_data,
  output logic [63:0]   core_in,
  output logic          core_dec,
  input  logic [63:0]   core_out,
  output logic          out_we,
  output logic [AW-1:0] out_addr,
  output logic [63:0]   out_data,
  output logic          busy,
  output logic          done
);

  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_RUN, S_DONE} state_t;

  state_t        state;
  logic [AW-1:0] blk;
  logic [CW-1:0] cnt;
  logic [63:0]   chain;
  logic          last, take;
  logic [63:0]   result;

  assign last   = (int'(blk) == N_BLOCKS - 1);
  assign take   = ce && state == S_RUN && int'(cnt) == WAIT_CYCLES - 1;
  assign result = core_dec ? (core_out ^ chain) : core_out;

  assign out_we   = take;
  assign out_addr = blk;
  assign out_data = result;
  assign busy     = state == S_FETCH || state == S_RUN;
  assign done     = state == S_DONE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      blk      <= '0;
      cnt      <= '0;
      in_addr  <= '0;
      chain    <= '0;
      core_in  <= '0;
      core_dec <= 1'b0;
    end else if (clear) begin
      state   <= S_IDLE;
      in_addr <= '0;
    end else if (start) begin
      state    <= S_FETCH;
      blk      <= '0;
      cnt      <= '0;
      in_addr  <= '0;
      chain    <= iv;
      core_dec <= decrypt;
    end else if (ce) begin
      unique case (state)
        S_FETCH: begin
          // in_data now holds block 0
          core_in <= core_dec ? in_data : (in_data ^ chain);
          in_addr <= AW'(1 % N_BLOCKS);
          cnt     <= '0;
          state   <= S_RUN;
        end
        S_RUN: begin
          if (int'(cnt) == WAIT_CYCLES - 1) begin
            // encryption chains on the ciphertext just produced, decryption
            // on the ciphertext just consumed
            chain <= core_dec ? core_in : core_out;
            cnt   <= '0;
            if (last) begin
              state   <= S_DONE;
              in_addr <= '0;   // park on block 0 for the next start
            end else begin
              blk     <= blk + 1'b1;
              core_in <= core_dec ? in_data : (in_data ^ core_out);
              in_addr <= (int'(in_addr) + 1 < N_BLOCKS) ? in_addr + 1'b1 : in_addr;
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: ;
      endcase
    end
  end

endmodule

// idea_key_rom: hard-wired IDEA key schedule.
//
// Sending the full 832-bit schedule with every request would cost more bus
// time than the data, and deriving the decryption schedule needs modular
// inverses, so the schedules are fixed when the design is built: both the
// encryption and the decryption schedule of KEY are computed at elaboration
// (idea_pkg) and stored as a ROM of 2 x 9 entries of six subkeys. The
// subkeys that feed multipliers (Z1, Z4, Z5, Z6) are stored decremented by
// one, as the multipliers expect; Z2 and Z3 are stored as they are.
//
// Ports: dec (0: encryption schedule, 1: decryption), round (0..8, 8 being
// the output transformation) -> z (z[0] = Z1 ... z[5] = Z6).
// Timing: combinational read. The default KEY is a well-known test key; the
// key actually used is a build-time choice.
module idea_key_rom
  import idea_pkg::*;
#(
  parameter logic [127:0] KEY = 128'h0001_0002_0003_0004_0005_0006_0007_0008
) (
  input  logic       dec,
  input  logic [3:0] round,
  output rkeys_t     z
);

  localparam sched_t ENC = enc_schedule(KEY);
  localparam sched_t DEC = dec_schedule(ENC);

  function automatic sched_t predecrement(input sched_t s);
    sched_t r;
    r = s;
    for (int i = 0; i <= ROUNDS; i++) begin
      r[i][0] = s[i][0] - 16'd1;
      r[i][3] = s[i][3] - 16'd1;
      r[i][4] = s[i][4] - 16'd1;
      r[i][5] = s[i][5] - 16'd1;
    end
    return r;
  endfunction

  localparam sched_t ENC_ROM = predecrement(ENC);
  localparam sched_t DEC_ROM = predecrement(DEC);

  always_comb begin
    if (int'(round) > ROUNDS) z = '0;
    else if (dec)             z = DEC_ROM[round];
    else                      z = ENC_ROM[round];
  end

endmodule

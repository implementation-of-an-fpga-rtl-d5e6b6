// idea_pkg: types, constants and key-schedule arithmetic for the IDEA core.
//
// IDEA works on four 16-bit sub-blocks and mixes XOR, addition modulo 2^16
// and multiplication modulo 2^16+1 (with the all-zero word standing for
// 2^16). Its 128-bit key expands to 52 subkeys Z_i^(r): six per round for
// eight rounds and four for the output transformation. The encryption
// schedule is the key cut into eight 16-bit words, the key rotated left by
// 25 bits cut again, and so on. The decryption schedule is derived from it
// by taking multiplicative and additive inverses in reverse round order.
//
// The functions here run at elaboration time only: they fill the
// hard-wired key ROM.
package idea_pkg;

  localparam int ROUNDS  = 8;    // full rounds; pass 9 is the output transformation
  localparam int MUL_LAT = 7;    // pipeline latency of one modular multiplier
  localparam int RND_LAT = 3 * MUL_LAT;  // one round: three multipliers deep

  typedef logic [15:0] word16_t;
  typedef logic [5:0][15:0] rkeys_t;              // Z1..Z6 of one round, [0] = Z1
  typedef logic [ROUNDS:0][5:0][15:0] sched_t;    // nine rounds, [0] = round 1

  // a*b mod 2^16+1 with 0 meaning 2^16 (reference arithmetic)
  function automatic word16_t mul(input word16_t a, input word16_t b);
    longint unsigned x, y, p;
    x = (a == 0) ? 64'd65536 : 64'(a);
    y = (b == 0) ? 64'd65536 : 64'(b);
    p = (x * y) % 65537;
    return word16_t'(p);   // 65536 wraps to 0, as intended
  endfunction

  // multiplicative inverse modulo 2^16+1: a^(65537-2)
  function automatic word16_t mulinv(input word16_t a);
    word16_t r, base;
    int unsigned e;
    r    = 16'd1;
    base = a;
    e    = 65535;
    while (e != 0) begin
      if (e[0]) r = mul(r, base);
      base = mul(base, base);
      e    = e >> 1;
    end
    return r;
  endfunction

  function automatic sched_t enc_schedule(input logic [127:0] key);
    sched_t      s;
    logic [127:0] k;
    k = key;
    s = '0;
    for (int i = 0; i < 52; i++) begin
      if (i != 0 && i % 8 == 0) k = {k[102:0], k[127:103]};
      s[i / 6][i % 6] = k[127 - 16*(i % 8) -: 16];
    end
    return s;
  endfunction

  // r is 1-based below, as in the usual statement of the schedule
  function automatic sched_t dec_schedule(input sched_t e);
    sched_t d;
    d = '0;
    for (int r = 1; r <= ROUNDS + 1; r++) begin
      d[r-1][0] = mulinv(e[9-r][0]);
      d[r-1][3] = mulinv(e[9-r][3]);
      if (r == 1 || r == ROUNDS + 1) begin
        d[r-1][1] = -e[9-r][1];
        d[r-1][2] = -e[9-r][2];
      end else begin
        d[r-1][1] = -e[9-r][2];
        d[r-1][2] = -e[9-r][1];
      end
      if (r <= ROUNDS) begin
        d[r-1][4] = e[8-r][4];
        d[r-1][5] = e[8-r][5];
      end
    end
    return d;
  endfunction

endpackage

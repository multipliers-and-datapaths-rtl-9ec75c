// tb_ref_pkg: reference models shared by the multiplier testbenches.
//
// round_ref rounds an exact 106-bit significand product to 53 bits, nearest
// even, by integer division and remainder rather than by bit selection, so
// that it is independent of the way sig_round is written. booth_digit gives
// the radix-4 digit value of one 3-bit multiplier group.
package tb_ref_pkg;

  typedef struct {
    logic [52:0] sig;
    logic [1:0]  exp_inc;
    logic        inexact;
  } round_t;

  function automatic round_t round_ref(logic [105:0] p);
    round_t      r;
    logic [105:0] q, rem, half, div;
    int          shift;
    shift = p[105] ? 53 : 52;
    div   = 106'(1) << shift;
    half  = div >> 1;
    q     = p / div;
    rem   = p % div;
    r.exp_inc = p[105] ? 2'd1 : 2'd0;
    r.inexact = (rem != 0);
    if (rem > half || (rem == half && q[0])) q = q + 1;
    if (q == (106'(1) << 53)) begin
      q = q >> 1;
      r.exp_inc = r.exp_inc + 2'd1;
    end
    r.sig = q[52:0];
    return r;
  endfunction

  function automatic int booth_digit(logic [2:0] g);
    return -2 * int'(g[2]) + int'(g[1]) + int'(g[0]);
  endfunction

endpackage

// booth_encoder: modified (radix-4) Booth encoder for one digit group.
//
// The multiplier is cut into overlapping 3-bit groups {y[2i+1], y[2i], y[2i-1]};
// each group is worth the digit d = -2*y[2i+1] + y[2i] + y[2i-1], in -2..+2.
// The encoder turns the group into three select lines for the Booth mux:
// `one` (|d| = 1), `two` (|d| = 2) and `neg` (d < 0). The group 111 (d = -0)
// is encoded as a plain zero, so `neg` is never set with both selects low;
// that choice is this design's own. Purely combinational, no clock.
module booth_encoder
  import mul_pkg::*;
(
  input  logic [2:0]  grp,  // {y[2i+1], y[2i], y[2i-1]}
  output booth_sel_t  sel
);

  always_comb begin
    sel.one = grp[1] ^ grp[0];
    sel.two = (grp[2] & ~grp[1] & ~grp[0]) | (~grp[2] & grp[1] & grp[0]);
    sel.neg = grp[2] & ~(grp[1] & grp[0]);
  end

endmodule

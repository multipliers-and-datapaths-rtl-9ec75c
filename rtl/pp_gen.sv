// pp_gen: partial-product generator (Booth encoders plus Booth muxes).
//
// The 53-bit multiplier y is extended with a zero below its LSB and two
// zeros above its MSB, then cut into 27 overlapping 3-bit groups. Each group
// drives one booth_encoder, whose select lines drive one booth_mux row over
// the multiplicand x. Row i has weight 4^i: it is sign-extended to the full
// product width and shifted left by 2i, so the rows are aligned to their
// arithmetic weight (the parallelogram of the multiplication). Because the
// product of two 53-bit numbers fits in 106 bits, the sum of all rows taken
// modulo 2^106 is exactly x*y.
//
// Output pp[0..26] are the Booth rows; pp[27] is the correction row that
// holds the "+1" of every negated row at bit 2i. Full sign extension (rather
// than a sign-extension-prevention encoding) is this design's own choice;
// the document gives the group decoding and the row count of 27.
// Purely combinational.
module pp_gen
  import mul_pkg::*;
(
  input  logic [SIG_W-1:0]  x,               // multiplicand (operand 1)
  input  logic [SIG_W-1:0]  y,               // multiplier (operand 2), Booth encoded
  output logic [PROD_W-1:0] pp [PP_ROWS]     // aligned rows, correction row last
);

  localparam int unsigned ROW_W = SIG_W + 2;

  logic [2*BOOTH_ROWS:0] y_ext;              // {0.., y, 0}
  booth_sel_t            sel [BOOTH_ROWS];
  logic [ROW_W-1:0]      row [BOOTH_ROWS];
  logic [PROD_W-1:0]     corr;

  assign y_ext = {{(2*BOOTH_ROWS - SIG_W){1'b0}}, y, 1'b0};

  for (genvar i = 0; i < BOOTH_ROWS; i++) begin : g_row
    booth_encoder u_enc (
      .grp (y_ext[2*i +: 3]),
      .sel (sel[i])
    );
    booth_mux #(.W(SIG_W)) u_mux (
      .x   (x),
      .sel (sel[i]),
      .row (row[i])
    );
    assign pp[i] = {{(PROD_W - ROW_W){row[i][ROW_W-1]}}, row[i]} << (2 * i);
  end

  always_comb begin
    corr = '0;
    for (int i = 0; i < BOOTH_ROWS; i++) corr[2*i] = sel[i].neg;
  end

  assign pp[PP_ROWS-1] = corr;

endmodule

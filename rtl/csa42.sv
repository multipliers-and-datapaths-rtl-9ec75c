// csa42: 4-2 counter made of two 3-2 counters.
//
// The first 3-2 counter adds a, b and c; the second adds its sum, its carry
// and d. The four inputs therefore leave as two vectors with the same total
// (modulo 2^W): a 2:1 reduction. This is the structure the document gives
// for the 4-2 counter; in this design it also serves as the pair of extra
// 3-2 counters with which a lower chain absorbs the sum and carry of the
// chains above it. Purely combinational.
module csa42 #(
  parameter int unsigned W = mul_pkg::PROD_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  output logic [W-1:0] s,
  output logic [W-1:0] co
);

  logic [W-1:0] s1, c1;

  csa32 #(.W(W)) u_first  (.a(a),  .b(b),  .c(c), .s(s1), .co(c1));
  csa32 #(.W(W)) u_second (.a(s1), .b(c1), .c(d), .s(s),  .co(co));

endmodule

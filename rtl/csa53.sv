// csa53: 5-3 counter made of two 3-2 counters in series.
//
// The first 3-2 counter adds a, b and c; the second adds its sum to d and e.
// The five inputs leave as three vectors: the first counter's carry (ready
// after one counter delay) and the second counter's sum and carry (ready
// after two). In the overturned-stairs tree the early inputs a, b, c are the
// linear array and the earliest output of the body, and d, e are the body's
// two late outputs. The document gives this construction. Purely
// combinational; all sums are modulo 2^W.
module csa53 #(
  parameter int unsigned W = mul_pkg::PROD_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  input  logic [W-1:0] e,
  output logic [W-1:0] c_early,  // carry of the first counter
  output logic [W-1:0] s,        // sum of the second counter
  output logic [W-1:0] co        // carry of the second counter
);

  logic [W-1:0] s1;

  csa32 #(.W(W)) u_first  (.a(a),  .b(b), .c(c), .s(s1), .co(c_early));
  csa32 #(.W(W)) u_second (.a(s1), .b(d), .c(e), .s(s),  .co(co));

endmodule
